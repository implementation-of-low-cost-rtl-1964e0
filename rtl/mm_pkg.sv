// mm_pkg: shared types of the SCS-MM-New Montgomery multiplier.
//
// opsel_e encodes the select input of the two 4-to-1 operand multiplexers
// M1 (carry word SC) and M2 (sum word SS). The four inputs follow the
// multiplier's block diagram: the register itself, the register shifted right
// by one or by two bits, and the operand load path (N-hat into M1, B-hat into
// M2). The binary encoding is this design's own choice.
//
// state_e lists the controller phases, one per loop of the algorithm:
// precomputation of D-hat = B-hat + N-hat, the Montgomery iteration loop and
// the final carry-save to binary format conversion.
package mm_pkg;

  typedef enum logic [1:0] {
    OPSEL_REG  = 2'd0,  // SS / SC unshifted (two-input additions)
    OPSEL_SHR1 = 2'd1,  // SS >> 1 / SC >> 1 (previous iteration not skipped)
    OPSEL_SHR2 = 2'd2,  // SS >> 2 / SC >> 2 (previous iteration skipped)
    OPSEL_LOAD = 2'd3   // B-hat into M2, N-hat into M1 (first addition)
  } opsel_e;

  typedef enum logic [2:0] {
    ST_IDLE,       // waiting for start
    ST_PRE_ADD,    // (SS,SC) = 1F_CSA(B-hat, N-hat, 0)
    ST_PRE_CONV,   // while SC != 0: (SS,SC) = 2H_CSA(SS,SC); then D-hat = SS
    ST_LOOP,       // Montgomery iterations i = -1 .. k+4 with skipping
    ST_POST_FIRST, // first conversion step, applies the pending right shift
    ST_POST_CONV   // while SC != 0: (SS,SC) = 2H_CSA(SS,SC); then done
  } state_e;

  // Datapath controls driven by the controller each cycle.
  typedef struct packed {
    logic   alpha;      // CCSA mode: 1 = 1F_CSA, 0 = 2H_CSA
    opsel_e opsel;      // select of M1 and M2
    logic   ops_load;   // capture N-hat, B-hat = B << 3 and A
    logic   sreg_we;    // write the CCSA result into SS / SC
    logic   sreg_clr;   // clear SS / SC (SS[-1] = SC[-1] = 0)
    logic   d_we;       // capture D-hat from SS
    logic   flags_clr;  // clear the q-hat, A-hat and skip flip-flops
    logic   flags_we;   // store the skip detector outputs, shift A
    logic   qa_zero;    // last iteration: store q-hat = A-hat = 0
  } ctrl_t;

endpackage
