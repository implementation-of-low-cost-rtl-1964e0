// mm_ctrl: control part of the SCS-MM-New multiplier.
//
// A finite-state machine that walks through the three loops of the
// algorithm and drives the datapath controls (ctrl_t) every cycle:
//   ST_PRE_ADD    one cycle, (SS,SC) = 1F_CSA(B-hat, N-hat, 0); q-hat and
//                 A-hat are zero, so SM3 supplies x = 0.
//   ST_PRE_CONV   2H_CSA on the unshifted registers until Zero_D reports
//                 SC = 0; in that cycle D-hat = SS is captured and SS/SC are
//                 cleared (SS[-1] = SC[-1] = 0).
//   ST_LOOP       one Montgomery iteration per cycle, index i = -1 .. k+4
//                 held as cnt = i + 1. M1/M2 shift by two when the stored
//                 skip flag is set, else by one. cnt advances by 1 + skip.
//                 A skip is not allowed when cnt = k+5 (the last iteration);
//                 the loop ends when cnt would pass k+5, and then q-hat and
//                 A-hat are written as zero.
//   ST_POST_FIRST one 2H_CSA step that also applies the pending shift.
//   ST_POST_CONV  2H_CSA until SC = 0; then done pulses one cycle later and
//                 SS holds the binary result.
// start is taken only in ST_IDLE. The sequence follows the algorithm's
// steps; the state encoding, the explicit clear of SS/SC, the mandatory first
// post-conversion step and the registered done pulse are this design's own.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024  // operand width in bits
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,     // begin a multiplication (ignored while busy)
  input  logic   sc_zero,   // Zero_D: SC register is zero
  input  logic   skip_q,    // stored skip flag (previous iteration)
  input  logic   skip_new,  // skip flag produced in this iteration
  output ctrl_t  ctl,       // datapath controls
  output logic   skip_en,   // a skip is allowed in this iteration
  output logic   busy,
  output logic   done       // one-cycle pulse, result valid from here on
);

  localparam int unsigned CW   = $clog2(K + 8);
  localparam int unsigned LAST = K + 5;  // cnt of the last iteration, i = k+4

  logic [CW-1:0] cnt, cnt_next;
  state_e        state, state_n;
  logic          done_n;

  always_comb begin
    ctl         = '0;
    ctl.opsel   = OPSEL_REG;
    state_n     = state;
    cnt_next    = cnt;
    done_n      = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          ctl.ops_load  = 1'b1;
          ctl.flags_clr = 1'b1;
          state_n       = ST_PRE_ADD;
        end
      end
      ST_PRE_ADD: begin
        ctl.alpha   = 1'b1;
        ctl.opsel   = OPSEL_LOAD;
        ctl.sreg_we = 1'b1;
        state_n     = ST_PRE_CONV;
      end
      ST_PRE_CONV: begin
        if (sc_zero) begin
          ctl.d_we     = 1'b1;
          ctl.sreg_clr = 1'b1;
          cnt_next     = '0;
          state_n      = ST_LOOP;
        end else begin
          ctl.sreg_we = 1'b1;
        end
      end
      ST_LOOP: begin
        ctl.alpha    = 1'b1;
        ctl.opsel    = skip_q ? OPSEL_SHR2 : OPSEL_SHR1;
        ctl.sreg_we  = 1'b1;
        ctl.flags_we = 1'b1;
        cnt_next     = cnt + CW'(1) + CW'(skip_new);
        if (cnt_next > CW'(LAST)) begin
          ctl.qa_zero = 1'b1;
          state_n     = ST_POST_FIRST;
        end
      end
      ST_POST_FIRST: begin
        ctl.opsel   = skip_q ? OPSEL_SHR2 : OPSEL_SHR1;
        ctl.sreg_we = 1'b1;
        state_n     = ST_POST_CONV;
      end
      ST_POST_CONV: begin
        if (sc_zero) begin
          done_n  = 1'b1;
          state_n = ST_IDLE;
        end else begin
          ctl.sreg_we = 1'b1;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      cnt   <= cnt_next;
      done  <= done_n;
    end
  end

  assign busy    = (state != ST_IDLE);
  assign skip_en = (state == ST_LOOP) && (cnt != CW'(LAST));

  // A skip can only be reported while the controller allows one.
  a_skip_allowed: assert property (@(posedge clk) disable iff (!rst_n)
    !skip_en |-> !skip_new);

endmodule
