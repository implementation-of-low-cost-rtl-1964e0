// scs_mm_new: radix-2 Montgomery modular multiplier with a one-level
// configurable carry-save adder (SCS-MM-New architecture).
//
// Computes S = A * B * 2^-(K+2) mod N-hat, returned as an integer smaller
// than 2^(K+1) and congruent to that value (no final subtraction). Operands
// and result are binary; only the internal sum is carry-save (SS, SC).
//
// Datapath: registers N-hat, B-hat = B << 3, D-hat = B-hat + N-hat, A
// (shifted right as iterations retire), SS, SC and three flag flip-flops
// (q-hat, A-hat, skip). M1/M2 feed SC/SS (unshifted, >>1, >>2, or N-hat /
// B-hat) into the CCSA, SM3 feeds the third operand ~x, Zero_D watches SC and
// Skip_D, fed by the 3-bit multiplexers M4/M5, precomputes the next quotient
// and decides whether the next iteration can be skipped. The halving of each
// iteration is deferred to the next cycle's M1/M2 select.
//
// Operation (see mm_ctrl): D-hat is computed with one full-adder step and
// repeated two-half-adder steps; K+6 iterations (i = -1 .. K+4) run one per
// cycle, a skipped iteration costing no cycle; the carry-save result is then
// resolved with two-half-adder steps. Latency therefore depends on the data.
//
// Interface: pulse start for one cycle while busy is low; a_in, b_in and
// n_hat_in are sampled on that edge. done pulses when result is valid; result
// holds until the next start. skip_taken pulses for each skipped iteration.
// Requirements on N-hat: bit 0 = 1 and bit 1 = 0 (N-hat = 1 mod 4), as the
// skip detector assumes. For an odd modulus N, N-hat = N when N = 1 mod 4 and
// N-hat = 3N otherwise; the result is then also congruent modulo N.
// K is the width of a_in, b_in and n_hat_in; the datapath is K+5 bits wide.
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a_in,
  input  logic [K-1:0] b_in,
  input  logic [K-1:0] n_hat_in,
  output logic         busy,
  output logic         done,
  output logic         skip_taken,
  output logic [K:0]   result
);

  localparam int unsigned W = K + 5;

  ctrl_t  ctl;
  logic   skip_en;

  logic [K-1:0] n_hat_q;
  logic [K+2:0] b_hat_q;
  logic [K+3:0] d_hat_q;
  logic [K-1:0] a_q;      // bit 0 = A(i+1), bit 1 = A(i+2)
  logic [W-1:0] ss_q, sc_q;
  logic         q_hat_q, a_hat_q, skip_q;

  logic [W-1:0] m1_y, m2_y, x_n, s_new, c_new;
  logic [2:0]   ss_lo, sc_lo;
  logic         sc_zero, skip_new, q_next, a_next;

  // M1: carry word, load operand N-hat. M2: sum word, load operand B-hat.
  opnd_mux4 #(.W(W)) u_m1 (.sel(ctl.opsel), .r(sc_q), .ld(W'(n_hat_q)), .y(m1_y));
  opnd_mux4 #(.W(W)) u_m2 (.sel(ctl.opsel), .r(ss_q), .ld(W'(b_hat_q)), .y(m2_y));

  sm3 #(.W(W)) u_sm3 (
    .q_hat(q_hat_q), .a_hat(a_hat_q),
    .n_hat(W'(n_hat_q)), .b_hat(W'(b_hat_q)), .d_hat(W'(d_hat_q)),
    .x_n  (x_n)
  );

  ccsa #(.W(W)) u_ccsa (
    .alpha(ctl.alpha), .ss(m2_y), .sc(m1_y), .x_n(x_n), .s(s_new), .c(c_new)
  );

  zero_d #(.W(W)) u_zero_d (.sc(sc_q), .z(sc_zero));

  // M4 (SC) and M5 (SS): low bits of SC[i] / SS[i] for the skip detector.
  lsb_mux u_m4 (.skip(skip_q), .r(sc_q[4:0]), .y(sc_lo));
  lsb_mux u_m5 (.skip(skip_q), .r(ss_q[4:0]), .y(ss_lo));

  skip_d u_skip_d (
    .n2     (n_hat_q[2]),
    .q_hat  (q_hat_q),
    .ss     (ss_lo),
    .sc     (sc_lo),
    .a1     (a_q[0]),
    .a2     (a_q[1]),
    .skip_en(skip_en),
    .skip   (skip_new),
    .q_next (q_next),
    .a_next (a_next)
  );

  mm_ctrl #(.K(K)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .sc_zero (sc_zero),
    .skip_q  (skip_q),
    .skip_new(skip_new),
    .ctl     (ctl),
    .skip_en (skip_en),
    .busy    (busy),
    .done    (done)
  );

  // Operand registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_hat_q <= '0;
      b_hat_q <= '0;
      d_hat_q <= '0;
      a_q     <= '0;
    end else begin
      if (ctl.ops_load) begin
        n_hat_q <= n_hat_in;
        b_hat_q <= {b_in, 3'b000};
        a_q     <= a_in;
      end else if (ctl.flags_we) begin
        a_q <= skip_new ? (a_q >> 2) : (a_q >> 1);
      end
      if (ctl.d_we) d_hat_q <= ss_q[K+3:0];
    end
  end

  // Carry-save accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss_q <= '0;
      sc_q <= '0;
    end else if (ctl.sreg_clr) begin
      ss_q <= '0;
      sc_q <= '0;
    end else if (ctl.sreg_we) begin
      ss_q <= s_new;
      sc_q <= c_new;
    end
  end

  // q-hat, A-hat and skip flip-flops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_hat_q <= 1'b0;
      a_hat_q <= 1'b0;
      skip_q  <= 1'b0;
    end else if (ctl.flags_clr) begin
      q_hat_q <= 1'b0;
      a_hat_q <= 1'b0;
      skip_q  <= 1'b0;
    end else if (ctl.flags_we) begin
      q_hat_q <= q_next & ~ctl.qa_zero;
      a_hat_q <= a_next & ~ctl.qa_zero;
      skip_q  <= skip_new;
    end
  end

  assign skip_taken = ctl.flags_we & skip_new;
  assign result     = ss_q[K:0];

  // The top bits of the accumulator stay zero after the conversion.
  a_result_fits: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (ss_q[W-1:K+1] == '0));

endmodule
