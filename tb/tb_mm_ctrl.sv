// tb_mm_ctrl: walks the controller through complete multiplications at K = 8
// with a scripted Zero_D and Skip_D, checking the controls of every phase:
// operand load, the B-hat + N-hat full-adder step, the precomputation loop
// until SC = 0, one loop cycle per executed iteration with the M1/M2 shift
// picked by the stored skip flag, no skip allowed in the last iteration,
// q-hat/A-hat zeroed on exit, the conversion loop and the done pulse. The
// loop must take K + 6 - (number of skips) cycles.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int K = 8;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0, sc_zero = 1'b0;
  logic  skip_q = 1'b0, skip_new = 1'b0;
  ctrl_t ctl;
  logic  skip_en, busy, done;
  int checks = 0, failures = 0;

  mm_ctrl #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One multiplication. skip_mask bit j asks for a skip in loop cycle j;
  // n_pre / n_post are the cycles Zero_D reports SC != 0.
  task automatic run(input logic [31:0] skip_mask, input int n_pre, input int n_post);
    int cnt, cyc, nskip;
    @(negedge clk);
    start = 1'b1;
    #1;
    check("load on start", ctl.ops_load && ctl.flags_clr && !busy);
    @(negedge clk);
    start = 1'b0;
    #1;
    check("B+N step", busy && ctl.alpha && ctl.opsel == OPSEL_LOAD && ctl.sreg_we);
    for (int j = 0; j < n_pre; j++) begin
      @(negedge clk);
      sc_zero = 1'b0;
      #1;
      check("pre 2H step", !ctl.alpha && ctl.opsel == OPSEL_REG && ctl.sreg_we && !ctl.d_we);
    end
    @(negedge clk);
    sc_zero = 1'b1;
    #1;
    check("D-hat capture", ctl.d_we && ctl.sreg_clr);
    cnt = 0; cyc = 0; nskip = 0;
    skip_q = 1'b0;
    while (cnt <= K + 5) begin
      @(negedge clk);
      sc_zero = 1'b0;
      skip_new = 1'b0;
      #1;
      check($sformatf("skip_en at cnt %0d", cnt), skip_en == (cnt != K + 5));
      skip_new = skip_mask[cyc] & skip_en;
      #1;
      check("loop controls", ctl.alpha && ctl.sreg_we && ctl.flags_we &&
            ctl.opsel == (skip_q ? OPSEL_SHR2 : OPSEL_SHR1));
      cnt += 1 + int'(skip_new);
      nskip += int'(skip_new);
      check("q/A zeroed only on exit", ctl.qa_zero == (cnt > K + 5));
      cyc++;
      @(posedge clk);
      skip_q = skip_new;
    end
    check($sformatf("loop cycles %0d", cyc), cyc == K + 6 - nskip);
    @(negedge clk);
    skip_new = 1'b0;
    #1;
    check("first conversion step", !ctl.alpha && ctl.sreg_we &&
          ctl.opsel == (skip_q ? OPSEL_SHR2 : OPSEL_SHR1) && !skip_en);
    for (int j = 0; j < n_post; j++) begin
      @(negedge clk);
      sc_zero = 1'b0;
      #1;
      check("post 2H step", !ctl.alpha && ctl.opsel == OPSEL_REG && ctl.sreg_we && !done);
    end
    @(negedge clk);
    sc_zero = 1'b1;
    #1;
    check("no write when resolved", !ctl.sreg_we && busy && !done);
    @(negedge clk);
    #1;
    check("done pulse", done && !busy);
    @(negedge clk);
    #1;
    check("done is one cycle", !done);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(32'h0, 3, 2);
    run(32'b1001_0010, 0, 0);
    // skips chosen so the loop leaves through a skip (cnt K+4 -> K+6)
    run(32'b100_0000_0101, 2, 4);
    run(32'hFFFF_FFFF, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
