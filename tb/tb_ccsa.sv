// tb_ccsa: the configurable CSA array at W = 24.
// 1F_CSA: s + c = ss + sc + x; 2H_CSA: s + c = ss + sc (operands kept below
// 2^(W-2) so nothing is lost at the top). Also counts the steps needed to
// resolve (2^m - 1, 1) to SC = 0: a plain CSA adding zero needs m steps, the
// 2H_CSA must need no more than m/2 + 1.
module tb_ccsa;
  localparam int W = 24;
  logic         alpha;
  logic [W-1:0] ss, sc, x_n, s, c;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
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

  initial begin
    logic [W-1:0] x;
    for (int t = 0; t < 2000; t++) begin
      ss = W'($urandom()) >> 2;
      sc = W'($urandom()) >> 2;
      x  = W'($urandom()) >> 2;
      if (t % 5 == 0) sc = sc & ~W'(1);
      x_n = ~x;
      alpha = 1'b1;
      #1;
      check($sformatf("1F %h+%h+%h", ss, sc, x), 64'(s) + 64'(c) == 64'(ss) + 64'(sc) + 64'(x));
      check("carry word bit 0 is zero", c[0] == 1'b0);
      alpha = 1'b0;
      #1;
      check($sformatf("2H %h+%h", ss, sc), 64'(s) + 64'(c) == 64'(ss) + 64'(sc));
    end
    for (int m = 2; m <= W - 2; m++) begin
      int steps;
      ss = W'((64'(1) << m) - 1);
      sc = W'(1);
      alpha = 1'b0;
      x_n = '1;
      steps = 0;
      while (sc != '0 && steps < 4 * W) begin
        #1;
        ss = s;
        sc = c;
        steps++;
      end
      check($sformatf("m=%0d resolved in %0d 2H steps", m, steps),
            steps <= m / 2 + 1 && ss == W'(64'(1) << m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
