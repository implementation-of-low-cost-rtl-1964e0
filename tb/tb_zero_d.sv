// tb_zero_d: z must be 1 for SC = 0 only; tries zero, every one-hot word and
// random words at the default width.
module tb_zero_d;
  localparam int W = 1029;
  logic [W-1:0] sc;
  logic         z;
  int checks = 0, failures = 0;

  zero_d dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic want);
    #1;
    checks++;
    if (z !== want) begin
      failures++;
      $display("FAIL z=%b want %b", z, want);
    end
  endtask

  initial begin
    sc = '0;
    check(1'b1);
    for (int j = 0; j < W; j++) begin
      sc = '0;
      sc[j] = 1'b1;
      check(1'b0);
    end
    for (int t = 0; t < 50; t++) begin
      for (int j = 0; j < W; j += 32) sc[j +: 32] = $urandom() | 1;
      check(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
