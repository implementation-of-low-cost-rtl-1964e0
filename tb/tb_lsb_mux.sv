// tb_lsb_mux: exhaustive; skip = 0 gives r[3:1], skip = 1 gives r[4:2].
module tb_lsb_mux;
  logic       skip;
  logic [4:0] r;
  logic [2:0] y;
  int checks = 0, failures = 0;

  lsb_mux dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {skip, r} = 6'(v);
      #1;
      checks++;
      if (y != 3'((r >> (skip ? 2 : 1)) & 5'h7)) begin
        failures++;
        $display("FAIL skip=%b r=%b y=%b", skip, r, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
