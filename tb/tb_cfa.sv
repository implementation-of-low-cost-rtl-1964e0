// tb_cfa: exhaustive test of the configurable full-adder cell.
// alpha = 1: s + 2c must equal ss + sc + x (x given inverted).
// alpha = 0: (s, c) must be the half-adder sum and carry of (ss ^ sc, hc_in);
// hc_out must be ss & sc in both modes.
module tb_cfa;
  logic alpha, ss, sc, x_n, hc_in, hc_out, s, c;
  int checks = 0, failures = 0;

  cfa dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {alpha, ss, sc, x_n, hc_in} = 5'(v);
      #1;
      checks++;
      if (alpha) begin
        if (2 * int'(c) + int'(s) != int'(ss) + int'(sc) + int'(!x_n)) begin
          failures++;
          $display("FAIL FA mode v=%b s=%b c=%b", v[4:0], s, c);
        end
      end else begin
        if (2 * int'(c) + int'(s) != int'(ss ^ sc) + int'(hc_in)) begin
          failures++;
          $display("FAIL HA mode v=%b s=%b c=%b", v[4:0], s, c);
        end
      end
      checks++;
      if (hc_out != (ss & sc)) begin
        failures++;
        $display("FAIL hc_out v=%b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
