// tb_opnd_mux4: each select value must give r, r >> 1, r >> 2 or ld.
module tb_opnd_mux4;
  import mm_pkg::*;
  localparam int W = 37;
  opsel_e       sel;
  logic [W-1:0] r, ld, y;
  int checks = 0, failures = 0;

  opnd_mux4 #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] want;
    for (int t = 0; t < 300; t++) begin
      r  = {$urandom(), $urandom()};
      ld = {$urandom(), $urandom()};
      for (int v = 0; v < 4; v++) begin
        sel = opsel_e'(v);
        #1;
        case (v)
          0: want = r;
          1: want = {1'b0, r[W-1:1]};
          2: want = {2'b00, r[W-1:2]};
          default: want = ld;
        endcase
        checks++;
        if (y !== want) begin
          failures++;
          $display("FAIL sel=%0d r=%h y=%h", v, r, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
