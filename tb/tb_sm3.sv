// tb_sm3: the simplified multiplexer must return ~x with
// x = 0, N, B, D for (A-hat, q-hat) = 00, 01, 10, 11, on random words.
module tb_sm3;
  localparam int W = 40;
  logic         q_hat, a_hat;
  logic [W-1:0] n_hat, b_hat, d_hat, x_n;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] want;
    for (int t = 0; t < 200; t++) begin
      n_hat = {$urandom(), $urandom()};
      b_hat = {$urandom(), $urandom()};
      d_hat = {$urandom(), $urandom()};
      for (int v = 0; v < 4; v++) begin
        {a_hat, q_hat} = 2'(v);
        #1;
        case (v)
          0: want = '0;
          1: want = n_hat;
          2: want = b_hat;
          default: want = d_hat;
        endcase
        checks++;
        if (x_n !== ~want) begin
          failures++;
          $display("FAIL sel=%0d", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
