// tb_serial_mult: exhaustive test of the bit-serial truncating multiplier.
// Words of N+1 = 5 clocks (4 magnitude bits of X, LSB first, then a 0) are
// driven back to back; after each word's last clock `prod` must equal
// floor(X*W/8) for all 256 pairs. This also checks the rate of one result
// every N+1 clocks.
module tb_serial_mult;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, first = 0, last = 0, x_bit = 0;
  logic [N-1:0] w_mag = '0;
  logic [N:0] prod;
  int checks = 0, failures = 0;

  serial_mult #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // pair p = 16*x + w is driven in word p and checked at the first
    // falling edge of word p+1, while that word is being driven
    for (int p = 0; p <= 256; p++) begin
      for (int k = 0; k <= N; k++) begin
        @(negedge clk);
        if (k == 0 && p > 0) begin
          checks++;
          if (prod !== 5'((((p-1) / 16) * ((p-1) % 16)) / 8)) begin
            failures++;
            $display("x=%0d w=%0d prod=%0d", (p-1) / 16, (p-1) % 16, prod);
          end
        end
        w_mag = N'(p % 16);
        first = (k == 0);
        last  = (k == N);
        x_bit = (k < N && p < 256) ? 1'((p / 16) >> k) : 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
