// tb_c2_adder: random test of the bit-serial multi-operand adder.
// Each word, 11 random 6-bit two's complement words are sent LSB first;
// the 6 output bits must equal their sum modulo 64. Inputs change on the
// falling clock edge.
module tb_c2_adder;
  localparam int N_OPS = 11;
  logic clk = 0, rst_n = 0, first = 0, h_bit;
  logic [N_OPS-1:0] bits = '0;
  int checks = 0, failures = 0, wraps = 0;

  c2_adder #(.N_OPS(N_OPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] ops [N_OPS];
    logic [5:0] got;
    int sum;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      sum = 0;
      for (int i = 0; i < N_OPS; i++) begin
        // every fourth word uses full-range operands, the others small ones
        ops[i] = (t % 4 == 0) ? 6'($urandom) : 6'($signed(3'($urandom)));
        sum += int'($signed(ops[i]));
      end
      if (sum > 31 || sum < -32) wraps++;
      for (int b = 0; b < 6; b++) begin
        @(negedge clk);
        first = (b == 0);
        for (int i = 0; i < N_OPS; i++) bits[i] = ops[i][b];
        #1 got[b] = h_bit;
      end
      checks++;
      if (got !== 6'(sum)) begin
        failures++;
        $display("sum=%0d got=%b", sum, got);
      end
    end
    if (wraps == 0) begin failures++; $display("no wrapped sum exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
