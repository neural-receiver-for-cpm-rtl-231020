// tb_bne: exhaustive test of the basic neural element.
// For all 1024 sign-magnitude (X, W) pairs, X and W are held for one
// 6-clock word, and the 6 serial bits of the next word are collected and
// compared with the 6-bit two's complement of sign * floor(|X||W|/8).
// Words run back to back, so one result per 6 clocks is checked as well.
// Inputs change and outputs are sampled on the falling clock edge.
module tb_bne;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  logic clk = 0, rst_n = 0, first, last, c_bit;
  sm5_t x = '0, w = '0;
  int ph = 0;
  int checks = 0, failures = 0;

  bne dut (.*);

  always #5 clk = ~clk;
  assign first = (ph == 0);
  assign last  = (ph == WORD - 1);
  always @(posedge clk) ph <= (!rst_n || ph == WORD - 1) ? 0 : ph + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] got;
    int exp_v;
    sm5_t px, pw;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (ph != 0) @(negedge clk);
    // word k presents pair k; during word k the result of pair k-1 is read
    for (int k = 0; k <= 1024; k++) begin
      px = x; pw = w;
      if (k < 1024) begin
        x = sm5_t'(k[9:5]);
        w = sm5_t'(k[4:0]);
      end
      for (int b = 0; b < WORD; b++) begin
        if (b > 0) @(negedge clk);
        if (ph != b) begin failures++; $display("phase lost"); end
        got[b] = c_bit;
      end
      @(negedge clk);
      if (k > 0) begin
        exp_v = prod_ref(px, pw);
        checks++;
        if (got !== 6'(exp_v)) begin
          failures++;
          $display("x=%b w=%b got=%b expected %0d", px, pw, got, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
