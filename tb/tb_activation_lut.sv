// tb_activation_lut: all 64 values of the 6-bit serial sum h are sent LSB
// first, one per 6-clock word, in random order and back to back; after each
// word's last clock y must equal the reference activation of h (sign of
// floor(h/2), magnitude 0/2/3/4 for |floor(h/2)| = 0/1/2/>=3). y must also
// hold between table reads. Inputs change on the falling clock edge.
module tb_activation_lut;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  logic clk = 0, rst_n = 0, last = 0, h_bit = 0;
  sm5_t y;
  int checks = 0, failures = 0;

  activation_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [128];
    sm5_t e;
    for (int i = 0; i < 128; i++) order[i] = i % 64;
    for (int i = 127; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i, 0);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int v = 0; v < 128; v++) begin
      for (int b = 0; b < WORD; b++) begin
        @(negedge clk);
        if (b == 1 && v > 0) begin
          // one clock after the table read: must hold the previous word's result
          e = act_ref(wrap6(order[v-1]));
          checks++;
          if (y !== e) begin
            failures++;
            $display("h=%0d y=%b expected %b", wrap6(order[v-1]), y, e);
          end
        end
        h_bit = 1'(order[v] >> b);
        last  = (b == WORD - 1);
      end
    end
    @(negedge clk);
    last = 0;
    e = act_ref(wrap6(order[127]));
    checks++;
    if (y !== e) begin failures++; $display("last word wrong"); end
    // y holds without a table read
    repeat (7) @(negedge clk);
    checks++;
    if (y !== e) begin failures++; $display("y changed without a read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
