// tb_derotator: random sample pairs with random steps and clears. In every
// clock the outputs must equal the input multiplied by (-j)^phase, where the
// phase is the testbench's own count of steps since the last clear, taken
// mod 4. A zero result must be +0. The phase output is checked every clock.
// Each of the four phases, a clear and a clear that coincides with a step
// must occur.
module tb_derotator;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  sm5_t in_i = '0, in_q = '0, out_i, out_q;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int n_phase [4] = '{0, 0, 0, 0};
  int n_clear = 0, n_clear_step = 0;

  derotator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   ph;
    sm5_t ei, eq;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ph = 0;
    for (int c = 0; c < 4000; c++) begin
      clear = ($urandom_range(15, 0) == 0);
      step  = ($urandom_range(1, 0) == 0);
      in_i  = rand_sm();
      in_q  = rand_sm();
      if ($urandom_range(7, 0) == 0) in_i.mag = '0;
      #1;
      rotate_ref(in_i, in_q, ph, ei, eq);
      checks += 2;
      if (out_i !== ei || out_q !== eq) begin
        failures++;
        $display("clock %0d phase %0d: in %b %b out %b %b expected %b %b",
                 c, ph, in_i, in_q, out_i, out_q, ei, eq);
      end
      if (phase !== 2'(ph)) begin
        failures++;
        $display("clock %0d: phase %0d expected %0d", c, phase, ph);
      end
      n_phase[ph]++;
      if (clear) n_clear++;
      if (clear && step) n_clear_step++;
      @(negedge clk);
      if (clear) ph = 0;
      else if (step) ph = (ph + 1) % 4;
    end
    // reset returns the phase to 0
    step = 1; clear = 0;
    @(negedge clk);
    rst_n = 0; step = 0;
    @(negedge clk);
    checks++;
    if (phase !== 2'd0) begin failures++; $display("phase not reset"); end
    for (int p = 0; p < 4; p++)
      if (n_phase[p] == 0) begin failures++; $display("phase %0d never used", p); end
    if (n_clear == 0)      begin failures++; $display("no clear"); end
    if (n_clear_step == 0) begin failures++; $display("no clear with step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
