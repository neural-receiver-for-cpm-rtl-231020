// tb_neuron: random test of one 11-input neuron.
// A new random input and weight vector is applied every 6-clock word, back
// to back; the output must equal the reference neuron (products truncated,
// sum wrapped to 6 bits, table activation) two words later, which checks
// one result per word and the two-word latency. Half of the vectors use
// small weights so that the sum stays in range and all table outputs occur.
module tb_neuron;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int NI = 11;
  localparam int NV = 3000;
  logic clk = 0, rst_n = 0, first, last;
  sm5_t x [NI], w [NI], y;
  int ph = 0;
  int checks = 0, failures = 0;
  int seen_mag [5];

  neuron #(.N_IN(NI)) dut (.*);

  always #5 clk = ~clk;
  assign first = (ph == 0);
  assign last  = (ph == WORD - 1);
  always @(posedge clk) ph <= (!rst_n || ph == WORD - 1) ? 0 : ph + 1;

  initial begin
    repeat (NV * 6 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm5_t expq [$];
    sm5_t e;
    int h;
    for (int i = 0; i < NI; i++) begin x[i] = '0; w[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (ph != 0) @(negedge clk);
    for (int k = 0; k < NV + 2; k++) begin
      // first clock of word k: result of vector k-2 is on y
      if (k >= 2) begin
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          $display("vector %0d: y=%b expected %b", k - 2, y, e);
        end
        if (y.mag <= 4) seen_mag[y.mag]++;
      end
      h = 0;
      for (int i = 0; i < NI; i++) begin
        x[i] = rand_sm();
        w[i] = rand_sm();
        if (k % 2 == 0) w[i].mag = 4'($urandom_range(3, 0));
        h += prod_ref(x[i], w[i]);
      end
      expq.push_back(act_ref(wrap6(h)));
      repeat (WORD) @(negedge clk);
    end
    foreach (seen_mag[m]) if (seen_mag[m] == 0 && m != 1) begin
      failures++;
      $display("output magnitude %0d never produced", m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
