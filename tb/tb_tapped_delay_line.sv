// tb_tapped_delay_line: random samples are shifted in with random gaps; after
// every clock the taps must equal the last five shifted samples, newest in
// tap 0, and must not move when `shift` is low. Reset must clear all taps.
module tb_tapped_delay_line;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int TAPS = 5;
  logic clk = 0, rst_n = 0, shift = 0;
  sm5_t din = '0;
  sm5_t taps [TAPS];
  int checks = 0, failures = 0;

  tapped_delay_line #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm5_t model [TAPS];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int c = 0; c < 1000; c++) begin
      shift = ($urandom_range(2, 0) != 0);
      din   = rand_sm();
      @(negedge clk);
      if (shift) begin
        for (int i = TAPS - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = din;
      end
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (taps[i] !== model[i]) begin
          failures++;
          $display("clock %0d tap %0d: %b expected %b", c, i, taps[i], model[i]);
        end
      end
    end
    shift = 0;
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < TAPS; i++) begin
      checks++;
      if (taps[i] !== '0) begin failures++; $display("tap %0d not cleared", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
