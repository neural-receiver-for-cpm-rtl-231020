// tb_frame_timer: `first` and `last` must each be high exactly once every
// 6 clocks, `last` in the clock before `first`, starting with `first` in
// the first clock after reset, and a reset in mid-word must restart the
// word.
module tb_frame_timer;
  logic clk = 0, rst_n = 0, first, last;
  int checks = 0, failures = 0;

  frame_timer #(.WORD(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check clocks c0 .. c0+n-1 of the word count, one per falling edge.
  task automatic run(int c0, int n);
    for (int c = c0; c < c0 + n; c++) begin
      if (c > c0) @(negedge clk);
      checks++;
      if (first !== (c % 6 == 0) || last !== (c % 6 == 5)) begin
        failures++;
        $display("clock %0d: first=%b last=%b", c, first, last);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;          // clock 0 after reset is the clock now in progress
    run(0, 64);
    @(negedge clk);
    rst_n = 0;          // reset in mid-word
    @(negedge clk);
    rst_n = 1;
    run(0, 120);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
