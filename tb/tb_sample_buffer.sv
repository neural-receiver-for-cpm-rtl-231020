// tb_sample_buffer: sample pairs are pushed with `capture` switched on and
// off; the write pointer must advance only on captured pushes and wrap after
// 148 entries, and every entry read back must be the latest pair captured
// at that address. While capture is off, the entry at the write pointer
// (the oldest one) is read back after every clock, so that any write that
// slips through is seen at once.
module tb_sample_buffer;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int DEPTH = 148;
  logic clk = 0, rst_n = 0, capture = 0, push = 0;
  sm5_t din_i = '0, din_q = '0, rdata_i, rdata_q;
  logic [7:0] raddr = '0, wr_ptr;
  int checks = 0, failures = 0, wraps = 0, frozen = 0;

  sample_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm5_t mi [DEPTH], mq [DEPTH];
    bit   written [DEPTH];
    int   ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      capture = (c % 500) < 400;
      push    = ($urandom_range(1, 0) == 1);
      din_i   = rand_sm();
      din_q   = rand_sm();
      @(negedge clk);
      if (push && capture) begin
        mi[ptr] = din_i; mq[ptr] = din_q; written[ptr] = 1;
        ptr = (ptr == DEPTH - 1) ? 0 : ptr + 1;
        if (ptr == 0) wraps++;
      end else if (push) frozen++;
      checks++;
      if (wr_ptr !== 8'(ptr)) begin
        failures++;
        $display("clock %0d: wr_ptr=%0d expected %0d", c, wr_ptr, ptr);
      end
      if (!capture && written[ptr]) begin
        push  = 0;
        raddr = 8'(ptr);
        @(negedge clk);
        checks++;
        if (rdata_i !== mi[ptr] || rdata_q !== mq[ptr]) begin
          failures++;
          $display("clock %0d: frozen entry %0d changed", c, ptr);
        end
      end
    end
    push = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 8'(a);
      @(negedge clk);
      if (written[a]) begin
        checks++;
        if (rdata_i !== mi[a] || rdata_q !== mq[a]) begin
          failures++;
          $display("entry %0d: %b %b expected %b %b", a, rdata_i, rdata_q, mi[a], mq[a]);
        end
      end
    end
    if (wraps < 2 || frozen == 0) begin failures++; $display("wrap or freeze not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
