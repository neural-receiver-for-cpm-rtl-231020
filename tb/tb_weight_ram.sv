// tb_weight_ram: random writes, including addresses above the 121 words
// that must be ignored, are checked against a model on all parallel outputs
// and on the registered read-back port. Reset must clear every word.
module tb_weight_ram;
  import nr_pkg::*;
  import nr_ref_pkg::*;
  localparam int DEPTH = 121;
  logic clk = 0, rst_n = 0, we = 0;
  logic [6:0] waddr = '0, raddr = '0;
  sm5_t wdata = '0, rdata;
  sm5_t w [DEPTH];
  int checks = 0, failures = 0, ignored = 0;

  weight_ram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm5_t model [DEPTH];
    logic [6:0] ra;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int c = 0; c < 3000; c++) begin
      we    = ($urandom_range(1, 0) == 1);
      waddr = 7'($urandom_range(127, 0));
      wdata = rand_sm();
      ra    = 7'($urandom_range(DEPTH - 1, 0));
      raddr = ra;
      @(negedge clk);
      // read-back reflects the memory before this clock's write
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        $display("read-back %0d: %b expected %b", ra, rdata, model[ra]);
      end
      if (we && waddr < DEPTH) model[waddr] = wdata;
      else if (we) ignored++;
      if (c % 100 == 0) begin
        for (int i = 0; i < DEPTH; i++) begin
          checks++;
          if (w[i] !== model[i]) begin
            failures++;
            $display("word %0d: %b expected %b", i, w[i], model[i]);
          end
        end
      end
    end
    if (ignored == 0) begin failures++; $display("no out-of-range write tried"); end
    we = 0;
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (w[i] !== '0) begin failures++; $display("word %0d not cleared", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
