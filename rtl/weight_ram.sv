// weight_ram: on-chip memory of the network weights.
//
// DEPTH words of 5-bit sign-magnitude <5,2> weights, one word for every
// BNE of the network. The training processor writes one word per clock
// through (we, waddr, wdata) and can read a word back through raddr/rdata
// (registered, one clock). Every word is also wired out in parallel on `w`,
// so each BNE sees its own weight at all times. Word address =
// neuron * 11 + input, neurons 0..9 hidden and 10 the output neuron, input
// 10 of each neuron being its bias.
//
// Timing: a write is visible on `w` from the clock after `we`. Writes to
// addresses at or above DEPTH are ignored. Reset clears all weights.
//
// The 121-word size and its loading by the DSP after training are the
// document's; the port set, the address map and the reset are this
// design's choices.
module weight_ram
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH = 121
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  sm5_t                       wdata,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output sm5_t                       rdata,
  output sm5_t                       w [DEPTH]
);

  sm5_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
      rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
    end
  end

  assign w = mem;

endmodule
