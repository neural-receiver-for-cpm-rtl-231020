// c2_adder: bit-serial adder of the two's complement words of a neuron's BNEs.
//
// Each clock the bits of equal weight from all N_OPS serial words are
// counted and added to the carry left from the previous clock; bit 0 of that
// sum is the sum bit of this position and the rest is the carry into the
// next position. The carry is dropped at the start of each word, so the
// output word is the sum of the input words modulo 2^WORD, two's complement,
// LSB first, in the same clocks as the inputs (combinational from `bits`
// and the carry register).
//
// The document gives this block as the "C2 adder" that adds the N BNE
// outputs; a column counter with a multi-bit carry in place of a tree of
// serial full adders is this design's choice. It has the same result and no
// extra latency.
module c2_adder #(
  parameter int unsigned N_OPS = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              first,
  input  logic [N_OPS-1:0]  bits,
  output logic              h_bit
);

  localparam int unsigned SW = $clog2(2 * N_OPS);

  logic [SW-1:0] carry, sum;

  always_comb begin
    sum = first ? '0 : carry;
    for (int i = 0; i < N_OPS; i++) sum = sum + SW'(bits[i]);
  end

  assign h_bit = sum[0];

  always_ff @(posedge clk) begin
    if (!rst_n) carry <= '0;
    else        carry <= sum >> 1;
  end

endmodule
