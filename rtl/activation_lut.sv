// activation_lut: neuron activation f(h) = (1 - e^-h) / (1 + e^-h) by table.
//
// The neuron sum h arrives serially, LSB first, as a 6-bit two's complement
// word in units of 1/2. A 5-bit shift register keeps the last five bits;
// in the word's last clock the five most significant bits h[5:1] (h in
// units of 1, range -16 .. +15) address a 32-word table of 4-bit
// magnitudes. The table is held as two 2-bit halves, LC1 for the upper and
// LC2 for the lower magnitude bits. The sign of h is passed on as the sign
// bit, which is exact because f is odd. The result is a 5-bit sign-magnitude
// <5,2> value, registered, and so can feed the next layer's BNEs directly.
//
// Table: mag(a) = round(4 * f(|a|)), computed at elaboration (nr_pkg). For
// the integer addresses this gives 0, 2, 3 and 4 for |a| = 0, 1, 2 and 3 or
// more.
//
// Timing: y loads on the edge that ends the clock with `last` high, once
// per word, and holds the result of the word that just ended.
//
// The 5-bit shift register, the 32-word table split over two logic cells,
// the sign bit passed around the table and the read once every 6 clocks are
// the document's; the rounding of the table entries is this design's.
module activation_lut
  import nr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  last,
  input  logic  h_bit,
  output sm5_t  y
);

  localparam act_table_t TABLE = act_table();

  logic [4:0]        sr;       // serial-to-parallel register of h; sr[0]
                               // holds h[0], which the table does not use
  logic [4:0]        addr;     // h[5:1]
  logic [1:0]        lc1, lc2; // upper and lower halves of the table word

  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else        sr <= {h_bit, sr[4:1]};
  end

  assign addr = {h_bit, sr[4:1]};
  assign lc1  = TABLE[addr][3:2];
  assign lc2  = TABLE[addr][1:0];

  always_ff @(posedge clk) begin
    if (!rst_n)    y <= '0;
    else if (last) y <= '{s: addr[4], mag: {lc1, lc2}};
  end

endmodule
