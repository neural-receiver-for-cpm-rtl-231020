// bne: basic neural element, one signed weight-times-input product.
//
// Input X and weight W are 5-bit sign-magnitude <5,2> numbers. X is
// serialised LSB first into a serial_mult together with the parallel
// magnitude of W; the sign of the product is the XOR of the two signs. The
// 5-bit truncated magnitude (units of 1/2) is then sent out serially in
// two's complement, LSB first: each magnitude bit is inverted when the sign
// is negative and a serial +1 carry is added, and a sixth bit taken from a
// zero pad becomes the sign-extension bit. The result is one 6-bit two's
// complement word (range -31 .. +31, units of 1/2) per 6-clock word.
//
// Timing: X and W must be stable from `first` to `last` of a word. The
// product of that word comes out on `c_bit` during the next word, bit i in
// clock i (bit 0 with `first`, sign bit with `last`). `c_bit` is driven
// from registers through one level of XOR logic.
//
// The structure (serial multiplier on magnitudes, XOR of signs, SM to C2
// conversion by inversion and +1, serial sign bit after n+2 clocks) follows
// the document. The one-hot bit selector and the carry register are this
// design's implementation of that conversion.
module bne
  import nr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  first,
  input  logic  last,
  input  sm5_t  x,
  input  sm5_t  w,
  output logic  c_bit
);

  logic [N_MAG-2:0] xsr;         // remaining X magnitude bits
  logic             x_bit;
  logic [N_MAG:0]   prod;        // truncated magnitude of the previous word
  logic             s_r;         // sign of the previous word's product
  logic [WORD-1:0]  sel;         // one-hot position in the output word
  logic             cy;          // +1 carry of the C2 conversion
  logic             m_bit;

  // Parallel-to-serial conversion of |X|; zeros follow the N magnitude bits.
  assign x_bit = first ? x.mag[0] : xsr[0];

  always_ff @(posedge clk) begin
    if (!rst_n) xsr <= '0;
    else        xsr <= first ? x.mag[N_MAG-1:1] : (xsr >> 1);
  end

  serial_mult #(.N(N_MAG)) u_mult (
    .clk   (clk),
    .rst_n (rst_n),
    .first (first),
    .last  (last),
    .x_bit (x_bit),
    .w_mag (w.mag),
    .prod  (prod)
  );

  // Magnitude bit of the current output position; the top bit is the zero pad.
  assign m_bit = |({1'b0, prod} & sel);
  assign c_bit = m_bit ^ s_r ^ cy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_r <= 1'b0;
      sel <= '0;
      cy  <= 1'b0;
    end else if (last) begin
      s_r <= x.s ^ w.s;
      sel <= WORD'(1);
      cy  <= x.s ^ w.s;
    end else begin
      sel <= sel << 1;
      cy  <= (m_bit ^ s_r) & cy;
    end
  end

endmodule
