// neuron: one bit-serial neuron, y = f(sum_i X_i * W_i).
//
// N_IN basic neural elements form the products X_i * W_i as serial 6-bit
// two's complement words; the C2 adder sums them bit by bit; the activation
// table turns the five most significant bits of the 6-bit sum into the
// 5-bit sign-magnitude output. In numbers, with X and W as <5,2> values
// (magnitudes in units of 1/4):
//   p_i = sign_i * floor(|X_i| * |W_i| / 8)          (units of 1/2)
//   h   = sum_i p_i, wrapped to 6-bit two's complement (units of 1/2)
//   y   = sign(h) * round(4 * f(floor(h / 2))) / 4
// The 6-bit word is the document's; a sum outside -32 .. +31 (units of 1/2)
// wraps, so the weights have to be scaled to keep h in range.
//
// Timing: a new input vector every word (6 clocks); X and W are sampled
// during the word from `first` to `last`, and y holds the result from the
// edge that ends the following word's `last` clock: two words of latency,
// one result per word.
//
// The structure (N BNEs, a C2 adder and a table) follows the document.
module neuron
  import nr_pkg::sm5_t;
#(
  parameter int unsigned N_IN = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  first,
  input  logic  last,
  input  sm5_t  x [N_IN],
  input  sm5_t  w [N_IN],
  output sm5_t  y
);

  logic [N_IN-1:0] c_bits;
  logic            h_bit;

  for (genvar i = 0; i < N_IN; i++) begin : g_bne
    bne u_bne (
      .clk   (clk),
      .rst_n (rst_n),
      .first (first),
      .last  (last),
      .x     (x[i]),
      .w     (w[i]),
      .c_bit (c_bits[i])
    );
  end

  c2_adder #(.N_OPS(N_IN)) u_add (
    .clk   (clk),
    .rst_n (rst_n),
    .first (first),
    .bits  (c_bits),
    .h_bit (h_bit)
  );

  activation_lut u_act (
    .clk   (clk),
    .rst_n (rst_n),
    .last  (last),
    .h_bit (h_bit),
    .y     (y)
  );

endmodule
