// frame_timer: word clock of the bit-serial neuron array.
//
// All arithmetic in the receiver is bit-serial on words of WORD clocks
// (n + 2 = 6 for 4-bit magnitudes): n magnitude bits, one zero pad bit for
// the truncated product and one sign-extension bit. This counter marks the
// position in the word. `first` is high in the clock that carries bit 0 of
// every serial word, `last` in the clock that carries the sign bit; `last`
// is the enable pulse of period WORD clocks that loads the product
// registers, reads the activation tables and lets the delay lines shift.
// The 6-clock period is the document's; the counter itself and the
// synchronous active-low reset are this design's choices.
module frame_timer #(
  parameter int unsigned WORD = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      first,
  output logic                      last
);

  logic [$clog2(WORD)-1:0] ph;   // position in the word

  always_ff @(posedge clk) begin
    if (!rst_n)                 ph <= '0;
    else if (last)              ph <= '0;
    else                        ph <= ph + 1'b1;
  end

  assign first = (ph == '0);
  assign last  = (ph == ($clog2(WORD))'(WORD - 1));

endmodule
