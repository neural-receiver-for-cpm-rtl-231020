// serial_mult: bit-serial by parallel multiplier of two N-bit magnitudes.
//
// The multiplicand X arrives one bit per clock, least significant bit first
// and followed by zeros; the multiplier W is held in parallel. Each clock
// adds W, shifted by the position of the current X bit, into an accumulator
// when that bit is 1, so the product is complete one clock after the last X
// bit. Only the N+1 most significant of the 2N product bits are kept:
// prod = floor(|X| * |W| / 2^(N-1)). For two <5,2> magnitudes (LSB = 1/4)
// that is the product in units of 1/2.
//
// Timing: `first` marks the clock of X bit 0; `prod` loads on the clock
// edge that ends the clock in which `last` is high and holds until the next
// word's `last`. With `last` N clocks after `first` (X plus one zero pad
// bit) a result is produced every N+1 clocks; inside the BNE the word is
// N+2 clocks. X must be 0 after its N bits.
//
// The serial X input, parallel W, truncation to N+1 MS bits and the result
// every N+1 clocks are the document's; the shift-and-add accumulator is this
// design's own way of building it in place of a gate-level adder chain.
module serial_mult #(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           first,
  input  logic           last,
  input  logic           x_bit,
  input  logic [N-1:0]   w_mag,
  output logic [N:0]     prod
);

  logic [2*N-1:0] acc, acc_next;   // partial product
  logic [2*N-1:0] wsh, addend;     // W shifted to the weight of the current X bit

  always_comb begin
    addend   = first ? (2*N)'(w_mag) : wsh;
    acc_next = (first ? '0 : acc) + (x_bit ? addend : '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      wsh  <= '0;
      prod <= '0;
    end else begin
      acc <= acc_next;
      wsh <= addend << 1;
      if (last) prod <= acc_next[2*N-1:N-1];
    end
  end

endmodule
