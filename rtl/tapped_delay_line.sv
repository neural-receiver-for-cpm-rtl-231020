// tapped_delay_line: observation window of the receiver for one component.
//
// A shift register of TAPS sign-magnitude samples. When `shift` is high
// the new sample enters tap 0 and every tap moves one place on; all taps
// are visible in parallel and form the network inputs for one quadrature
// component. The receiver uses two, one for I and one for Q, with TAPS = m
// = 5 symbol intervals at one sample per interval.
//
// Timing: taps change on the clock edge at which `shift` is high. The two
// delay lines and m = 5 are the document's; tap order (tap 0 = newest) and
// the reset to zero are this design's choices.
module tapped_delay_line
  import nr_pkg::*;
#(
  parameter int unsigned TAPS = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift,
  input  sm5_t  din,
  output sm5_t  taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else if (shift) begin
      taps[0] <= din;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
