// derotator: removes the pi/2-per-bit phase advance of the GMSK signal.
//
// A GMSK signal with modulation index 1/2 turns its phase by +-pi/2 in
// every bit. Multiplying sample k by (-j)^k takes out a steady -pi/2 per bit,
// so each bit's contribution to the signal lies near one axis. The
// network then sees a pattern that depends only on the bits in the window,
// not on the window's position in the burst. On the <5,2> sign-magnitude
// samples this is exact and needs no arithmetic. It is a swap of I and Q and
// a change of sign, chosen by a 2-bit phase counter:
//   phase 0: ( I,  Q)    phase 1: ( Q, -I)
//   phase 2: (-I, -Q)    phase 3: (-Q,  I)
// A zero output is always +0, also for a -0 input.
//
// Interface and timing: out_i/out_q are combinational from in_i/in_q and the
// current phase. `step` (a sample taken) advances the phase at the clock
// edge, so the next sample is turned a quarter further. `clear` sets the
// phase to 0 at the clock edge and has priority over `step`. A sample taken
// in the same clock as `clear` still uses the old phase. Reset also sets the
// phase to 0.
//
// The derotation at pi/2 per bit ahead of the delay lines is the
// document's. The direction (-pi/2 per bit), the clear input that lines the
// phase up with a burst, and the +0 rule are this design's choices.
module derotator
  import nr_pkg::sm5_t;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  input  sm5_t       in_i,
  input  sm5_t       in_q,
  output sm5_t       out_i,
  output sm5_t       out_q,
  output logic [1:0] phase
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) phase <= 2'd0;
    else if (step)       phase <= phase + 2'd1;
  end

  // v or -v, with zero as +0
  function automatic sm5_t turn(sm5_t v, logic flip);
    sm5_t r;
    r.mag = v.mag;
    r.s   = (v.mag == '0) ? 1'b0 : v.s ^ flip;
    return r;
  endfunction

  always_comb begin
    unique case (phase)
      2'd0: begin out_i = turn(in_i, 1'b0); out_q = turn(in_q, 1'b0); end
      2'd1: begin out_i = turn(in_q, 1'b0); out_q = turn(in_i, 1'b1); end
      2'd2: begin out_i = turn(in_i, 1'b1); out_q = turn(in_q, 1'b1); end
      2'd3: begin out_i = turn(in_q, 1'b1); out_q = turn(in_i, 1'b0); end
    endcase
  end

endmodule
