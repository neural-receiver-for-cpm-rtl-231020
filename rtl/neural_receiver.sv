// neural_receiver: multilayer-perceptron demodulator for GMSK (GSM) bursts.
//
// The receiver decides each transmitted bit from a window of m = 5 baseband
// samples around it, one sample per bit and per quadrature component, with a 10-10-1 perceptron: 10 inputs (5 I and 5 Q), 10 hidden
// neurons and one output neuron. The bit is 1 when the output neuron's sum
// is non-negative and 0 when it is negative. All arithmetic is 5-bit
// sign-magnitude <5,2> and bit-serial on 6-clock words (see neuron.sv).
//
// Blocks: frame_timer gives the word strobes; derotator takes the pi/2
// per-bit phase advance out of each accepted sample; two tapped_delay_lines
// hold the derotated I and Q windows; ten hidden neurons and one output neuron of 11 BNEs
// each (10 inputs and a bias input held at +1.0) compute the network;
// weight_ram holds the 121 weights written by an external training
// processor; sample_buffer records the derotated samples for that
// processor, which trains on the same values the network sees.
//
// Interface and timing:
//   - in_ready is high in the last clock of every word; a sample pair is
//     taken when in_valid and in_ready are both high, so at most one pair
//     per 6 clocks. in_i/in_q must be held while in_valid waits for in_ready.
//   - out_valid pulses for one clock, 25 clocks after the clock in which
//     the pair was taken (the first clock of the fifth word after it); out_y
//     and out_bit then hold the result for the window whose newest sample
//     is that pair, until the next word. The pair enters the delay lines at
//     the end of its word, the hidden layer takes two words and the output
//     neuron two more.
//   - in_i/in_q are the received samples before derotation. derot_phase
//     is the quarter turn the next accepted pair will get; derot_clear sets
//     it to 0 (first sample of a burst) at the clock edge.
//   - Weight map: w_addr = neuron * 11 + input. Hidden neuron j (0..9)
//     reads inputs 0..4 = I taps (0 newest), 5..9 = Q taps, 10 = bias; the
//     output neuron (10) reads the hidden outputs 0..9 and the bias.
//   - Weights and the capture buffer may be written and read at any time;
//     a weight written during a word can change that word's result.
//
// The network size, the serial neuron structure, the table activation, the
// weight RAM loaded by the DSP and the sample storage are the document's.
// The derotation ahead of the delay lines is the document's as well. The
// bias input, the handshake, the address map, the result latency and the
// derotation's direction and clear input are this design's choices.
module neural_receiver
  import nr_pkg::sm5_t;
  import nr_pkg::BIAS_IN;
#(
  parameter int unsigned M_WIN     = 5,
  parameter int unsigned N_HID     = 10,
  parameter int unsigned WORD      = 6,
  parameter int unsigned BUF_DEPTH = 148
) (
  input  logic  clk,
  input  logic  rst_n,
  // sample stream
  input  logic  in_valid,
  output logic  in_ready,
  input  sm5_t  in_i,
  input  sm5_t  in_q,
  input  logic  derot_clear,
  output logic [1:0] derot_phase,
  // decisions
  output logic  out_valid,
  output sm5_t  out_y,
  output logic  out_bit,
  // training processor: weight memory
  input  logic  w_we,
  input  logic [$clog2((N_HID + 1) * (2 * M_WIN + 1))-1:0] w_addr,
  input  sm5_t  w_wdata,
  input  logic [$clog2((N_HID + 1) * (2 * M_WIN + 1))-1:0] w_raddr,
  output sm5_t  w_rdata,
  // training processor: sample capture buffer
  input  logic  buf_capture,
  input  logic [$clog2(BUF_DEPTH)-1:0] buf_raddr,
  output sm5_t  buf_rdata_i,
  output sm5_t  buf_rdata_q,
  output logic [$clog2(BUF_DEPTH)-1:0] buf_wr_ptr
);

  localparam int unsigned NI = 2 * M_WIN + 1;   // inputs per hidden neuron
  localparam int unsigned NO = N_HID + 1;       // inputs of the output neuron
  localparam int unsigned NW = N_HID * NI + NO; // weights

  logic first, last, take;

  frame_timer #(.WORD(WORD)) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .first (first),
    .last  (last)
  );

  assign in_ready = last;
  assign take     = in_valid && in_ready;

  // ---- derotation ----
  sm5_t dr_i, dr_q;

  derotator u_derot (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (derot_clear),
    .step  (take),
    .in_i  (in_i),
    .in_q  (in_q),
    .out_i (dr_i),
    .out_q (dr_q),
    .phase (derot_phase)
  );

  // ---- observation window ----
  sm5_t tap_i [M_WIN];
  sm5_t tap_q [M_WIN];

  tapped_delay_line #(.TAPS(M_WIN)) u_tdl_i (
    .clk(clk), .rst_n(rst_n), .shift(take), .din(dr_i), .taps(tap_i));
  tapped_delay_line #(.TAPS(M_WIN)) u_tdl_q (
    .clk(clk), .rst_n(rst_n), .shift(take), .din(dr_q), .taps(tap_q));

  // ---- weights ----
  sm5_t wts [NW];

  weight_ram #(.DEPTH(NW)) u_wram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (w_we),
    .waddr (w_addr),
    .wdata (w_wdata),
    .raddr (w_raddr),
    .rdata (w_rdata),
    .w     (wts)
  );

  // ---- hidden layer ----
  sm5_t hid_x [NI];
  sm5_t hid_y [N_HID];

  always_comb begin
    for (int k = 0; k < M_WIN; k++) begin
      hid_x[k]         = tap_i[k];
      hid_x[M_WIN + k] = tap_q[k];
    end
    hid_x[NI-1] = BIAS_IN;
  end

  for (genvar j = 0; j < N_HID; j++) begin : g_hid
    sm5_t wj [NI];
    for (genvar i = 0; i < NI; i++) begin : g_w
      assign wj[i] = wts[j*NI + i];
    end
    neuron #(.N_IN(NI)) u_neuron (
      .clk(clk), .rst_n(rst_n), .first(first), .last(last),
      .x(hid_x), .w(wj), .y(hid_y[j]));
  end

  // ---- output layer ----
  sm5_t out_x [NO];
  sm5_t out_w [NO];

  for (genvar i = 0; i < NO; i++) begin : g_out
    if (i < N_HID) begin : g_hid_in
      assign out_x[i] = hid_y[i];
    end else begin : g_bias_in
      assign out_x[i] = BIAS_IN;
    end
    assign out_w[i] = wts[N_HID*NI + i];
  end

  neuron #(.N_IN(NO)) u_out (
    .clk(clk), .rst_n(rst_n), .first(first), .last(last),
    .x(out_x), .w(out_w), .y(out_y));

  // Threshold decision: non-negative neuron sum -> 1.
  assign out_bit = ~out_y.s;

  // ---- result valid: a taken sample reaches out_y four words later ----
  logic [3:0] vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vpipe     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= last && vpipe[3];
      if (last) vpipe <= {vpipe[2:0], take};
    end
  end

  // ---- capture buffer for training ----
  sample_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .capture (buf_capture),
    .push    (take),
    .din_i   (dr_i),
    .din_q   (dr_q),
    .raddr   (buf_raddr),
    .rdata_i (buf_rdata_i),
    .rdata_q (buf_rdata_q),
    .wr_ptr  (buf_wr_ptr)
  );

  // A sample offered but not yet taken must stay on the inputs.
  property p_hold_sample;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && !in_ready) |=> (in_valid && $stable(in_i) && $stable(in_q));
  endproperty
  a_hold_sample: assert property (p_hold_sample);

endmodule
