// sample_buffer: store of received samples for the training processor.
//
// While `capture` is high, every I/Q sample pair that the receiver accepts
// (`push`) is written at wr_ptr, which then advances and wraps after DEPTH
// entries, so the buffer holds the latest DEPTH pairs. The training
// processor reads any entry through raddr (registered read, one clock) and
// can stop recording by lowering `capture`, so that it trains on stored data
// while the network keeps running on live samples.
//
// The need to store the incoming data so that weight updating does not
// disturb the on-line computation is the document's; the depth (one GSM
// burst of 148 symbols), the circular organisation and the ports are this
// design's choices.
module sample_buffer
  import nr_pkg::*;
#(
  parameter int unsigned DEPTH = 148
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       capture,
  input  logic                       push,
  input  sm5_t                       din_i,
  input  sm5_t                       din_q,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output sm5_t                       rdata_i,
  output sm5_t                       rdata_q,
  output logic [$clog2(DEPTH)-1:0]   wr_ptr
);

  typedef struct packed {
    sm5_t i;
    sm5_t q;
  } iq_t;

  iq_t mem [DEPTH];
  iq_t rd;

  always_ff @(posedge clk) begin
    if (capture && push) mem[wr_ptr] <= '{i: din_i, q: din_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd     <= '0;
    end else begin
      if (capture && push)
        wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      rd <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
    end
  end

  assign rdata_i = rd.i;
  assign rdata_q = rd.q;

endmodule
