// tb_neural_receiver: end-to-end test of the 10-10-1 receiver at its
// default sizes.
//
// The testbench plays the training processor and the sample source. It
// writes a random weight set through the weight port, checks it by read-back,
// streams random I/Q sample pairs with a valid/ready handshake, and compares
// every out_valid result with an integer model of the whole network
// (derotation, delay lines, 10 hidden neurons, output neuron, threshold),
// using the window of the five latest pairs. The model turns each taken pair
// by (-j)^p, where p counts the pairs taken since the last derot_clear, and
// checks derot_phase against p before every pair. derot_clear is pulsed at
// random in idle words. The result latency (out_valid 25 clocks after the
// clock in which the pair is taken) and the rate limit of one pair per
// 6-clock word are checked. Four weight sets are
// used in turn: between them the stream pauses, the weights are rewritten
// and the capture buffer is frozen and read back.
//
// Events counted, each of which must occur: a sample made to wait for
// in_ready (stall), a word with no sample (gap), decisions 1 and 0, a
// neuron sum wrapping past the 6-bit range, a saturated table output, a
// weight reload between streams, a capture-buffer wrap, a frozen buffer
// ignoring samples, a derotation clear and pairs taken in each of the four
// derotation phases.
module tb_neural_receiver;
  import nr_pkg::*;
  import nr_ref_pkg::*;

  localparam int NI = 11, NH = 10, NW = 121, DEPTH = 148;
  localparam int NSETS = 4, NSAMP = 400;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_bit;
  sm5_t in_i = '0, in_q = '0, out_y;
  logic derot_clear = 0;
  logic [1:0] derot_phase;
  logic w_we = 0;
  logic [6:0] w_addr = '0, w_raddr = '0;
  sm5_t w_wdata = '0, w_rdata;
  logic buf_capture = 0;
  logic [7:0] buf_raddr = '0, buf_wr_ptr;
  sm5_t buf_rdata_i, buf_rdata_q;

  neural_receiver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_gap = 0, n_one = 0, n_zero = 0, n_wrap = 0, n_sat = 0;
  int n_reload = 0, n_bufwrap = 0, n_frozen = 0, n_clear = 0;
  int n_phase [4] = '{0, 0, 0, 0};
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in_ready must be high exactly once every 6 clocks
  longint last_ready = -1;
  always @(negedge clk) begin
    if (rst_n && in_ready) begin
      if (last_ready >= 0) begin
        checks++;
        if (cyc - last_ready != 6) begin
          failures++;
          $display("in_ready after %0d clocks", cyc - last_ready);
        end
      end
      last_ready = cyc;
    end
  end

  // ---------------- reference network ----------------
  sm5_t wt [NW];
  sm5_t win_i [5], win_q [5];

  function automatic sm5_t neuron_ref(sm5_t x [], int base, ref int wraps, ref int sats);
    int h;
    sm5_t y;
    h = 0;
    for (int i = 0; i < x.size(); i++) h += prod_ref(x[i], wt[base + i]);
    if (h > 31 || h < -32) wraps++;
    y = act_ref(wrap6(h));
    if (y.mag == 4) sats++;
    return y;
  endfunction

  function automatic sm5_t net_ref(ref int wraps, ref int sats);
    sm5_t hx [] = new[NI];
    sm5_t ox [] = new[NH + 1];
    for (int k = 0; k < 5; k++) begin hx[k] = win_i[k]; hx[5 + k] = win_q[k]; end
    hx[10] = BIAS_IN;
    for (int j = 0; j < NH; j++) ox[j] = neuron_ref(hx, j * NI, wraps, sats);
    ox[NH] = BIAS_IN;
    return neuron_ref(ox, NH * NI, wraps, sats);
  endfunction

  // ---------------- result checker ----------------
  sm5_t   expq [$];
  longint takeq [$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      sm5_t e;
      longint t0;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected out_valid at clock %0d", cyc);
      end else begin
        e  = expq.pop_front();
        t0 = takeq.pop_front();
        checks++;
        if (out_y !== e || out_bit !== !e.s) begin
          failures++;
          $display("clock %0d: out_y=%b out_bit=%b expected %b", cyc, out_y, out_bit, e);
        end
        checks++;
        if (cyc - t0 != 25) begin
          failures++;
          $display("latency %0d clocks, expected 25", cyc - t0);
        end
        if (out_bit) n_one++; else n_zero++;
      end
    end
  end

  // ---------------- stimulus ----------------
  task automatic load_weights(int set);
    for (int a = 0; a < NW; a++) begin
      wt[a] = rand_sm();
      // set 0: small weights, sums in range; later sets: wider weights
      if (set == 0) wt[a].mag = 4'($urandom_range(2, 0));
      else if (set == 1) wt[a].mag = 4'($urandom_range(4, 0));
      w_we = 1; w_addr = 7'(a); w_wdata = wt[a];
      @(negedge clk);
    end
    w_we = 0;
    for (int a = 0; a < NW; a++) begin
      w_raddr = 7'(a);
      @(negedge clk);
      checks++;
      if (w_rdata !== wt[a]) begin
        failures++;
        $display("weight %0d read back %b expected %b", a, w_rdata, wt[a]);
      end
    end
  endtask

  initial begin
    int last_take;
    int prev_ptr;
    sm5_t bi [DEPTH], bq [DEPTH];
    bit   bw [DEPTH];
    int   bptr = 0;
    int   mph = 0;
    sm5_t ri, rq;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the delay lines start cleared and keep their samples across weight sets
    for (int k = 0; k < 5; k++) begin win_i[k] = '0; win_q[k] = '0; end
    for (int set = 0; set < NSETS; set++) begin
      if (set > 0) n_reload++;
      load_weights(set);
      buf_capture = (set != 2);
      for (int s = 0; s < NSAMP; s++) begin
        // idle words now and then
        if ($urandom_range(7, 0) == 0) begin
          @(negedge clk);
          while (!in_ready) @(negedge clk);
          n_gap++;
          // restart the derotation phase in some idle words
          if ($urandom_range(3, 0) == 0) begin
            derot_clear = 1;
            mph = 0;
            n_clear++;
          end
          @(negedge clk);
          derot_clear = 0;
        end
        // offer the pair at a random clock: it waits for in_ready
        repeat ($urandom_range(5, 0)) @(negedge clk);
        in_valid = 1;
        in_i = rand_sm();
        in_q = rand_sm();
        if (!in_ready) n_stall++;
        checks++;
        if (derot_phase !== 2'(mph)) begin
          failures++;
          $display("derot_phase %0d expected %0d", derot_phase, mph);
        end
        while (!in_ready) @(negedge clk);
        // pair is taken at the coming rising edge
        rotate_ref(in_i, in_q, mph, ri, rq);
        n_phase[mph]++;
        mph = (mph + 1) % 4;
        for (int k = 4; k > 0; k--) begin win_i[k] = win_i[k-1]; win_q[k] = win_q[k-1]; end
        win_i[0] = ri; win_q[0] = rq;
        begin
          int wr, sa;
          wr = 0; sa = 0;
          expq.push_back(net_ref(wr, sa));
          // a wrap or saturation counts once it influences a checked window
          if (s >= 4) begin n_wrap += wr; n_sat += sa; end
        end
        takeq.push_back(cyc);
        if (buf_capture) begin
          bi[bptr] = ri; bq[bptr] = rq; bw[bptr] = 1;
          bptr = (bptr == DEPTH - 1) ? 0 : bptr + 1;
          if (bptr == 0) n_bufwrap++;
        end else n_frozen++;
        @(negedge clk);
        in_valid = 0;
      end
      // drain the pipeline before the weights change
      repeat (40) @(negedge clk);
      checks++;
      if (expq.size() != 0) begin
        failures++;
        $display("%0d results missing", expq.size());
        expq.delete(); takeq.delete();
      end
      // read back the capture buffer
      checks++;
      if (buf_wr_ptr !== 8'(bptr)) begin
        failures++;
        $display("buffer pointer %0d expected %0d", buf_wr_ptr, bptr);
      end
      for (int a = 0; a < DEPTH; a++) begin
        buf_raddr = 8'(a);
        @(negedge clk);
        if (bw[a]) begin
          checks++;
          if (buf_rdata_i !== bi[a] || buf_rdata_q !== bq[a]) begin
            failures++;
            $display("buffer entry %0d wrong", a);
          end
        end
      end
    end
    $display("stalls=%0d gaps=%0d ones=%0d zeros=%0d sum_wraps=%0d saturations=%0d reloads=%0d buffer_wraps=%0d frozen=%0d derot_clears=%0d phases=%0d/%0d/%0d/%0d",
             n_stall, n_gap, n_one, n_zero, n_wrap, n_sat, n_reload, n_bufwrap, n_frozen,
             n_clear, n_phase[0], n_phase[1], n_phase[2], n_phase[3]);
    if (n_clear == 0)   begin failures++; $display("no derotation clear"); end
    for (int p = 0; p < 4; p++)
      if (n_phase[p] == 0) begin failures++; $display("derotation phase %0d never used", p); end
    if (n_stall == 0)   begin failures++; $display("no stall"); end
    if (n_gap == 0)     begin failures++; $display("no gap"); end
    if (n_one == 0)     begin failures++; $display("no decision 1"); end
    if (n_zero == 0)    begin failures++; $display("no decision 0"); end
    if (n_wrap == 0)    begin failures++; $display("no sum wrap"); end
    if (n_sat == 0)     begin failures++; $display("no table saturation"); end
    if (n_reload == 0)  begin failures++; $display("no weight reload"); end
    if (n_bufwrap == 0) begin failures++; $display("no buffer wrap"); end
    if (n_frozen == 0)  begin failures++; $display("no frozen buffer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
