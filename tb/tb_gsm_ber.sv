// tb_gsm_ber: GMSK demodulation workload for the receiver.
//
// The testbench builds a GSM-like link, trains the network in floating
// point, loads the 5-bit weights into the receiver and counts bit errors.
//   - Transmitter: random bits, differential encoding (a_k = 1 - 2(d_k XOR
//     d_k-1)), GMSK with BT = 0.3 and modulation index 1/2. The Gaussian
//     frequency pulse is a unit rectangle of one bit convolved with a
//     Gaussian of sigma = sqrt(ln 2) / (2 pi BT) bit periods, integrated
//     numerically; the phase is integrated at 8 points per bit.
//   - Channel: white Gaussian noise at a given Eb/N0 (one sample per bit,
//     unit symbol energy), perfect timing and phase, no receive filter.
//   - Receiver front end: samples at mid-bit, rounded to <5,2>
//     sign-magnitude. The model computes the derotated samples (turned by
//     -pi/2 per bit), rounds them, and turns them back by +pi/2 per bit, which
//     is exact on sign-magnitude values. The receiver's own derotator,
//     cleared before each test stream, has to undo that turn. Training uses
//     the derotated samples, as the capture buffer would deliver them.
//   - Training (what the external processor does): on-line back-propagation
//     with momentum, learning rate 0.2 halved every 3700 bits, momentum 0.9,
//     weights initialised in +-0.1 and kept in +-3.75, targets +-0.8, over
//     4 x 3700 = 14800 bits at Eb/N0 = 8 dB. Activation tanh(h/2). Three
//     networks are trained from different starting weights; the one whose
//     rounded 5-bit version makes the fewest errors on a separate 1000-bit
//     burst at 8 dB is loaded.
//   - Test: 2000 bits each at 4 and 6 dB, 3000 bits at 8 dB and 1000
//     noise-free bits are streamed through the receiver. Every decision
//     must match the integer model of the 5-bit network exactly; the error
//     rates must stay below 10% at 4 dB, 5% at 6 dB, 2% at 8 dB and 1%
//     without noise. These limits are loose: the measured rates depend on
//     the random training run.
// Four window lengths are run. m = 5 (10-10-1) and m = 3 (6-10-1) use the
// receiver at its default sizes; m = 9 (18-10-1) and m = 7 (14-10-1) use a
// second instance built with M_WIN = 9. A shorter window than the hardware's
// is run by holding the weights of the outer taps at zero. The modulator's
// pulse for bit k is centred on sample k+2, so the window is centred there,
// and the decision for bit k comes with the window whose newest sample is
// k+2+(M_WIN-1)/2. Both instances share the stimulus signals; `sel` picks
// the one that is driven and observed.
module tb_gsm_ber;
  import nr_pkg::sm5_t;
  import nr_pkg::BIAS_IN;
  import nr_ref_pkg::*;

  localparam int NH = 10;
  localparam int MWMAX = 9, NIMAX = 2 * MWMAX + 1, NWMAX = NH * NIMAX + NH + 1;
  localparam int OS = 8;          // phase integration points per bit
  localparam int SPAN = 2 * OS;   // pulse support: +-2 bits
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic sel = 0;                  // 0: default receiver, 1: M_WIN = 9 receiver
  logic in_valid = 0, w_we = 0, derot_clear = 0;
  sm5_t in_i = '0, in_q = '0, w_wdata = '0;
  logic [7:0] w_addr = '0;
  logic in_ready, out_valid, out_bit;
  sm5_t out_y;

  logic r5, v5, b5, r9, v9, b9;
  sm5_t y5, y9, unused_sm [6];
  logic [7:0] unused_ptr [2];
  logic [1:0] unused_ph [2];

  neural_receiver dut5 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && !sel), .in_ready(r5), .in_i(in_i), .in_q(in_q),
    .derot_clear(derot_clear), .derot_phase(unused_ph[0]),
    .out_valid(v5), .out_y(y5), .out_bit(b5),
    .w_we(w_we && !sel), .w_addr(w_addr[6:0]), .w_wdata(w_wdata),
    .w_raddr(7'd0), .w_rdata(unused_sm[0]),
    .buf_capture(1'b0), .buf_raddr(8'd0), .buf_rdata_i(unused_sm[1]),
    .buf_rdata_q(unused_sm[2]), .buf_wr_ptr(unused_ptr[0]));

  neural_receiver #(.M_WIN(9)) dut9 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && sel), .in_ready(r9), .in_i(in_i), .in_q(in_q),
    .derot_clear(derot_clear), .derot_phase(unused_ph[1]),
    .out_valid(v9), .out_y(y9), .out_bit(b9),
    .w_we(w_we && sel), .w_addr(w_addr), .w_wdata(w_wdata),
    .w_raddr(8'd0), .w_rdata(unused_sm[3]),
    .buf_capture(1'b0), .buf_raddr(8'd0), .buf_rdata_i(unused_sm[4]),
    .buf_rdata_q(unused_sm[5]), .buf_wr_ptr(unused_ptr[1]));

  assign in_ready  = sel ? r9 : r5;
  assign out_valid = sel ? v9 : v5;
  assign out_y     = sel ? y9 : y5;
  assign out_bit   = sel ? b9 : b5;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- link model ----------------
  real gp [2*SPAN+1];             // frequency pulse, integral 1

  function automatic real gauss01();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = (real'($urandom) + 1.0) / 4294967297.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  task automatic make_pulse();
    real sg, s, t, tau, acc;
    sg = $sqrt($ln(2.0)) / (2.0 * PI * 0.3);
    s = 0.0;
    for (int i = 0; i <= 2 * SPAN; i++) begin
      t = real'(i - SPAN) / OS;
      acc = 0.0;
      for (int k = 0; k < 400; k++) begin   // midpoint rule over [t-0.5, t+0.5]
        tau = t - 0.5 + (k + 0.5) / 400.0;
        acc += $exp(-tau * tau / (2.0 * sg * sg)) / 400.0;
      end
      gp[i] = acc;
      s += acc / OS;
    end
    for (int i = 0; i <= 2 * SPAN; i++) gp[i] /= s;
  endtask

  // Bits d[0..n-1] and derotated samples I/Q (noise standard deviation sd).
  task automatic gen(int n, real sd, output bit d [], output real si [], output real sq []);
    int nf, prev, k;
    real fr [], ph, re, im, r;
    d  = new[n];
    nf = n * OS + 2 * SPAN + OS;
    fr = new[nf];
    foreach (fr[i]) fr[i] = 0.0;
    prev = 0;
    for (int b = 0; b < n; b++) begin
      d[b] = 1'($urandom);
      r = (d[b] ^ prev) ? -1.0 : 1.0;
      prev = d[b];
      for (int i = 0; i <= 2 * SPAN; i++) fr[b * OS + i] += r * gp[i];
    end
    si = new[nf / OS + 1];
    sq = new[nf / OS + 1];
    ph = 0.0;
    for (int t = 0; t < nf; t++) begin
      ph += PI * 0.5 * fr[t] / OS;
      if (t % OS == OS / 2) begin
        k  = t / OS;
        re = $cos(ph);
        im = $sin(ph);
        case (k % 4)   // multiply by (-j)^k
          0: begin si[k] =  re; sq[k] =  im; end
          1: begin si[k] =  im; sq[k] = -re; end
          2: begin si[k] = -re; sq[k] = -im; end
          default: begin si[k] = -im; sq[k] = re; end
        endcase
        si[k] += sd * gauss01();
        sq[k] += sd * gauss01();
      end
    end
  endtask

  function automatic sm5_t quant(real v);
    sm5_t q;
    int m;
    m = int'($floor(((v < 0.0) ? -v : v) * 4.0 + 0.5));
    q.s   = (v < 0.0);
    q.mag = 4'((m > 15) ? 15 : m);
    return q;
  endfunction

  function automatic real sd_of(real ebn0_db);
    return $sqrt(0.5 / $pow(10.0, ebn0_db / 10.0));
  endfunction

  // ---------------- floating-point network and training ----------------
  int  mw;                        // window of the receiver in use
  int  ni;                        // its inputs per hidden neuron, 2*mw+1
  int  ctr;                       // its centre tap, (mw-1)/2
  real w1 [NH][NIMAX], w2 [NH+1], dw1 [NH][NIMAX], dw2 [NH+1];
  bit  mask [NIMAX];              // inputs in use

  function automatic real fa(real h);
    return (1.0 - $exp(-h)) / (1.0 + $exp(-h));
  endfunction

  function automatic real clip(real v);
    return (v > 3.75) ? 3.75 : (v < -3.75) ? -3.75 : v;
  endfunction

  // Window for bit k: tap i holds sample k + 2 + ctr - i.
  task automatic window(int k, real si [], real sq [], output real x [NIMAX]);
    for (int i = 0; i < NIMAX; i++) x[i] = 0.0;
    for (int i = 0; i < mw; i++) begin
      x[i]      = mask[i]      ? si[k + 2 + ctr - i] : 0.0;
      x[mw + i] = mask[mw + i] ? sq[k + 2 + ctr - i] : 0.0;
    end
    x[2 * mw] = 1.0;
  endtask

  task automatic train(int m_win);
    bit  d [];
    real si [], sq [];
    real x [NIMAX], h1 [NH], y1 [NH+1], d1 [NH];
    real h2, y, d2, tgt, alpha;
    int  t;
    for (int i = 0; i < NIMAX; i++) begin
      t = i % mw;
      mask[i] = (i < ni) && ((i == ni - 1) ||
                ((t >= ctr - (m_win - 1) / 2) && (t <= ctr + (m_win - 1) / 2)));
    end
    for (int j = 0; j < NH; j++)
      for (int i = 0; i < NIMAX; i++) begin
        w1[j][i]  = mask[i] ? ($urandom_range(2000, 0) / 10000.0 - 0.1) : 0.0;
        dw1[j][i] = 0.0;
      end
    for (int i = 0; i <= NH; i++) begin
      w2[i]  = $urandom_range(2000, 0) / 10000.0 - 0.1;
      dw2[i] = 0.0;
    end
    alpha = 0.2;
    for (int ep = 0; ep < 4; ep++) begin
      gen(3700, sd_of(8.0), d, si, sq);
      for (int k = ctr; k < 3700 - ctr; k++) begin
        window(k, si, sq, x);
        tgt = d[k] ? 0.8 : -0.8;
        for (int j = 0; j < NH; j++) begin
          h1[j] = 0.0;
          for (int i = 0; i < ni; i++) h1[j] += w1[j][i] * x[i];
          y1[j] = fa(h1[j]);
        end
        y1[NH] = 1.0;
        h2 = 0.0;
        for (int i = 0; i <= NH; i++) h2 += w2[i] * y1[i];
        y  = fa(h2);
        d2 = (tgt - y) * 0.5 * (1.0 - y * y);
        for (int j = 0; j < NH; j++) d1[j] = 0.5 * (1.0 - y1[j] * y1[j]) * d2 * w2[j];
        for (int i = 0; i <= NH; i++) begin
          dw2[i] = alpha * d2 * y1[i] + 0.9 * dw2[i];
          w2[i]  = clip(w2[i] + dw2[i]);
        end
        for (int j = 0; j < NH; j++)
          for (int i = 0; i < ni; i++) if (mask[i]) begin
            dw1[j][i] = alpha * d1[j] * x[i] + 0.9 * dw1[j][i];
            w1[j][i]  = clip(w1[j][i] + dw1[j][i]);
          end
      end
      alpha = alpha * 0.5;
    end
  endtask

  // ---------------- integer model of the loaded network ----------------
  sm5_t qw [NWMAX];
  sm5_t win_i [2][MWMAX], win_q [2][MWMAX];   // delay lines of both receivers
  int   n_wrap = 0;

  function automatic sm5_t qnet(sm5_t wi [MWMAX], sm5_t wq [MWMAX]);
    sm5_t hy [NH];
    int h;
    for (int j = 0; j < NH; j++) begin
      h = prod_ref(BIAS_IN, qw[j*ni + ni - 1]);
      for (int k = 0; k < mw; k++)
        h += prod_ref(wi[k], qw[j*ni + k]) + prod_ref(wq[k], qw[j*ni + mw + k]);
      if (h > 31 || h < -32) n_wrap++;
      hy[j] = act_ref(wrap6(h));
    end
    h = prod_ref(BIAS_IN, qw[NH*ni + NH]);
    for (int j = 0; j < NH; j++) h += prod_ref(hy[j], qw[NH*ni + j]);
    if (h > 31 || h < -32) n_wrap++;
    return act_ref(wrap6(h));
  endfunction

  function automatic sm5_t net_ref();
    return qnet(win_i[int'(sel)], win_q[int'(sel)]);
  endfunction

  task automatic quantize_weights();
    for (int j = 0; j < NH; j++)
      for (int i = 0; i < ni; i++) qw[j*ni + i] = quant(w1[j][i]);
    for (int i = 0; i <= NH; i++) qw[NH*ni + i] = quant(w2[i]);
  endtask

  // Errors of the rounded network on a fresh 1000-bit burst at 8 dB.
  task automatic validate(output int errs);
    bit   d [];
    real  si [], sq [];
    sm5_t wi [MWMAX], wq [MWMAX], y;
    quantize_weights();
    gen(1000, sd_of(8.0), d, si, sq);
    errs = 0;
    for (int k = ctr; k < 1000 - ctr; k++) begin
      for (int i = 0; i < MWMAX; i++) begin wi[i] = '0; wq[i] = '0; end
      for (int i = 0; i < mw; i++) begin
        wi[i] = quant(si[k + 2 + ctr - i]);
        wq[i] = quant(sq[k + 2 + ctr - i]);
      end
      y = qnet(wi, wq);
      if (y.s == d[k]) errs++;   // sign 1 decides 0
    end
  endtask

  // Train three candidates and keep the best after rounding.
  task automatic train_best(int m_win);
    real bw1 [NH][NIMAX], bw2 [NH+1];
    int  e, best;
    best = 1 << 30;
    for (int c = 0; c < 3; c++) begin
      train(m_win);
      validate(e);
      if (e < best) begin
        best = e;
        bw1 = w1;
        bw2 = w2;
      end
    end
    w1 = bw1;
    w2 = bw2;
  endtask

  task automatic load_weights();
    quantize_weights();
    for (int a = 0; a < NH * ni + NH + 1; a++) begin
      w_we = 1; w_addr = 8'(a); w_wdata = qw[a];
      @(negedge clk);
    end
    w_we = 0;
  endtask

  // Stream n bits through the selected receiver; returns the bit errors.
  task automatic run_ber(int n, real sd, output int errs, output int nbits);
    bit  d [];
    real si [], sq [];
    sm5_t expq [$];
    int   idxq [$];
    int   got, u;
    gen(n, sd, d, si, sq);
    u = int'(sel);
    errs = 0; nbits = 0; got = 0;
    // the stream starts at derotation phase 0
    derot_clear = 1;
    @(negedge clk);
    derot_clear = 0;
    fork
      begin : feed
        for (int s = 0; s < n; s++) begin
          in_valid = 1;
          // received sample = rounded derotated sample turned by +pi/2 per bit
          rotate_ref(quant(si[s]), quant(sq[s]), 4 - s % 4, in_i, in_q);
          while (!in_ready) @(negedge clk);
          for (int k = mw - 1; k > 0; k--) begin
            win_i[u][k] = win_i[u][k-1];
            win_q[u][k] = win_q[u][k-1];
          end
          rotate_ref(in_i, in_q, s % 4, win_i[u][0], win_q[u][0]);
          expq.push_back(net_ref());
          idxq.push_back(s - 2 - ctr);
          @(negedge clk);
          in_valid = 0;
        end
      end
      begin : collect
        sm5_t e;
        int   b;
        while (got < n) begin
          @(negedge clk);
          if (out_valid) begin
            e = expq.pop_front();
            b = idxq.pop_front();
            got++;
            checks++;
            if (out_y !== e || out_bit !== !e.s) begin
              failures++;
              if (failures < 10) $display("bit %0d: out_y=%b expected %b", b, out_y, e);
            end
            // count only windows made entirely of this run's samples
            if (b >= ctr - 2) begin
              nbits++;
              if (out_bit != d[b]) errs++;
            end
          end
        end
      end
    join
  endtask

  int run_hw [4] = '{5, 5, 9, 9};   // receiver window of each run
  int run_m  [4] = '{5, 3, 9, 7};   // window length trained

  initial begin
    int e4, n4, e6, n6, e8, n8, e0, n0;
    make_pulse();
    for (int u = 0; u < 2; u++)
      for (int k = 0; k < MWMAX; k++) begin win_i[u][k] = '0; win_q[u][k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (run_m[r]) begin
      sel = (run_hw[r] == 9);
      mw  = run_hw[r];
      ni  = 2 * mw + 1;
      ctr = (mw - 1) / 2;
      train_best(run_m[r]);
      load_weights();
      n_wrap = 0;
      run_ber(2000, sd_of(4.0), e4, n4);
      run_ber(2000, sd_of(6.0), e6, n6);
      run_ber(3000, sd_of(8.0), e8, n8);
      run_ber(1000, 0.0, e0, n0);
      $display("window m=%0d on M_WIN=%0d: BER %f at 4 dB, %f at 6 dB, %f at 8 dB (%0d of %0d bits), %0d of %0d errors without noise, %0d neuron sums wrapped",
               run_m[r], mw, real'(e4) / n4, real'(e6) / n6, real'(e8) / n8, e8, n8, e0, n0, n_wrap);
      checks++;
      if (real'(e4) / n4 > 0.10) begin failures++; $display("BER at 4 dB too high"); end
      checks++;
      if (real'(e6) / n6 > 0.05) begin failures++; $display("BER at 6 dB too high"); end
      checks++;
      if (real'(e8) / n8 > 0.02) begin failures++; $display("BER at 8 dB too high"); end
      checks++;
      if (real'(e0) / n0 > 0.01) begin failures++; $display("noise-free BER too high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
