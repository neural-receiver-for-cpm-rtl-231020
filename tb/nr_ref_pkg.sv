// nr_ref_pkg: arithmetic reference for the receiver testbenches.
//
// Integer model of the fixed-point network, written from the number rules
// and not from the RTL structure: sign-magnitude <5,2> values, products
// truncated to floor(|x||w|/8) in units of 1/2, sums wrapped to 6-bit two's
// complement, and the activation magnitude round(4 * tanh(a/2)) whose
// values for a = 0, 1, 2 and 3 or more are 0, 2, 3 and 4 (4*tanh(0.5) =
// 1.85, 4*tanh(1) = 3.05, 4*tanh(1.5) = 3.62, 4*tanh(2) = 3.86), and the
// derotation as a complex multiplication by a power of -j.
package nr_ref_pkg;
  import nr_pkg::sm5_t;

  function automatic int prod_ref(sm5_t x, sm5_t w);
    int m;
    m = (int'(x.mag) * int'(w.mag)) / 8;
    return (x.s ^ w.s) ? -m : m;
  endfunction

  // Wrap to 6-bit two's complement, result in -32 .. 31.
  function automatic int wrap6(int v);
    int r;
    r = ((v % 64) + 64) % 64;
    return (r >= 32) ? r - 64 : r;
  endfunction

  function automatic sm5_t act_ref(int h);
    int a, am;
    sm5_t y;
    a  = (h >= 0) ? h / 2 : -((-h + 1) / 2);   // floor(h / 2)
    am = (a < 0) ? -a : a;
    y.s   = (a < 0);
    y.mag = (am == 0) ? 4'd0 : (am == 1) ? 4'd2 : (am == 2) ? 4'd3 : 4'd4;
    return y;
  endfunction

  // Multiply the complex sample (i + jq) by (-j)^r, working on the values.
  // A zero result is +0.
  function automatic void rotate_ref(input sm5_t i, input sm5_t q, input int r,
                                     output sm5_t oi, output sm5_t oq);
    int vi, vq, t;
    vi = i.s ? -int'(i.mag) : int'(i.mag);
    vq = q.s ? -int'(q.mag) : int'(q.mag);
    for (int n = 0; n < ((r % 4) + 4) % 4; n++) begin
      // (vi + j vq)(-j) = vq - j vi
      t  = vi;
      vi = vq;
      vq = -t;
    end
    oi.s = (vi < 0); oi.mag = 4'((vi < 0) ? -vi : vi);
    oq.s = (vq < 0); oq.mag = 4'((vq < 0) ? -vq : vq);
  endfunction

  function automatic sm5_t rand_sm();
    sm5_t v;
    v.s   = 1'($urandom);
    v.mag = 4'($urandom);
    return v;
  endfunction

endpackage
