// Reference model for the IIR filter testbenches: a direct-form IIR filter
// of order 1..6 in plain integer arithmetic,
//   acc  = sum_{k=0..K} b_k x(n-k) + sum_{k=1..K} a_k y(n-k)
//   y(n) = saturate(floor(acc / 2^FRAC)) to DATA_W signed bits,
// with its own sample history. It shares no code with the design.
package iir_ref_pkg;

  class iir_ref;
    int     order;
    int     dw, frac;
    longint b [0:6];
    longint a [1:6];
    longint xh [1:6];
    longint yh [1:6];

    function new(int order_, int dw_, int frac_);
      order = order_; dw = dw_; frac = frac_;
      for (int k = 0; k <= 6; k++) b[k] = 0;
      for (int k = 1; k <= 6; k++) begin a[k] = 0; xh[k] = 0; yh[k] = 0; end
    endfunction

    function void clear();
      for (int k = 1; k <= 6; k++) begin xh[k] = 0; yh[k] = 0; end
    endfunction

    function longint step(longint x);
      longint acc, y, lim;
      acc = b[0] * x;
      for (int k = 1; k <= order; k++) acc += b[k] * xh[k] + a[k] * yh[k];
      // floor division by 2^frac
      if (acc >= 0) y = acc / (64'sd1 << frac);
      else          y = -((-acc + (64'sd1 << frac) - 1) / (64'sd1 << frac));
      lim = 64'sd1 << (dw - 1);
      if (y > lim - 1) y = lim - 1;
      if (y < -lim)    y = -lim;
      for (int k = 6; k > 1; k--) begin xh[k] = xh[k-1]; yh[k] = yh[k-1]; end
      xh[1] = x; yh[1] = y;
      return y;
    endfunction
  endclass

endpackage
