// fcnn_ref_pkg: reference arithmetic of the network for the testbenches.
//
// Plain integer and real-number models of each datapath step, written
// independently of the RTL: a scaled product is floor(x*w / 256), the tansig
// activation is round(256*tanh(a/256)) of the sum saturated to a 9-bit
// address a, with tanh taken as (e^2x - 1)/(e^2x + 1), and purelin is a
// saturation to the output width.
package fcnn_ref_pkg;

  function automatic int sprod(int x, int w);
    return (x * w) >>> 8;
  endfunction

  function automatic int sat(int v, int bits);
    int hi, lo;
    hi = (1 << (bits - 1)) - 1;
    lo = -(1 << (bits - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int tansig_ref(int c);
    int  a;
    real e;
    a = sat(c, 9);
    e = $exp(2.0 * real'(a) / 256.0);
    return $rtoi($floor(256.0 * (e - 1.0) / (e + 1.0) + 0.5));
  endfunction

  // random signed value in [-lim, lim]
  function automatic int srand(int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

endpackage
