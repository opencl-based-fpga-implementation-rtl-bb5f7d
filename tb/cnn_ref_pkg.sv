// cnn_ref_pkg: reference arithmetic for the accelerator testbenches.
//
// Computes results with plain integers, independently of the RTL datapath:
// a dot product in 64-bit arithmetic, bias added in the product format
// (value * 2**FRAC), leaky ReLU as floor(x * 26 / 256) for negative x,
// division by 2**FRAC rounding toward minus infinity, saturation to 16 bits.
package cnn_ref_pkg;

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int finish_value(longint acc, int bias, bit relu, int frac = 8);
    longint x, y;
    x = acc + longint'(bias) * (longint'(1) << frac);
    if (relu && x < 0) x = floor_div(x * 26, 256);
    y = floor_div(x, longint'(1) << frac);
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    return int'(y);
  endfunction

  // Small random value, mostly within +-2.0 in Q8.8, sometimes large.
  function automatic int rnd_val();
    if ($urandom_range(0, 15) == 0) return $signed($urandom_range(0, 65535)) - 32768;
    return $signed($urandom_range(0, 1023)) - 512;
  endfunction

endpackage
