// hdc_tb_pkg: reference arithmetic shared by the testbenches, written
// with real numbers independently of the RTL:
//   h = cos(B.F + 2*pi*b/2^32) * sin(B.F)   (the encoding of one dimension)
// plus conversions between Q16.16 and real and the xorshift32 generator
// used to predict regenerated basis vectors.
package hdc_tb_pkg;
  import hdc_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic real q2r(data_t v);
    return real'(v) / 65536.0;
  endfunction

  // Random Q16.16 value in [-1, 1).
  function automatic data_t rand_unit();
    return data_t'($signed(17'($urandom)));
  endfunction

  // Random Q16.16 value in [0, 1) (a normalised pixel).
  function automatic data_t rand_pixel();
    return data_t'({16'd0, 16'($urandom)});
  endfunction

  function automatic real encode_ref(real dot, turn_t bias);
    return $cos(dot + 2.0 * PI * real'(bias) / 4294967296.0) * $sin(dot);
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction
endpackage
