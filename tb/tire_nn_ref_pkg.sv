// Reference arithmetic for the testbenches, written independently of the RTL
// package: 64-bit integer versions of the 27-bit fixed-point (20 fraction bits)
// product, saturating sum, ReLU and the full network.
package tire_nn_ref_pkg;
  localparam longint FMAX =  (longint'(1) << 26) - 1;
  localparam longint FMIN = -(longint'(1) << 26);

  function automatic longint r_sat(longint v);
    return (v > FMAX) ? FMAX : (v < FMIN) ? FMIN : v;
  endfunction

  function automatic longint r_mul(longint a, longint b);
    return r_sat((a * b) >>> 20);
  endfunction

  function automatic longint r_add(longint a, longint b);
    return r_sat(a + b);
  endfunction

  function automatic longint r_relu(longint a);
    return (a < 0) ? 0 : a;
  endfunction

  // Random fixed-point value in [-range, range) LSBs.
  function automatic longint r_rand(longint range);
    return longint'($urandom % (2 * range)) - range;
  endfunction
endpackage
