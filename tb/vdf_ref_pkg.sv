// Reference arithmetic for the variable filter's testbenches.
//
// fd_ref models one fractional-delay stage with plain 64-bit integer
// multiplications (the hardware uses shift-and-add), following the same
// truncation points: x0/2 and x2/2 rounded toward minus infinity, and each
// product with d = k/16 rounded toward minus infinity.
// fd_exact512 returns 512 times the ideal Lagrange interpolator output
//   y = d(d-1)/2*x0 + (1-d^2)*x1 + d(d+1)/2*x2,
// which is an integer for d = k/16.
package vdf_ref_pkg;

  function automatic longint floor_div16(input longint v);
    return v >>> 4;
  endfunction

  function automatic longint fd_ref(input longint x0, input longint x1,
                                    input longint x2, input int k);
    longint a, b, s2, s3, m1, m2;
    a  = x0 >>> 1;
    b  = x2 >>> 1;
    s2 = a - x1 + b;
    m1 = floor_div16(s2 * k);
    s3 = m1 - a + b;
    m2 = floor_div16(s3 * k);
    return x1 + m2;
  endfunction

  function automatic longint fd_exact512(input longint x0, input longint x1,
                                         input longint x2, input int k);
    return 512 * x1 + 16 * k * (x2 - x0) + k * k * (x0 - 2 * x1 + x2);
  endfunction

endpackage
