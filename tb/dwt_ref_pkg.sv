// Reference arithmetic for the wavelet testbenches, written directly from the
// filter definitions with ordinary integer multiplies, independent of the
// distributed-arithmetic hardware.
//   Lo_D = round(2^14 * [-0.12941,  0.22414,  0.83652,  0.48296])
//   Hi_D = round(2^14 * [-0.48296,  0.83652, -0.22414, -0.12941])
// A filter output y[n] = sum_k c[k]*x[n-k] is brought back to a 16-bit sample
// by floor(y / 2^14) clipped to [-32768, 32767].
package dwt_ref_pkg;
  typedef longint coefs_t [4];
  localparam coefs_t REF_LO = '{-2120, 3672, 13705, 7913};
  localparam coefs_t REF_HI = '{-7913, 13705, -3672, -2120};

  // hist[0] is the newest sample
  function automatic longint fir(coefs_t c, longint hist [4]);
    longint s = 0;
    for (int k = 0; k < 4; k++) s += c[k] * hist[k];
    return s;
  endfunction

  function automatic longint floor_div(longint y, int sh);
    longint d = longint'(1) << sh;
    if (y >= 0) return y / d;
    return -((-y + d - 1) / d);
  endfunction

  function automatic longint requant(longint y, output bit clipped);
    longint q = floor_div(y, 14);
    clipped = 1'b0;
    if (q > 32767)  begin q = 32767;  clipped = 1'b1; end
    if (q < -32768) begin q = -32768; clipped = 1'b1; end
    return q;
  endfunction
endpackage
