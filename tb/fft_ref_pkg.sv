// fft_ref_pkg: reference arithmetic for the FFT testbenches.
//
// Computes DFTs directly from the definition X(k) = sum_n x(n) exp(-j2pi nk/N)
// in double-precision reals, independent of the fixed-point datapath, and
// converts between reals and the datapath's fixed-point format.
package fft_ref_pkg;
  import fft36_pkg::*;

  localparam real PI = 3.14159265358979323846;

  // Direct DFT of up to 12 points; xr/xi hold the inputs, yr/yi the outputs.
  function automatic void dft(input int n_pts, input real xr [12], input real xi [12],
                              output real yr [12], output real yi [12]);
    for (int k = 0; k < 12; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      if (k < n_pts)
        for (int n = 0; n < n_pts; n++) begin
          real ang;
          ang   = -2.0 * PI * real'((n * k) % n_pts) / real'(n_pts);
          yr[k] += xr[n] * $cos(ang) - xi[n] * $sin(ang);
          yi[k] += xr[n] * $sin(ang) + xi[n] * $cos(ang);
        end
    end
  endfunction

  function automatic real to_real(dval_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // Random datapath value of magnitude below 2^(bits-1) LSBs.
  function automatic dval_t rnd_d(int bits);
    int v;
    v = int'($urandom_range(0, (1 << bits) - 1)) - (1 << (bits - 1));
    return dval_t'(v);
  endfunction

  // Random input sample part, full IN_W range.
  function automatic ival_t rnd_i();
    return ival_t'($urandom);
  endfunction
endpackage
