// Reference model shared by the testbenches: a direct O(N^2) DFT in real
// arithmetic, independent of the radix-2 structure and the fixed-point
// rounding of the design. Arrays hold up to 64 points; n gives the length.
package fft_tb_pkg;

  localparam int MAXN = 64;
  typedef real vec_t [MAXN];

  function automatic void dft(input int n, input vec_t xr, input vec_t xi,
                              output vec_t yr, output vec_t yi);
    real a;
    for (int k = 0; k < MAXN; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
    end
    for (int k = 0; k < n; k++)
      for (int m = 0; m < n; m++) begin
        a = -2.0 * 3.14159265358979323846 * real'((k * m) % n) / real'(n);
        yr[k] += xr[m] * $cos(a) - xi[m] * $sin(a);
        yi[k] += xr[m] * $sin(a) + xi[m] * $cos(a);
      end
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Random signed value of w bits, full range.
  function automatic int rand_s(int w);
    int v = int'($urandom % (1 << w));
    return v - (1 << (w - 1));
  endfunction

endpackage
