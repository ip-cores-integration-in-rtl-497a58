// tb_ref_pkg: reference arithmetic shared by the FFT testbenches.
//
// dft8_scaled() is a direct 8-point DFT in real arithmetic, divided by 8 to
// match the core's one-half-per-stage scaling. near() compares a result part
// with a real value within a tolerance of whole LSBs.
package tb_ref_pkg;
  import ipi_pkg::*;

  localparam real PI = 3.14159265358979;

  typedef struct {
    real re;
    real im;
  } rcplx_t;

  function automatic void dft8_scaled(input cplx_t x [8], output rcplx_t y [8]);
    for (int k = 0; k < 8; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < 8; n++) begin
        real c, s;
        c = $cos(2.0 * PI * n * k / 8.0);
        s = $sin(2.0 * PI * n * k / 8.0);
        sr += x[n].re * c + x[n].im * s;
        si += x[n].im * c - x[n].re * s;
      end
      y[k].re = sr / 8.0;
      y[k].im = si / 8.0;
    end
  endfunction

  function automatic bit near(input int got, input real exp_v, input real tol);
    return (real'(got) - exp_v) <= tol && (exp_v - real'(got)) <= tol;
  endfunction

  // A random sample whose parts lie in [-lim, lim].
  function automatic cplx_t rand_sample(input int lim);
    cplx_t s;
    s.re = 8'($urandom_range(0, 2 * lim) - lim);
    s.im = 8'($urandom_range(0, 2 * lim) - lim);
    return s;
  endfunction

endpackage
