// butterfly: radix-2 decimation-in-time butterfly unit.
//
// Computes x = a + w*b and y = a - w*b for complex Q1.15 operands. The complex
// product is formed at full 32-bit precision and truncated (arithmetic shift
// right by 15) to 16 bits before the add/subtract; the sums wrap in 16 bits.
// There is no per-level scaling, as in the design, so a full-scale input can
// overflow: the audio samples are expected to stay well below full scale.
//
// Combinational; the FFT places it between the RAM read registers and the
// RAM write ports.
module butterfly
  import eq_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output cplx_t x,
  output cplx_t y
);

  logic signed [32:0] prod_re, prod_im;
  sample_t            wb_re, wb_im;

  always_comb begin
    prod_re = 33'(b.re * w.re) - 33'(b.im * w.im);
    prod_im = 33'(b.re * w.im) + 33'(b.im * w.re);
    wb_re   = prod_re[30:15];
    wb_im   = prod_im[30:15];
    x.re    = a.re + wb_re;
    x.im    = a.im + wb_im;
    y.re    = a.re - wb_re;
    y.im    = a.im - wb_im;
  end

endmodule
