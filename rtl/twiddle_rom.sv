// twiddle_rom: twiddle factors for the 32-point FFT.
//
// Entry k (k = 0 .. N/2-1) holds W(k) = cos(2*pi*k/N) + j*sin(2*pi*k/N) in
// Q1.15, each part rounded from 32767 times the exact value, so that
// W(0) = 0x7fff + j0. These are the values the design tabulates; note the
// positive sine, which makes the FFT compute sum x[n]*exp(+j*2*pi*n*k/N).
// For the real audio input used here that is the complex conjugate of the
// usual forward DFT and gives the same bin magnitudes.
//
// Combinational: `w` follows `addr` in the same cycle.
module twiddle_rom
  import eq_pkg::*;
(
  input  logic [LOG2N-2:0] addr,
  output cplx_t            w
);

  // Quarter-wave table: round(32767*sin(2*pi*i/N)) for i = 0 .. N/4.
  // The table is written for the 32-point size set in eq_pkg.
  localparam int unsigned QN = (1 << LOG2N) / 4;
  localparam logic [15:0] SIN_Q [0:8] = '{
    16'h0000, 16'h18f9, 16'h30fb, 16'h471c, 16'h5a82,
    16'h6a6d, 16'h7641, 16'h7d89, 16'h7fff
  };

  // cos(theta) = sin(pi/2 - theta); second quadrant by symmetry.
  always_comb begin
    int unsigned k;
    k = int'(addr);
    if (k <= QN) begin
      w.re = sample_t'(SIN_Q[QN - k]);
      w.im = sample_t'(SIN_Q[k]);
    end else begin
      w.re = -sample_t'(SIN_Q[k - QN]);
      w.im = sample_t'(SIN_Q[2*QN - k]);
    end
  end

endmodule
