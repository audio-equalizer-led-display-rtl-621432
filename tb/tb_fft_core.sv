// tb_fft_core: self-checking test of the 32-point FFT engine.
//
// Loads 32 real samples at bit-reversed addresses, pulses start, checks that
// done arrives 86 cycles later, then reads all 32 bins and compares them with
// a double-precision DFT X[k] = sum x[n] exp(+j*2*pi*n*k/32) (the sign
// convention of the twiddle table). Test vectors: the +/-1024 square wave
// (16 samples high, 16 low), whose bins are also compared with the expected
// simulation values X[1] = 0x0800 + j0x511b etc., a unit impulse, a DC level,
// a cosine at bin 3, and random samples of amplitude up to 900. Every bin is
// also compared exactly with a bit-exact integer model of a textbook
// iterative radix-2 FFT using the same fixed-point rules; the DFT tolerance
// of 40 covers the truncation error of five unscaled levels (at most 31).
module tb_fft_core;
  import eq_pkg::*;

  logic             clk = 0, reset = 1;
  logic             load_we = 0, start = 0, busy, done;
  logic [LOG2N-1:0] load_addr = '0, res_addr_a = '0, res_addr_b = '0;
  sample_t          load_data = '0;
  cplx_t            res_a, res_b;
  int checks = 0, failures = 0;

  fft_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [32];
  cplx_t got [32];

  function automatic logic [4:0] bitrev(logic [4:0] a);
    return {a[0], a[1], a[2], a[3], a[4]};
  endfunction

  task automatic run_fft(output int cycles);
    for (int n = 0; n < 32; n++) begin
      @(negedge clk);
      load_we = 1; load_addr = bitrev(5'(n)); load_data = sample_t'(x[n]);
    end
    @(negedge clk); load_we = 0; start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    for (int k = 0; k < 32; k += 2) begin
      res_addr_a = 5'(k); res_addr_b = 5'(k + 1);
      @(negedge clk);
      got[k] = res_a; got[k+1] = res_b;
    end
  endtask

  // Bit-exact model: iterative radix-2 DIT on natural indices, Q1.15
  // twiddles rounded from 32767*cos/sin, products truncated by >>> 15,
  // sums wrapped to 16 bits.
  int mre [32], mim [32];
  task automatic model_fft();
    int ar, ai, br, bi, wr, wi, tr, ti, span, k;
    for (int n = 0; n < 32; n++) begin mre[bitrev(5'(n))] = x[n]; mim[bitrev(5'(n))] = 0; end
    for (int s = 0; s < 5; s++) begin
      span = 1 << s;
      for (int g = 0; g < 32; g += 2 * span)
        for (int m = 0; m < span; m++) begin
          k  = m * (16 / span);
          wr = int'($rtoi(32767.0 * $cos(2.0 * 3.14159265358979 * k / 32.0) + ((k < 8) ? 0.5 : -0.5)));
          wi = int'($rtoi(32767.0 * $sin(2.0 * 3.14159265358979 * k / 32.0) + 0.5));
          ar = mre[g+m]; ai = mim[g+m]; br = mre[g+m+span]; bi = mim[g+m+span];
          tr = (br * wr - bi * wi) >>> 15;
          ti = (br * wi + bi * wr) >>> 15;
          mre[g+m]      = int'(sample_t'(ar + tr));
          mim[g+m]      = int'(sample_t'(ai + ti));
          mre[g+m+span] = int'(sample_t'(ar - tr));
          mim[g+m+span] = int'(sample_t'(ai - ti));
        end
    end
  endtask

  task automatic check_dft(string name, real tol);
    int cycles;
    int bad = 0;
    real re, im, th;
    run_fft(cycles);
    model_fft();
    checks++;
    if (cycles != 86) begin
      failures++; $display("%s: FFT took %0d cycles, expected 86", name, cycles);
    end
    for (int k = 0; k < 32; k++) begin
      re = 0; im = 0;
      for (int n = 0; n < 32; n++) begin
        th = 2.0 * 3.14159265358979 * n * k / 32.0;
        re += x[n] * $cos(th);
        im += x[n] * $sin(th);
      end
      checks++;
      if (int'(got[k].re) != mre[k] || int'(got[k].im) != mim[k]) begin
        failures++; bad++;
        if (bad < 5) $display("%s: X[%0d] = %0d, %0dj; bit-exact model %0d, %0dj",
                              name, k, int'(got[k].re), int'(got[k].im), mre[k], mim[k]);
      end
      checks++;
      if ((re - got[k].re > tol) || (got[k].re - re > tol) ||
          (im - got[k].im > tol) || (got[k].im - im > tol)) begin
        failures++; bad++;
        if (bad < 5) $display("%s: X[%0d] = %0d, %0dj; expected %0.1f, %0.1fj",
                              name, k, int'(got[k].re), int'(got[k].im), re, im);
      end
    end
  endtask

  // expected square-wave bins (odd k): real, imaginary
  localparam logic [15:0] SQ_RE [16] = '{16'h0800, 16'h07fd, 16'h07fc, 16'h07fc, 16'h07fd, 16'h07fc,
                                         16'h07fd, 16'h07fd, 16'h07fe, 16'h07fd, 16'h07fe, 16'h07fe,
                                         16'h07fd, 16'h07fe, 16'h0801, 16'h0805};
  localparam logic [15:0] SQ_IM [16] = '{16'h511b, 16'h1a54, 16'h0ef2, 16'h09bc, 16'h068e, 16'h0445,
                                         16'h026d, 16'h00c9, 16'hff37, 16'hfd94, 16'hfbbc, 16'hf972,
                                         16'hf644, 16'hf10f, 16'he5a9, 16'haee5};

  int exact;
  initial begin
    repeat (3) @(negedge clk);
    reset = 0;

    for (int n = 0; n < 32; n++) x[n] = (n < 16) ? 1024 : -1024;
    check_dft("square", 40.0);
    exact = 0;
    for (int i = 0; i < 16; i++) begin
      int er, ei;
      er = int'(got[2*i+1].re) - int'(signed'(SQ_RE[i]));
      ei = int'(got[2*i+1].im) - int'(signed'(SQ_IM[i]));
      checks++;
      if (er > 24 || er < -24 || ei > 24 || ei < -24) begin
        failures++;
        $display("square: X[%0d] = %h %h, expected about %h %h", 2*i+1, got[2*i+1].re, got[2*i+1].im, SQ_RE[i], SQ_IM[i]);
      end
      if (er == 0 && ei == 0) exact++;
      checks++;
      if (got[2*i].re != 0 || got[2*i].im != 0) begin
        failures++; $display("square: even bin %0d not zero", 2*i);
      end
    end
    $display("square wave: %0d of 16 odd bins identical to the expected simulation values", exact);

    for (int n = 0; n < 32; n++) x[n] = (n == 0) ? 20000 : 0;
    check_dft("impulse", 2.0);
    for (int n = 0; n < 32; n++) x[n] = 700;
    check_dft("dc", 40.0);
    for (int n = 0; n < 32; n++) x[n] = int'(900.0 * $cos(2.0 * 3.14159265358979 * 3 * n / 32.0));
    check_dft("cos3", 40.0);
    for (int t = 0; t < 20; t++) begin
      for (int n = 0; n < 32; n++) x[n] = int'($urandom_range(1800)) - 900;
      check_dft("random", 40.0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
