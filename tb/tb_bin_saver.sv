// tb_bin_saver: feeds the saver from a behavioural result memory (one cycle
// read latency, like the FFT's result ports) holding random bins, and checks
// that column c receives ((re^2+im^2)>>15 of bin 2c) + (same of bin 2c+1),
// that `complete` pulses 10 cycles after start, and that the columns hold
// their values between saves. Includes full-scale bins (-32768) to check
// that the sum does not wrap.
module tb_bin_saver;
  import eq_pkg::*;
  logic clk = 0, reset = 1, start = 0, busy, complete;
  logic [4:0] res_addr_a, res_addr_b;
  cplx_t res_a, res_b;
  mag_t mags [N_BINS];
  mag_t held [N_BINS];
  cplx_t bank [32];
  int checks = 0, failures = 0;

  bin_saver dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    res_a <= bank[res_addr_a];
    res_b <= bank[res_addr_b];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint pw(cplx_t v);
    return (longint'(v.re) * v.re + longint'(v.im) * v.im) >> 15;
  endfunction

  initial begin
    int cycles;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < 32; i++) begin
        bank[i] = cplx_t'({$urandom, $urandom});
        if (t % 3 == 1) bank[i] = cplx_t'({16'($urandom_range(60)), 16'($urandom_range(60))});
      end
      if (t == 0) begin bank[4] = '{re: -32768, im: -32768}; bank[5] = '{re: -32768, im: -32768}; end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!complete) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 10) begin failures++; $display("complete after %0d cycles", cycles); end
      for (int c = 0; c < N_BINS; c++) begin
        longint e;
        e = pw(bank[2 * c]) + pw(bank[2 * c + 1]);
        checks++;
        if (longint'(mags[c]) != e) begin failures++; $display("column %0d = %0d, expected %0d", c, mags[c], e); end
        held[c] = mags[c];
      end
      // columns hold while the source changes
      for (int i = 0; i < 32; i++) bank[i] = '0;
      repeat (10) @(negedge clk);
      for (int c = 0; c < N_BINS; c++) begin
        checks++;
        if (mags[c] != held[c]) begin failures++; $display("column %0d changed without a save", c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
