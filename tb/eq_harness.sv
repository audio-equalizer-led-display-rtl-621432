// eq_harness: end-to-end test of the equalizer, shared by tb_eq_top
// (shortened timings) and tb_eq_top_full (the design's timings).
//
// The microcontroller model sends a known waveform, 32 samples per spectrum:
// a +/-1024 square wave of period 32, a tone at bin 5, silence, random noise
// and a two-tone signal, one per pass. For every pass the harness computes
// the expected column magnitudes with a bit-exact integer model of a radix-2
// FFT (Q1.15 twiddles rounded from 32767*cos/sin, products truncated by
// >>> 15, 16-bit wrapping sums), then checks
//  * the 8 stored column magnitudes exactly,
//  * the LED rows of every column as it is multiplexed onto the matrix,
//  * that the display keeps showing that spectrum while the next 32 samples
//    are collected,
//  * the sampling interval (WRITEDATA to next START = SAMPLE_DELAY + 3),
//    the FFT time (86 cycles in S1) and the display hold
//    (S3 to S5 = DISPLAY_DELAY + 2).
// It counts each mechanism (SPI words, sampling waits, FFT runs, reads from
// each bank, magnitude saves, display holds, columns shown, bar heights 0
// and 8, display held during loading) and fails any that never happened.
// USE_DEFAULTS instantiates eq_top with no parameter overrides.
module eq_harness #(
  parameter bit USE_DEFAULTS  = 0,
  parameter int SAMPLE_DELAY  = 64,
  parameter int DISPLAY_DELAY = 300,
  parameter int HALF_BIT      = 40,
  parameter int ADC_TIME      = 60,
  parameter int N_PASSES      = 5,
  parameter int MAX_CYCLES    = 400000
) ();
  import eq_pkg::*;

  logic clk = 0, reset = 1;
  logic spi_clk, sdi, load, done;
  logic [15:0] led_display;
  logic [15:0] sample_in;
  int sent;

  ctrl_state_t state;
  logic        fft_done, agu_busy, agu_bank;
  mag_t        mags [N_BINS];

  if (USE_DEFAULTS) begin : g_dut
    eq_top dut (.clk, .reset, .spi_clk, .sdi, .load, .done, .led_display);
    assign state    = dut.u_ctrl.state;
    assign fft_done = dut.fft_done;
    assign agu_busy = dut.u_fft.busy;
    assign agu_bank = dut.u_fft.u_agu.rd_bank;
    assign mags     = dut.mags;
  end else begin : g_dut
    eq_top #(.SAMPLE_DELAY(SAMPLE_DELAY), .DISPLAY_DELAY(DISPLAY_DELAY)) dut (
      .clk, .reset, .spi_clk, .sdi, .load, .done, .led_display);
    assign state    = dut.u_ctrl.state;
    assign fft_done = dut.fft_done;
    assign agu_busy = dut.u_fft.busy;
    assign agu_bank = dut.u_fft.u_agu.rd_bank;
    assign mags     = dut.mags;
  end

  mcu_model #(.HALF_BIT(HALF_BIT), .ADC_TIME(ADC_TIME)) u_mcu (
    .done, .sample_in, .spi_clk, .sdi, .load, .sent);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == MAX_CYCLES) begin
      failures++;
      $display("watchdog: %0d cycles, state %s, %0d words sent", cyc, state.name(), sent);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---------------------------------------------------------------- stimulus
  localparam real PI = 3.14159265358979;

  function automatic int wave(int p, int n);
    case (p % 5)
      0: return (n < 16) ? 1024 : -1024;
      1: return $rtoi(3000.0 * $sin(2.0 * PI * 5 * n / 32.0));
      2: return 0;
      3: return int'(((32'(n * 7919 + p * 104729) * 32'd2654435761) >> 20) % 601) - 300;  // fixed pseudo-random noise
      default: return $rtoi(1500.0 * $cos(2.0 * PI * 2 * n / 32.0) + 600.0 * $sin(2.0 * PI * 13 * n / 32.0));
    endcase
  endfunction

  always_comb sample_in = 16'(wave(sent / 32, sent % 32));

  // -------------------------------------------------------- reference model

  function automatic logic [4:0] bitrev(logic [4:0] a);
    return {a[0], a[1], a[2], a[3], a[4]};
  endfunction

  function automatic int tw_re(int k);
    real v = 32767.0 * $cos(2.0 * PI * k / 32.0);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction
  function automatic int tw_im(int k);
    real v = 32767.0 * $sin(2.0 * PI * k / 32.0);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  longint exp_mag [8];
  localparam int TH [8] = '{2, 4, 33, 100, 598, 1298, 1896, 4736};

  task automatic model(int p);
    int re [32], im [32];
    int ar, ai, br, bi, tr, ti, span, k;
    for (int n = 0; n < 32; n++) begin
      re[bitrev(5'(n))] = int'(signed'(16'(wave(p, n))));
      im[bitrev(5'(n))] = 0;
    end
    for (int s = 0; s < 5; s++) begin
      span = 1 << s;
      for (int g = 0; g < 32; g += 2 * span)
        for (int m = 0; m < span; m++) begin
          k  = m * (16 / span);
          ar = re[g+m]; ai = im[g+m]; br = re[g+m+span]; bi = im[g+m+span];
          tr = (br * tw_re(k) - bi * tw_im(k)) >>> 15;
          ti = (br * tw_im(k) + bi * tw_re(k)) >>> 15;
          re[g+m]      = int'(signed'(16'(ar + tr)));
          im[g+m]      = int'(signed'(16'(ai + ti)));
          re[g+m+span] = int'(signed'(16'(ar - tr)));
          im[g+m+span] = int'(signed'(16'(ai - ti)));
        end
    end
    for (int c = 0; c < 8; c++)
      exp_mag[c] = ((longint'(re[2*c]) * re[2*c] + longint'(im[2*c]) * im[2*c]) >> 15) +
                   ((longint'(re[2*c+1]) * re[2*c+1] + longint'(im[2*c+1]) * im[2*c+1]) >> 15);
  endtask

  function automatic int height(longint m);
    int h = 0;
    for (int i = 0; i < 8; i++) if (m >= longint'(TH[i])) h++;
    return h;
  endfunction

  int exp_h [8];
  bit have_display = 0;

  // check the LED outputs over 16 cycles against exp_h; returns columns seen
  task automatic check_display(string when);
    bit seen [8];
    int c;
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      c = -1;
      for (int i = 0; i < 8; i++) if (led_display[i]) c = i;
      checks++;
      if (!$onehot(led_display[7:0])) begin failures++; $display("%s: column lines %b", when, led_display[7:0]); continue; end
      seen[c] = 1;
      checks++;
      if (~led_display[15:8] != 8'((1 << exp_h[c]) - 1)) begin
        failures++;
        $display("%s: column %0d rows %b, expected height %0d", when, c, led_display[15:8], exp_h[c]);
      end
      if (exp_h[c] == 0) cnt_h0++;
      if (exp_h[c] == 8) cnt_h8++;
    end
    for (int i = 0; i < 8; i++) if (seen[i]) cnt_cols[i]++;
  endtask

  // ------------------------------------------------------------ monitoring
  int cnt_spi = 0, cnt_wait = 0, cnt_fft = 0, cnt_bank [2] = '{0, 0}, cnt_save = 0, cnt_hold = 0;
  int cnt_cols [8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  int cnt_h0 = 0, cnt_h8 = 0, cnt_held = 0;
  int passes_done = 0;

  initial begin
    ctrl_state_t prev;
    int last_write, last_s3, s1_start;
    last_write = 0; last_s3 = 0; s1_start = 0;
    repeat (4) @(negedge clk);
    reset = 0;
    prev = state;
    forever begin
      @(negedge clk); #1;
      if (agu_busy) cnt_bank[agu_bank]++;
      if (state != prev) begin
        case (state)
          ST_WRITEDATA: begin cnt_spi++; last_write = cyc; end
          ST_DELAY:     cnt_wait++;
          ST_START:     if (prev == ST_RESET_SPI) begin
                          checks++;
                          if (cyc - last_write != SAMPLE_DELAY + 3) begin
                            failures++; $display("sampling interval %0d cycles", cyc - last_write);
                          end
                        end
          ST_S1:        s1_start = cyc;
          ST_S2:        begin
                          cnt_fft++;
                          checks++;
                          if (cyc - s1_start != 86) begin failures++; $display("FFT took %0d cycles", cyc - s1_start); end
                        end
          ST_S3:        begin
                          cnt_save++;
                          last_s3 = cyc;
                          model(passes_done);
                          for (int c = 0; c < 8; c++) begin
                            checks++;
                            if (longint'(mags[c]) != exp_mag[c]) begin
                              failures++;
                              $display("pass %0d column %0d magnitude %0d, expected %0d", passes_done, c, mags[c], exp_mag[c]);
                            end
                            exp_h[c] = height(exp_mag[c]);
                          end
                          $display("pass %0d heights %0d %0d %0d %0d %0d %0d %0d %0d", passes_done,
                                   exp_h[0], exp_h[1], exp_h[2], exp_h[3], exp_h[4], exp_h[5], exp_h[6], exp_h[7]);
                          check_display("after save");
                          have_display = 1;
                        end
          ST_S5:        begin
                          cnt_hold++;
                          checks++;
                          if (cyc - last_s3 != DISPLAY_DELAY + 2) begin
                            failures++; $display("display hold %0d cycles", cyc - last_s3);
                          end
                          passes_done++;
                        end
          default: ;
        endcase
        // the previous spectrum stays on the display while sampling
        if (state == ST_DELAY && have_display && (cnt_spi % 8 == 3)) begin
          check_display("while loading");
          cnt_held++;
        end
      end
      prev = state;
      if (passes_done == N_PASSES && (state == ST_DELAY) && cnt_held > 0 && cnt_spi >= 32 * N_PASSES + 4) begin
        summary();
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never exercised: %s", what); end
  endtask

  task automatic summary();
    $display("SPI words %0d, sampling waits %0d, FFT runs %0d, bank reads %0d/%0d, saves %0d, holds %0d",
             cnt_spi, cnt_wait, cnt_fft, cnt_bank[0], cnt_bank[1], cnt_save, cnt_hold);
    $display("height-0 bars %0d, height-8 bars %0d, display held during loading %0d times",
             cnt_h0, cnt_h8, cnt_held);
    need("SPI sample transfer", cnt_spi);
    need("sampling delay", cnt_wait);
    need("FFT", cnt_fft);
    need("read from bank 0", cnt_bank[0]);
    need("read from bank 1", cnt_bank[1]);
    need("magnitude save", cnt_save);
    need("display hold delay", cnt_hold);
    for (int i = 0; i < 8; i++) need($sformatf("column %0d shown", i), cnt_cols[i]);
    need("empty bar", cnt_h0);
    need("full bar", cnt_h8);
    need("display held while loading", cnt_held);
    checks++;
    if (cnt_fft != N_PASSES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
