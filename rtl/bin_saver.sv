// bin_saver: turns the FFT result into the 8 column magnitudes and keeps
// them for the display.
//
// With 32 real samples the FFT gives 16 useful bins (0 .. N/2-1); the display
// has 8 columns, so adjacent bins are combined: column c shows bins 2c and
// 2c+1. For each column the saver reads both bins at once through the result
// ports of the FFT memory, forms each bin's relative magnitude as
// (re^2 + im^2) >> 15 (the squared magnitude in Q1.15 units; no square root
// is taken), adds the two and writes the sum into column register c. The
// squaring, its scaling and the full-width (unwrapped) sum are this
// implementation's reading of "the magnitude of each bin is calculated".
// The column registers keep their values until the next save, so the display
// holds the previous spectrum while new samples are collected.
//
// Interface: `start` (one-cycle pulse) begins a save; res_addr_a/b drive the
// FFT's result read addresses, res_a/res_b return the bins one cycle later.
// Timing: N_BINS + 2 cycles after start, `complete` pulses for one cycle with
// all column registers written.
module bin_saver
  import eq_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  output logic [LOG2N-1:0] res_addr_a,
  output logic [LOG2N-1:0] res_addr_b,
  input  cplx_t            res_a,
  input  cplx_t            res_b,
  output mag_t             mags [N_BINS],
  output logic             busy,
  output logic             complete
);

  localparam int unsigned CW = $clog2(N_BINS);

  logic          reading;      // addresses for column `col` are being issued
  logic          capture;      // mags for column `cap_col` are at res_a/res_b
  logic [CW-1:0] col, cap_col;

  always_ff @(posedge clk) begin
    if (reset) begin
      reading  <= 1'b0;
      col      <= '0;
      capture  <= 1'b0;
      cap_col  <= '0;
      complete <= 1'b0;
    end else begin
      capture  <= reading;
      cap_col  <= col;
      complete <= capture && (cap_col == CW'(N_BINS - 1));
      if (start && !reading) begin
        reading <= 1'b1;
        col     <= '0;
      end else if (reading) begin
        col <= col + 1'b1;
        if (col == CW'(N_BINS - 1)) reading <= 1'b0;
      end
    end
  end

  assign res_addr_a = LOG2N'({col, 1'b0});
  assign res_addr_b = LOG2N'({col, 1'b1});
  assign busy       = reading | capture;

  function automatic logic [31:0] power(cplx_t v);
    logic signed [31:0] re2, im2;
    re2 = 32'(v.re * v.re);
    im2 = 32'(v.im * v.im);
    return 32'(unsigned'(re2)) + 32'(unsigned'(im2));
  endfunction

  mag_t col_mag;
  always_comb begin
    logic [31:0] pa, pb;
    pa = power(res_a);
    pb = power(res_b);
    col_mag = MAG_W'(pa >> 15) + MAG_W'(pb >> 15);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int c = 0; c < N_BINS; c++) mags[c] <= '0;
    end else if (capture) begin
      mags[cap_col] <= col_mag;
    end
  end

endmodule
