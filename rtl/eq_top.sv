// eq_top: audio equalizer LED display, FPGA side.
//
// A microcontroller digitises a microphone signal and sends 16-bit samples
// over SPI whenever this design raises `done`. The design collects 32 samples
// at about 2441 samples/s, runs a 32-point radix-2 FFT on them, reduces the
// 16 bins below half the sampling rate (about 76 Hz each) to 8 column
// magnitudes by adding adjacent bins, and shows them as bars on an 8x8 LED
// matrix, multiplexed one column at a time. A new spectrum is taken about
// every 0.1 s; the old one stays on the display while samples are collected.
//
//   spi_receiver  -> sample register (synchronised to clk)
//   eq_controller -> sequencing, sampling and display timers
//   fft_core      -> AGU, twiddle ROM, butterfly, 4 two-port RAMs
//   bin_saver     -> 8 column magnitudes
//   display_driver-> led_display
//
// Ports: clk (40 MHz in the design), reset (active high), spi_clk/sdi/load
// from the microcontroller, done to it, led_display to the matrix ([7:0]
// columns C1..C8 high = selected, [15:8] rows R1..R8 low = lit). The
// parameter defaults are the design's timings at 40 MHz; COLUMN_DIV sets the
// clock cycles per displayed column.
module eq_top
  import eq_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY  = 16384,
  parameter int unsigned DISPLAY_DELAY = 4194304,
  parameter int unsigned COLUMN_DIV    = 1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        spi_clk,
  input  logic        sdi,
  input  logic        load,
  output logic        done,
  output logic [15:0] led_display
);

  sample_t          sample;
  logic             load_sync;
  logic             load_we, fft_start, fft_done, fft_busy;
  logic             save_start, save_busy, save_complete;
  logic [LOG2N-1:0] load_addr, res_addr_a, res_addr_b;
  cplx_t            res_a, res_b;
  mag_t             mags [N_BINS];
  ctrl_state_t      state;
  logic [2:0]       column;

  spi_receiver u_spi (
    .clk, .reset, .spi_clk, .sdi, .load, .sample, .load_sync);

  eq_controller #(.SAMPLE_DELAY(SAMPLE_DELAY), .DISPLAY_DELAY(DISPLAY_DELAY)) u_ctrl (
    .clk, .reset, .load(load_sync), .fft_done, .save_complete,
    .done, .load_we, .load_addr, .fft_start, .save_start, .state);

  fft_core u_fft (
    .clk, .reset, .load_we, .load_addr, .load_data(sample), .start(fft_start),
    .busy(fft_busy), .done(fft_done),
    .res_addr_a, .res_addr_b, .res_a, .res_b);

  bin_saver u_save (
    .clk, .reset, .start(save_start), .res_addr_a, .res_addr_b, .res_a, .res_b,
    .mags, .busy(save_busy), .complete(save_complete));

  display_driver #(.COLUMN_DIV(COLUMN_DIV)) u_disp (
    .clk, .reset, .mags, .led_display, .column);

endmodule
