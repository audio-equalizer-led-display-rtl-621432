// eq_pkg: types and constants shared by the audio-equalizer datapath.
//
// The equalizer takes 32 real 16-bit audio samples, runs a 32-point radix-2
// FFT on them in Q1.15 fixed point, and reduces the 16 bins below the Nyquist
// frequency to 8 column magnitudes for an 8x8 LED matrix. Sizes here follow
// the design (32 points, 16-bit words, 8 columns); the 20-bit magnitude width
// is this implementation's choice.
package eq_pkg;

  localparam int unsigned LOG2N    = 5;            // 32-point FFT
  localparam int unsigned NPOINTS  = 1 << LOG2N;
  localparam int unsigned DATA_W   = 16;           // sample / RAM word width
  localparam int unsigned N_BINS   = 8;            // LED columns
  localparam int unsigned N_ROWS   = 8;            // LED rows
  localparam int unsigned MAG_W    = 20;           // combined bin magnitude

  typedef logic signed [DATA_W-1:0] sample_t;

  // Complex Q1.15 word as it is stored in a real/imaginary RAM pair.
  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef logic [MAG_W-1:0] mag_t;

  // Main controller states, in the order the controller visits them.
  typedef enum logic [3:0] {
    ST_PRE_START = 4'd0,   // reset the sample address
    ST_START     = 4'd1,   // ask the microcontroller for a sample
    ST_SPI       = 4'd2,   // sample is being shifted in
    ST_WRITEDATA = 4'd3,   // write the sample into RAM
    ST_S0        = 4'd4,   // advance the sample address
    ST_DELAY     = 4'd5,   // wait for the next sampling instant
    ST_RESET_SPI = 4'd6,   // return to START for the next sample
    ST_S1        = 4'd7,   // FFT running
    ST_S2        = 4'd8,   // save the 8 column magnitudes
    ST_S3        = 4'd9,   // restart the display delay
    ST_S4        = 4'd10,  // hold the display
    ST_S5        = 4'd11   // start over
  } ctrl_state_t;

endpackage
