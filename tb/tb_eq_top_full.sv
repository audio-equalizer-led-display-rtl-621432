// tb_eq_top_full: one complete operation of eq_top at the design's own
// timings (no parameter overrides): 32 samples at 2**14-cycle intervals over
// an SPI link at about 244 kHz (for a 40 MHz clock), the FFT, the magnitude
// save, the 2**22-cycle display hold, and the start of the next acquisition
// with the spectrum still displayed, twice: for the +/-1024 square wave and
// for a tone at bin 5. See eq_harness for what is checked.
module tb_eq_top_full;
  eq_harness #(.USE_DEFAULTS(1), .SAMPLE_DELAY(16384), .DISPLAY_DELAY(4194304), .HALF_BIT(820),
               .ADC_TIME(400), .N_PASSES(2), .MAX_CYCLES(12000000)) h ();
endmodule
