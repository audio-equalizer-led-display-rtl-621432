// tb_eq_top: end-to-end test of eq_top with shortened sampling and display
// delays (64 and 300 cycles) and a fast SPI clock, over five spectra; see
// eq_harness for what is checked.
module tb_eq_top;
  eq_harness #(.USE_DEFAULTS(0), .SAMPLE_DELAY(64), .DISPLAY_DELAY(300), .HALF_BIT(40),
               .ADC_TIME(60), .N_PASSES(5), .MAX_CYCLES(400000)) h ();
endmodule
