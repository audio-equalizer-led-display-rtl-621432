// spi_receiver: collects the 16-bit audio sample the microcontroller sends
// over SPI.
//
// The microcontroller is the SPI master (clock polarity 0, data captured on
// the rising clock edge, most significant bit first) and holds LOAD high
// while it sends; a short low pulse on LOAD marks the end of a sample. Bits
// are shifted in on rising edges of spi_clk while LOAD is high, as the design
// does. This implementation samples spi_clk, sdi and load into the system
// clock domain through two-flop synchronisers and shifts on a detected
// spi_clk rising edge, so the whole receiver runs on `clk`; that requires the
// system clock to be several times faster than the SPI clock (40 MHz against
// about 244 kHz in the design). The synchronised LOAD is also handed to the
// controller.
//
// Timing: a bit is shifted 3 clk cycles after the spi_clk rising edge; the
// sample register holds its value while no spi_clk edges arrive.
module spi_receiver
  import eq_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    spi_clk,
  input  logic    sdi,
  input  logic    load,
  output sample_t sample,
  output logic    load_sync
);

  logic [2:0] sclk_q;     // two sync stages plus one for edge detection
  logic [1:0] sdi_q;
  logic [1:0] load_q;

  always_ff @(posedge clk) begin
    if (reset) begin
      sclk_q <= '0;
      sdi_q  <= '0;
      load_q <= '1;
    end else begin
      sclk_q <= {sclk_q[1:0], spi_clk};
      sdi_q  <= {sdi_q[0], sdi};
      load_q <= {load_q[0], load};
    end
  end

  logic sclk_rise;
  assign sclk_rise = sclk_q[1] & ~sclk_q[2];
  assign load_sync = load_q[1];

  always_ff @(posedge clk) begin
    if (reset)
      sample <= '0;
    else if (sclk_rise && load_sync)
      sample <= {sample[DATA_W-2:0], sdi_q[1]};
  end

endmodule
