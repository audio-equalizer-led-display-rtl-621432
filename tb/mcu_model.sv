// mcu_model: behavioural model (not synthesizable) of the microcontroller
// side of the equalizer: the ADC plus SPI master that feeds the FPGA.
//
// Protocol: LOAD idles high. Whenever DONE is high the model waits
// ADC_TIME (the conversion), takes `sample_in`, sends it MSB first as a
// mode-0 SPI master (data set while the clock is low, clock high for
// HALF_BIT, low for HALF_BIT per bit), then pulls LOAD low for LOAD_LOW and
// raises it again, and counts the word in `sent`. It then waits GAP before
// looking at DONE again. Times are in simulation time units; the equalizer
// testbenches use a 10-unit clock period standing for 25 ns.
module mcu_model #(
  parameter int HALF_BIT = 820,     // about 244 kHz SPI clock at 25 ns/10 units
  parameter int ADC_TIME = 400,
  parameter int LOAD_LOW = 100,
  parameter int GAP      = 100
) (
  input  logic        done,
  input  logic [15:0] sample_in,
  output logic        spi_clk,
  output logic        sdi,
  output logic        load,
  output int          sent
);

  initial begin
    logic [15:0] w;
    spi_clk = 0;
    sdi     = 0;
    load    = 1;
    sent    = 0;
    forever begin
      wait (done);
      #(ADC_TIME);
      w = sample_in;
      for (int b = 15; b >= 0; b--) begin
        sdi = w[b];
        #(HALF_BIT);
        spi_clk = 1;
        #(HALF_BIT);
        spi_clk = 0;
      end
      load = 0;
      #(LOAD_LOW);
      load = 1;
      sent++;
      #(GAP);
    end
  end

endmodule
