// delay_timer: programmable wait used by the controller for the sampling
// interval and for the display hold time.
//
// A counter restarts at zero on `clear` and counts clock cycles until it
// reaches DELAY, where it stops; `expired` is high from then on until the next
// clear. With a 40 MHz clock the design uses DELAY = 2**14 (one sample every
// 409.6 us, about 2441 samples/s) and DELAY = 2**22 (about 0.1 s between
// display updates). The saturating counter, rather than a free-running one
// whose top bit is watched, is this implementation's choice: it gives an exact
// delay for any DELAY.
//
// Timing: `expired` goes high exactly DELAY clock edges after the edge that
// sampled `clear` high.
module delay_timer #(
  parameter int unsigned DELAY = 16384
) (
  input  logic clk,
  input  logic reset,
  input  logic clear,
  output logic expired
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset || clear)
      count <= '0;
    else if (!expired)
      count <= count + 1'b1;
  end

  assign expired = (count == CW'(DELAY));

endmodule
