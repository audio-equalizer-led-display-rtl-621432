// display_driver: drives the 8x8 LED matrix as a bar graph, one column at a
// time.
//
// A column counter steps through the 8 columns, advancing every COLUMN_DIV
// clock cycles (every cycle by default, as in the design; the persistence of
// vision hides the multiplexing). While column c is selected its column line
// is driven high and the rows from the bottom up to the bar height are driven
// low (lit); the other rows are high. The bar height is the number of
// thresholds LEVELS[0..7] that the column's magnitude reaches, 0 to 8. The
// threshold values are the design's; it compares with "greater than",
// here a magnitude equal to a threshold also reaches it.
//
// led_display mapping (the design's wiring): bits [7:0] are column lines
// C1..C8, bits [15:8] are row lines R1..R8, R1 being the bottom row.
//
// Timing: led_display is registered and shows column c one cycle after the
// counter selects it.
module display_driver
  import eq_pkg::*;
#(
  parameter int unsigned COLUMN_DIV = 1
) (
  input  logic        clk,
  input  logic        reset,
  input  mag_t        mags [N_BINS],
  output logic [15:0] led_display,
  output logic [2:0]  column
);

  localparam mag_t LEVELS [N_ROWS] = '{
    mag_t'('h2),   mag_t'('h4),   mag_t'('h21),  mag_t'('h64),
    mag_t'('h256), mag_t'('h512), mag_t'('h768), mag_t'('h1280)
  };

  localparam int unsigned DW = (COLUMN_DIV > 1) ? $clog2(COLUMN_DIV) : 1;

  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (reset) begin
      div    <= '0;
      column <= '0;
    end else if (div == DW'(COLUMN_DIV - 1)) begin
      div    <= '0;
      column <= column + 1'b1;
    end else begin
      div <= div + 1'b1;
    end
  end

  // Rows lit (1) for a magnitude: a thermometer code from the bottom row.
  function automatic logic [N_ROWS-1:0] bar(mag_t m);
    logic [N_ROWS-1:0] lit;
    for (int r = 0; r < N_ROWS; r++) lit[r] = (m >= LEVELS[r]);
    return lit;
  endfunction

  always_ff @(posedge clk) begin
    if (reset)
      led_display <= {8'hff, 8'h00};           // all rows dark, no column
    else
      led_display <= {~bar(mags[column]), 8'(1) << column};
  end

endmodule
