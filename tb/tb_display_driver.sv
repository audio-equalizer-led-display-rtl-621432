// tb_display_driver: loads column magnitudes (including values exactly at,
// just below and just above each threshold) and checks every cycle that
// exactly one column line is high, that columns are visited in order
// 0..7 with the programmed COLUMN_DIV cycles each, and that the row lines
// of the shown column light the bottom `h` rows, h being the number of
// thresholds 0x2, 0x4, 0x21, 0x64, 0x256, 0x512, 0x768, 0x1280 the
// magnitude reaches. Two instances: COLUMN_DIV = 1 and 3.
module tb_display_driver;
  import eq_pkg::*;
  logic clk = 0, reset = 1;
  mag_t mags [N_BINS];
  logic [15:0] led1, led3;
  logic [2:0] col1, col3;
  int checks = 0, failures = 0;
  int heights_seen [9];

  display_driver #(.COLUMN_DIV(1)) dut1 (.clk, .reset, .mags, .led_display(led1), .column(col1));
  display_driver #(.COLUMN_DIV(3)) dut3 (.clk, .reset, .mags, .led_display(led3), .column(col3));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TH [8] = '{2, 4, 33, 100, 598, 1298, 1896, 4736};

  function automatic int height(mag_t m);
    int h = 0;
    for (int i = 0; i < 8; i++) if (int'(m) >= TH[i]) h++;
    return h;
  endfunction

  // check one display output against the column it shows
  task automatic check_led(logic [15:0] led, string name);
    int c = -1, h;
    logic [7:0] rows_lit;
    checks++;
    if (!$onehot(led[7:0])) begin failures++; $display("%s: columns %b", name, led[7:0]); return; end
    for (int i = 0; i < 8; i++) if (led[i]) c = i;
    h = height(mags[c]);
    rows_lit = ~led[15:8];
    checks++;
    if (rows_lit != 8'((1 << h) - 1)) begin
      failures++; $display("%s: column %0d mag %0d rows %b, height %0d", name, c, mags[c], led[15:8], h);
    end
    heights_seen[h]++;
  endtask

  initial begin
    automatic int prev1 = -1, run3 = 0, prev3 = -1;
    automatic bit first3 = 1;
    for (int c = 0; c < 8; c++) mags[c] = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (led1 != 16'hff00) failures++;          // dark while in reset
    reset = 0;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      if (t % 40 == 0) begin
        for (int c = 0; c < 8; c++) begin
          int k;
          k = int'($urandom_range(7));
          case ($urandom_range(3))
            0: mags[c] = mag_t'(TH[k]);
            1: mags[c] = mag_t'(TH[k] - 1);
            2: mags[c] = mag_t'(TH[k] + 1);
            default: mags[c] = mag_t'($urandom_range(6000));
          endcase
        end
      end
      @(posedge clk); #1;
      check_led(led1, "div1");
      check_led(led3, "div3");
      // column order
      for (int i = 0; i < 8; i++) if (led1[i]) begin
        checks++;
        if (prev1 >= 0 && i != (prev1 + 1) % 8) begin failures++; $display("div1 column %0d after %0d", i, prev1); end
        prev1 = i;
      end
      for (int i = 0; i < 8; i++) if (led3[i]) begin
        if (i == prev3) run3++;
        else begin
          checks++;
          if (prev3 >= 0 && (i != (prev3 + 1) % 8 || (run3 != 3 && !first3))) begin
            failures++; $display("div3 column %0d after %0d held %0d", i, prev3, run3);
          end
          if (prev3 >= 0) first3 = 0;
          prev3 = i; run3 = 1;
        end
      end
      @(negedge clk);
    end
    for (int h = 0; h <= 8; h++) begin
      checks++;
      if (heights_seen[h] == 0) begin failures++; $display("height %0d never shown", h); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
