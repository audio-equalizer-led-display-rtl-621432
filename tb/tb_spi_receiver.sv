// tb_spi_receiver: sends random 16-bit words as an SPI master would (clock
// idle low, data changed while the clock is low, MSB first, LOAD high during
// the word, then a short LOAD low pulse) and checks the received sample after
// each word. Also checks that clock edges while LOAD is low shift nothing and
// that load_sync follows LOAD two clock cycles later. The SPI clock runs at
// 1/40 of the system clock.
module tb_spi_receiver;
  import eq_pkg::*;
  logic clk = 0, reset = 1, spi_clk = 0, sdi = 0, load = 1;
  sample_t sample;
  logic load_sync;
  int checks = 0, failures = 0;

  spi_receiver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [15:0] word);
    for (int b = 15; b >= 0; b--) begin
      sdi = word[b];
      repeat (20) @(negedge clk);
      spi_clk = 1;
      repeat (20) @(negedge clk);
      spi_clk = 0;
    end
  endtask

  initial begin
    logic [15:0] w;
    repeat (4) @(negedge clk);
    reset = 0;
    repeat (4) @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      w = 16'($urandom);
      if (t == 0) w = 16'h8001;
      if (t == 1) w = 16'h7ffe;
      send(w);
      repeat (5) @(negedge clk);
      checks++;
      if (sample != w) begin failures++; $display("received %h, sent %h", sample, w); end
      load = 0;
      @(negedge clk); checks++;
      if (!load_sync) begin failures++; $display("load_sync fell too early"); end
      @(negedge clk); checks++;
      if (load_sync) begin failures++; $display("load_sync did not follow load"); end
      repeat (4) @(negedge clk);
      if (t == 30) begin
        // clocks while LOAD is low must not shift
        send(~w);
        repeat (5) @(negedge clk);
        checks++;
        if (sample != w) begin failures++; $display("shifted while LOAD low"); end
      end
      load = 1;
      repeat (6) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
