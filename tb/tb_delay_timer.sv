// tb_delay_timer: checks that `expired` rises exactly DELAY cycles after a
// clear, stays high until the next clear, and that a clear in mid-count
// restarts the count. Runs with DELAY = 37 and with the sampling delay
// 2**14 used by the design.
module tb_delay_timer;
  logic clk = 0, reset = 1;
  logic clr [2] = '{0, 0};
  logic ex [2];
  int checks = 0, failures = 0;

  delay_timer #(.DELAY(37))    dut0 (.clk, .reset, .clear(clr[0]), .expired(ex[0]));
  delay_timer #(.DELAY(16384)) dut1 (.clk, .reset, .clear(clr[1]), .expired(ex[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // n counts negedges from the one after the clear pulse; `expired` is
  // first seen at n = DELAY + 1.
  task automatic measure(int i, int delay);
    int expect_n = delay + 1;
    int n;
    @(negedge clk); clr[i] = 1;
    @(negedge clk); clr[i] = 0;
    n = 1;
    while (!ex[i]) begin
      checks++;
      if (n > expect_n) begin failures++; break; end
      @(negedge clk); n++;
    end
    checks++;
    if (n != expect_n) begin
      failures++; $display("delay %0d measured, %0d expected", n, expect_n);
    end
    repeat (5) begin
      @(negedge clk); checks++;
      if (!ex[i]) begin failures++; $display("expired dropped"); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    measure(0, 37);
    measure(0, 37);
    // restart in mid-count
    @(negedge clk); clr[0] = 1; @(negedge clk); clr[0] = 0;
    repeat (20) @(negedge clk);
    measure(0, 37);
    measure(1, 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
