// tb_eq_controller: runs the controller through three complete passes with
// a scripted environment (LOAD pulses after a random transfer time, an FFT
// that reports done 86 cycles after its start, a magnitude save that
// completes 10 cycles after its start) and checks:
//  * the state sequence PRE_START, START, SPI, WRITEDATA, S0, DELAY,
//    RESET_SPI, ... S1, S2, S3, S4, S5 (every transition is legal),
//  * `done` exactly in START and SPI, sample writes exactly in WRITEDATA,
//  * 32 sample writes per pass at bit-reversed addresses 0,16,8,24,...,
//  * START follows WRITEDATA by SAMPLE_DELAY + 3 cycles,
//  * S5 follows S3 by DISPLAY_DELAY + 2 cycles,
//  * fft_start and save_start pulse once per pass, in the right state.
module tb_eq_controller;
  import eq_pkg::*;
  localparam int SD = 20, DD = 150;
  logic clk = 0, reset = 1, load = 1, fft_done = 0, save_complete = 0;
  logic done, load_we, fft_start, save_start;
  logic [4:0] load_addr;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  eq_controller #(.SAMPLE_DELAY(SD), .DISPLAY_DELAY(DD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // environment; drives its inputs just after the falling edge
  initial begin
    forever begin
      @(negedge clk);
      if (state == ST_SPI) begin
        repeat ($urandom_range(40, 5)) @(negedge clk);
        load = 0;
        repeat ($urandom_range(3, 1)) @(negedge clk);
        load = 1;
        while (state == ST_SPI) @(negedge clk);
      end
    end
  end
  initial begin
    forever begin
      @(negedge clk);
      if (fft_start) begin
        repeat (85) @(negedge clk);
        fft_done = 1; @(negedge clk); fft_done = 0;
        // save_start was issued with fft_done
        repeat (8) @(negedge clk);
        save_complete = 1; @(negedge clk); save_complete = 0;
      end
    end
  end

  function automatic bit legal(ctrl_state_t a, ctrl_state_t b);
    case (a)
      ST_PRE_START: return b == ST_START;
      ST_START:     return b == ST_SPI;
      ST_SPI:       return b == ST_SPI || b == ST_WRITEDATA;
      ST_WRITEDATA: return b == ST_S0;
      ST_S0:        return b == ST_DELAY || b == ST_S1;
      ST_DELAY:     return b == ST_DELAY || b == ST_RESET_SPI;
      ST_RESET_SPI: return b == ST_START;
      ST_S1:        return b == ST_S1 || b == ST_S2;
      ST_S2:        return b == ST_S2 || b == ST_S3;
      ST_S3:        return b == ST_S4;
      ST_S4:        return b == ST_S4 || b == ST_S5;
      ST_S5:        return b == ST_PRE_START;
      default:      return 0;
    endcase
  endfunction

  initial begin
    ctrl_state_t prev;
    automatic int cyc = 0, last_write = -1, last_s3 = -1, writes = 0, passes = 0, fft_starts = 0, save_starts = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk); #2;
    prev = state;
    while (passes < 3) begin
      @(negedge clk); #2; cyc++;
      checks++;
      if (!legal(prev, state) && prev != state) begin
        failures++; $display("illegal transition %s -> %s", prev.name(), state.name());
      end
      checks += 2;
      if (done != (state == ST_START || state == ST_SPI)) failures++;
      if (load_we != (state == ST_WRITEDATA)) failures++;
      if (load_we) begin
        logic [4:0] n, r;
        n = 5'(writes);
        r = {n[0], n[1], n[2], n[3], n[4]};
        checks++;
        if (load_addr != r) begin failures++; $display("sample %0d written at %0d", writes, load_addr); end
        writes++;
        last_write = cyc;
      end
      if (state == ST_START && prev == ST_RESET_SPI) begin
        checks++;
        if (cyc - last_write != SD + 3) begin failures++; $display("sample interval %0d", cyc - last_write); end
      end
      if (fft_start) begin
        fft_starts++;
        checks++;
        if (state != ST_S0 || writes != 32) begin failures++; $display("fft_start after %0d samples", writes); end
      end
      if (save_start) begin
        save_starts++;
        checks++;
        if (state != ST_S1 || !fft_done) failures++;
      end
      if (state == ST_S3) last_s3 = cyc;
      if (state == ST_S5) begin
        checks++;
        if (cyc - last_s3 != DD + 2) begin failures++; $display("display hold %0d", cyc - last_s3); end
      end
      if (state == ST_PRE_START && prev == ST_S5) begin
        passes++;
        checks += 2;
        if (fft_starts != 1 || save_starts != 1) begin failures++; $display("starts %0d %0d", fft_starts, save_starts); end
        if (writes != 32) begin failures++; $display("writes %0d", writes); end
        writes = 0; fft_starts = 0; save_starts = 0;
      end
      prev = state;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
