// tb_fft_agu: runs the address generator through two complete FFTs and
// checks, independently of its rotate-based formula, that:
//  * every level reads N/2 address pairs covering all 32 addresses once,
//    each pair differing only in bit `level` (the butterfly span),
//  * the twiddle index equals (lower address mod 2**level) << (4 - level),
//    the radix-2 decimation-in-time exponent,
//  * reads alternate banks by level and writes go to the other bank, one
//    cycle after the read, to the same addresses,
//  * no level reads an address before the previous level has written it,
//  * done pulses 86 cycles after start, and start is ignored while busy.
module tb_fft_agu;
  import eq_pkg::*;
  logic clk = 0, reset = 1, start = 0;
  logic rd_valid, rd_bank, wr_en, wr_bank, busy, done;
  logic [4:0] rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b;
  logic [3:0] tw_addr;
  int checks = 0, failures = 0;

  fft_agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one();
    int cycles = 0, reads = 0, level, exp_tw;
    logic [4:0] lo, pa, pb;
    logic pbank;
    logic pvalid = 0;
    bit   seen [32];
    int   written_at [2][32];
    for (int b = 0; b < 2; b++) for (int i = 0; i < 32; i++) written_at[b][i] = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin
      // write side belongs to the read issued in the previous cycle
      checks++;
      if (wr_en != pvalid) begin failures++; $display("wr_en mismatch at %0d", cycles); end
      if (pvalid) begin
        checks += 3;
        if (wr_addr_a != pa || wr_addr_b != pb) failures++;
        if (wr_bank == pbank) failures++;
        level = reads_level(reads - 1);
        lo = (pa < pb) ? pa : pb;
        exp_tw = (int'(lo) % (1 << level)) << (4 - level);
        if (int'(tw_addr) != exp_tw) begin
          failures++; $display("tw %0d exp %0d (level %0d addr %0d)", tw_addr, exp_tw, level, lo);
        end
        written_at[wr_bank][wr_addr_a] = cycles;
        written_at[wr_bank][wr_addr_b] = cycles;
      end
      if (rd_valid) begin
        level = reads_level(reads);
        if (reads % 16 == 0) for (int i = 0; i < 32; i++) seen[i] = 0;
        checks += 4;
        if ((rd_addr_a ^ rd_addr_b) != 5'(1 << level)) begin
          failures++; $display("pair %0d,%0d at level %0d", rd_addr_a, rd_addr_b, level);
        end
        if (seen[rd_addr_a] || seen[rd_addr_b]) failures++;
        seen[rd_addr_a] = 1; seen[rd_addr_b] = 1;
        if (rd_bank != level[0]) failures++;
        // operands of level > 0 must have been written by the previous level
        if (level > 0 && (written_at[rd_bank][rd_addr_a] < 0 || written_at[rd_bank][rd_addr_b] < 0 ||
            written_at[rd_bank][rd_addr_a] >= cycles || written_at[rd_bank][rd_addr_b] >= cycles)) begin
          failures++; $display("read before write at level %0d", level);
        end
        reads++;
      end
      pvalid = rd_valid; pa = rd_addr_a; pb = rd_addr_b; pbank = rd_bank;
      if (cycles == 40) begin start = 1; @(negedge clk); start = 0; cycles++; continue; end
      @(negedge clk); cycles++;
    end
    checks += 3;
    if (cycles != 86) begin failures++; $display("done after %0d cycles, expected 86", cycles); end
    if (reads != 80) begin failures++; $display("%0d butterflies, expected 80", reads); end
    if (wr_bank != 1'b1) failures++;     // last level writes bank 1
    @(negedge clk); checks++;
    if (done || busy) failures++;
  endtask

  function automatic int reads_level(int r);
    return r / 16;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    run_one();
    repeat (7) @(negedge clk);
    run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
