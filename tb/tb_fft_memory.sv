// tb_fft_memory: exercises the two-bank memory against a shadow model:
// sample loads into bank 0 (imaginary part written as zero), paired reads
// from either bank with one cycle of latency, paired butterfly writes into
// one bank while the other is read in the same cycle, reads alternating
// between the banks every cycle, and a butterfly write
// to bank 0 overriding a simultaneous sample load.
module tb_fft_memory;
  import eq_pkg::*;
  logic clk = 0, reset = 1;
  logic load_we = 0, rd_bank = 0, wr_en = 0, wr_bank = 0;
  logic [4:0] load_addr = 0, rd_addr_a = 0, rd_addr_b = 0, wr_addr_a = 0, wr_addr_b = 0;
  sample_t load_data = 0;
  cplx_t wr_a = 0, wr_b = 0, q_a, q_b;
  cplx_t shadow [2][32];
  int checks = 0, failures = 0;

  fft_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(logic bank, logic [4:0] a, logic [4:0] b);
    @(negedge clk);
    rd_bank = bank; rd_addr_a = a; rd_addr_b = b;
    @(negedge clk);
    checks += 2;
    if (q_a != shadow[bank][a]) begin failures++; $display("bank %0d [%0d] = %h exp %h", bank, a, q_a, shadow[bank][a]); end
    if (q_b != shadow[bank][b]) begin failures++; $display("bank %0d [%0d] = %h exp %h", bank, b, q_b, shadow[bank][b]); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset = 0;
    // load bank 0
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 5'(i); load_data = sample_t'($urandom);
      shadow[0][i] = '{re: load_data, im: '0};
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < 32; i += 2) read_check(0, 5'(i), 5'(31 - i));
    // fill bank 1 by butterfly writes while reading bank 0
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = 1; wr_addr_a = 5'(i); wr_addr_b = 5'(i + 16);
      wr_a = cplx_t'({$urandom, $urandom}); wr_b = cplx_t'({$urandom, $urandom});
      shadow[1][i] = wr_a; shadow[1][i + 16] = wr_b;
      rd_bank = 0; rd_addr_a = 5'(2 * i); rd_addr_b = 5'(2 * i + 1);
      @(negedge clk);
      wr_en = 0;
      checks++;
      if (q_a != shadow[0][2 * i] || q_b != shadow[0][2 * i + 1]) failures++;
    end
    for (int i = 0; i < 32; i += 2) read_check(1, 5'(i), 5'(i + 1));
    // back-to-back reads alternating banks every cycle; each result is
    // checked after the next request has been applied
    begin
      logic pbk;
      logic [4:0] pa, pb_addr;
      for (int i = 0; i <= 32; i++) begin
        @(negedge clk);
        if (i < 32) begin rd_bank = 1'(i); rd_addr_a = 5'(i); rd_addr_b = 5'(31 - i); end
        #1;
        if (i > 0) begin
          checks += 2;
          if (q_a != shadow[pbk][pa]) begin failures++; $display("alternating: port A bank %0d", pbk); end
          if (q_b != shadow[pbk][pb_addr]) begin failures++; $display("alternating: port B bank %0d", pbk); end
        end
        pbk = rd_bank; pa = rd_addr_a; pb_addr = rd_addr_b;
      end
    end
    // write into bank 0 wins over a simultaneous load
    @(negedge clk);
    wr_en = 1; wr_bank = 0; wr_addr_a = 5'd3; wr_addr_b = 5'd4;
    wr_a = cplx_t'(32'h1234_5678); wr_b = cplx_t'(32'h9abc_def0);
    load_we = 1; load_addr = 5'd7; load_data = 16'h5555;
    shadow[0][3] = wr_a; shadow[0][4] = wr_b;
    @(negedge clk); wr_en = 0; load_we = 0;
    read_check(0, 5'd3, 5'd4);
    read_check(0, 5'd7, 5'd0);
    read_check(1, 5'd3, 5'd4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
