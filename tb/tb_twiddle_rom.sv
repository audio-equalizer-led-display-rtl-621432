// tb_twiddle_rom: compares all 16 twiddle factors with round(32767*cos) and
// round(32767*sin) of 2*pi*k/32 computed in floating point, and spot-checks
// the design's tabulated values 0x7d89/0x18f9 (k = 1) and 0xe707/0x7d89
// (k = 9).
module tb_twiddle_rom;
  import eq_pkg::*;
  logic [3:0] addr;
  cplx_t      w;
  int checks = 0, failures = 0;

  twiddle_rom dut (.addr, .w);

  function automatic int rnd(real v);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  initial begin
    for (int k = 0; k < 16; k++) begin
      int er, ei;
      addr = 4'(k);
      #1;
      er = rnd(32767.0 * $cos(2.0 * 3.14159265358979 * k / 32.0));
      ei = rnd(32767.0 * $sin(2.0 * 3.14159265358979 * k / 32.0));
      checks += 2;
      if (int'(w.re) != er) begin failures++; $display("k=%0d re %0d exp %0d", k, w.re, er); end
      if (int'(w.im) != ei) begin failures++; $display("k=%0d im %0d exp %0d", k, w.im, ei); end
    end
    addr = 4'd1; #1; checks++;
    if (w != {16'h7d89, 16'h18f9}) failures++;
    addr = 4'd9; #1; checks++;
    if (w != {16'he707, 16'h7d89}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
