// tb_butterfly: drives random operands and twiddles into the butterfly and
// compares x = a + w*b, y = a - w*b with a reference computed in 64-bit
// integers (product truncated by arithmetic shift 15, results wrapped to 16
// bits). Also checks w = 1 (0x7fff) and w = j (0x7fff imaginary) cases.
module tb_butterfly;
  import eq_pkg::*;
  cplx_t a, b, w, x, y;
  int checks = 0, failures = 0;

  butterfly dut (.a, .b, .w, .x, .y);

  task automatic check();
    longint pr, pi;
    sample_t er, ei;
    #1;
    pr = (longint'(b.re) * w.re - longint'(b.im) * w.im) >>> 15;
    pi = (longint'(b.re) * w.im + longint'(b.im) * w.re) >>> 15;
    checks += 4;
    er = sample_t'(longint'(a.re) + pr); if (x.re != er) failures++;
    ei = sample_t'(longint'(a.im) + pi); if (x.im != ei) failures++;
    er = sample_t'(longint'(a.re) - pr); if (y.re != er) failures++;
    ei = sample_t'(longint'(a.im) - pi); if (y.im != ei) failures++;
  endtask

  initial begin
    a = '{re: 100, im: -50}; b = '{re: 1000, im: 2000}; w = '{re: 16'h7fff, im: 0};
    check();
    checks++; if (x.re != 1099 || y.re != -899) begin failures++; $display("w=1 case %0d %0d", x.re, y.re); end
    w = '{re: 0, im: 16'h7fff};
    check();
    checks++; if (x.re != 100 - 2000 || x.im != -50 + 999) begin failures++; $display("w=j case %0d %0d", x.re, x.im); end
    for (int t = 0; t < 2000; t++) begin
      a = cplx_t'({$urandom, $urandom});
      b = cplx_t'({$urandom, $urandom});
      w = cplx_t'({$urandom, $urandom});
      if (w.re == -32768) w.re = -32767;
      if (w.im == -32768) w.im = -32767;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
