// tb_dp_ram: random reads and writes on both ports of a 32 x 16 RAM,
// compared with a shadow array; checks the one-cycle read latency, that a
// read on the same edge as a write returns the old word, and that port B
// wins a same-address write.
module tb_dp_ram;
  logic clk = 0;
  logic [4:0] addr_a = 0, addr_b = 0;
  logic we_a = 0, we_b = 0;
  logic [15:0] d_a = 0, d_b = 0, q_a, q_b;
  logic [15:0] shadow [32];
  logic [15:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(32), .WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through both ports
    for (int i = 0; i < 32; i += 2) begin
      @(negedge clk);
      addr_a = 5'(i); addr_b = 5'(i + 1); we_a = 1; we_b = 1;
      d_a = 16'($urandom); d_b = 16'($urandom);
      shadow[i] = d_a; shadow[i+1] = d_b;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr_a = 5'($urandom); addr_b = 5'($urandom);
      we_a = ($urandom_range(3) == 0); we_b = ($urandom_range(3) == 0);
      d_a = 16'($urandom); d_b = 16'($urandom);
      exp_a = shadow[addr_a]; exp_b = shadow[addr_b];
      if (we_a) shadow[addr_a] = d_a;
      if (we_b) shadow[addr_b] = d_b;
      @(posedge clk); #1;
      checks += 2;
      if (q_a != exp_a) begin failures++; $display("port A read %h exp %h", q_a, exp_a); end
      if (q_b != exp_b) begin failures++; $display("port B read %h exp %h", q_b, exp_b); end
    end
    // check the whole array
    we_a = 0; we_b = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); addr_a = 5'(i); addr_b = 5'(31 - i);
      @(posedge clk); #1;
      checks += 2;
      if (q_a != shadow[i] || q_b != shadow[31 - i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
