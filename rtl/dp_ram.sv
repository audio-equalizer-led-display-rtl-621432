// dp_ram: two-port RAM, the storage element of the FFT memory bank.
//
// DEPTH words of WIDTH bits with two independent ports, each able to read or
// write one word per cycle. Reads are synchronous: q_a/q_b show the word at
// the address presented one clock earlier (the old contents if the same edge
// writes it). A write on both ports to the same address keeps port B's data.
// The design uses four of these, 32 x 16 each.
module dp_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic                     we_a,
  input  logic                     we_b,
  input  logic [WIDTH-1:0]         d_a,
  input  logic [WIDTH-1:0]         d_b,
  output logic [WIDTH-1:0]         q_a,
  output logic [WIDTH-1:0]         q_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    q_a <= mem[addr_a];
    q_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= d_a;
    if (we_b) mem[addr_b] <= d_b;
  end

endmodule
