// fft_agu: address generation unit of the in-place radix-2 FFT.
//
// The FFT runs LOG2N levels of N/2 butterflies. Samples are loaded in
// bit-reversed order, and each level reads one bank and writes the other
// (ping-pong), so level i reads bank i%2 and the result ends up in bank
// LOG2N%2 in natural order. For butterfly j of level i the operand addresses
// are the LOG2N-bit words 2j and 2j+1 rotated left by i; they differ only in
// bit i, the butterfly span. The twiddle index keeps the top i bits of j (the
// LOG2N-1 bit counter), i.e. tw = j & ~((1 << (LOG2N-1-i)) - 1). This
// addressing follows the design and the hardware FFT tutorial it is based on.
//
// Pipeline (this implementation's choice): in the cycle a butterfly's read
// addresses are issued (rd_valid), the RAMs register them; in the next cycle
// the operands are at the RAM outputs, the twiddle index, write enable and
// write addresses (registered copies of the read addresses) are presented, and
// the butterfly results are written into the other bank at the end of that
// cycle. One idle cycle separates levels so that the last write of a level
// lands before the next level's first read.
//
// Timing: `start` (one-cycle pulse, ignored while busy) begins the FFT on the
// next cycle; each level takes N/2 + 1 cycles; `done` pulses for one cycle,
// LOG2N*(N/2+1) + 1 cycles after the start pulse (86 for N = 32), when the
// last result has been written. `busy` is high from the cycle after start
// until done.
module fft_agu
  import eq_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  // read side (cycle t)
  output logic             rd_valid,
  output logic [LOG2N-1:0] rd_addr_a,
  output logic [LOG2N-1:0] rd_addr_b,
  output logic             rd_bank,
  // write side (cycle t+1)
  output logic             wr_en,
  output logic [LOG2N-1:0] wr_addr_a,
  output logic [LOG2N-1:0] wr_addr_b,
  output logic             wr_bank,
  output logic [LOG2N-2:0] tw_addr,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {A_IDLE, A_RUN, A_GAP} agu_state_t;

  localparam int unsigned JW = LOG2N - 1;

  agu_state_t                 st;
  logic [$clog2(LOG2N+1)-1:0] level;
  logic [JW-1:0]              j;

  // rotate a LOG2N-bit word left by r
  function automatic logic [LOG2N-1:0] rotl(logic [LOG2N-1:0] v, logic [$clog2(LOG2N+1)-1:0] r);
    logic [LOG2N-1:0] o;
    for (int b = 0; b < LOG2N; b++) o[(b + int'(r)) % LOG2N] = v[b];
    return o;
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      st    <= A_IDLE;
      level <= '0;
      j     <= '0;
    end else begin
      case (st)
        A_IDLE: if (start) begin
          st    <= A_RUN;
          level <= '0;
          j     <= '0;
        end
        A_RUN: begin
          j <= j + 1'b1;
          if (j == '1) st <= A_GAP;
        end
        A_GAP: begin
          if (level == ($bits(level))'(LOG2N - 1)) begin
            st <= A_IDLE;
          end else begin
            st    <= A_RUN;
            level <= level + 1'b1;
          end
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  assign rd_valid  = (st == A_RUN);
  assign rd_bank   = level[0];
  assign rd_addr_a = rotl({j, 1'b0}, level);
  assign rd_addr_b = rotl({j, 1'b1}, level);
  assign busy      = (st != A_IDLE);

  logic [JW-1:0] tw_mask;
  assign tw_mask = ~(JW'((1 << JW) - 1) >> level);

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_en     <= 1'b0;
      wr_addr_a <= '0;
      wr_addr_b <= '0;
      wr_bank   <= 1'b1;
      tw_addr   <= '0;
      done      <= 1'b0;
    end else begin
      wr_en     <= rd_valid;
      wr_addr_a <= rd_addr_a;
      wr_addr_b <= rd_addr_b;
      wr_bank   <= ~rd_bank;
      tw_addr   <= j & tw_mask;
      done      <= (st == A_GAP) && (level == ($bits(level))'(LOG2N - 1));
    end
  end

endmodule
