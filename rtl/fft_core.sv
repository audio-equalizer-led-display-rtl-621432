// fft_core: 32-point radix-2 decimation-in-time FFT engine.
//
// Built, as in the design, from an address generation unit (fft_agu), a
// twiddle-factor ROM (twiddle_rom), a butterfly unit (butterfly) and a memory
// bank of four two-port RAMs (fft_memory). The caller first writes the N real
// samples into bank 0 at bit-reversed addresses (load_we/load_addr/
// load_data), then pulses `start`. The AGU walks LOG2N levels of N/2
// butterflies; operands read from one bank pass through the butterfly and are
// written into the other bank one cycle later. When `done` pulses, bank
// RESULT_BANK holds X[k] at address k, in natural order, unscaled Q1.15 (so
// X[0] is the plain sum of the samples).
//
// While the engine is idle the result bank can be read through res_addr_a/b;
// res_a/res_b follow one cycle later.
//
// Timing: `done` pulses 86 cycles after `start` for N = 32 (see fft_agu).
module fft_core
  import eq_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             load_we,
  input  logic [LOG2N-1:0] load_addr,
  input  sample_t          load_data,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  logic [LOG2N-1:0] res_addr_a,
  input  logic [LOG2N-1:0] res_addr_b,
  output cplx_t            res_a,
  output cplx_t            res_b
);

  localparam logic RESULT_BANK = 1'(LOG2N % 2);

  logic             agu_rd_bank, wr_en, wr_bank;
  logic [LOG2N-1:0] agu_rd_a, agu_rd_b, wr_addr_a, wr_addr_b;
  logic [LOG2N-2:0] tw_addr;
  cplx_t            w, q_a, q_b, bf_x, bf_y;

  fft_agu u_agu (
    .clk, .reset, .start, .rd_valid(),
    .rd_addr_a(agu_rd_a), .rd_addr_b(agu_rd_b), .rd_bank(agu_rd_bank),
    .wr_en, .wr_addr_a, .wr_addr_b, .wr_bank, .tw_addr, .busy, .done);

  twiddle_rom u_tw (.addr(tw_addr), .w);

  butterfly u_bf (.a(q_a), .b(q_b), .w, .x(bf_x), .y(bf_y));

  logic             rd_bank;
  logic [LOG2N-1:0] rd_addr_a, rd_addr_b;
  assign rd_bank   = busy ? agu_rd_bank : RESULT_BANK;
  assign rd_addr_a = busy ? agu_rd_a : res_addr_a;
  assign rd_addr_b = busy ? agu_rd_b : res_addr_b;

  fft_memory u_mem (
    .clk, .reset, .load_we, .load_addr, .load_data,
    .rd_bank, .rd_addr_a, .rd_addr_b,
    .wr_en, .wr_bank, .wr_addr_a, .wr_addr_b, .wr_a(bf_x), .wr_b(bf_y),
    .q_a, .q_b);

  assign res_a = q_a;
  assign res_b = q_b;

endmodule
