// fft_memory: the FFT's memory bank, four two-port RAMs forming two complex
// banks (bank 0 and bank 1, each a real and an imaginary RAM of N words).
//
// Three users share it, never at the same time in the design's sequence:
//  * sample loading writes real samples (imaginary part zero) into bank 0
//    through port A (load_we, load_addr, load_data);
//  * each FFT level reads a butterfly's operands from bank rd_bank through
//    ports A and B, and one cycle later writes the results through ports A
//    and B of bank wr_bank (wr_en, wr_addr_a/b, wr_a/b);
//  * after the FFT, the result bank is read through rd_addr_a/b.
// A bank being written ignores the read addresses that cycle; a butterfly
// write takes priority over a sample load into bank 0.
//
// Timing: q_a/q_b give the words of bank rd_bank at rd_addr_a/b presented in
// the previous cycle (the bank select is registered alongside the RAM read).
module fft_memory
  import eq_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  // sample loading
  input  logic             load_we,
  input  logic [LOG2N-1:0] load_addr,
  input  sample_t          load_data,
  // reads
  input  logic             rd_bank,
  input  logic [LOG2N-1:0] rd_addr_a,
  input  logic [LOG2N-1:0] rd_addr_b,
  // butterfly writes
  input  logic             wr_en,
  input  logic             wr_bank,
  input  logic [LOG2N-1:0] wr_addr_a,
  input  logic [LOG2N-1:0] wr_addr_b,
  input  cplx_t            wr_a,
  input  cplx_t            wr_b,
  output cplx_t            q_a,
  output cplx_t            q_b
);

  logic [LOG2N-1:0] addr_a [2];
  logic [LOG2N-1:0] addr_b [2];
  logic             we_a   [2];
  logic             we_b   [2];
  cplx_t            d_a    [2];
  cplx_t            d_b    [2];
  cplx_t            qa_bank[2];
  cplx_t            qb_bank[2];

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      addr_a[b] = rd_addr_a;
      addr_b[b] = rd_addr_b;
      we_a[b]   = 1'b0;
      we_b[b]   = 1'b0;
      d_a[b]    = wr_a;
      d_b[b]    = wr_b;
      if (wr_en && (wr_bank == 1'(b))) begin
        addr_a[b] = wr_addr_a;
        addr_b[b] = wr_addr_b;
        we_a[b]   = 1'b1;
        we_b[b]   = 1'b1;
      end else if (load_we && b == 0) begin
        addr_a[b] = load_addr;
        we_a[b]   = 1'b1;
        d_a[b]    = '{re: load_data, im: '0};
      end
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    dp_ram #(.DEPTH(NPOINTS), .WIDTH(DATA_W)) u_re (
      .clk, .addr_a(addr_a[b]), .addr_b(addr_b[b]), .we_a(we_a[b]), .we_b(we_b[b]),
      .d_a(d_a[b].re), .d_b(d_b[b].re), .q_a(qa_bank[b].re), .q_b(qb_bank[b].re));
    dp_ram #(.DEPTH(NPOINTS), .WIDTH(DATA_W)) u_im (
      .clk, .addr_a(addr_a[b]), .addr_b(addr_b[b]), .we_a(we_a[b]), .we_b(we_b[b]),
      .d_a(d_a[b].im), .d_b(d_b[b].im), .q_a(qa_bank[b].im), .q_b(qb_bank[b].im));
  end

  logic rd_bank_q;
  always_ff @(posedge clk) begin
    if (reset) rd_bank_q <= 1'b0;
    else       rd_bank_q <= rd_bank;
  end

  assign q_a = qa_bank[rd_bank_q];
  assign q_b = qb_bank[rd_bank_q];

endmodule
