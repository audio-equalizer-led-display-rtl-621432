// eq_controller: main state machine of the equalizer.
//
// One pass of the machine takes a new spectrum and shows it:
//   PRE_START  clear the sample address
//   START      raise `done`: ask the microcontroller for a sample
//   SPI        keep `done` high while the sample is shifted in; leave when
//              the microcontroller pulls LOAD low (end of the sample)
//   WRITEDATA  write the sample into FFT bank 0 at the bit-reversed sample
//              address; restart the sampling timer
//   S0         advance the sample address; after the 32nd sample go to S1,
//              otherwise to DELAY
//   DELAY      wait until the sampling timer expires (SAMPLE_DELAY cycles
//              after WRITEDATA), which sets the sampling rate
//   RESET_SPI  back to START for the next sample
//   S1         FFT running (started on the way in); wait for its done
//   S2         magnitude save running (started on the way in); wait for it
//   S3         restart the display timer
//   S4         hold the new display for DISPLAY_DELAY cycles
//   S5         back to PRE_START
// The states, their order and their outputs follow the design's state
// diagram. Two points where the diagram and the design's description differ
// are settled here as follows: DELAY is left when the sampling delay has
// elapsed, and the display timer is restarted in S3. `done` is high in both
// START and SPI so the microcontroller sees the request for the whole
// transfer. The timers are delay_timer instances.
//
// Timing (40 MHz clock): SAMPLE_DELAY = 2**14 gives one request every
// 409.6 us plus the transfer time; DISPLAY_DELAY = 2**22 holds each display
// for about 0.105 s. fft_start and save_start are one-cycle pulses issued
// in the cycle that enters S1 and S2 respectively.
module eq_controller
  import eq_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY  = 16384,
  parameter int unsigned DISPLAY_DELAY = 4194304
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load,           // synchronised LOAD
  input  logic             fft_done,
  input  logic             save_complete,
  output logic             done,
  output logic             load_we,
  output logic [LOG2N-1:0] load_addr,      // bit-reversed sample address
  output logic             fft_start,
  output logic             save_start,
  output ctrl_state_t      state
);

  ctrl_state_t      next;
  logic [LOG2N-1:0] sample_addr;
  logic             last_sample;
  logic             sample_wait_over, display_wait_over;

  assign last_sample = (sample_addr == '1);

  always_comb begin
    next = state;
    unique case (state)
      ST_PRE_START: next = ST_START;
      ST_START:     next = ST_SPI;
      ST_SPI:       if (!load) next = ST_WRITEDATA;
      ST_WRITEDATA: next = ST_S0;
      ST_S0:        next = last_sample ? ST_S1 : ST_DELAY;
      ST_DELAY:     if (sample_wait_over) next = ST_RESET_SPI;
      ST_RESET_SPI: next = ST_START;
      ST_S1:        if (fft_done) next = ST_S2;
      ST_S2:        if (save_complete) next = ST_S3;
      ST_S3:        next = ST_S4;
      ST_S4:        if (display_wait_over) next = ST_S5;
      ST_S5:        next = ST_PRE_START;
      default:      next = ST_PRE_START;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state <= ST_PRE_START;
    else       state <= next;
  end

  // Sample address: cleared in PRE_START, advanced in S0.
  always_ff @(posedge clk) begin
    if (reset || state == ST_PRE_START) sample_addr <= '0;
    else if (state == ST_S0)            sample_addr <= sample_addr + 1'b1;
  end

  always_comb begin
    for (int b = 0; b < LOG2N; b++) load_addr[b] = sample_addr[LOG2N-1-b];
  end

  assign done       = (state == ST_START) || (state == ST_SPI);
  assign load_we    = (state == ST_WRITEDATA);
  assign fft_start  = (state == ST_S0) && last_sample;
  assign save_start = (state == ST_S1) && fft_done;

  delay_timer #(.DELAY(SAMPLE_DELAY)) u_sample_timer (
    .clk, .reset, .clear(state == ST_WRITEDATA), .expired(sample_wait_over));

  delay_timer #(.DELAY(DISPLAY_DELAY)) u_display_timer (
    .clk, .reset, .clear(state == ST_S3), .expired(display_wait_over));

endmodule
