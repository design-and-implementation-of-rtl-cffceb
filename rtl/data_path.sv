// data_path: DDR data path (write latch and serializer, read capture).
//
// Write: after the command FSM accepts a WRITE ('wr_accept' in cycle A), the
// user presents the burst's BL/2 words of 2*DQ_W bits on u_data_i in cycles
// A+1 .. A+BL/2; they are latched into a small buffer.  While the FSM's
// 'wr_window' is high
// (WRITE and WRITE_DATA, BL/2 cycles starting at the WRITE command cycle W),
// the burst is sent: the DDR samples WRITE at the rising edge that ends cycle
// W, and the first DQS rising edge comes one clock later, at the end of cycle
// W+1.  Each word goes out as two DQ_W-bit beats, low half first, one beat per
// half clock.  DQS is driven low as a preamble from the middle of cycle W+1,
// then toggles on every clock edge, BL edges in all.  DQ changes half way
// between DQS edges (on falling edges of the 2x clock), so DQS is centre
// aligned with the data.  DM is driven low (no byte masking).
//
// Read: beats are captured on each falling edge of the 2x clock, which is the
// middle of each beat.  The DDR drives DQS edge aligned, high for even beats
// and low for odd ones, so a beat sampled with DQS high is a low half and the
// next beat sampled with DQS low completes the word.  Completed words are
// handed to the controller clock and presented on u_data_o with u_data_valid
// high for one cycle each.  Read capture does not depend on the CAS latency.
//
// Clocks: clk is the controller clock (fpga_clk, same frequency and phase as
// ddr_clk); clk2x has twice its frequency with rising edges on both edges of
// clk.  The document fixes the n-bit DQ / 2n-bit user data split (its
// waveforms show 8-bit user data and a 4-bit DQ) and the use of the 2x
// clock; the buffer, the handshake and the capture scheme are this design's
// own.
module data_path
  import ddr_pkg::*;
#(
  parameter int unsigned DQ_W   = 4,
  parameter int unsigned BL_MAX = 8
) (
  input  logic              clk,
  input  logic              clk2x,
  input  logic              rst_n,
  // from the command FSM / address latch
  input  logic              wr_accept,
  input  logic              wr_window,
  input  logic [3:0]        burst_len,
  // user side
  input  logic [2*DQ_W-1:0] u_data_i,
  output logic [2*DQ_W-1:0] u_data_o,
  output logic              u_data_valid,
  // DDR side (pad signals split into output, output enable and input)
  output logic [DQ_W-1:0]   dq_o,
  output logic              dq_oe,
  input  logic [DQ_W-1:0]   dq_i,
  output logic              dqs_o,
  output logic              dqs_oe,
  input  logic              dqs_i,
  output logic              dm_o
);
  localparam int unsigned NW = BL_MAX / 2;
  localparam int unsigned PW = $clog2(NW);
  localparam int unsigned BW = $clog2(BL_MAX);

  // ---------------- write buffer (controller clock) ----------------
  logic [2*DQ_W-1:0] wbuf [NW];
  logic [PW:0]       wleft;
  logic [PW-1:0]     wptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wleft <= '0;
      wptr  <= '0;
    end else if (wr_accept) begin
      wleft <= (PW+1)'(burst_len >> 1);
      wptr  <= '0;
    end else if (wleft != '0) begin
      wleft <= wleft - 1'b1;
      wptr  <= wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!wr_accept && wleft != '0) wbuf[wptr] <= u_data_i;
  end

  // ---------------- write serializer (2x clock) ----------------
  // wr_d: wr_window delayed by one controller cycle (the DDR write latency)
  logic          wr_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_d <= 1'b0;
    else        wr_d <= wr_window;
  end

  logic          win1, win2;     // wr_d delayed by one and two half cycles
  logic [BW-1:0] beat;           // beat index while win1 is high
  logic          dqs_q;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      win1  <= 1'b0;
      win2  <= 1'b0;
      beat  <= '0;
      dqs_q <= 1'b0;
    end else begin
      win1  <= wr_d;
      win2  <= win1;
      beat  <= win1 ? beat + 1'b1 : '0;
      dqs_q <= win1 ? ~dqs_q : 1'b0;
    end
  end

  logic [2*DQ_W-1:0] cur_word;
  assign cur_word = wbuf[beat[BW-1:1]];

  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      dq_o  <= '0;
      dq_oe <= 1'b0;
    end else begin
      dq_o  <= beat[0] ? cur_word[2*DQ_W-1:DQ_W] : cur_word[DQ_W-1:0];
      dq_oe <= win1;
    end
  end

  assign dqs_o  = dqs_q;
  assign dqs_oe = win1 | win2;
  assign dm_o   = 1'b0;

  // ---------------- read capture (falling edge of the 2x clock) ----------------
  logic [DQ_W-1:0]   lo_q;
  logic              have_lo;
  logic [2*DQ_W-1:0] rword;
  logic              rtgl;

  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      lo_q    <= '0;
      have_lo <= 1'b0;
      rword   <= '0;
      rtgl    <= 1'b0;
    end else if (dqs_i) begin
      lo_q    <= dq_i;
      have_lo <= 1'b1;
    end else if (have_lo) begin
      rword   <= {dq_i, lo_q};
      rtgl    <= ~rtgl;
      have_lo <= 1'b0;
    end
  end

  // hand completed words to the controller clock
  logic rtgl_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rtgl_d       <= 1'b0;
      u_data_valid <= 1'b0;
      u_data_o     <= '0;
    end else begin
      rtgl_d       <= rtgl;
      u_data_valid <= (rtgl != rtgl_d);
      if (rtgl != rtgl_d) u_data_o <= rword;
    end
  end
endmodule
