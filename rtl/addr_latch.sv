// addr_latch: address latch and mode register.
//
// Latches the address of each READ, WRITE or LOAD MODE request when the
// command FSM accepts it ('load').  The 24-bit user address is split as
//   bank = addr[23:22], column = addr[21:11], row = addr[10:0].
// 'sel' chooses what goes onto the DDR address pins in the current cycle:
//   AD_ROW     row address (ACTIVE)
//   AD_COL     column: A9..A0 = col[9:0], A11 = col[10], A10 = 0 (READ/WRITE)
//   AD_MODE    mode value addr[12:0], bank pins = addr[23:22] (LOAD MODE)
//   AD_PRE_ALL A10 = 1 (PRECHARGE all banks)
// When the FSM is in LOAD_MR ('mr_write') and the bank pins select the mode
// register (BA = 00), the mode value is also stored here, and its burst
// length, CAS latency (in half cycles) and burst type are decoded for the rest
// of the controller.  The field layout of the mode register and the address
// split follow the document's figures; the output multiplexer and the
// column bit placement are this design's own.
module addr_latch
  import ddr_pkg::*;
#(
  parameter logic [AD_W-1:0] RESET_MODE = MR_BL8_CL2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [UADDR_W-1:0] addr_in,
  input  ad_sel_e            sel,
  input  logic               mr_write,
  output logic [AD_W-1:0]    ddr_ad,
  output logic [BA_W-1:0]    ddr_ba,
  output logic [ROW_W-1:0]   row,
  output logic [COL_W-1:0]   col,
  output logic [AD_W-1:0]    mode,
  output logic [3:0]         burst_len,
  output logic [2:0]         cas_half,
  output logic               burst_type
);
  logic [UADDR_W-1:0] addr_q;
  logic [BA_W-1:0]    ba;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr_q <= '0;
    else if (load) addr_q <= addr_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          mode <= RESET_MODE;
    else if (mr_write && ba == 2'b00)    mode <= addr_q[AD_W-1:0];
  end

  assign row = addr_q[ROW_W-1:0];
  assign col = addr_q[ROW_W+COL_W-1:ROW_W];
  assign ba  = addr_q[UADDR_W-1:UADDR_W-BA_W];

  assign burst_len  = mr_burst_len(mode[2:0]);
  assign cas_half   = mr_cas_half(mode[6:4]);
  assign burst_type = mode[3];

  always_comb begin
    ddr_ba = ba;
    unique case (sel)
      AD_COL:     ddr_ad = {1'b0, col[10], 1'b0, col[9:0]};
      AD_MODE:    ddr_ad = addr_q[AD_W-1:0];
      AD_PRE_ALL: ddr_ad = 13'h0400;
      default:    ddr_ad = {2'b00, row};
    endcase
  end
endmodule
