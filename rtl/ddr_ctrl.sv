// ddr_ctrl: DDR SDRAM controller, top level.
//
// Connects the clock DLL model, the control interface (command decoder,
// arbiter, refresh unit), the command FSM (with its power-up sequencer and
// timing counters), the address latch (with the mode register) and the DDR
// data path.  User side: hold u_cmd / u_addr until u_cmd_ack is seen at a
// rising edge of fpga_clk; for a WRITE, present the BL/2 data words on
// u_data_i in the BL/2 cycles after the acknowledge; READ data comes back on
// u_data_o with u_data_valid, one word per cycle.  u_ref_ack pulses after
// each periodic auto-refresh.  Nothing is acknowledged until the power-up
// sequence has finished (INIT_WAIT + about 30 + DLL_WAIT cycles).
//
// DDR side: the bidirectional DQ and DQS pads are split into output, output
// enable and input signals, to be joined in the I/O pads.  ddr_clk/ddr_clkb
// is the differential DDR clock; u_clk_fb must be ddr_clk fed back from the
// board.  The internal reset is u_reset_n combined with the DLL lock and
// synchronised to fpga_clk.  The block split and the signal names follow the
// document's block diagrams; the split pads, the acknowledge and the reset
// synchroniser are this design's own choices.
module ddr_ctrl
  import ddr_pkg::*;
#(
  parameter int unsigned     DQ_W         = 4,
  parameter int unsigned     T_RCD        = 2,
  parameter int unsigned     T_RP         = 2,
  parameter int unsigned     T_RFC        = 8,
  parameter int unsigned     T_MRD        = 2,
  parameter int unsigned     T_WR         = 2,
  parameter int unsigned     REF_INTERVAL = 780,
  parameter int unsigned     INIT_WAIT    = 20000,
  parameter int unsigned     DLL_WAIT     = 200,
  parameter logic [AD_W-1:0] INIT_MODE    = MR_BL8_CL2
) (
  // user side
  input  logic               u_clk,
  input  logic               u_clk_fb,
  input  logic               u_reset_n,
  input  logic [3:0]         u_cmd,
  input  logic [UADDR_W-1:0] u_addr,
  input  logic [2*DQ_W-1:0]  u_data_i,
  output logic               u_cmd_ack,
  output logic [2*DQ_W-1:0]  u_data_o,
  output logic               u_data_valid,
  output logic               u_ref_ack,
  output logic               fpga_clk,
  // DDR side
  output logic               ddr_clk,
  output logic               ddr_clkb,
  output logic               ddr_cke,
  output logic               ddr_csb,
  output logic               ddr_rasb,
  output logic               ddr_casb,
  output logic               ddr_web,
  output logic [BA_W-1:0]    ddr_ba,
  output logic [AD_W-1:0]    ddr_ad,
  output logic               ddr_dm,
  output logic [DQ_W-1:0]    ddr_dq_o,
  output logic               ddr_dq_oe,
  input  logic [DQ_W-1:0]    ddr_dq_i,
  output logic               ddr_dqs_o,
  output logic               ddr_dqs_oe,
  input  logic               ddr_dqs_i
);
  logic fpga_clk2x, locked;
  logic [1:0] rst_sync;
  logic rst_n;

  clk_dll u_clk_dll (
    .u_clk, .u_clk_fb, .fpga_clk, .fpga_clk2x, .ddr_clk, .ddr_clkb, .locked
  );

  always_ff @(posedge fpga_clk or negedge u_reset_n) begin
    if (!u_reset_n) rst_sync <= 2'b00;
    else            rst_sync <= {rst_sync[0], locked};
  end
  assign rst_n = rst_sync[1];

  req_t       arb_req;
  logic       arb_accept, init_done;
  logic [3:0] burst_len;
  logic [2:0] cas_half;
  logic       lat_load, mr_write, wr_accept, wr_window;
  logic [UADDR_W-1:0] lat_addr;
  ad_sel_e    ad_sel;
  fsm_state_e state;

  ctrl_if #(.REF_INTERVAL(REF_INTERVAL)) u_ctrl_if (
    .clk(fpga_clk), .rst_n, .init_done, .u_cmd, .u_addr,
    .u_cmd_ack, .u_ref_ack, .req(arb_req), .accept(arb_accept)
  );

  cmd_fsm #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD), .T_WR(T_WR),
    .INIT_WAIT(INIT_WAIT), .DLL_WAIT(DLL_WAIT), .INIT_MODE(INIT_MODE)
  ) u_cmd_fsm (
    .clk(fpga_clk), .rst_n, .arb_req, .arb_accept, .init_done,
    .burst_len, .cas_half,
    .ddr_cke, .ddr_csb, .ddr_rasb, .ddr_casb, .ddr_web,
    .lat_load, .lat_addr, .ad_sel, .mr_write,
    .wr_accept, .wr_window, .state
  );

  logic [ROW_W-1:0] row;
  logic [COL_W-1:0] col;
  logic [AD_W-1:0]  mode;
  logic             burst_type;

  addr_latch #(.RESET_MODE(INIT_MODE)) u_addr_latch (
    .clk(fpga_clk), .rst_n, .load(lat_load), .addr_in(lat_addr), .sel(ad_sel),
    .mr_write, .ddr_ad, .ddr_ba, .row, .col, .mode, .burst_len, .cas_half, .burst_type
  );

  data_path #(.DQ_W(DQ_W)) u_data_path (
    .clk(fpga_clk), .clk2x(fpga_clk2x), .rst_n,
    .wr_accept, .wr_window, .burst_len,
    .u_data_i, .u_data_o, .u_data_valid,
    .dq_o(ddr_dq_o), .dq_oe(ddr_dq_oe), .dq_i(ddr_dq_i),
    .dqs_o(ddr_dqs_o), .dqs_oe(ddr_dqs_oe), .dqs_i(ddr_dqs_i), .dm_o(ddr_dm)
  );
endmodule
