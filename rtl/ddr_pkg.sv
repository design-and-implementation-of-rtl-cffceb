// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// Holds the DDR command encoding (CS#, RAS#, CAS#, WE# as in the command
// table of the controller), the user command codes, the controller FSM state
// type, the request bundle passed from the control interface to the command
// FSM, and decoders for the burst length and CAS latency fields of the mode
// register (A2..A0 burst length 2/4/8, A3 burst type, A6..A4 CAS latency
// 2/2.5/3, A8 DLL reset).  The command pin values follow the command table;
// the user command codes are this design's own choice.
package ddr_pkg;

  // Address geometry: 24-bit user address = {bank[1:0], column[10:0], row[10:0]}
  localparam int unsigned UADDR_W = 24;
  localparam int unsigned ROW_W   = 11;
  localparam int unsigned COL_W   = 11;
  localparam int unsigned BA_W    = 2;
  localparam int unsigned AD_W    = 13;

  // DDR command on {cs_n, ras_n, cas_n, we_n}
  typedef logic [3:0] ddr_cmd_t;
  localparam ddr_cmd_t DDR_NOP   = 4'b0111;
  localparam ddr_cmd_t DDR_ACT   = 4'b0011;
  localparam ddr_cmd_t DDR_READ  = 4'b0101;
  localparam ddr_cmd_t DDR_WRITE = 4'b0100;
  localparam ddr_cmd_t DDR_BST   = 4'b0110;
  localparam ddr_cmd_t DDR_PRE   = 4'b0010;
  localparam ddr_cmd_t DDR_REF   = 4'b0001;
  localparam ddr_cmd_t DDR_LMR   = 4'b0000;

  // User command codes on u_cmd[3:0]
  typedef enum logic [3:0] {
    UCMD_NOP     = 4'd0,
    UCMD_LOAD_MR = 4'd1,
    UCMD_REFRESH = 4'd2,
    UCMD_PRECHG  = 4'd3,
    UCMD_READ    = 4'd6,
    UCMD_WRITE   = 4'd7
  } ucmd_e;

  // Request kinds seen by the command FSM
  typedef enum logic [2:0] {
    RQ_NONE, RQ_READ, RQ_WRITE, RQ_PRECHG, RQ_REFRESH, RQ_LOAD_MR
  } req_kind_e;

  typedef struct packed {
    req_kind_e              kind;
    logic [UADDR_W-1:0]     addr;
  } req_t;

  // Command FSM states (controller command FSM)
  typedef enum logic [3:0] {
    S_IDLE, S_PRECHARGE, S_REFRESH, S_LOAD_MR, S_ACT, S_ACT_WAIT,
    S_READ, S_READ_WAIT, S_DATA, S_WRITE, S_WRITE_DATA
  } fsm_state_e;

  // What the address latch drives onto ddr_ad / ddr_ba
  typedef enum logic [1:0] { AD_ROW, AD_COL, AD_MODE, AD_PRE_ALL } ad_sel_e;

  // Mode register fields
  localparam logic [AD_W-1:0] MR_BL8_CL2 = 13'h023;  // BL 8, sequential, CL 2
  localparam logic [AD_W-1:0] MR_DLL_RST = 13'h100;  // A8: DLL reset

  // Burst length in beats from A2..A0 (001:2, 010:4, 011:8; reserved codes -> 8)
  function automatic logic [3:0] mr_burst_len(input logic [2:0] code);
    unique case (code)
      3'b001:  return 4'd2;
      3'b010:  return 4'd4;
      default: return 4'd8;
    endcase
  endfunction

  // CAS latency in half clock cycles from A6..A4 (010:2, 011:3, 110:2.5; reserved -> 3)
  function automatic logic [2:0] mr_cas_half(input logic [2:0] code);
    unique case (code)
      3'b010:  return 3'd4;
      3'b110:  return 3'd5;
      default: return 3'd6;
    endcase
  endfunction

endpackage
