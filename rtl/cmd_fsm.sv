// cmd_fsm: DDR SDRAM command FSM.
//
// Takes requests (from the power-up sequencer until it is done, then from the
// control interface) and drives the DDR command pins CS#, RAS#, CAS#, WE# as
// a Moore function of its state, using the command table encoding (IDLE and
// the wait states issue NOP).  State graph:
//   IDLE -> PRECHARGE | REFRESH | LOAD_MR -> IDLE
//   IDLE -> ACT -> (ACT_WAIT until rcd_end) -> READ or WRITE
//   READ -> (READ_WAIT until cas_lat_end) -> DATA -> IDLE, or for burst
//           length 2 READ_WAIT -> IDLE directly
//   WRITE -> WRITE_DATA -> IDLE, or for burst length 2 WRITE -> IDLE
// DATA and WRITE_DATA loop until burst_end (burst counter at zero) or, for
// burst length 4, leave after one cycle.  After every read or write burst the
// FSM closes the row itself: back in IDLE it first issues PRECHARGE (all
// banks, A10 high).  The state graph and the counters (Rcd, Cslt, Brst)
// follow the document.  The extra recovery timer is this design's own: a
// command issued in PRECHARGE, REFRESH, LOAD_MR or the end of a write burst
// loads it with tRP-1, tRFC-1, tMRD-1 or tWR+1 (the data follows the WRITE by one
// clock), and IDLE accepts nothing until
// it has run out.
//
// Timing (controller clock cycles): ACT to READ/WRITE is T_RCD.  The cycle in
// which cas_lat_end holds is the cycle in which the first read data word
// arrives for an integer CAS latency; the CAS counter is loaded with
// floor(CL)+1.  'wr_window' is high for the BL/2 cycles of WRITE and
// WRITE_DATA; the data path sends the burst one cycle later.  Only the
// counters' 'done' flags steer the FSM; their count values stay visible for
// debugging.
module cmd_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned     T_RCD     = 2,
  parameter int unsigned     T_RP      = 2,
  parameter int unsigned     T_RFC     = 8,
  parameter int unsigned     T_MRD     = 2,
  parameter int unsigned     T_WR      = 2,
  parameter int unsigned     INIT_WAIT = 20000,
  parameter int unsigned     DLL_WAIT  = 200,
  parameter logic [AD_W-1:0] INIT_MODE = MR_BL8_CL2
) (
  input  logic               clk,
  input  logic               rst_n,
  // requests from the control interface
  input  req_t               arb_req,
  output logic               arb_accept,
  output logic               init_done,
  // mode register fields (from the address latch)
  input  logic [3:0]         burst_len,
  input  logic [2:0]         cas_half,
  // DDR command pins
  output logic               ddr_cke,
  output logic               ddr_csb,
  output logic               ddr_rasb,
  output logic               ddr_casb,
  output logic               ddr_web,
  // address latch control
  output logic               lat_load,
  output logic [UADDR_W-1:0] lat_addr,
  output ad_sel_e            ad_sel,
  output logic               mr_write,
  // data path control
  output logic               wr_accept,
  output logic               wr_window,
  output fsm_state_e         state
);
  fsm_state_e state_n;
  req_t       init_req, req;
  logic       init_accept, accept;
  req_kind_e  op_q;              // READ or WRITE of the access in progress
  logic       pre_pending;

  logic       rcd_load, cas_load, brst_load, tmr_load;
  logic [3:0] rcd_val;
  logic [2:0] cas_val, brst_val;
  logic [7:0] tmr_val;
  logic       rcd_end, cas_lat_end, burst_end, tmr_done;
  logic       burst_2, burst_4;
  logic [3:0] rcd_cnt;
  logic [2:0] cas_cnt, brst_cnt;
  logic [7:0] tmr_cnt;

  init_seq #(.INIT_WAIT(INIT_WAIT), .DLL_WAIT(DLL_WAIT), .INIT_MODE(INIT_MODE)) u_init (
    .clk, .rst_n, .accept(init_accept), .req(init_req), .cke(ddr_cke), .done(init_done)
  );

  ddr_cntr #(.W(4)) u_rcd_cntr  (.clk, .rst_n, .load(rcd_load),  .value(rcd_val),  .count(rcd_cnt),  .done(rcd_end));
  ddr_cntr #(.W(3)) u_cslt_cntr (.clk, .rst_n, .load(cas_load),  .value(cas_val),  .count(cas_cnt),  .done(cas_lat_end));
  ddr_cntr #(.W(3)) u_brst_cntr (.clk, .rst_n, .load(brst_load), .value(brst_val), .count(brst_cnt), .done(burst_end));
  ddr_cntr #(.W(8)) u_tmr_cntr  (.clk, .rst_n, .load(tmr_load),  .value(tmr_val),  .count(tmr_cnt),  .done(tmr_done));

  assign burst_2 = (burst_len == 4'd2);
  assign burst_4 = (burst_len == 4'd4);

  assign req         = init_done ? arb_req : init_req;
  assign accept      = (state == S_IDLE) && tmr_done && !pre_pending && (req.kind != RQ_NONE);
  assign arb_accept  = accept && init_done;
  assign init_accept = accept && !init_done;

  assign rcd_val  = 4'(T_RCD - 1);
  assign cas_val  = 3'(cas_half >> 1) + 3'd1;
  assign brst_val = 3'(burst_len >> 1) - 3'd2;

  // next state and counter loads
  always_comb begin
    state_n   = state;
    rcd_load  = 1'b0;
    cas_load  = 1'b0;
    brst_load = 1'b0;
    tmr_load  = 1'b0;
    tmr_val   = '0;
    unique case (state)
      S_IDLE: begin
        if (tmr_done && pre_pending) state_n = S_PRECHARGE;
        else if (accept) begin
          unique case (req.kind)
            RQ_PRECHG:  state_n = S_PRECHARGE;
            RQ_REFRESH: state_n = S_REFRESH;
            RQ_LOAD_MR: state_n = S_LOAD_MR;
            default: begin state_n = S_ACT; rcd_load = 1'b1; end
          endcase
        end
        if (state_n == S_PRECHARGE) begin tmr_load = 1'b1; tmr_val = 8'(T_RP - 1);  end
        if (state_n == S_REFRESH)   begin tmr_load = 1'b1; tmr_val = 8'(T_RFC - 1); end
        if (state_n == S_LOAD_MR)   begin tmr_load = 1'b1; tmr_val = 8'(T_MRD - 1); end
      end
      S_PRECHARGE, S_REFRESH, S_LOAD_MR: state_n = S_IDLE;
      S_ACT, S_ACT_WAIT: begin
        if (rcd_end) begin
          state_n  = (op_q == RQ_READ) ? S_READ : S_WRITE;
          cas_load = (op_q == RQ_READ);
        end else state_n = S_ACT_WAIT;
      end
      S_READ: begin
        if (cas_lat_end) begin state_n = S_DATA; brst_load = 1'b1; end
        else state_n = S_READ_WAIT;
      end
      S_READ_WAIT: begin
        if (cas_lat_end) begin
          if (burst_2) state_n = S_IDLE;
          else begin state_n = S_DATA; brst_load = 1'b1; end
        end
      end
      S_DATA: if (burst_4 || burst_end) state_n = S_IDLE;
      S_WRITE: begin
        if (burst_2) begin
          state_n = S_IDLE; tmr_load = 1'b1; tmr_val = 8'(T_WR + 1);
        end else begin
          state_n = S_WRITE_DATA; brst_load = 1'b1;
        end
      end
      S_WRITE_DATA: if (burst_4 || burst_end) begin
        state_n = S_IDLE; tmr_load = 1'b1; tmr_val = 8'(T_WR + 1);
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      op_q        <= RQ_NONE;
      pre_pending <= 1'b0;
    end else begin
      state <= state_n;
      if (accept) op_q <= req.kind;
      if (state_n == S_PRECHARGE) pre_pending <= 1'b0;
      else if (state != S_IDLE && state_n == S_IDLE &&
               (state == S_READ_WAIT || state == S_DATA ||
                state == S_WRITE || state == S_WRITE_DATA))
        pre_pending <= 1'b1;
    end
  end

  // Moore command outputs, {cs#, ras#, cas#, we#}
  ddr_cmd_t cmd;
  always_comb begin
    unique case (state)
      S_PRECHARGE: cmd = DDR_PRE;
      S_REFRESH:   cmd = DDR_REF;
      S_LOAD_MR:   cmd = DDR_LMR;
      S_ACT:       cmd = DDR_ACT;
      S_READ:      cmd = DDR_READ;
      S_WRITE:     cmd = DDR_WRITE;
      default:     cmd = DDR_NOP;
    endcase
  end
  assign {ddr_csb, ddr_rasb, ddr_casb, ddr_web} = cmd;

  always_comb begin
    unique case (state)
      S_READ, S_WRITE: ad_sel = AD_COL;
      S_LOAD_MR:       ad_sel = AD_MODE;
      S_PRECHARGE:     ad_sel = AD_PRE_ALL;
      default:         ad_sel = AD_ROW;
    endcase
  end

  assign lat_load  = accept && (req.kind inside {RQ_READ, RQ_WRITE, RQ_LOAD_MR});
  assign lat_addr  = req.addr;
  assign mr_write  = (state == S_LOAD_MR);
  assign wr_accept = accept && (req.kind == RQ_WRITE);
  assign wr_window = (state == S_WRITE) || (state == S_WRITE_DATA);

  a_cmd_only_after_init_cke: assert property (@(posedge clk) disable iff (!rst_n)
                                              !ddr_cke |-> state == S_IDLE);
endmodule
