// tb_cmd_fsm: checks the command FSM cycle by cycle.  After the power-up
// sequence (whose commands are checked in order), each request is offered
// and the DDR command issued in every following cycle is compared with a
// hand-written expected sequence: READ with burst length 8, 4 and 2 (CAS
// latency 2 and 3), WRITE with burst length 8 and 4, LOAD MODE, REFRESH and
// PRECHARGE, including the automatic precharge after each burst, the
// ACT_WAIT cycles for tRCD and the recovery times.  The address-select,
// wr_window and mr_write outputs are checked against the command.
module tb_cmd_fsm;
  import ddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  req_t arb_req = '{kind: RQ_NONE, addr: '0};
  logic arb_accept, init_done;
  logic [3:0] burst_len = 4'd8;
  logic [2:0] cas_half = 3'd4;
  logic ddr_cke, ddr_csb, ddr_rasb, ddr_casb, ddr_web;
  logic lat_load, mr_write, wr_accept, wr_window;
  logic [23:0] lat_addr;
  ad_sel_e ad_sel;
  fsm_state_e state;
  int checks = 0, failures = 0;

  cmd_fsm #(.T_RCD(2), .T_RP(2), .T_RFC(4), .T_MRD(2), .T_WR(2), .INIT_WAIT(6), .DLL_WAIT(3)) dut (
    .clk, .rst_n, .arb_req, .arb_accept, .init_done, .burst_len, .cas_half,
    .ddr_cke, .ddr_csb, .ddr_rasb, .ddr_casb, .ddr_web,
    .lat_load, .lat_addr, .ad_sel, .mr_write, .wr_accept, .wr_window, .state
  );

  always #5 clk = ~clk;

  ddr_cmd_t pins;
  assign pins = {ddr_csb, ddr_rasb, ddr_casb, ddr_web};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle consistency of the side outputs
  always @(negedge clk) if (rst_n) begin
    if (pins == DDR_ACT)   chk(ad_sel == AD_ROW, "ACT drives the row");
    if (pins == DDR_READ || pins == DDR_WRITE) chk(ad_sel == AD_COL, "READ/WRITE drive the column");
    if (pins == DDR_PRE)   chk(ad_sel == AD_PRE_ALL, "PRECHARGE drives A10");
    chk(mr_write == (pins == DDR_LMR), "mr_write only in LOAD_MR");
  end

  // offer a request, then compare the commands of the following cycles
  task automatic run(input req_kind_e k, input logic [3:0] bl, input logic [2:0] ch,
                     input ddr_cmd_t exp[$], input int exp_wr, input string name);
    int wr_cycles = 0;
    burst_len = bl; cas_half = ch;
    arb_req.kind = k; arb_req.addr = 24'($urandom);
    #1;
    while (!arb_accept) begin @(negedge clk); #1; end
    chk(lat_load == (k inside {RQ_READ, RQ_WRITE, RQ_LOAD_MR}), {name, ": lat_load"});
    chk(lat_addr == arb_req.addr, {name, ": lat_addr"});
    chk(wr_accept == (k == RQ_WRITE), {name, ": wr_accept"});
    @(negedge clk);
    arb_req.kind = RQ_NONE;
    foreach (exp[i]) begin
      chk(pins == exp[i], $sformatf("%s: cycle %0d command %b expected %b", name, i + 1, pins, exp[i]));
      if (wr_window) wr_cycles++;
      @(negedge clk);
    end
    chk(wr_cycles == exp_wr, $sformatf("%s: wr_window for %0d cycles, expected %0d", name, wr_cycles, exp_wr));
    repeat (6) @(negedge clk);
  endtask

  ddr_cmd_t N, A, R, W, P, F, L;
  ddr_cmd_t log_q[$];

  initial begin
    N = DDR_NOP; A = DDR_ACT; R = DDR_READ; W = DDR_WRITE; P = DDR_PRE; F = DDR_REF; L = DDR_LMR;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // power-up: collect the issued commands
    while (!init_done) begin
      if (pins != DDR_NOP) log_q.push_back(pins);
      chk(ddr_cke || pins == DDR_NOP, "only NOP while CKE is low");
      @(negedge clk);
    end
    chk(log_q.size() == 7, $sformatf("%0d power-up commands", log_q.size()));
    if (log_q.size() == 7)
      chk(log_q[0] == P && log_q[1] == L && log_q[2] == L && log_q[3] == P &&
          log_q[4] == F && log_q[5] == F && log_q[6] == L, "power-up command order");
    repeat (3) @(negedge clk);

    // READ, BL 8, CL 2: ACT, ACT_WAIT, READ, 3 x READ_WAIT, 3 x DATA, IDLE, PRE
    run(RQ_READ, 4'd8, 3'd4, '{A, N, R, N, N, N, N, N, N, N, P}, 0, "read BL8 CL2");
    // READ, BL 4, CL 3: 4 x READ_WAIT, 1 x DATA
    run(RQ_READ, 4'd4, 3'd6, '{A, N, R, N, N, N, N, N, N, P}, 0, "read BL4 CL3");
    // READ, BL 2, CL 2.5 (counted as 2): READ_WAIT straight back to IDLE
    run(RQ_READ, 4'd2, 3'd5, '{A, N, R, N, N, N, N, P}, 0, "read BL2 CL2.5");
    // WRITE, BL 8: WRITE + 3 x WRITE_DATA, then tWR+1 recovery before PRE
    run(RQ_WRITE, 4'd8, 3'd4, '{A, N, W, N, N, N, N, N, N, N, P}, 4, "write BL8");
    // WRITE, BL 4
    run(RQ_WRITE, 4'd4, 3'd4, '{A, N, W, N, N, N, N, N, P}, 2, "write BL4");
    // WRITE, BL 2: WRITE straight back to IDLE
    run(RQ_WRITE, 4'd2, 3'd4, '{A, N, W, N, N, N, N, P}, 1, "write BL2");
    // LOAD MODE then an immediate READ: tMRD = 2
    arb_req.kind = RQ_LOAD_MR;
    #1;
    while (!arb_accept) begin @(negedge clk); #1; end
    @(negedge clk);
    arb_req.kind = RQ_READ;
    chk(pins == L, "LOAD MODE issued");
    #1;
    chk(!arb_accept, "nothing accepted during LOAD_MR");
    @(negedge clk);
    #1;
    chk(pins == N && arb_accept, "request accepted so that ACT comes tMRD after LOAD MODE");
    @(negedge clk);
    arb_req.kind = RQ_NONE;
    chk(pins == A, "ACT after LOAD MODE");
    repeat (16) @(negedge clk);
    // REFRESH: tRFC = 4 before the next command
    run(RQ_REFRESH, 4'd8, 3'd4, '{F, N, N, N}, 0, "refresh");
    arb_req.kind = RQ_REFRESH;
    #1;
    while (!arb_accept) begin @(negedge clk); #1; end
    @(negedge clk);
    arb_req.kind = RQ_PRECHG;
    chk(pins == F, "second REFRESH");
    repeat (2) begin @(negedge clk); #1; chk(!arb_accept, "tRFC holds off the next command"); end
    @(negedge clk); #1;
    chk(arb_accept, "PRECHARGE accepted after tRFC");
    @(negedge clk);
    arb_req.kind = RQ_NONE;
    chk(pins == P, "user PRECHARGE issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
