// ddr_sdram_model: behavioural model of a DDR SDRAM device, for simulation.
//
// Four banks, 11-bit rows, 11-bit columns, DQ_W-bit data.  Commands are
// sampled on the rising edge of clk (CS#, RAS#, CAS#, WE#, BA, A).  It keeps
// the mode register (burst length 2/4/8, sequential or interleaved order, CAS
// latency 2/2.5/3), opens and closes rows, and stores data sparsely.
//   READ:  beat i is driven on dq_o from (CL + i/2) clocks after the command
//          edge, DQS edge aligned (high for even beats), with a one-cycle low
//          preamble on dqs_oe_o.
//   WRITE: beats are taken on every edge of the controller's DQS once the
//          WRITE command has been sampled; the first DQS rising edge must come
//          one clock after the command edge.
// Protocol errors (a command while CKE is low, ACTIVE to an open bank, READ
// or WRITE to a closed bank, REFRESH with a bank open, tRCD, tRP, tRFC, tMRD
// violations, a late or missing DQS) are counted in 'errors' and printed.
// Counters of each command, and a log of the first commands, can be read
// hierarchically by a testbench.  Unwritten locations read as the low DQ_W
// bits of (column ^ row ^ 5).
module ddr_sdram_model #(
  parameter int unsigned DQ_W  = 4,
  parameter int unsigned T_RCD = 2,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_RFC = 8,
  parameter int unsigned T_MRD = 2
) (
  input  logic            clk,
  input  logic            cke,
  input  logic            csb,
  input  logic            rasb,
  input  logic            casb,
  input  logic            web,
  input  logic [1:0]      ba,
  input  logic [12:0]     ad,
  input  logic            dm,
  input  logic [DQ_W-1:0] dq_i,
  input  logic            dq_oe_i,
  input  logic            dqs_i,
  input  logic            dqs_oe_i,
  output logic [DQ_W-1:0] dq_o,
  output logic            dqs_o,
  output logic            dqs_oe_o
);
  logic [DQ_W-1:0] mem [logic [23:0]];
  logic [12:0] mode = 13'h023;
  logic [12:0] emode = 13'h000;
  logic        open_q [4];
  logic [10:0] row_q  [4];
  int          act_cyc [4];
  int          cyc = 0, hc = 0;
  int          pre_cyc = -100, ref_cyc = -100, lmr_cyc = -100;
  int          errors = 0;
  int          n_act = 0, n_read = 0, n_write = 0, n_pre = 0, n_ref = 0, n_lmr = 0, n_emr = 0;
  int          n_wbeats = 0, n_rbeats = 0;
  int          cke_low_cycles = 0;
  logic [3:0]  cmd_log [16];
  int          n_log = 0;

  // read burst in flight
  int          rd_start_hc = -1;
  int          rd_len = 0;
  logic [23:0] rd_key [8];
  // write burst in flight
  int          wr_left = 0;
  int          wr_beat = 0;
  int          wr_cmd_hc = -1;
  logic [23:0] wr_key [8];

  initial begin
    for (int b = 0; b < 4; b++) begin open_q[b] = 1'b0; row_q[b] = '0; act_cyc[b] = -100; end
    dq_o = '0; dqs_o = 1'b0; dqs_oe_o = 1'b0;
  end

  function automatic int burst_len();
    case (mode[2:0]) 3'b001: return 2; 3'b010: return 4; default: return 8; endcase
  endfunction
  function automatic int cas_half();
    case (mode[6:4]) 3'b010: return 4; 3'b110: return 5; default: return 6; endcase
  endfunction
  // column of beat i of a burst starting at column c
  function automatic logic [10:0] beat_col(input logic [10:0] c, input int i);
    int bl;
    logic [10:0] m;
    bl = burst_len();
    m  = 11'(bl - 1);
    if (mode[3]) return (c & ~m) | ((c ^ 11'(i)) & m);
    else         return (c & ~m) | ((c + 11'(i)) & m);
  endfunction
  function automatic logic [DQ_W-1:0] peek(input logic [1:0] b, input logic [10:0] r, input logic [10:0] c);
    logic [23:0] k;
    k = {b, r, c};
    if (mem.exists(k)) return mem[k];
    return DQ_W'(c ^ r ^ 11'd5);
  endfunction

  task automatic err(input string s);
    errors++;
    $display("DDR model error at cycle %0d: %s", cyc, s);
  endtask

  always @(clk) begin
    hc = hc + 1;
    // read beats
    if (rd_start_hc >= 0 && hc >= rd_start_hc - 2 && hc < rd_start_hc + rd_len) begin
      dqs_oe_o = 1'b1;
      if (hc >= rd_start_hc) begin
        int i;
        i = hc - rd_start_hc;
        dq_o  = peek(rd_key[i][23:22], rd_key[i][21:11], rd_key[i][10:0]);
        dqs_o = (i % 2 == 0);
        n_rbeats++;
      end else dqs_o = 1'b0;
    end else begin
      dqs_oe_o = 1'b0;
      dqs_o    = 1'b0;
      if (rd_start_hc >= 0 && hc >= rd_start_hc + rd_len) rd_start_hc = -1;
    end

    if (clk) begin
      cyc = cyc + 1;
      if (!cke) begin
        cke_low_cycles++;
        if (!csb && {rasb, casb, web} != 3'b111) err("command while CKE low");
      end else if (!csb && {rasb, casb, web} != 3'b111) begin
        if (n_log < 16) begin cmd_log[n_log] = {csb, rasb, casb, web}; n_log++; end
        if (cyc - lmr_cyc < int'(T_MRD)) err("tMRD violated");
        unique case ({rasb, casb, web})
          3'b011: begin // ACTIVE
            n_act++;
            if (open_q[ba]) err("ACTIVE to an open bank");
            if (cyc - pre_cyc < int'(T_RP))  err("tRP violated");
            if (cyc - ref_cyc < int'(T_RFC)) err("tRFC violated");
            open_q[ba] = 1'b1; row_q[ba] = ad[10:0]; act_cyc[ba] = cyc;
          end
          3'b101, 3'b100: begin // READ / WRITE
            logic [10:0] c;
            c = {ad[11], ad[9:0]};
            if (!open_q[ba]) err("READ/WRITE to a closed bank");
            if (cyc - act_cyc[ba] < int'(T_RCD)) err("tRCD violated");
            if (ad[10]) err("auto precharge not expected");
            for (int i = 0; i < burst_len(); i++) begin
              if (web) rd_key[i] = {ba, row_q[ba], beat_col(c, i)};
              else     wr_key[i] = {ba, row_q[ba], beat_col(c, i)};
            end
            if (web) begin
              n_read++;
              if (rd_start_hc >= 0) err("READ while a read burst is in flight");
              rd_start_hc = hc + cas_half();
              rd_len      = burst_len();
            end else begin
              n_write++;
              if (wr_left != 0) err("WRITE while a write burst is in flight");
              wr_left   = burst_len();
              wr_beat   = 0;
              wr_cmd_hc = hc;
            end
          end
          3'b010: begin // PRECHARGE
            n_pre++;
            if (wr_left != 0) err("PRECHARGE during a write burst");
            pre_cyc = cyc;
            if (ad[10]) for (int b = 0; b < 4; b++) open_q[b] = 1'b0;
            else open_q[ba] = 1'b0;
          end
          3'b001: begin // AUTO REFRESH
            n_ref++;
            for (int b = 0; b < 4; b++) if (open_q[b]) err("REFRESH with a bank open");
            if (cyc - pre_cyc < int'(T_RP)) err("tRP violated before REFRESH");
            if (cyc - ref_cyc < int'(T_RFC)) err("tRFC violated");
            ref_cyc = cyc;
          end
          3'b000: begin // LOAD MODE
            for (int b = 0; b < 4; b++) if (open_q[b]) err("LOAD MODE with a bank open");
            lmr_cyc = cyc;
            if (ba == 2'b00) begin n_lmr++; mode = ad; end
            else if (ba == 2'b01) begin n_emr++; emode = ad; end
          end
          default: ; // BURST TERMINATE: not used by the controller
        endcase
      end
    end
    // a write burst whose DQS never came
    if (wr_left != 0 && wr_beat == 0 && hc > wr_cmd_hc + 3) begin
      err("no DQS edge one clock after WRITE");
      wr_left = 0;
    end
  end

  always @(dqs_i) begin
    if (wr_left != 0) begin
      if (wr_beat == 0 && !(dqs_i && hc == wr_cmd_hc + 2)) err($sformatf("first write DQS edge misplaced hc=%0d cmd=%0d dqs=%0d", hc, wr_cmd_hc, dqs_i));
      if (!dqs_oe_i || !dq_oe_i) err("write DQ/DQS not driven");
      if (dm) err("write data masked");
      mem[wr_key[wr_beat]] = dq_i;
      n_wbeats++;
      wr_beat++;
      wr_left--;
    end
  end
endmodule
