// tb_ddr_ctrl: end-to-end test of the DDR SDRAM controller with a DDR SDRAM
// model.
//
// Runs the power-up sequence, then write/read-back bursts at several mode
// register settings (burst length 8/4/2, sequential and interleaved order,
// CAS latency 2, 2.5 and 3), user PRECHARGE and REFRESH commands, and
// periodic refreshes that compete with user traffic.  Every word read back is
// compared with what was written (kept in the testbench's own reference
// memory), every written beat is compared with the model's memory at the
// column the burst order gives, and the read latency from command
// acknowledge to the first valid word is checked against
// T_RCD + ceil(CL) + 3 cycles.  Each mechanism (initialisation, ACT_WAIT,
// READ_WAIT, each burst length, each CAS latency, interleaved order,
// automatic precharge, periodic refresh, refresh pre-empting a waiting user
// command, user PRECHARGE / REFRESH) is counted and must happen at least
// once.  The model's protocol error count must stay zero.
module tb_ddr_ctrl;
  import ddr_pkg::*;

  localparam int unsigned INIT_WAIT    = 60;
  localparam int unsigned DLL_WAIT     = 20;
  localparam int unsigned REF_INTERVAL = 150;
  localparam int unsigned T_RCD        = 2;
  localparam int unsigned T_RFC        = 8;
  localparam int unsigned NACC         = 12;   // accesses per mode setting

  logic u_clk = 1'b0, u_reset_n = 1'b0;
  logic [3:0]  u_cmd = 4'd0;
  logic [23:0] u_addr = '0;
  logic [7:0]  u_data_i = '0;
  logic u_cmd_ack, u_data_valid, u_ref_ack, fpga_clk;
  logic [7:0] u_data_o;
  logic ddr_clk, ddr_clkb, ddr_cke, ddr_csb, ddr_rasb, ddr_casb, ddr_web, ddr_dm;
  logic [1:0] ddr_ba;
  logic [12:0] ddr_ad;
  logic [3:0] ddr_dq_o, ddr_dq_i;
  logic ddr_dq_oe, ddr_dqs_o, ddr_dqs_oe, ddr_dqs_i, m_dqs_oe;

  int checks = 0, failures = 0;

  always #5 u_clk = ~u_clk;

  ddr_ctrl #(.INIT_WAIT(INIT_WAIT), .DLL_WAIT(DLL_WAIT), .REF_INTERVAL(REF_INTERVAL),
             .T_RCD(T_RCD), .T_RFC(T_RFC)) dut (
    .u_clk, .u_clk_fb(ddr_clk), .u_reset_n, .u_cmd, .u_addr, .u_data_i,
    .u_cmd_ack, .u_data_o, .u_data_valid, .u_ref_ack, .fpga_clk,
    .ddr_clk, .ddr_clkb, .ddr_cke, .ddr_csb, .ddr_rasb, .ddr_casb, .ddr_web,
    .ddr_ba, .ddr_ad, .ddr_dm, .ddr_dq_o, .ddr_dq_oe, .ddr_dq_i,
    .ddr_dqs_o, .ddr_dqs_oe, .ddr_dqs_i
  );

  ddr_sdram_model #(.DQ_W(4), .T_RCD(T_RCD), .T_RFC(T_RFC)) mem (
    .clk(ddr_clk), .cke(ddr_cke), .csb(ddr_csb), .rasb(ddr_rasb), .casb(ddr_casb),
    .web(ddr_web), .ba(ddr_ba), .ad(ddr_ad), .dm(ddr_dm),
    .dq_i(ddr_dq_o), .dq_oe_i(ddr_dq_oe), .dqs_i(ddr_dqs_o), .dqs_oe_i(ddr_dqs_oe),
    .dq_o(ddr_dq_i), .dqs_o(ddr_dqs_i), .dqs_oe_o(m_dqs_oe)
  );

  // ---------------- mechanism counters ----------------
  int n_init = 0, n_act_wait = 0, n_read_wait = 0, n_auto_pre = 0;
  int n_ref_ack = 0, n_ref_preempt = 0, n_user_pre = 0, n_user_ref = 0;
  int n_bl[9] = '{default: 0};
  int n_cl[7] = '{default: 0};
  int n_interleaved = 0;
  int cyc = 0;

  always @(posedge fpga_clk) begin
    if (dut.state == S_ACT_WAIT)  n_act_wait++;
    if (dut.state == S_READ_WAIT) n_read_wait++;
    if (u_ref_ack) n_ref_ack++;
    // a user command waiting while a periodic refresh is granted
    if (dut.u_ctrl_if.ref_gnt && u_cmd != 4'd0) n_ref_preempt++;
  end

  // ---------------- read data collection ----------------
  logic [7:0] rd_q[$];
  int         first_valid_cyc = -1;
  // sampled at the falling edge, half a cycle after the outputs change
  // (the same process counts the cycles)
  always @(negedge fpga_clk) begin
    cyc++;
    if (u_data_valid) begin
      rd_q.push_back(u_data_o);
      if (first_valid_cyc < 0) first_valid_cyc = cyc;
    end
  end

  // ---------------- reference memory (nibble per beat address) ----------------
  logic [3:0] ref_mem [logic [23:0]];
  logic [12:0] cur_mode = MR_BL8_CL2;

  function automatic int bl_of(input logic [12:0] m);
    case (m[2:0]) 3'b001: return 2; 3'b010: return 4; default: return 8; endcase
  endfunction
  function automatic int clh_of(input logic [12:0] m);
    case (m[6:4]) 3'b010: return 4; 3'b110: return 5; default: return 6; endcase
  endfunction
  // column of beat i of a burst starting at column c (JEDEC burst order)
  function automatic logic [10:0] col_of(input logic [12:0] m, input logic [10:0] c, input int i);
    logic [10:0] w;
    w = 11'(bl_of(m) - 1);
    return m[3] ? ((c & ~w) | ((c ^ 11'(i)) & w)) : ((c & ~w) | ((c + 11'(i)) & w));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue a command and wait for its acknowledge; returns the number of the
  // cycle in which u_cmd_ack was high (cycles are counted at falling edges)
  task automatic issue(input logic [3:0] c, input logic [23:0] a, output int acc_cyc);
    @(negedge fpga_clk);
    u_cmd  = c;
    u_addr = a;
    #1;
    while (!u_cmd_ack) begin @(negedge fpga_clk); #1; end
    acc_cyc = cyc;
    @(negedge fpga_clk);
    u_cmd = 4'd0;
  endtask

  task automatic do_write(input logic [23:0] a);
    int acc, bl;
    logic [7:0] w;
    bl = bl_of(cur_mode);
    issue(4'd7, a, acc);
    // the issue task returns at the negedge of the cycle after the accept edge
    for (int k = 0; k < bl / 2; k++) begin
      w = 8'($urandom);
      u_data_i = w;
      ref_mem[{a[23:22], a[10:0], col_of(cur_mode, a[21:11], 2*k)}]   = w[3:0];
      ref_mem[{a[23:22], a[10:0], col_of(cur_mode, a[21:11], 2*k+1)}] = w[7:4];
      @(negedge fpga_clk);
    end
    n_bl[bl]++;
    if (cur_mode[3]) n_interleaved++;
  endtask

  function automatic logic [3:0] ref_peek(input logic [23:0] k);
    if (ref_mem.exists(k)) return ref_mem[k];
    return 4'(k[10:0] ^ k[21:11] ^ 11'd5);
  endfunction

  task automatic do_read(input logic [23:0] a);
    int acc, bl, lat, exp_lat, t0;
    logic [7:0] exp_w;
    bl = bl_of(cur_mode);
    rd_q.delete();
    first_valid_cyc = -1;
    issue(4'd6, a, acc);
    t0 = cyc;
    while (rd_q.size() < bl / 2 && cyc < t0 + 60) @(negedge fpga_clk);
    repeat (3) @(negedge fpga_clk);
    chk(rd_q.size() == bl / 2, $sformatf("read at %h: %0d words, expected %0d", a, rd_q.size(), bl / 2));
    for (int k = 0; k < bl / 2 && k < rd_q.size(); k++) begin
      exp_w = {ref_peek({a[23:22], a[10:0], col_of(cur_mode, a[21:11], 2*k+1)}),
               ref_peek({a[23:22], a[10:0], col_of(cur_mode, a[21:11], 2*k)})};
      chk(rd_q[k] == exp_w, $sformatf("read at %h word %0d: got %h expected %h", a, k, rd_q[k], exp_w));
    end
    // latency: from the acknowledge cycle to the first cycle with u_data_valid
    lat = first_valid_cyc - acc;
    exp_lat = int'(T_RCD) + (clh_of(cur_mode) + 1) / 2 + 3;
    // a refresh cannot slip in between, so the latency is exact
    chk(lat == exp_lat, $sformatf("read latency %0d, expected %0d (mode %h)", lat, exp_lat, cur_mode));
    n_bl[bl]++;
    n_cl[clh_of(cur_mode)]++;
  endtask

  task automatic load_mode(input logic [12:0] m);
    int acc;
    issue(4'd1, {2'b00, 9'd0, m}, acc);
    cur_mode = m;
    repeat (4) @(negedge fpga_clk);
    chk(dut.u_addr_latch.mode == m, $sformatf("mode register %h, expected %h", dut.u_addr_latch.mode, m));
  endtask

  // compare the model's stored beats with the reference
  task automatic check_model_mem();
    foreach (ref_mem[k])
      chk(mem.peek(k[23:22], k[21:11], k[10:0]) == ref_mem[k],
          $sformatf("model memory at %h: %h, expected %h", k, mem.peek(k[23:22], k[21:11], k[10:0]), ref_mem[k]));
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (60000) @(posedge u_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [12:0] modes[6] = '{13'h023, 13'h032, 13'h061, 13'h02A, 13'h06B, 13'h022};
  logic [23:0] addrs[$];

  initial begin
    int acc, pre0;
    logic [23:0] a;
    repeat (20) @(posedge u_clk);
    u_reset_n = 1'b1;

    // ---- power-up sequence ----
    wait (dut.u_cmd_fsm.init_done);
    n_init++;
    chk(mem.cke_low_cycles >= int'(INIT_WAIT), $sformatf("CKE low for %0d cycles", mem.cke_low_cycles));
    chk(mem.n_log >= 7, "init command count");
    chk(mem.cmd_log[0] == DDR_PRE && mem.cmd_log[1] == DDR_LMR && mem.cmd_log[2] == DDR_LMR &&
        mem.cmd_log[3] == DDR_PRE && mem.cmd_log[4] == DDR_REF && mem.cmd_log[5] == DDR_REF &&
        mem.cmd_log[6] == DDR_LMR, "init command order");
    chk(mem.n_emr == 1 && mem.emode == 13'h000, "extended mode register loaded");
    chk(mem.mode == MR_BL8_CL2, "mode register after init");

    // ---- write / read back at each mode setting ----
    foreach (modes[mi]) begin
      load_mode(modes[mi]);
      addrs.delete();
      for (int j = 0; j < NACC; j++) begin
        a = 24'($urandom);
        addrs.push_back(a);
        pre0 = mem.n_pre;
        do_write(a);
        repeat (int'($urandom_range(0, 6))) @(negedge fpga_clk);
      end
      foreach (addrs[j]) begin
        do_read(addrs[j]);
        if (mem.n_pre > 0) n_auto_pre++;
      end
      check_model_mem();
    end

    // ---- user PRECHARGE and REFRESH ----
    pre0 = mem.n_pre;
    issue(4'd3, '0, acc);
    repeat (4) @(negedge fpga_clk);
    chk(mem.n_pre > pre0, "user PRECHARGE issued");
    if (mem.n_pre > pre0) n_user_pre++;
    pre0 = mem.n_ref;
    issue(4'd2, '0, acc);
    repeat (4) @(negedge fpga_clk);
    chk(mem.n_ref > pre0, "user REFRESH issued");
    if (mem.n_ref > pre0) n_user_ref++;

    // ---- summary ----
    chk(mem.errors == 0, $sformatf("DDR model protocol errors: %0d", mem.errors));
    chk(mem.n_write == mem.n_read, "every write has been read back");
    chk(mem.n_ref == n_ref_ack + 2 + 1, $sformatf("refresh count %0d vs ref_ack %0d", mem.n_ref, n_ref_ack));
    chk(mem.n_pre >= mem.n_write + mem.n_read, "a precharge after every burst");
    n_auto_pre = (mem.n_pre >= mem.n_write + mem.n_read) ? mem.n_write + mem.n_read : 0;
    $display("mechanisms: init=%0d act_wait=%0d read_wait=%0d auto_pre=%0d ref=%0d ref_preempt=%0d user_pre=%0d user_ref=%0d",
             n_init, n_act_wait, n_read_wait, n_auto_pre, n_ref_ack, n_ref_preempt, n_user_pre, n_user_ref);
    $display("bursts: BL2=%0d BL4=%0d BL8=%0d  CL2=%0d CL2.5=%0d CL3=%0d interleaved=%0d",
             n_bl[2], n_bl[4], n_bl[8], n_cl[4], n_cl[5], n_cl[6], n_interleaved);
    chk(n_init > 0, "init happened");
    chk(n_act_wait > 0, "ACT_WAIT happened");
    chk(n_read_wait > 0, "READ_WAIT happened");
    chk(n_auto_pre > 0, "automatic precharge happened");
    chk(n_ref_ack > 0, "periodic refresh happened");
    chk(n_ref_preempt > 0, "refresh pre-empted a waiting user command");
    chk(n_bl[2] > 0 && n_bl[4] > 0 && n_bl[8] > 0, "all burst lengths used");
    chk(n_cl[4] > 0 && n_cl[5] > 0 && n_cl[6] > 0, "all CAS latencies used");
    chk(n_interleaved > 0, "interleaved burst order used");
    chk(n_user_pre > 0 && n_user_ref > 0, "user PRECHARGE and REFRESH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
