// tb_fig_waveforms: replays the two example transfers of the controller's
// reference waveforms, with every parameter at its default.
// Write: words 0a, 0b, 0c, 0d to user address 0x2f4d3b with burst length 8.
// The testbench checks the ACTIVE row (0x53b), the WRITE column (0x5e9),
// bank 0, and the beats on DQ taken at the DQS edges: a,0,b,0,c,0,d,0.
// Read: words 0b, 0c, 0d, 0e are written to the same address and read back;
// the testbench checks the beats on DQ (b,0,c,0,d,0,e,0), the words on
// u_data_o in order, one u_data_valid cycle per word and four consecutive
// valid cycles.
module tb_fig_waveforms;
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

  ddr_ctrl dut (
    .u_clk, .u_clk_fb(ddr_clk), .u_reset_n, .u_cmd, .u_addr, .u_data_i,
    .u_cmd_ack, .u_data_o, .u_data_valid, .u_ref_ack, .fpga_clk,
    .ddr_clk, .ddr_clkb, .ddr_cke, .ddr_csb, .ddr_rasb, .ddr_casb, .ddr_web,
    .ddr_ba, .ddr_ad, .ddr_dm, .ddr_dq_o, .ddr_dq_oe, .ddr_dq_i,
    .ddr_dqs_o, .ddr_dqs_oe, .ddr_dqs_i
  );

  ddr_sdram_model mem (
    .clk(ddr_clk), .cke(ddr_cke), .csb(ddr_csb), .rasb(ddr_rasb), .casb(ddr_casb),
    .web(ddr_web), .ba(ddr_ba), .ad(ddr_ad), .dm(ddr_dm),
    .dq_i(ddr_dq_o), .dq_oe_i(ddr_dq_oe), .dqs_i(ddr_dqs_o), .dqs_oe_i(ddr_dqs_oe),
    .dq_o(ddr_dq_i), .dqs_o(ddr_dqs_i), .dqs_oe_o(m_dqs_oe)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitors
  logic [3:0]  wbeats[$], rbeats[$];
  logic [12:0] act_row[$], cas_col[$];
  always @(ddr_dqs_o) if (dut.rst_n && ddr_dqs_oe && ddr_dq_oe) wbeats.push_back(ddr_dq_o);
  always @(negedge dut.fpga_clk2x) if (m_dqs_oe && (ddr_dqs_i || rbeats.size() % 2 == 1)) rbeats.push_back(ddr_dq_i);
  always @(posedge ddr_clk) if (ddr_cke && !ddr_csb) begin
    if ({ddr_rasb, ddr_casb, ddr_web} == 3'b011) act_row.push_back(ddr_ad);
    if ({ddr_rasb, ddr_casb} == 2'b10) begin
      cas_col.push_back(ddr_ad);
      chk(ddr_ba == 2'd0, "bank 0");
    end
  end

  logic [7:0] rd_q[$];
  int vcycles = 0, vruns = 0;
  logic v_d = 1'b0;
  always @(negedge fpga_clk) begin
    if (u_data_valid) begin rd_q.push_back(u_data_o); vcycles++; end
    if (u_data_valid && !v_d) vruns++;
    v_d = u_data_valid;
  end

  task automatic issue(input logic [3:0] c, input logic [23:0] a);
    @(negedge fpga_clk);
    u_cmd = c; u_addr = a;
    #1;
    while (!u_cmd_ack) begin @(negedge fpga_clk); #1; end
    @(negedge fpga_clk);
    u_cmd = 4'd0;
  endtask

  task automatic write4(input logic [7:0] w0, w1, w2, w3);
    logic [7:0] w[4];
    w = '{w0, w1, w2, w3};
    issue(4'd7, 24'h2f4d3b);
    for (int k = 0; k < 4; k++) begin u_data_i = w[k]; @(negedge fpga_clk); end
    u_data_i = 8'h00;
    repeat (20) @(negedge fpga_clk);
  endtask

  initial begin
    repeat (40000) @(posedge u_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp_w[8], exp_r[8];
    exp_w = '{4'ha, 4'h0, 4'hb, 4'h0, 4'hc, 4'h0, 4'hd, 4'h0};
    exp_r = '{4'hb, 4'h0, 4'hc, 4'h0, 4'hd, 4'h0, 4'he, 4'h0};
    repeat (20) @(posedge u_clk);
    u_reset_n = 1'b1;
    // write example
    write4(8'h0a, 8'h0b, 8'h0c, 8'h0d);
    chk(act_row.size() == 1 && act_row[0] == 13'h053b, "ACTIVE row 053b");
    chk(cas_col.size() == 1 && cas_col[0][9:0] == 10'h1e9 && cas_col[0][11] == 1'b1, "WRITE column 05e9");
    chk(wbeats.size() == 8, $sformatf("%0d write beats", wbeats.size()));
    for (int i = 0; i < 8 && i < wbeats.size(); i++)
      chk(wbeats[i] == exp_w[i], $sformatf("write beat %0d: %h expected %h", i, wbeats[i], exp_w[i]));
    // read example
    write4(8'h0b, 8'h0c, 8'h0d, 8'h0e);
    rd_q.delete(); rbeats.delete(); vcycles = 0; vruns = 0;
    issue(4'd6, 24'h2f4d3b);
    repeat (20) @(negedge fpga_clk);
    chk(rbeats.size() == 8, $sformatf("%0d read beats", rbeats.size()));
    for (int i = 0; i < 8 && i < rbeats.size(); i++)
      chk(rbeats[i] == exp_r[i], $sformatf("read beat %0d: %h expected %h", i, rbeats[i], exp_r[i]));
    chk(rd_q.size() == 4, $sformatf("%0d read words", rd_q.size()));
    for (int k = 0; k < 4 && k < rd_q.size(); k++)
      chk(rd_q[k] == 8'(8'h0b + k), $sformatf("read word %0d: %h", k, rd_q[k]));
    chk(vcycles == 4 && vruns == 1, "u_data_valid high for four consecutive cycles");
    chk(mem.errors == 0, "no DDR protocol errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
