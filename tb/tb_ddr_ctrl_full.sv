// tb_ddr_ctrl_full: the controller with every parameter at its default
// (200 us power-up wait, 7.8 us refresh interval at a 100 MHz clock), with
// the DDR SDRAM model.  It runs the full power-up sequence, writes one burst
// of burst length 8 at the default mode (CL 2), reads it back, compares the
// words and the read latency (T_RCD + CL + 3 = 7 cycles from the acknowledge
// cycle), waits for a periodic refresh and checks that the model saw no
// protocol error.
module tb_ddr_ctrl_full;
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
  int cyc = 0, first_valid = -1, n_ref_ack = 0;
  logic [7:0] rd_q[$];

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

  always @(negedge fpga_clk) begin
    cyc++;
    if (u_ref_ack) n_ref_ack++;
    if (u_data_valid) begin
      rd_q.push_back(u_data_o);
      if (first_valid < 0) first_valid = cyc;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input logic [3:0] c, input logic [23:0] a, output int acc);
    @(negedge fpga_clk);
    u_cmd = c; u_addr = a;
    #1;
    while (!u_cmd_ack) begin @(negedge fpga_clk); #1; end
    acc = cyc;
    @(negedge fpga_clk);
    u_cmd = 4'd0;
  endtask

  initial begin
    repeat (40000) @(posedge u_clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, t0;
    logic [7:0] w[4];
    logic [23:0] a;
    repeat (20) @(posedge u_clk);
    u_reset_n = 1'b1;
    a = 24'h2f4d3b;
    // the write waits for the power-up sequence to finish
    issue(4'd7, a, acc);
    chk(mem.cke_low_cycles >= 20000, $sformatf("CKE low for %0d cycles", mem.cke_low_cycles));
    chk(mem.n_ref == 2 && mem.n_lmr == 2 && mem.n_emr == 1, "power-up commands");
    for (int k = 0; k < 4; k++) begin
      w[k] = 8'($urandom);
      u_data_i = w[k];
      @(negedge fpga_clk);
    end
    repeat (20) @(negedge fpga_clk);
    issue(4'd6, a, acc);
    t0 = cyc;
    while (rd_q.size() < 4 && cyc < t0 + 50) @(negedge fpga_clk);
    chk(rd_q.size() == 4, $sformatf("%0d words read", rd_q.size()));
    for (int k = 0; k < 4 && k < rd_q.size(); k++)
      chk(rd_q[k] == w[k], $sformatf("word %0d: %h expected %h", k, rd_q[k], w[k]));
    chk(first_valid - acc == 7, $sformatf("read latency %0d, expected 7", first_valid - acc));
    // beats landed at the burst's columns (row 0x53b, column 0x5e9.., bank 0)
    for (int i = 0; i < 8; i++)
      chk(mem.peek(2'd0, 11'h53b, (11'h5e9 & ~11'd7) | ((11'h5e9 + 11'(i)) & 11'd7)) ==
          (i % 2 ? w[i/2][7:4] : w[i/2][3:0]), $sformatf("beat %0d in the DDR model", i));
    t0 = cyc;
    while (n_ref_ack == 0 && cyc < t0 + 2000) @(negedge fpga_clk);
    chk(n_ref_ack > 0, "periodic refresh");
    chk(mem.errors == 0, $sformatf("DDR model protocol errors: %0d", mem.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
