// tb_clk_dll: checks the clock DLL model: no 2x clock before lock, 'locked'
// after LOCK_EDGES feedback edges, fpga_clk and ddr_clk following u_clk,
// ddr_clkb its complement, and exactly two fpga_clk2x rising edges per
// u_clk period (counted over 20 periods, one edge of slack at the window
// ends), one at each u_clk edge, for two different input periods.
module tb_clk_dll;
  logic u_clk = 1'b0;
  logic fpga_clk, fpga_clk2x, ddr_clk, ddr_clkb, locked;
  int checks = 0, failures = 0;
  int half = 5;
  int n2x = 0, n1x = 0;

  clk_dll #(.LOCK_EDGES(4)) dut (.u_clk, .u_clk_fb(ddr_clk), .fpga_clk, .fpga_clk2x,
                                 .ddr_clk, .ddr_clkb, .locked);

  always #(half) u_clk = ~u_clk;

  always @(posedge fpga_clk2x) n2x++;
  always @(posedge fpga_clk)   n1x++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // at every u_clk edge the 2x clock rises with it
  always @(u_clk) if (locked) begin
    #0.01;
    chk(fpga_clk2x == 1'b1, "2x clock high just after a u_clk edge");
    chk(fpga_clk == u_clk && ddr_clk == u_clk && ddr_clkb == !u_clk, "clock outputs follow u_clk");
  end

  initial begin
    #1;
    chk(!locked, "not locked at start");
    repeat (3) @(posedge u_clk);
    #1;
    chk(!locked && n2x == 0, "no 2x clock before lock");
    repeat (2) @(posedge u_clk);
    #1;
    chk(locked, "locked after 4 feedback edges");
    n2x = 0; n1x = 0;
    repeat (20) @(posedge u_clk);
    #1;
    chk(n2x >= 2 * n1x - 1 && n2x <= 2 * n1x + 1, $sformatf("period 10: %0d 2x edges for %0d 1x edges", n2x, n1x));
    // 2x clock high for a quarter period
    @(posedge u_clk); #(half / 2.0 - 0.2);
    chk(fpga_clk2x, "2x clock still high before a quarter period");
    #0.4;
    chk(!fpga_clk2x, "2x clock low after a quarter period");
    half = 8;
    repeat (3) @(posedge u_clk);
    n2x = 0; n1x = 0;
    repeat (20) @(posedge u_clk);
    #1;
    chk(n2x >= 2 * n1x - 1 && n2x <= 2 * n1x + 1, $sformatf("period 16: %0d 2x edges for %0d 1x edges", n2x, n1x));
    @(posedge u_clk); #(half / 2.0 - 0.2);
    chk(fpga_clk2x, "period 16: 2x clock high before a quarter period");
    #0.4;
    chk(!fpga_clk2x, "period 16: 2x clock low after a quarter period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
