// tb_addr_latch: checks the address latch: the bank/column/row split of the
// user address (including the example address 0x2f4d3b, which must give row
// 0x53b, column 0x5e9, bank 0), what each address select drives onto the DDR
// address and bank pins, that the address only changes on 'load', and the
// mode register: written only in LOAD_MR with bank 00, and decoded into
// burst length, CAS latency and burst type for every defined code.
module tb_addr_latch;
  import ddr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, mr_write = 1'b0;
  logic [23:0] addr_in = '0;
  ad_sel_e sel = AD_ROW;
  logic [12:0] ddr_ad, mode;
  logic [1:0] ddr_ba;
  logic [10:0] row, col;
  logic [3:0] burst_len;
  logic [2:0] cas_half;
  logic burst_type;
  int checks = 0, failures = 0;

  addr_latch dut (.clk, .rst_n, .load, .addr_in, .sel, .mr_write, .ddr_ad, .ddr_ba,
                  .row, .col, .mode, .burst_len, .cas_half, .burst_type);

  always #5 clk = ~clk;

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

  task automatic latch(input logic [23:0] a);
    @(negedge clk); addr_in = a; load = 1'b1;
    @(negedge clk); load = 1'b0; addr_in = ~a;
  endtask

  initial begin
    logic [23:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(mode == MR_BL8_CL2 && burst_len == 4'd8 && cas_half == 3'd4, "mode register reset value");
    latch(24'h2f4d3b);
    chk(row == 11'h53b && col == 11'h5e9 && ddr_ba == 2'd0, $sformatf("example address: row %h col %h ba %0d", row, col, ddr_ba));
    repeat (200) begin
      a = 24'($urandom);
      latch(a);
      sel = AD_ROW; #1;
      chk(ddr_ad == {2'b00, a[10:0]} && ddr_ba == a[23:22], "row select");
      sel = AD_COL; #1;
      chk(ddr_ad == {1'b0, a[21], 1'b0, a[20:11]} && ddr_ba == a[23:22], "column select, A10 low");
      sel = AD_PRE_ALL; #1;
      chk(ddr_ad[10] == 1'b1, "precharge all: A10 high");
      sel = AD_MODE; #1;
      chk(ddr_ad == a[12:0], "mode select");
      @(negedge clk);
      chk(row == a[10:0], "address held without load");
    end
    // mode register writes
    for (int bl = 0; bl < 8; bl++) begin
      for (int cl = 0; cl < 8; cl++) begin
        int ebl, ech;
        a = {2'b00, 9'd0, 3'b000, 3'(cl), 1'(bl % 2), 3'(bl)};
        latch(a);
        mr_write = 1'b1; @(negedge clk); mr_write = 1'b0;
        ebl = (bl == 1) ? 2 : (bl == 2) ? 4 : 8;
        ech = (cl == 2) ? 4 : (cl == 6) ? 5 : 6;
        chk(mode == a[12:0], "mode value stored");
        chk(burst_len == 4'(ebl), $sformatf("BL code %0d: %0d", bl, burst_len));
        chk(cas_half == 3'(ech), $sformatf("CL code %0d: %0d half cycles", cl, cas_half));
        chk(burst_type == 1'(bl % 2), "burst type");
      end
    end
    // extended mode register (bank 01) leaves the mode register alone
    latch({2'b00, 9'd0, 13'h022});
    mr_write = 1'b1; @(negedge clk); mr_write = 1'b0;
    latch({2'b01, 9'd0, 13'h061});
    mr_write = 1'b1; @(negedge clk); mr_write = 1'b0;
    chk(mode == 13'h022, "EMR write does not change the mode register");
    // no write without mr_write
    latch({2'b00, 9'd0, 13'h033});
    repeat (2) @(negedge clk);
    chk(mode == 13'h022, "no mode write without mr_write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
