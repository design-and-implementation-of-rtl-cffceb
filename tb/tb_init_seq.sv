// tb_init_seq: checks the power-up sequencer: CKE low for exactly INIT_WAIT
// clocks, no request before that, then the seven requests in order
// (PRECHARGE, LOAD MODE EMR1, LOAD MODE MR with DLL reset, PRECHARGE,
// REFRESH, REFRESH, LOAD MODE MR) with their mode values, each held until
// accepted, and 'done' DLL_WAIT clocks after the last one.
module tb_init_seq;
  import ddr_pkg::*;
  localparam int unsigned IW = 25, DW = 7;
  localparam logic [12:0] IM = 13'h032;
  logic clk = 1'b0, rst_n = 1'b0, accept = 1'b0;
  req_t req;
  logic cke, done;
  int checks = 0, failures = 0;

  init_seq #(.INIT_WAIT(IW), .DLL_WAIT(DW), .INIT_MODE(IM)) dut (.clk, .rst_n, .accept, .req, .cke, .done);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  req_kind_e   ek[7] = '{RQ_PRECHG, RQ_LOAD_MR, RQ_LOAD_MR, RQ_PRECHG, RQ_REFRESH, RQ_REFRESH, RQ_LOAD_MR};
  logic [23:0] ea[7] = '{24'h0, 24'h400000, 24'h000132, 24'h0, 24'h0, 24'h0, 24'h000032};

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    t = 0;
    while (!cke && t < 100) begin
      chk(req.kind == RQ_NONE && !done, "no request while CKE is low");
      @(negedge clk); t++;
    end
    chk(t == IW, $sformatf("CKE low for %0d clocks, expected %0d", t, IW));
    for (int i = 0; i < 7; i++) begin
      repeat (i % 3) begin
        @(negedge clk);
        chk(req.kind == ek[i], $sformatf("step %0d held until accepted", i));
      end
      chk(req.kind == ek[i], $sformatf("step %0d kind %0d expected %0d", i, req.kind, ek[i]));
      if (ek[i] == RQ_LOAD_MR)
        chk(req.addr == ea[i], $sformatf("step %0d address %h expected %h", i, req.addr, ea[i]));
      accept = 1'b1;
      @(negedge clk);
      accept = 1'b0;
    end
    t = 0;
    while (!done && t < 100) begin
      chk(req.kind == RQ_NONE, "no request after the sequence");
      @(negedge clk); t++;
    end
    chk(t == DW, $sformatf("done %0d clocks after the last request, expected %0d", t, DW));
    chk(cke, "CKE stays high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
