// tb_ctrl_if: checks the control interface: no request before init_done,
// decoding of every user command code, acknowledge only when the FSM
// accepts, priority of a pending refresh over a waiting user command, and
// the one-cycle u_ref_ack pulse after a refresh grant.
module tb_ctrl_if;
  import ddr_pkg::*;
  localparam int unsigned RI = 40;
  logic clk = 1'b0, rst_n = 1'b0, init_done = 1'b0, accept = 1'b0;
  logic [3:0] u_cmd = '0;
  logic [23:0] u_addr = '0;
  logic u_cmd_ack, u_ref_ack;
  req_t req;
  int checks = 0, failures = 0;

  ctrl_if #(.REF_INTERVAL(RI)) dut (.clk, .rst_n, .init_done, .u_cmd, .u_addr,
                                    .u_cmd_ack, .u_ref_ack, .req, .accept);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic req_kind_e exp_kind(input logic [3:0] c);
    case (c)
      4'd1: return RQ_LOAD_MR;
      4'd2: return RQ_REFRESH;
      4'd3: return RQ_PRECHG;
      4'd6: return RQ_READ;
      4'd7: return RQ_WRITE;
      default: return RQ_NONE;
    endcase
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    u_cmd = 4'd6; u_addr = 24'h2f4d3b;
    #1;
    chk(req.kind == RQ_NONE, "no request before init_done");
    @(negedge clk);
    init_done = 1'b1;
    // decode every code (the refresh counter has just started)
    for (int c = 0; c < 16; c++) begin
      u_cmd = 4'(c); u_addr = 24'($urandom);
      #1;
      chk(req.kind == exp_kind(4'(c)), $sformatf("decode of code %0d: %0d", c, req.kind));
      chk(req.addr == u_addr, "address passed with the request");
      chk(!u_cmd_ack, "no acknowledge without accept");
      if (req.kind != RQ_NONE) begin
        accept = 1'b1; #1;
        chk(u_cmd_ack, "acknowledge with accept");
      end
      @(negedge clk);
      accept = 1'b0;
    end
    // wait until the periodic refresh request appears while a user READ waits
    u_cmd = 4'd6;
    while (!dut.ref_req) @(negedge clk);
    #1;
    chk(req.kind == RQ_REFRESH, "refresh has priority over a user command");
    accept = 1'b1; #1;
    chk(!u_cmd_ack, "user not acknowledged when the refresh is granted");
    @(negedge clk);
    accept = 1'b0;
    chk(u_ref_ack, "u_ref_ack one cycle after the grant");
    #1;
    chk(req.kind == RQ_READ, "user command offered again after the refresh");
    @(negedge clk);
    chk(!u_ref_ack, "u_ref_ack lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
