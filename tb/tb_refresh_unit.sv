// tb_refresh_unit: checks the periodic refresh request.  With a short
// interval, the request must rise exactly REF_INTERVAL clocks after the unit
// is enabled, drop after one grant, rise again one interval after the first,
// count several expiries while no grant comes, and stay low while disabled.
module tb_refresh_unit;
  localparam int unsigned RI = 12;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ref_gnt = 1'b0;
  logic ref_req;
  int checks = 0, failures = 0;

  refresh_unit #(.REF_INTERVAL(RI)) dut (.clk, .rst_n, .en, .ref_gnt, .ref_req);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3 * RI) begin @(negedge clk); chk(!ref_req, "no request while disabled"); end
    en = 1'b1;
    t = 0;
    while (!ref_req && t < 5 * RI) begin @(negedge clk); t++; end
    chk(t == RI, $sformatf("first request after %0d clocks, expected %0d", t, RI));
    // grant it
    ref_gnt = 1'b1; @(negedge clk); ref_gnt = 1'b0;
    chk(!ref_req, "request cleared by grant");
    t = 1;
    while (!ref_req && t < 5 * RI) begin @(negedge clk); t++; end
    chk(t == RI, $sformatf("second request after %0d clocks, expected %0d", t, RI));
    // let two more intervals pass without a grant: three owed
    repeat (2 * RI) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      chk(ref_req, $sformatf("owed refresh %0d still requested", k));
      ref_gnt = 1'b1; @(negedge clk); ref_gnt = 1'b0;
    end
    chk(!ref_req, "all owed refreshes granted");
    en = 1'b0;
    repeat (3 * RI) begin @(negedge clk); chk(!ref_req, "no request after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
