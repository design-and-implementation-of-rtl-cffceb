// tb_ddr_cntr: checks the loadable down counter: after a load of N the count
// falls by one per clock, 'done' comes exactly N clocks after the load edge
// and the count then stays at zero; a new load in mid-count restarts it.
module tb_ddr_cntr;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [3:0] value = '0, count;
  logic done;
  int checks = 0, failures = 0;

  ddr_cntr #(.W(4)) dut (.clk, .rst_n, .load, .value, .count, .done);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(count == 0 && done, "reset value");
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      load = 1'b1; value = 4'(n);
      @(negedge clk);
      load = 1'b0;
      for (int k = 0; k <= n + 2; k++) begin
        int e;
        e = (n - k > 0) ? n - k : 0;
        chk(count == 4'(e), $sformatf("load %0d, %0d clocks later: count %0d expected %0d", n, k, count, e));
        chk(done == (e == 0), $sformatf("load %0d, %0d clocks later: done %0d", n, k, done));
        @(negedge clk);
      end
    end
    // reload while counting
    load = 1'b1; value = 4'd9; @(negedge clk);
    load = 1'b0; repeat (3) @(negedge clk);
    chk(count == 4'd6, "count after 3 clocks");
    load = 1'b1; value = 4'd2; @(negedge clk);
    load = 1'b0;
    chk(count == 4'd2, "reload in mid-count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
