// tb_data_path: checks the DDR data path on its own.
// Write: for burst lengths 8, 4 and 2 the testbench hands over BL/2 random
// words after 'wr_accept', raises wr_window for BL/2 cycles, and takes the
// beats off DQ at every DQS edge, as a DDR device would.  It checks the beat
// values (low half of each word first), that DQ and DQS are driven, that the
// first DQS rising edge comes at the end of the cycle after the WRITE cycle,
// that there are exactly BL DQS edges, and that DM stays low.
// Read: the testbench drives beats edge aligned with the clock and with DQS
// (high for even beats), starting on a rising or on a falling clock edge
// (integer and half CAS latency), and checks the words on u_data_o, one
// u_data_valid per word, and that each word is valid no later than two
// cycles after its last beat started.
module tb_data_path;
  logic clk = 1'b0, clk2x = 1'b0, rst_n = 1'b0;
  logic wr_accept = 1'b0, wr_window = 1'b0;
  logic [3:0] burst_len = 4'd8;
  logic [7:0] u_data_i = '0, u_data_o;
  logic u_data_valid;
  logic [3:0] dq_o, dq_i = '0;
  logic dq_oe, dqs_o, dqs_oe, dqs_i = 1'b0, dm_o;
  int checks = 0, failures = 0;

  data_path dut (.clk, .clk2x, .rst_n, .wr_accept, .wr_window, .burst_len,
                 .u_data_i, .u_data_o, .u_data_valid,
                 .dq_o, .dq_oe, .dq_i, .dqs_o, .dqs_oe, .dqs_i, .dm_o);

  // both clocks from one process, so their edges share a time step
  initial forever begin
    clk = 1'b1; clk2x = 1'b1; #2.5;
    clk2x = 1'b0; #2.5;
    clk = 1'b0; clk2x = 1'b1; #2.5;
    clk2x = 1'b0; #2.5;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DDR-side capture of write beats at DQS edges
  logic [3:0] beats[$];
  realtime    first_dqs = -1.0;
  always @(dqs_o) begin
    if (dqs_oe && (dqs_o || beats.size() > 0)) begin
      if (beats.size() == 0) first_dqs = $realtime;
      chk(dq_oe, "DQ driven at a DQS edge");
      chk(!dm_o, "DM low");
      beats.push_back(dq_o);
    end
  end

  // user-side collection of read words
  logic [7:0] words[$];
  realtime    word_t[$];
  always @(posedge clk) if (u_data_valid) begin
    words.push_back(u_data_o);
    word_t.push_back($realtime);
  end

  task automatic write_burst(input int bl, input int gap);
    logic [7:0] w[4];
    realtime t_w;
    burst_len = 4'(bl);
    beats.delete();
    first_dqs = -1.0;
    @(negedge clk);
    wr_accept = 1'b1;
    @(negedge clk);
    wr_accept = 1'b0;
    for (int k = 0; k < bl / 2; k++) begin
      w[k] = 8'($urandom);
      u_data_i = w[k];
      @(negedge clk);
      u_data_i = 8'($urandom);
    end
    repeat (gap) @(negedge clk);
    wr_window = 1'b1;
    t_w = $realtime + 5.0;          // end of the WRITE cycle
    repeat (bl / 2) @(negedge clk);
    wr_window = 1'b0;
    repeat (4) @(negedge clk);
    chk(beats.size() == bl, $sformatf("BL%0d: %0d DQS edges", bl, beats.size()));
    chk(first_dqs == t_w + 10.0, $sformatf("BL%0d: first DQS edge at %0t, expected %0t", bl, first_dqs, t_w + 10.0));
    for (int i = 0; i < bl && i < beats.size(); i++)
      chk(beats[i] == (i % 2 ? w[i/2][7:4] : w[i/2][3:0]),
          $sformatf("BL%0d beat %0d: %h", bl, i, beats[i]));
    chk(!dqs_oe && !dq_oe, "pads released after the burst");
  endtask

  task automatic read_burst(input int bl, input bit half);
    logic [3:0] b[8];
    realtime t_last;
    words.delete(); word_t.delete();
    @(posedge clk);
    if (half) @(negedge clk);
    for (int i = 0; i < bl; i++) begin
      b[i] = 4'($urandom);
      dq_i = b[i];
      dqs_i = (i % 2 == 0);
      t_last = $realtime;
      #5;
    end
    dqs_i = 1'b0;
    dq_i = 4'($urandom);
    repeat (4) @(posedge clk);
    chk(words.size() == bl / 2, $sformatf("read BL%0d: %0d words", bl, words.size()));
    for (int k = 0; k < bl / 2 && k < words.size(); k++) begin
      chk(words[k] == {b[2*k+1], b[2*k]}, $sformatf("read BL%0d word %0d: %h", bl, k, words[k]));
      // sampled at the rising edge after the one that makes it valid
      chk(word_t[k] <= t_last - 5.0 * (bl - 2 - 2 * k) + 20.0, $sformatf("read word %0d late", k));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    write_burst(8, 1);
    write_burst(4, 2);
    write_burst(2, 0);
    write_burst(8, 0);
    read_burst(8, 0);
    read_burst(8, 1);
    read_burst(4, 0);
    read_burst(2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
