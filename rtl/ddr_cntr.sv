// ddr_cntr: loadable down counter used for the controller's timing counters
// (burst counter, CAS latency counter, RAS-to-CAS counter and the command
// recovery timer).
//
// 'load' puts 'value' into the counter; otherwise it counts down by one each
// clock until it reaches zero, where it stays.  'done' is high while the count
// is zero, so a counter loaded with N in one cycle reports done N cycles after
// the load takes effect.  The three counters are named in the controller block
// diagram; their width and load/done behaviour are this design's own choice.
module ddr_cntr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] value,
  output logic [W-1:0] count,
  output logic         done
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (load)          count <= value;
    else if (count != '0)   count <= count - 1'b1;
  end

  assign done = (count == '0);
endmodule
