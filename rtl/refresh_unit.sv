// refresh_unit: periodic auto-refresh request generator.
//
// A registered counter runs while 'en' is high (after initialisation).  Every
// REF_INTERVAL clocks it sets 'ref_req'; the request stays up until the
// arbiter grants it with 'ref_gnt'.  Up to 8 expiries may be owed at once
// (JEDEC DDR allows eight refreshes to be postponed); 'ref_req' stays high
// until all owed refreshes have been granted.  The default interval of 780
// clocks is 7.8 us at a 100 MHz controller clock.  The periodic counter
// follows the control interface description; the interval and the owed-count
// are this design's own choices.
module refresh_unit #(
  parameter int unsigned REF_INTERVAL = 780
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic ref_gnt,
  output logic ref_req
);
  localparam int unsigned CW = $clog2(REF_INTERVAL + 1);

  logic [CW-1:0] tick;
  logic [3:0]    owed;
  logic          expire;

  assign expire  = en && (tick == CW'(REF_INTERVAL - 1));
  assign ref_req = (owed != 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       tick <= '0;
    else if (!en)     tick <= '0;
    else if (expire)  tick <= '0;
    else              tick <= tick + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) owed <= 4'd0;
    else begin
      unique case ({expire && owed != 4'd8, ref_gnt && ref_req})
        2'b10:   owed <= owed + 4'd1;
        2'b01:   owed <= owed - 4'd1;
        default: owed <= owed;
      endcase
    end
  end

  a_gnt_only_when_req: assert property (@(posedge clk) disable iff (!rst_n) ref_gnt |-> ref_req);
endmodule
