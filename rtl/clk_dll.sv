// clk_dll: behavioural model of the clock DLL block (not synthesizable).
//
// Stands in for the FPGA's delay-locked loops.  From the board clock u_clk it
// produces the controller clock fpga_clk (same frequency and phase), the
// doubled clock fpga_clk2x (a rising edge on every edge of fpga_clk, high for
// a quarter of the u_clk period), and the DDR clock pair ddr_clk / ddr_clkb.
// u_clk_fb is the DDR clock fed back from the board: the model counts
// LOCK_EDGES rising edges on it before it reports 'locked' and starts
// fpga_clk2x; in hardware this feedback lets the DLL remove the board delay.
// The u_clk period is measured between rising edges; until a period has been
// measured, NOMINAL_PERIOD (in ps) is used.  The model keeps time in ps.  All outputs
// change in the same process so that every edge of fpga_clk coincides with a
// rising edge of fpga_clk2x in the same time step.  The clock names come from
// the document's block diagram; the lock behaviour is this model's own.
module clk_dll #(
  parameter int unsigned LOCK_EDGES     = 4,
  parameter int unsigned NOMINAL_PERIOD = 10000
) (
  input  logic u_clk,
  input  logic u_clk_fb,
  output logic fpga_clk,
  output logic fpga_clk2x,
  output logic ddr_clk,
  output logic ddr_clkb,
  output logic locked
);
  timeunit 1ps;
  timeprecision 1ps;

  time         t_last;
  time         period;
  int unsigned fb_edges;

  initial begin
    fpga_clk   = 1'b0;
    fpga_clk2x = 1'b0;
    ddr_clk    = 1'b0;
    ddr_clkb   = 1'b1;
    locked     = 1'b0;
    t_last     = 0;
    period     = time'(NOMINAL_PERIOD);
    fb_edges   = 0;
  end

  always @(posedge u_clk_fb) begin
    if (fb_edges < LOCK_EDGES) fb_edges = fb_edges + 1;
    if (fb_edges >= LOCK_EDGES) locked = 1'b1;
  end

  always @(u_clk) begin
    if (u_clk) begin
      if (t_last > 0) period = $time - t_last;
      t_last = $time;
    end
    fpga_clk = u_clk;
    ddr_clk  = u_clk;
    ddr_clkb = !u_clk;
    if (locked) begin
      fpga_clk2x = 1'b1;
      #(period / 4);
      fpga_clk2x = 1'b0;
    end
  end
endmodule
