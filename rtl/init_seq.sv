// init_seq: power-up initialisation of the DDR SDRAM.
//
// After reset it keeps CKE low for INIT_WAIT clocks (200 us at 100 MHz by
// default), raises CKE, and then offers the command FSM this fixed sequence,
// one request at a time, each taken with 'accept':
//   PRECHARGE all, LOAD MODE (EMR1: DLL enabled), LOAD MODE (MR with DLL
//   reset), PRECHARGE all, AUTO REFRESH, AUTO REFRESH, LOAD MODE (MR).
// It then waits DLL_WAIT clocks (200 clocks for the DLL to lock after its
// reset) and raises 'done'.  The mode register value INIT_MODE (burst length,
// burst type, CAS latency) is a parameter.  The document only says that the
// command FSM is initialised in a predefined way on power-up; the sequence
// itself is the usual JEDEC DDR one.
module init_seq
  import ddr_pkg::*;
#(
  parameter int unsigned     INIT_WAIT = 20000,
  parameter int unsigned     DLL_WAIT  = 200,
  parameter logic [AD_W-1:0] INIT_MODE = MR_BL8_CL2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic accept,
  output req_t req,
  output logic cke,
  output logic done
);
  localparam int unsigned NSTEP = 7;
  localparam int unsigned TW    = $clog2((INIT_WAIT > DLL_WAIT ? INIT_WAIT : DLL_WAIT) + 2);

  typedef enum logic [1:0] { I_WAIT, I_CMDS, I_DLL, I_DONE } ist_e;

  ist_e           st;
  logic [TW-1:0]  tcnt;
  logic [2:0]     step;

  // Request of each step
  always_comb begin
    req = '{kind: RQ_NONE, addr: '0};
    if (st == I_CMDS) begin
      unique case (step)
        3'd0, 3'd3: req.kind = RQ_PRECHG;
        3'd1: begin req.kind = RQ_LOAD_MR; req.addr = {2'b01, 9'd0, 13'd0}; end
        3'd2: begin req.kind = RQ_LOAD_MR; req.addr = {2'b00, 9'd0, INIT_MODE | MR_DLL_RST}; end
        3'd4, 3'd5: req.kind = RQ_REFRESH;
        default: begin req.kind = RQ_LOAD_MR; req.addr = {2'b00, 9'd0, INIT_MODE}; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= I_WAIT;
      tcnt <= '0;
      step <= '0;
      cke  <= 1'b0;
    end else begin
      unique case (st)
        I_WAIT: begin
          if (tcnt == TW'(INIT_WAIT - 1)) begin
            st   <= I_CMDS;
            cke  <= 1'b1;
            tcnt <= '0;
          end else tcnt <= tcnt + 1'b1;
        end
        I_CMDS: if (accept) begin
          if (step == 3'(NSTEP - 1)) st <= I_DLL;
          step <= step + 1'b1;
        end
        I_DLL: begin
          if (tcnt == TW'(DLL_WAIT - 1)) st <= I_DONE;
          else tcnt <= tcnt + 1'b1;
        end
        default: st <= I_DONE;
      endcase
    end
  end

  assign done = (st == I_DONE);
endmodule
