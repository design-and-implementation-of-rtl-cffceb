// ctrl_if: control interface between the user and the command FSM.
//
// Decodes the 4-bit user command (u_cmd) into a request for the command FSM
// and arbitrates between the user and the refresh unit it contains.  A
// pending refresh always wins over a user command.  Nothing is offered before
// initialisation is done (init_done).  The command FSM takes the offered
// request with 'accept' in the same cycle; a user command is then acknowledged
// combinationally on u_cmd_ack, and the user must hold u_cmd and u_addr until
// it sees u_cmd_ack high at a rising clock edge.  u_ref_ack pulses for one
// cycle, one cycle after a refresh has been granted.  The request carries
// u_addr unregistered: the address latch captures it when the FSM accepts.
//
// Command codes: 0 NOP, 1 LOAD_MR, 2 REFRESH, 3 PRECHARGE, 6 READ, 7 WRITE;
// other codes are treated as NOP.  Decoding, arbitration and the periodic
// refresh follow the control interface description; the codes, the priority
// and the acknowledge handshake are this design's own choices.
module ctrl_if
  import ddr_pkg::*;
#(
  parameter int unsigned REF_INTERVAL = 780
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_done,
  input  logic [3:0]         u_cmd,
  input  logic [UADDR_W-1:0] u_addr,
  output logic               u_cmd_ack,
  output logic               u_ref_ack,
  output req_t               req,
  input  logic               accept
);
  logic      ref_req, ref_gnt;
  req_kind_e user_kind;

  refresh_unit #(.REF_INTERVAL(REF_INTERVAL)) u_refresh (
    .clk, .rst_n, .en(init_done), .ref_gnt, .ref_req
  );

  always_comb begin
    unique case (u_cmd)
      UCMD_LOAD_MR: user_kind = RQ_LOAD_MR;
      UCMD_REFRESH: user_kind = RQ_REFRESH;
      UCMD_PRECHG:  user_kind = RQ_PRECHG;
      UCMD_READ:    user_kind = RQ_READ;
      UCMD_WRITE:   user_kind = RQ_WRITE;
      default:      user_kind = RQ_NONE;
    endcase
  end

  always_comb begin
    req = '{kind: RQ_NONE, addr: u_addr};
    if (init_done) begin
      if (ref_req) req.kind = RQ_REFRESH;
      else         req.kind = user_kind;
    end
  end

  assign ref_gnt   = accept && init_done && ref_req;
  assign u_cmd_ack = accept && init_done && !ref_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) u_ref_ack <= 1'b0;
    else        u_ref_ack <= ref_gnt;
  end

  a_accept_has_req: assert property (@(posedge clk) disable iff (!rst_n)
                                     accept |-> req.kind != RQ_NONE);
endmodule
