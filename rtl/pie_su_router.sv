// pie_su_router: the distributed router of one switching unit.
//
// Each SU routes on its own, from what reaches its inputs: there is no
// central controller in the network. An input that asks for a connection
// (REQ high) and is not yet connected names an output in one of two ways:
//   * addressed request (LB low): the destination PE number is on the input's
//     forward data lines; the SU takes the base-4 digit of its stage
//     (most significant digit at the first stage);
//   * lowest-load request (LB high): the output the load comparator found to
//     have the smallest load among the free outputs.
// The router grants the output if it is free. When two inputs want the same
// free output in the same cycle the lower-numbered input wins; the other
// keeps waiting, since the network does not buffer or drop: the PE gives up
// by withdrawing REQ. Destination routing by address digit, the lowest-load
// request and the PE-side timeout are the document's; the LB line, the
// address in bits [2*STAGES-1:0] of the byte lane and the fixed priority are
// this design's choices.
//
// Interface: combinational. grant_v[o]/grant_src[o] say that output o is to
// be connected to input grant_src[o] at the SU's next clock edge.
module pie_su_router
  import pie_in_pkg::*;
#(
  parameter int unsigned STAGE  = 0,
  parameter int unsigned STAGES = 3,
  parameter int unsigned N      = RADIX,
  parameter int unsigned W      = SU_W
) (
  input  logic [N-1:0]                 req,
  input  logic [N-1:0]                 lb,
  input  logic [N-1:0][W-1:0]          addr,
  input  logic [N-1:0]                 in_used,
  input  logic [N-1:0]                 out_free,
  input  logic [$clog2(N)-1:0]         min_port,
  input  logic                         any_free,
  output logic [N-1:0]                 grant_v,
  output logic [N-1:0][$clog2(N)-1:0]  grant_src
);

  localparam int unsigned PB = $clog2(N);

  logic [N-1:0]         want_v;
  logic [N-1:0][PB-1:0] want_port;

  // The output each waiting input asks for.
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      want_v[i]    = req[i] && !in_used[i] && (!lb[i] || any_free);
      want_port[i] = lb[i] ? min_port
                           : PB'(route_digit(SU_W'(addr[i]), STAGE, STAGES));
    end
  end

  // Fixed-priority grant of each free output.
  always_comb begin
    grant_v   = '0;
    grant_src = '0;
    for (int unsigned o = 0; o < N; o++) begin
      for (int i = int'(N) - 1; i >= 0; i--) begin
        if (out_free[o] && want_v[i] && want_port[i] == PB'(o)) begin
          grant_v[o]   = 1'b1;
          grant_src[o] = PB'(i);
        end
      end
    end
  end

endmodule
