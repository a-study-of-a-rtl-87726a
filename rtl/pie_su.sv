// pie_su: Switching Unit, the 4-input, 4-output, 8-bit crossbar from which
// every switch node of the network is built.
//
// How it works
//   * Circuit switching without buffers. The SU keeps, for every output, one
//     connection register (connected, source input). Data, the control lines
//     and the backward reply pass through an established connection without
//     touching a clock; only the connection registers change at clock edges.
//   * Establishing: an input with REQ high that is not connected is routed by
//     pie_su_router; at the next rising edge of clk the granted output is
//     connected, and from then on REQ, LB, DIR and the data are seen by the
//     next stage. One stage is thus crossed per clock edge.
//   * Direction: the DIR line travels forward with the connection. DIR low
//     lets the forward data through to the output; DIR high lets the backward
//     data of the output back to the input. The switch follows DIR at once.
//   * Release: a connected input whose REQ is low at a rising edge has its
//     release accepted at that edge; the connection is cleared at the next
//     rising edge.
//   * Load balancing: an output that is not connected carries on its
//     backward data lines the load of the PE behind it. The comparator takes
//     the smallest of these; every unused input shows it on its backward data
//     lines, so a PE sees the lowest load it can reach. A request with LB high
//     is routed to that output.
//   * Scan path: with scan_en high the connection registers and the pending
//     releases form one shift register (scan_in -> ... -> scan_out, one bit
//     per clock, output 0's register nearest scan_out). A tester can read the
//     state and load any pattern, including one input feeding several outputs
//     (multicast).
// Following the document: 4x4 ports, 8 data lines, distributed routing,
// load comparator, the DIR line, clock-edge establishment, the two-edge
// release and scan paths. This design's own choices: separate forward and
// backward data wires instead of bidirectional pins, the control set
// REQ/LB/DIR forward and ACK backward (the document counts six control lines
// but names only DIR), asynchronous active-low reset, and the scan order.
// With multicast, the backward data and ACK of the input come from its
// lowest-numbered connected output.
//
// Interface: in_* are the source-side ports, out_* the destination-side
// ports. ACK is passed backwards through a connection and is low elsewhere.
module pie_su
  import pie_in_pkg::*;
#(
  parameter int unsigned STAGE  = 0,
  parameter int unsigned STAGES = 3,
  parameter int unsigned N      = RADIX,
  parameter int unsigned W      = SU_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // source side
  input  logic [N-1:0]         in_req,
  input  logic [N-1:0]         in_lb,
  input  logic [N-1:0]         in_dir,
  input  logic [N-1:0][W-1:0]  in_fdata,
  output logic [N-1:0]         in_ack,
  output logic [N-1:0][W-1:0]  in_bdata,
  // destination side
  output logic [N-1:0]         out_req,
  output logic [N-1:0]         out_lb,
  output logic [N-1:0]         out_dir,
  output logic [N-1:0][W-1:0]  out_fdata,
  input  logic [N-1:0]         out_ack,
  input  logic [N-1:0][W-1:0]  out_bdata,
  // scan path
  input  logic                 scan_en,
  input  logic                 scan_in,
  output logic                 scan_out
);

  localparam int unsigned PB = $clog2(N);
  localparam int unsigned SB = N * (1 + PB) + N;

  typedef struct packed {
    logic          v;
    logic [PB-1:0] src;
  } su_conn_t;

  su_conn_t [N-1:0] conn;
  logic     [N-1:0] rel_seen;

  // Per input: is it connected, and to which output (lowest-numbered).
  logic [N-1:0]         in_used;
  logic [N-1:0][PB-1:0] in_port;
  logic [N-1:0]         out_free;

  always_comb begin
    in_used = '0;
    in_port = '0;
    for (int unsigned o = 0; o < N; o++) out_free[o] = !conn[o].v;
    for (int unsigned i = 0; i < N; i++) begin
      for (int o = int'(N) - 1; o >= 0; o--) begin
        if (conn[o].v && conn[o].src == PB'(i)) begin
          in_used[i] = 1'b1;
          in_port[i] = PB'(o);
        end
      end
    end
  end

  // Load comparator over the free outputs.
  logic [W-1:0]  min_load;
  logic [PB-1:0] min_port;
  logic          any_free;

  pie_load_comparator #(.N(N), .W(W)) u_cmp (
    .load     (out_bdata),
    .free     (out_free),
    .min_load (min_load),
    .min_port (min_port),
    .any_free (any_free)
  );

  // Router.
  logic [N-1:0]         grant_v;
  logic [N-1:0][PB-1:0] grant_src;

  pie_su_router #(.STAGE(STAGE), .STAGES(STAGES), .N(N), .W(W)) u_router (
    .req       (in_req),
    .lb        (in_lb),
    .addr      (in_fdata),
    .in_used   (in_used),
    .out_free  (out_free),
    .min_port  (min_port),
    .any_free  (any_free),
    .grant_v   (grant_v),
    .grant_src (grant_src)
  );

  // Crossbar: forward through connected outputs, backward to connected
  // inputs, the minimum load to unused inputs.
  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      out_req[o]   = conn[o].v && in_req[conn[o].src];
      out_lb[o]    = conn[o].v && in_lb[conn[o].src];
      out_dir[o]   = conn[o].v && in_dir[conn[o].src];
      out_fdata[o] = (conn[o].v && !in_dir[conn[o].src]) ? in_fdata[conn[o].src]
                                                         : '0;
    end
    for (int unsigned i = 0; i < N; i++) begin
      if (in_used[i]) begin
        in_ack[i]   = out_ack[in_port[i]];
        in_bdata[i] = in_dir[i] ? out_bdata[in_port[i]] : '0;
      end else begin
        in_ack[i]   = 1'b0;
        in_bdata[i] = any_free ? min_load : W'(LOAD_NONE);
      end
    end
  end

  // Scan view of the state: conn[N-1..0] then rel_seen, MSB leaves first.
  logic [SB-1:0] scan_vec;
  assign scan_vec = {conn, rel_seen};
  assign scan_out = scan_vec[SB-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conn     <= '0;
      rel_seen <= '0;
    end else if (scan_en) begin
      {conn, rel_seen} <= {scan_vec[SB-2:0], scan_in};
    end else begin
      for (int unsigned i = 0; i < N; i++) begin
        if (rel_seen[i]) begin
          // Second edge after REQ fell: clear every output of this input.
          rel_seen[i] <= 1'b0;
          for (int unsigned o = 0; o < N; o++)
            if (conn[o].v && conn[o].src == PB'(i)) conn[o] <= '0;
        end else if (in_used[i] && !in_req[i]) begin
          rel_seen[i] <= 1'b1;   // first edge: release accepted
        end
      end
      for (int unsigned o = 0; o < N; o++)
        if (grant_v[o]) conn[o] <= '{v: 1'b1, src: grant_src[o]};
    end
  end

  // A grant only ever goes to a free output.
  a_grant_free : assert property (@(posedge clk) disable iff (!rst_n)
                                  (grant_v & ~out_free) == '0);

endmodule
