// pie_switch_node: one 4x4, 32-bit crossbar switch node of the network,
// built as in the document from four 8-bit switching units side by side.
//
// SU k switches data bits [8k+7:8k]. Every SU receives the same REQ, LB and
// DIR lines of each port and routes on its own byte lane, so the PE puts the
// destination address and its load value in every byte; the four SUs then
// take the same decisions in the same clock edge and behave as one 32-bit
// crossbar. The node's forward control outputs and its backward ACK are
// taken from SU 0; an assertion checks that all four SUs agree. The four
// scan paths are chained, SU 0 first. Channel width (32 bits, four SUs) is
// the document's; the fan-out of the control lines, the replicated address
// and load bytes and the scan order are this design's choices.
//
// Interface and timing as pie_su, with WIDTH-bit data.
module pie_switch_node
  import pie_in_pkg::*;
#(
  parameter int unsigned STAGE   = 0,
  parameter int unsigned STAGES  = 3,
  parameter int unsigned N       = RADIX,
  parameter int unsigned NSLICES = SLICES,
  parameter int unsigned WIDTH   = NSLICES * SU_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             in_req,
  input  logic [N-1:0]             in_lb,
  input  logic [N-1:0]             in_dir,
  input  logic [N-1:0][WIDTH-1:0]  in_fdata,
  output logic [N-1:0]             in_ack,
  output logic [N-1:0][WIDTH-1:0]  in_bdata,
  output logic [N-1:0]             out_req,
  output logic [N-1:0]             out_lb,
  output logic [N-1:0]             out_dir,
  output logic [N-1:0][WIDTH-1:0]  out_fdata,
  input  logic [N-1:0]             out_ack,
  input  logic [N-1:0][WIDTH-1:0]  out_bdata,
  input  logic                     scan_en,
  input  logic                     scan_in,
  output logic                     scan_out
);

  localparam int unsigned SW = WIDTH / NSLICES;

  logic [NSLICES-1:0][N-1:0] s_in_ack, s_out_req, s_out_lb, s_out_dir;
  logic [NSLICES:0]          scan_chain;

  assign scan_chain[0] = scan_in;
  assign scan_out      = scan_chain[NSLICES];

  for (genvar s = 0; s < NSLICES; s++) begin : g_su
    logic [N-1:0][SW-1:0] fd_in, bd_in, fd_out, bd_out;

    for (genvar p = 0; p < N; p++) begin : g_lane
      assign fd_in[p] = in_fdata[p][s*SW +: SW];
      assign bd_in[p] = out_bdata[p][s*SW +: SW];
      assign out_fdata[p][s*SW +: SW] = fd_out[p];
      assign in_bdata[p][s*SW +: SW]  = bd_out[p];
    end

    pie_su #(.STAGE(STAGE), .STAGES(STAGES), .N(N), .W(SW)) u_su (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_req    (in_req),
      .in_lb     (in_lb),
      .in_dir    (in_dir),
      .in_fdata  (fd_in),
      .in_ack    (s_in_ack[s]),
      .in_bdata  (bd_out),
      .out_req   (s_out_req[s]),
      .out_lb    (s_out_lb[s]),
      .out_dir   (s_out_dir[s]),
      .out_fdata (fd_out),
      .out_ack   (out_ack),
      .out_bdata (bd_in),
      .scan_en   (scan_en),
      .scan_in   (scan_chain[s]),
      .scan_out  (scan_chain[s+1])
    );
  end

  assign in_ack  = s_in_ack[0];
  assign out_req = s_out_req[0];
  assign out_lb  = s_out_lb[0];
  assign out_dir = s_out_dir[0];

  // The bit slices must stay in lock step outside scan mode.
  for (genvar s = 1; s < NSLICES; s++) begin : g_lockstep
    a_lockstep : assert property (@(posedge clk) disable iff (!rst_n || scan_en)
                                  s_out_req[s] == s_out_req[0] &&
                                  s_out_lb[s]  == s_out_lb[0]  &&
                                  s_out_dir[s] == s_out_dir[0] &&
                                  s_in_ack[s]  == s_in_ack[0]);
  end

endmodule
