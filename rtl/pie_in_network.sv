// pie_in_network: one 64x64 multistage circuit-switching network of PIE64.
//
// Structure: STAGES stages of RADIX**(STAGES-1) switch nodes (3 stages of 16
// 4x4 32-bit nodes, 48 nodes in all, for the 64 PEs). Port i on the source
// side is PE i sending; port j on the destination side is PE j receiving.
// Between stages the lines are wired as a radix-4 butterfly
// (pie_in_pkg::next_line): the first stage spreads each node's four outputs
// over the four groups of the second stage, and the last boundary connects
// groups of four nodes among themselves. With destination-digit routing
// (most significant digit at the first stage) every source reaches every
// destination along exactly one path.
//
// Timing: a node changes its connections only at its clock's rising edge;
// data, DIR, REQ and the load values pass through established connections
// with no clock. With TWO_PHASE = 0 all nodes use clk: a request issued at
// one rising edge is taken by the stages at the next three edges and the
// destination sees REQ at the fourth. With TWO_PHASE = 1 the first and third
// stages (every stage with an even index) run on the inverted clock, half a
// period ahead; the stages then connect at successive half periods and the
// destination sees REQ two clocks after the request. Both arrangements and
// their cycle counts are the document's; TWO_PHASE = 1 is the default, as it
// gives the two-clock connection time the document reports for the built
// network.
//
// Scan: the scan paths of the nodes of one stage form one chain, node 0
// nearest scan_in[stage]; there is one chain per stage, so that every chain
// shifts on a single clock phase (a chain running from a stage on one phase
// into a stage on the other would pass a bit on after half a period and
// lose the order of the shift). Wiring pattern of the first boundary, the
// scan organisation and the clock inversion for even stages beyond three are
// this design's choices.
module pie_in_network
  import pie_in_pkg::*;
#(
  parameter int unsigned STAGES    = 3,
  parameter int unsigned NP        = RADIX ** STAGES,
  parameter int unsigned WIDTH     = SLICES * SU_W,
  parameter bit          TWO_PHASE = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // source side, one port per sending PE
  input  logic [NP-1:0]             in_req,
  input  logic [NP-1:0]             in_lb,
  input  logic [NP-1:0]             in_dir,
  input  logic [NP-1:0][WIDTH-1:0]  in_fdata,
  output logic [NP-1:0]             in_ack,
  output logic [NP-1:0][WIDTH-1:0]  in_bdata,
  // destination side, one port per receiving PE
  output logic [NP-1:0]             out_req,
  output logic [NP-1:0]             out_lb,
  output logic [NP-1:0]             out_dir,
  output logic [NP-1:0][WIDTH-1:0]  out_fdata,
  input  logic [NP-1:0]             out_ack,
  input  logic [NP-1:0][WIDTH-1:0]  out_bdata,
  // maintenance scan path
  input  logic                      scan_en,
  input  logic [STAGES-1:0]         scan_in,
  output logic [STAGES-1:0]         scan_out
);

  localparam int unsigned NODES = NP / RADIX;

  logic clk_n;
  assign clk_n = ~clk;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    // Source-side lines of this stage, indexed node*RADIX + port.
    logic [NP-1:0]            i_req, i_lb, i_dir, i_ack;
    logic [NP-1:0][WIDTH-1:0] i_fd, i_bd;
    // Destination-side lines of this stage.
    logic [NP-1:0]            o_req, o_lb, o_dir, o_ack;
    logic [NP-1:0][WIDTH-1:0] o_fd, o_bd;
    logic [NODES:0]           chain;
    logic                     sclk;

    if (TWO_PHASE && (s % 2 == 0)) begin : g_early
      assign sclk = clk_n;
    end else begin : g_late
      assign sclk = clk;
    end

    // Forward lines into this stage, backward lines out of the previous one.
    if (s == 0) begin : g_first
      assign i_req    = in_req;
      assign i_lb     = in_lb;
      assign i_dir    = in_dir;
      assign i_fd     = in_fdata;
      assign in_ack   = i_ack;
      assign in_bdata = i_bd;
    end else begin : g_mid
      for (genvar l = 0; l < NP; l++) begin : g_wire
        localparam int unsigned NL = next_line(l, s - 1, STAGES);
        assign i_req[NL] = g_stage[s-1].o_req[l];
        assign i_lb[NL]  = g_stage[s-1].o_lb[l];
        assign i_dir[NL] = g_stage[s-1].o_dir[l];
        assign i_fd[NL]  = g_stage[s-1].o_fd[l];
      end
    end

    // Backward lines into this stage from the next one.
    if (s == STAGES - 1) begin : g_last
      assign out_req   = o_req;
      assign out_lb    = o_lb;
      assign out_dir   = o_dir;
      assign out_fdata = o_fd;
      assign o_ack     = out_ack;
      assign o_bd      = out_bdata;
    end else begin : g_back
      for (genvar l = 0; l < NP; l++) begin : g_wire
        localparam int unsigned NL = next_line(l, s, STAGES);
        assign o_ack[l] = g_stage[s+1].i_ack[NL];
        assign o_bd[l]  = g_stage[s+1].i_bd[NL];
      end
    end

    assign chain[0]    = scan_in[s];
    assign scan_out[s] = chain[NODES];

    for (genvar n = 0; n < NODES; n++) begin : g_node
      pie_switch_node #(.STAGE(s), .STAGES(STAGES), .N(RADIX), .WIDTH(WIDTH)) u_node (
        .clk       (sclk),
        .rst_n     (rst_n),
        .in_req    (i_req[n*RADIX +: RADIX]),
        .in_lb     (i_lb[n*RADIX +: RADIX]),
        .in_dir    (i_dir[n*RADIX +: RADIX]),
        .in_fdata  (i_fd[n*RADIX +: RADIX]),
        .in_ack    (i_ack[n*RADIX +: RADIX]),
        .in_bdata  (i_bd[n*RADIX +: RADIX]),
        .out_req   (o_req[n*RADIX +: RADIX]),
        .out_lb    (o_lb[n*RADIX +: RADIX]),
        .out_dir   (o_dir[n*RADIX +: RADIX]),
        .out_fdata (o_fd[n*RADIX +: RADIX]),
        .out_ack   (o_ack[n*RADIX +: RADIX]),
        .out_bdata (o_bd[n*RADIX +: RADIX]),
        .scan_en   (scan_en),
        .scan_in   (chain[n]),
        .scan_out  (chain[n+1])
      );
    end
  end

endmodule
