// pie64_in: the duplicated interconnection network of PIE64.
//
// Two independent, identical multistage networks connect the 64 inference
// units (PEs). Each PE owns one source port and one destination port on each
// network, so it can hold two connections at once, and a request that is
// blocked in one network may find a path in the other. Because each network
// has its own load comparators, a PE reports two load values, one per
// network, and the two can express a pair of load measures. Each network is
// a 64x64 three-stage network of 48 4x4 32-bit switch nodes
// (pie_in_network); all switch nodes share the global clock, the first and
// third stages on its inverted phase by default. Nothing joins the two
// networks but clk and rst_n; each keeps its own scan paths, one per stage.
//
// Interface: every port array is indexed [network][PE]. Per port the source
// side has REQ, LB (route to lowest load), DIR (0: data flows to the
// destination, 1: back to the source) and forward data in, ACK and backward
// data out; the destination side is the mirror image. A PE that is not in a
// connection drives its load value on every byte of its destination port's
// backward data. The duplicated 64-port structure, 32-bit channels and the
// load-balancing mechanism are the document's; the signal set is this
// design's choice.
module pie64_in
  import pie_in_pkg::*;
#(
  parameter int unsigned NETS      = 2,
  parameter int unsigned STAGES    = 3,
  parameter int unsigned NP        = RADIX ** STAGES,
  parameter int unsigned WIDTH     = SLICES * SU_W,
  parameter bit          TWO_PHASE = 1'b1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NETS-1:0][NP-1:0]              src_req,
  input  logic [NETS-1:0][NP-1:0]              src_lb,
  input  logic [NETS-1:0][NP-1:0]              src_dir,
  input  logic [NETS-1:0][NP-1:0][WIDTH-1:0]   src_fdata,
  output logic [NETS-1:0][NP-1:0]              src_ack,
  output logic [NETS-1:0][NP-1:0][WIDTH-1:0]   src_bdata,
  output logic [NETS-1:0][NP-1:0]              dst_req,
  output logic [NETS-1:0][NP-1:0]              dst_lb,
  output logic [NETS-1:0][NP-1:0]              dst_dir,
  output logic [NETS-1:0][NP-1:0][WIDTH-1:0]   dst_fdata,
  input  logic [NETS-1:0][NP-1:0]              dst_ack,
  input  logic [NETS-1:0][NP-1:0][WIDTH-1:0]   dst_bdata,
  input  logic [NETS-1:0]                      scan_en,
  input  logic [NETS-1:0][STAGES-1:0]         scan_in,
  output logic [NETS-1:0][STAGES-1:0]          scan_out
);

  for (genvar k = 0; k < NETS; k++) begin : g_net
    pie_in_network #(
      .STAGES(STAGES), .NP(NP), .WIDTH(WIDTH), .TWO_PHASE(TWO_PHASE)
    ) u_net (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_req    (src_req[k]),
      .in_lb     (src_lb[k]),
      .in_dir    (src_dir[k]),
      .in_fdata  (src_fdata[k]),
      .in_ack    (src_ack[k]),
      .in_bdata  (src_bdata[k]),
      .out_req   (dst_req[k]),
      .out_lb    (dst_lb[k]),
      .out_dir   (dst_dir[k]),
      .out_fdata (dst_fdata[k]),
      .out_ack   (dst_ack[k]),
      .out_bdata (dst_bdata[k]),
      .scan_en   (scan_en[k]),
      .scan_in   (scan_in[k]),
      .scan_out  (scan_out[k])
    );
  end

endmodule
