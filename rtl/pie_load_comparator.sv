// pie_load_comparator: the load-balancing comparator of one switching unit.
//
// Every PE that is not in a connection reports its load on the data lines
// that run backwards through the network. An SU therefore sees one load value
// on each of its outputs that is not connected. This block picks the smallest
// of those values and its port number; the SU passes the value back out of
// its unused inputs and the router sends a "lowest load" request to the port.
// The comparison of load values on unused outputs is the document's
// mechanism; the tie rule (lowest port number wins) and the code reported when
// no output is free (all ones) are this design's choices.
//
// Interface: load[p] is the backward data of output p, free[p] says output p
// is unused. Purely combinational: min_load, min_port and any_free follow the
// inputs in the same cycle.
module pie_load_comparator
  import pie_in_pkg::*;
#(
  parameter int unsigned N = RADIX,
  parameter int unsigned W = SU_W
) (
  input  logic [N-1:0][W-1:0]   load,
  input  logic [N-1:0]          free,
  output logic [W-1:0]          min_load,
  output logic [$clog2(N)-1:0]  min_port,
  output logic                  any_free
);

  always_comb begin
    min_load = '1;
    min_port = '0;
    any_free = 1'b0;
    for (int unsigned p = 0; p < N; p++) begin
      if (free[p] && (!any_free || load[p] < min_load)) begin
        min_load = load[p];
        min_port = $clog2(N)'(p);
        any_free = 1'b1;
      end
    end
  end

endmodule
