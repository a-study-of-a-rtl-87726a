// pie_in_pkg: constants and wiring functions shared by the switching
// unit (SU), the switch node, the multistage network and the duplicated
// interconnection network of the PIE64 machine.
//
// The network is a circuit-switched, non-buffering multistage network of
// 4x4 crossbar switch nodes. Each switch node is four 8-bit bit-sliced SUs.
// Routing is distributed: every SU reads the destination address from its own
// 8-bit byte lane and takes the 2-bit base-4 digit that belongs to its stage.
// The radix (4), the SU width (8 bits) and the slice count (4, for a 32-bit
// channel) are the document's numbers; the address placement and the
// "no free output" load code are this design's choices.
package pie_in_pkg;

  localparam int unsigned RADIX      = 4;   // ports per side of an SU / node
  localparam int unsigned DIGIT_BITS = 2;   // log2(RADIX)
  localparam int unsigned SU_W       = 8;   // data lines per SU
  localparam int unsigned SLICES     = 4;   // SUs per 32-bit switch node

  // Load value an SU reports backwards when none of its outputs is free:
  // the largest code, so an upstream comparator never prefers it.
  localparam logic [SU_W-1:0] LOAD_NONE = '1;

  // Destination digit that stage `stage` (0 = next to the sources) of a
  // `stages`-stage network routes on: the most significant digit first.
  function automatic logic [DIGIT_BITS-1:0] route_digit(
      input logic [SU_W-1:0] addr, input int unsigned stage,
      input int unsigned stages);
    int unsigned sh;
    sh = DIGIT_BITS * (stages - 1 - stage);
    return DIGIT_BITS'(addr >> sh);
  endfunction

  // Wiring between stage `stage` and stage `stage+1`: the output line
  // (node*RADIX + port) becomes the next stage's input line with base-4
  // digit 0 and digit (stages-1-stage) exchanged. This is a radix-4
  // butterfly: the last boundary keeps groups of four nodes together, as the
  // network diagram shows, and every source reaches every destination by
  // exactly one path.
  function automatic int unsigned next_line(input int unsigned line,
      input int unsigned stage, input int unsigned stages);
    int unsigned k, d0, dk, base;
    k    = stages - 1 - stage;
    d0   = line % RADIX;
    dk   = (line / (RADIX ** k)) % RADIX;
    base = line - d0 - dk * (RADIX ** k);
    return base + dk + d0 * (RADIX ** k);
  endfunction

endpackage
