// tb_pie_switch_node: check of one 32-bit switch node made of four SUs
// (last stage of a three-stage network, so it routes on address bits [1:0]
// of every byte). Checked: a connection through all four byte lanes with
// random 32-bit words, in both directions; every other output idle; the
// lowest load offered back on all four lanes and a lowest-load request;
// release in two edges; and the length of the chained scan path (a single 1
// comes out after 4 x 16 shifts).
`define CHECK(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end

module tb_pie_switch_node;
  localparam int unsigned N = 4, WIDTH = 32;

  logic clk, rst_n;
  logic [N-1:0]            in_req, in_lb, in_dir, in_ack, out_req, out_lb, out_dir, out_ack;
  logic [N-1:0][WIDTH-1:0] in_fdata, in_bdata, out_fdata, out_bdata;
  logic scan_en, scan_in, scan_out;
  int checks = 0, failures = 0;

  pie_switch_node #(.STAGE(2), .STAGES(3)) dut (.*);

  initial clk = 1'b0;
  always #50 clk = ~clk;

  function automatic logic [WIDTH-1:0] rep(input logic [7:0] b);
    return {4{b}};
  endfunction

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] w;
    int shifts;
    rst_n = 1'b0;
    in_req = '0; in_lb = '0; in_dir = '0; in_fdata = '0; out_ack = '0;
    out_bdata = '{rep(8'd40), rep(8'd7), rep(8'd9), rep(8'd12)};
    scan_en = 1'b0; scan_in = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); #1;
    `CHECK(in_bdata[2], rep(8'd7), "idle min load on all lanes")

    // Input 1 to destination ...10 (digit 2).
    in_req[1] = 1'b1; in_fdata[1] = rep(8'h2E);
    @(negedge clk); #1;
    `CHECK(out_req, 4'b0100, "one output connected")
    for (int t = 0; t < 20; t++) begin
      w = $urandom; in_fdata[1] = w; #1;
      `CHECK(out_fdata[2], w, "32-bit word forward")
      `CHECK(out_fdata[0] | out_fdata[1] | out_fdata[3], 32'h0, "other outputs idle")
    end
    in_dir[1] = 1'b1;
    for (int t = 0; t < 20; t++) begin
      w = $urandom; out_bdata[2] = w; #1;
      `CHECK(in_bdata[1], w, "32-bit word backward")
    end
    in_dir[1] = 1'b0; out_bdata[2] = rep(8'd7);
    out_ack[2] = 1'b1; #1;
    `CHECK(in_ack, 4'b0010, "ack on the connected input")
    // Output 2 busy: lowest free load is 9 on output 1.
    `CHECK(in_bdata[0], rep(8'd9), "next lowest load")
    in_req[3] = 1'b1; in_lb[3] = 1'b1;
    @(negedge clk); #1;
    `CHECK(out_req, 4'b0110, "lowest-load request to output 1")
    `CHECK(in_bdata[0], rep(8'd12), "then load 12 is lowest")
    // Release both: two edges.
    in_req = '0; out_ack = 4'b0110;
    @(posedge clk); #1;
    `CHECK(in_ack, 4'b1010, "held one edge")
    @(posedge clk); #1;
    `CHECK(in_ack, 4'b0000, "released at the second edge")
    `CHECK(in_bdata[0], rep(8'd7), "all outputs free again")
    out_ack = '0;

    // Scan chain length: push a single 1 through 64 zeros.
    @(negedge clk);
    scan_en = 1'b1; scan_in = 1'b0;
    repeat (64) @(negedge clk);
    scan_in = 1'b1; @(negedge clk); scan_in = 1'b0;
    shifts = 1;
    while (!scan_out && shifts < 100) begin @(negedge clk); shifts++; end
    `CHECK(shifts, 64, "scan chain length")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
