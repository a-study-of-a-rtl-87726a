// tb_pie_su: directed check of one switching unit (first stage of a
// three-stage network, so it routes on address bits [5:4]).
// Inputs change on the falling edge; the SU acts on the rising edge.
// Checked: one rising edge to connect; data, REQ and LB through the
// connection; ACK back; DIR turning the data path around in the same cycle;
// release accepted at the first edge after REQ falls and done at the
// second; blocking and fixed priority between two requests for one output;
// the load comparator values sent back and a lowest-load request (the
// load-balancing example: loads 20, busy, 8, 1); the scan path read-out and
// a multicast pattern loaded through it.
`define CHECK(got, exp, what) \
  begin \
    checks++; \
    if ((got) !== (exp)) begin \
      failures++; \
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time); \
    end \
  end

module tb_pie_su;
  import pie_in_pkg::*;
  localparam int unsigned N = 4, W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]        in_req, in_lb, in_dir, in_ack, out_req, out_lb, out_dir, out_ack;
  logic [N-1:0][W-1:0] in_fdata, in_bdata, out_fdata, out_bdata;
  logic scan_en, scan_in, scan_out;
  int checks = 0, failures = 0;

  pie_su #(.STAGE(0), .STAGES(3), .N(N), .W(W)) dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  // Advance to the next falling edge (inputs change there).
  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Output o is connected to input i: data passes straight through.
  task automatic expect_path(input int i, input int o, input string what);
    logic [W-1:0] d = W'($urandom);
    in_fdata[i] = d; #1;
    `CHECK(out_req[o], in_req[i], $sformatf("%s req", what))
    `CHECK(out_fdata[o], d, $sformatf("%s fwd data", what))
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] sv, pattern;
    in_req = '0; in_lb = '0; in_dir = '0; in_fdata = '0;
    out_ack = '0; out_bdata = '{8'd1, 8'd8, 8'd30, 8'd20};
    scan_en = 1'b0; scan_in = 1'b0;
    step(2); rst_n = 1'b1; step();

    // No connections: every input shows the lowest load (1, from output 3).
    #1;
    for (int i = 0; i < N; i++) `CHECK(in_bdata[i], 8'd1, "idle min load")
    `CHECK(out_req, 4'b0, "idle outputs")

    // Input 2 asks for destination 0x1A: first-stage digit 1 -> output 1.
    in_req[2] = 1'b1; in_fdata[2] = 8'h1A; #1;
    `CHECK(out_req, 4'b0, "not yet connected before the edge")
    @(posedge clk); #1;
    `CHECK(out_req, 4'b0010, "connected after one edge")
    `CHECK(out_fdata[1], 8'h1A, "address passed on")
    step();
    expect_path(2, 1, "path 2->1");
    // Output 1 busy: minimum over outputs 0, 2, 3 is still 1.
    `CHECK(in_bdata[0], 8'd1, "min load with 1 busy")
    // ACK from downstream comes back to input 2 only.
    out_ack[1] = 1'b1; #1;
    `CHECK(in_ack, 4'b0100, "ack back")
    // Turn the direction: backward data flows, forward data is cut.
    in_dir[2] = 1'b1; out_bdata[1] = 8'h5C; #1;
    `CHECK(in_bdata[2], 8'h5C, "backward data after DIR turn")
    `CHECK(out_fdata[1], 8'h00, "forward data cut after DIR turn")
    `CHECK(out_dir[1], 1'b1, "DIR passed on")
    in_dir[2] = 1'b0; out_bdata[1] = 8'd30; #1;
    `CHECK(out_fdata[1], in_fdata[2], "forward again after DIR back")

    // Input 0 wants output 1 as well (0x10): blocked, waits.
    in_req[0] = 1'b1; in_fdata[0] = 8'h10;
    step(3);
    `CHECK(out_req, 4'b0010, "blocked request waits")
    `CHECK(in_ack[0], 1'b0, "blocked request has no ack")
    // Release input 2: accepted at the first edge, cleared at the second.
    in_req[2] = 1'b0;
    @(posedge clk); #1;
    `CHECK(in_ack[2], 1'b1, "still connected after first edge")
    `CHECK(out_req[1], 1'b0, "REQ withdrawn downstream at once")
    @(posedge clk); #1;
    `CHECK(in_ack[2], 1'b0, "released at second edge")
    `CHECK(out_req[1], 1'b0, "output 1 idle")
    @(posedge clk); #1;
    `CHECK(out_req[1] && out_fdata[1] == 8'h10 && in_ack == 4'b0001, 1'b1, "waiting input 0 connected next")
    out_ack[1] = 1'b0;
    in_req[0] = 1'b0; step(3);
    `CHECK(out_req, 4'b0, "all released")

    // Two requests for one free output in the same cycle: input 1 beats 3.
    in_req[1] = 1'b1; in_fdata[1] = 8'h30;
    in_req[3] = 1'b1; in_fdata[3] = 8'h3F;
    step();
    `CHECK(out_req[3] && out_fdata[3] == 8'h30, 1'b1, "priority to lower input")
    in_req[1] = 1'b0; step(3);
    `CHECK(out_req[3] && out_fdata[3] == 8'h3F, 1'b1, "second input after release")
    in_req[3] = 1'b0; step(3);

    // Load balancing: outputs carry 20, (busy), 8, 1.
    in_req[3] = 1'b1; in_fdata[3] = 8'h10; step();        // input 3 takes output 1
    out_bdata = '{8'd1, 8'd8, 8'd99, 8'd20}; #1;
    `CHECK(in_bdata[0], 8'd1, "lowest load 1 offered")
    in_req[0] = 1'b1; in_lb[0] = 1'b1; in_fdata[0] = 8'h00; step();
    in_fdata[0] = 8'h77; #1;
    `CHECK(out_req[3] && out_fdata[3] == 8'h77, 1'b1, "LB request to lowest load")
    `CHECK(out_lb[3], 1'b1, "LB passed on")
    `CHECK(in_bdata[1], 8'd8, "next lowest load 8 offered")
    `CHECK(in_bdata[2], 8'd8, "next lowest load 8 offered (2)")

    // Scan out: conn[3]={1,00}, conn[2]=0, conn[1]={1,11}, conn[0]=0, rel=0.
    scan_en = 1'b1;
    for (int b = 15; b >= 0; b--) begin
      #1; sv[b] = scan_out;
      scan_in = 1'b0;
      @(posedge clk); #1;
    end
    `CHECK(sv, 16'b100_000_111_000_0000, "scan read-out")
    // Scan in a multicast pattern: input 1 drives outputs 0, 2 and 3.
    pattern = 16'b101_101_000_101_0000;
    for (int b = 15; b >= 0; b--) begin
      @(negedge clk); scan_in = pattern[b];
    end
    @(posedge clk); #1;
    @(negedge clk); scan_en = 1'b0;
    in_req = 4'b0010; in_lb = '0; in_fdata[1] = 8'hA5; #1;
    `CHECK(out_req, 4'b1101, "multicast req")
    `CHECK(out_fdata[0], 8'hA5, "multicast data 0")
    `CHECK(out_fdata[2], 8'hA5, "multicast data 2")
    `CHECK(out_fdata[3], 8'hA5, "multicast data 3")
    // Releasing the input frees all three outputs.
    in_req = '0; step(2); #1;
    `CHECK(in_bdata[0], 8'd1, "multicast released: output 3 (load 1) free again")
    `CHECK(in_bdata[1], 8'd1, "multicast released: input 1 idle")

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
