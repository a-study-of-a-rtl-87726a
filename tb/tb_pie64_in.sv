// tb_pie64_in: end-to-end test of the duplicated interconnection network
// with every parameter at its default (two 64-port, three-stage networks,
// 32-bit channels, two clock phases, 10 MHz clock).
//
// The 64 PEs are modelled here: outputs change 10 ns after the rising edge;
// as destination a PE registers ACK from REQ, keeps the last word it
// received, answers (word ^ {PE, 24'h5A5A5A}) when DIR is high and otherwise
// shows its load, one value per network, in every byte.
//
// Each mechanism is exercised and counted:
//   connection   - addressed connections in both networks, 2 clock edges
//   duplicate    - one PE reached through both networks at once
//   blocked      - a request for a PE busy in one network waits
//   stream       - one 32-bit word per clock (40 MB/s at 10 MHz)
//   turn         - DIR turned, answer back in the same cycle
//   release      - network idle two edges after REQ falls
//   lowest_load  - lowest-load requests, different per network (load pairs)
//   scan         - a broadcast pattern loaded through a scan path, data to
//                  all 64 PEs, state read back out of the scan path
//   heavy        - connect/transfer/release on net 0 while net 1 broadcasts
//                  alternating 0101... and 1010... data
module tb_pie64_in;
  import pie_in_pkg::*;
  localparam int NETS = 2, NP = 64, W = 32, E = 2;
  localparam int STAGES = 3;
  localparam int CHAIN = 16 * SLICES * 16;   // scan bits per stage chain

  logic clk, rst_n;
  logic [NETS-1:0][NP-1:0]        src_req, src_lb, src_dir, src_ack;
  logic [NETS-1:0][NP-1:0]        dst_req, dst_lb, dst_dir, dst_ack;
  logic [NETS-1:0][NP-1:0][W-1:0] src_fdata, src_bdata, dst_fdata, dst_bdata;
  logic [NETS-1:0]                scan_en;
  logic [NETS-1:0][STAGES-1:0]    scan_in, scan_out;

  pie64_in dut (.*);

  initial clk = 1'b0;
  always #50 clk = ~clk;

  int checks = 0, failures = 0;
  int n_conn = 0, n_dup = 0, n_blocked = 0, n_stream = 0, n_turn = 0, n_release = 0,
      n_lb = 0, n_scan = 0, n_heavy = 0;

  // ---------------- destination PEs ----------------
  logic [NETS-1:0][NP-1:0][7:0]   load;
  logic [NETS-1:0][NP-1:0][W-1:0] last_word;

  function automatic logic [W-1:0] rep(input logic [7:0] b);
    return {4{b}};
  endfunction
  function automatic logic [W-1:0] answer(input int d, input logic [W-1:0] w);
    return w ^ {8'(d), 24'h5A5A5A};
  endfunction

  always_ff @(posedge clk)
    for (int k = 0; k < NETS; k++)
      for (int d = 0; d < NP; d++) begin
        dst_ack[k][d] <= dst_req[k][d];
        if (dst_req[k][d] && !dst_dir[k][d]) last_word[k][d] <= dst_fdata[k][d];
      end

  always_comb
    for (int k = 0; k < NETS; k++)
      for (int d = 0; d < NP; d++)
        dst_bdata[k][d] = !dst_req[k][d] ? rep(load[k][d])
                        : dst_dir[k][d] ? answer(d, last_word[k][d]) : '0;

  // ---------------- helpers ----------------
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) begin @(posedge clk); #10; end
  endtask

  function automatic logic [7:0] min_load(input int k);
    logic [7:0] m = '1;
    for (int d = 0; d < NP; d++) if (load[k][d] < m) m = load[k][d];
    return m;
  endfunction

  task automatic request(input int k, input int s, input int d);
    src_req[k][s] = 1'b1; src_lb[k][s] = 1'b0; src_dir[k][s] = 1'b0;
    src_fdata[k][s] = rep(8'(d));
  endtask

  task automatic release_and_check(input int k, input int s);
    src_req[k][s] = 1'b0; src_dir[k][s] = 1'b0; src_lb[k][s] = 1'b0;
    tick(2);
    chk(src_bdata[k][s] == rep(min_load(k)), $sformatf("net %0d idle after release of PE %0d", k, s));
    n_release++;
  endtask

  // Bits of the scan chain of one stage, in shift order, for a broadcast
  // from source PE 0: stage 0 node 0, stage 1 nodes 0/4/8/12 and every stage
  // 2 node connect all their outputs to input 0. An SU holds
  // {conn[3], conn[2], conn[1], conn[0], release[3:0]}, conn = {v, src[1:0]}.
  function automatic logic chain_bit(input int stage, input int i);
    int su, bit_in_su, node;
    su        = (CHAIN - 1 - i) / 16;        // the first bit shifted travels furthest
    bit_in_su = 15 - (i % 16);               // most significant bit first
    node      = su / SLICES;
    if (bit_in_su < 4) return 1'b0;          // pending releases
    if (!((stage == 0 && node == 0) || (stage == 1 && node % 4 == 0) || stage == 2)) return 1'b0;
    return ((bit_in_su - 4) % 3) == 2;       // {v, src=00} per output
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin
    int n, s, d, da, db;
    logic [W-1:0] w;
    rst_n = 1'b0;
    src_req = '0; src_lb = '0; src_dir = '0; src_fdata = '0;
    scan_en = '0; scan_in = '0;
    for (int k = 0; k < NETS; k++)
      for (int dd = 0; dd < NP; dd++) load[k][dd] = 8'(60 + $urandom_range(0, 180));
    tick(3); rst_n = 1'b1; tick();
    for (int k = 0; k < NETS; k++)
      chk(src_bdata[k][11] == rep(min_load(k)), $sformatf("net %0d offers its own minimum load", k));

    // Duplicated network: PE 3 (net 0) and PE 7 (net 1) both reach PE 40.
    request(0, 3, 40); request(1, 7, 40);
    n = 0;
    while (!(src_ack[0][3] && src_ack[1][7]) && n < 10) begin tick(); n++; end
    chk(n == E, $sformatf("both networks connect in %0d edges (got %0d)", E, n));
    n_conn += 2; n_dup++;
    // PE 9 wants PE 40 on net 0 too: blocked there.
    request(0, 9, 40);
    tick(5);
    chk(!src_ack[0][9], "second request for PE 40 on net 0 is blocked");
    n_blocked++;

    // Stream: one word per clock through net 0, another through net 1.
    for (int t = 0; t < 32; t++) begin
      w = $urandom;
      src_fdata[0][3] = w; src_fdata[1][7] = ~w; #1;
      chk(dst_fdata[0][40] == w && dst_fdata[1][40] == ~w, "word per clock on both networks");
      n_stream++;
      tick();
    end
    // Turn the direction on net 0: the answer arrives in the same cycle.
    src_dir[0][3] = 1'b1; #1;
    chk(src_bdata[0][3] == answer(40, last_word[0][40]) && last_word[0][40] == w,
        "answer after the DIR turn");
    n_turn++;
    tick();
    release_and_check(1, 7);
    // Releasing PE 3 lets the blocked PE 9 through.
    src_req[0][3] = 1'b0; src_dir[0][3] = 1'b0;
    n = 0;
    while (!src_ack[0][9] && n < 10) begin tick(); n++; end
    chk(src_ack[0][9], "blocked PE 9 connects after PE 3 releases");
    n_conn++; n_release++;
    release_and_check(0, 9);

    // Load pairs: each network has its own least loaded PE.
    da = 21; db = 50;
    load[0][da] = 8'd2; load[1][db] = 8'd4;
    for (int k = 0; k < NETS; k++) begin
      src_req[k][60] = 1'b1; src_lb[k][60] = 1'b1; src_fdata[k][60] = 32'h1B1B1B1B;
    end
    tick(E);
    chk(src_ack[0][60] && dst_req[0][da] && dst_lb[0][da], "net 0 lowest-load request reached its least loaded PE");
    chk(src_ack[1][60] && dst_req[1][db] && dst_lb[1][db], "net 1 lowest-load request reached its least loaded PE");
    n_lb += 2;
    release_and_check(0, 60);
    release_and_check(1, 60);

    // Random connections alternating between the networks.
    for (int p = 0; p < 400; p++) begin
      int k = p % 2;
      s = $urandom_range(0, NP - 1); d = $urandom_range(0, NP - 1);
      request(k, s, d);
      n = 0;
      while (!src_ack[k][s] && n < 10) begin tick(); n++; end
      chk(n == E, $sformatf("net %0d %0d->%0d connects in %0d edges", k, s, d, E));
      n_conn++;
      w = $urandom; src_fdata[k][s] = w; #1;
      chk(dst_fdata[k][d] == w, $sformatf("net %0d word %0d->%0d", k, s, d));
      tick(); src_dir[k][s] = 1'b1; #1;
      chk(src_bdata[k][s] == answer(d, w), $sformatf("net %0d answer %0d->%0d", k, d, s));
      n_turn++;
      release_and_check(k, s);
    end

    // Scan path of net 1: load a broadcast from PE 0 to all 64 PEs.
    scan_en[1] = 1'b1;
    for (int i = 0; i < CHAIN; i++) begin
      for (int st = 0; st < STAGES; st++) scan_in[1][st] = chain_bit(st, i);
      tick();
    end
    src_req[1][0] = 1'b1; src_fdata[1][0] = 32'h55555555;
    scan_en[1] = 1'b0; #1;
    chk(dst_req[1] == '1, "broadcast reaches all 64 PEs");
    for (int dd = 0; dd < NP; dd++)
      chk(dst_fdata[1][dd] == 32'h55555555, $sformatf("broadcast data at PE %0d", dd));
    src_fdata[1][0] = 32'hAAAAAAAA; #1;
    chk(dst_fdata[1][63] == 32'hAAAAAAAA && dst_fdata[1][0] == 32'hAAAAAAAA, "broadcast follows the data");
    chk(dst_req[0] == '0, "net 0 untouched by net 1 scan");
    n_scan++;
    // Heavy case: net 0 connects, transfers and releases while net 1 holds
    // the broadcast and its data keep changing as 0101... / 1010...
    for (int p = 0; p < 50; p++) begin
      s = $urandom_range(0, NP - 1); d = $urandom_range(0, NP - 1);
      src_fdata[1][0] = p[0] ? 32'hAAAAAAAA : 32'h55555555;
      request(0, s, d);
      tick(E);
      chk(src_ack[0][s], $sformatf("net 0 %0d->%0d connects during the broadcast", s, d));
      w = $urandom; src_fdata[0][s] = w; #1;
      chk(dst_fdata[0][d] == w, $sformatf("net 0 word %0d->%0d during the broadcast", s, d));
      chk(dst_req[1] == '1 && dst_fdata[1][d] == src_fdata[1][0], "broadcast holds during net 0 traffic");
      n_conn++; n_heavy++;
      release_and_check(0, s);
    end
    // Read the state back out, shifting zeros in; the network is then empty.
    scan_en[1] = 1'b1; scan_in[1] = '0; #1;
    n = 0;
    for (int i = 0; i < CHAIN; i++) begin
      for (int st = 0; st < STAGES; st++) if (scan_out[1][st] != chain_bit(st, i)) n++;
      tick(); #1;
    end
    chk(n == 0, $sformatf("scan read-back matches the loaded pattern (%0d bits differ)", n));
    scan_en[1] = 1'b0; src_req[1][0] = 1'b0; #1;
    chk(dst_req[1] == '0, "scan shifted the broadcast out");
    tick(2);

    // Every mechanism happened.
    chk(n_conn > 0, "connections counted");
    chk(n_dup > 0, "duplicated use counted");
    chk(n_blocked > 0, "blocking counted");
    chk(n_stream > 0, "streaming counted");
    chk(n_turn > 0, "direction turns counted");
    chk(n_release > 0, "releases counted");
    chk(n_lb > 0, "lowest-load requests counted");
    chk(n_scan > 0, "scan broadcast counted");
    chk(n_heavy > 0, "traffic during the broadcast counted");
    $display("connection=%0d duplicate=%0d blocked=%0d stream=%0d turn=%0d release=%0d lowest_load=%0d scan=%0d heavy=%0d",
             n_conn, n_dup, n_blocked, n_stream, n_turn, n_release, n_lb, n_scan, n_heavy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
