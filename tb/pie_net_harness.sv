// pie_net_harness: drives one pie_in_network as the 64 (or RADIX**STAGES)
// PEs would, and checks it. Used by tb_pie_in_network at several sizes.
//
// PE model. A PE changes its outputs 10 ns after the rising clock edge.
// As destination it registers ACK from the REQ it sees, remembers the last
// forward word, answers with (word ^ {port, 24'h5A5A5A}) when DIR is high,
// and drives its load value in every byte of its backward data while it is
// not in a connection.
//
// Phases, each counted:
//   1. sequential connections (all pairs if PAIRS == 0, else PAIRS random
//      ones): connection time in clock edges (STAGES+1 with one clock phase,
//      STAGES/2+1 with two), one word each way with a direction turn, and
//      release within two edges (afterwards the source sees the global
//      minimum load again, which needs every node on its paths to be free);
//   2. blocking: a second request for a busy destination waits and
//      connects once the first releases;
//   3. load balancing: a lowest-load request reaches the least loaded PE,
//      and a second one from a disjoint part of the network the next least;
//   4. random concurrent traffic from every PE, addressed and lowest-load,
//      with the PE-side timeout for blocked requests.
module pie_net_harness
  import pie_in_pkg::*;
#(
  parameter int unsigned STAGES    = 3,
  parameter bit          TWO_PHASE = 1'b1,
  parameter int unsigned PAIRS     = 0,
  parameter int unsigned TRAFFIC   = 3000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_conn,
  output int   n_turn,
  output int   n_release,
  output int   n_blocked,
  output int   n_timeout,
  output int   n_lb
);
  localparam int unsigned NP = RADIX ** STAGES;
  localparam int unsigned W  = 32;
  localparam int unsigned E  = TWO_PHASE ? STAGES / 2 + 1 : STAGES + 1;
  localparam int unsigned TIMEOUT = 12;

  logic rst_n;
  logic [NP-1:0]        in_req, in_lb, in_dir, in_ack, out_req, out_lb, out_dir, out_ack;
  logic [NP-1:0][W-1:0] in_fdata, in_bdata, out_fdata, out_bdata;
  logic [STAGES-1:0] scan_in, scan_out;

  pie_in_network #(.STAGES(STAGES), .TWO_PHASE(TWO_PHASE)) dut (
    .clk, .rst_n, .in_req, .in_lb, .in_dir, .in_fdata, .in_ack, .in_bdata,
    .out_req, .out_lb, .out_dir, .out_fdata, .out_ack, .out_bdata,
    .scan_en(1'b0), .scan_in, .scan_out);

  // ---------------- destination PEs ----------------
  logic [NP-1:0][7:0]   load;
  logic [NP-1:0][W-1:0] last_word;

  function automatic logic [W-1:0] rep(input logic [7:0] b);
    return {4{b}};
  endfunction
  function automatic logic [W-1:0] answer(input int d, input logic [W-1:0] w);
    return w ^ {8'(d), 24'h5A5A5A};
  endfunction

  always_ff @(posedge clk) begin
    for (int d = 0; d < NP; d++) begin
      out_ack[d] <= out_req[d];
      if (out_req[d] && !out_dir[d]) last_word[d] <= out_fdata[d];
    end
  end
  always_comb begin
    for (int d = 0; d < NP; d++)
      out_bdata[d] = !out_req[d] ? rep(load[d])
                   : out_dir[d] ? answer(d, last_word[d]) : '0;
  end

  // ---------------- helpers ----------------
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [S=%0d 2ph=%0d] %s (t=%0t)", STAGES, TWO_PHASE, what, $time);
    end
  endtask

  task automatic tick(input int n = 1);
    repeat (n) begin @(posedge clk); #10; end
  endtask

  function automatic logic [7:0] min_load();
    logic [7:0] m = '1;
    for (int d = 0; d < NP; d++) if (load[d] < m) m = load[d];
    return m;
  endfunction

  // One complete connection s -> d on an otherwise idle network.
  task automatic one_pair(input int s, input int d);
    int n = 0;
    logic [W-1:0] w;
    in_req[s] = 1'b1; in_lb[s] = 1'b0; in_dir[s] = 1'b0; in_fdata[s] = rep(8'(d));
    while (!in_ack[s] && n < 40) begin tick(); n++; end
    chk(n == E, $sformatf("connection %0d->%0d took %0d edges, expected %0d", s, d, n, E));
    n_conn++;
    chk(out_req == (NP'(1) << d), $sformatf("only destination %0d requested", d));
    w = $urandom; in_fdata[s] = w; #1;
    chk(out_fdata[d] == w, $sformatf("word %0d->%0d", s, d));
    tick();
    in_dir[s] = 1'b1; #1;
    chk(in_bdata[s] == answer(d, w), $sformatf("answer %0d->%0d after DIR turn", d, s));
    chk(out_fdata[d] == '0, "forward data off after DIR turn");
    n_turn++;
    in_dir[s] = 1'b0; in_req[s] = 1'b0; #1;
    chk(out_req[d] == 1'b0, "REQ withdrawn at destination");
    tick(2);
    chk(in_bdata[s] == rep(min_load()), $sformatf("network idle after release %0d->%0d", s, d));
    n_release++;
  endtask

  // ---------------- concurrent traffic ----------------
  typedef enum logic [2:0] {IDLE, WAIT, XFER, TURN, DONE, GAP} pe_state_e;

  task automatic traffic(input int cycles);
    pe_state_e      st   [NP];
    int             dst  [NP];
    int             cnt  [NP];
    logic [W-1:0]   word [NP];
    int             found;
    for (int s = 0; s < NP; s++) begin st[s] = IDLE; cnt[s] = 0; end
    for (int c = 0; c < cycles; c++) begin
      tick();
      if (c % 500 == 0) for (int d = 0; d < NP; d++) load[d] = 8'($urandom_range(1, 250));
      // advance every PE
      for (int s = 0; s < NP; s++) begin
        cnt[s]++;
        case (st[s])
          IDLE: if (c < cycles - 40 && $urandom_range(0, 7) == 0) begin
            in_req[s] = 1'b1; in_dir[s] = 1'b0;
            in_lb[s]  = ($urandom_range(0, 3) == 0);
            dst[s]    = $urandom_range(0, NP - 1);
            in_fdata[s] = in_lb[s] ? {24'hC0FFEE, 8'(s)} : rep(8'(dst[s]));
            st[s] = WAIT; cnt[s] = 0;
          end
          WAIT: if (in_ack[s]) begin
            found = -1;
            for (int d = 0; d < NP; d++)
              if (out_req[d] && !out_dir[d] && out_lb[d] == in_lb[s] && out_fdata[d] == in_fdata[s]
                  && (in_lb[s] || d == dst[s])) found = d;
            chk(found >= 0, $sformatf("PE %0d acked but no destination holds its request", s));
            if (in_lb[s]) n_lb++;
            if (cnt[s] > E) n_blocked++;
            n_conn++;
            dst[s] = found < 0 ? 0 : found;
            word[s] = $urandom; in_fdata[s] = word[s];
            st[s] = XFER;
          end else if (cnt[s] >= TIMEOUT) begin
            in_req[s] = 1'b0; n_timeout++; st[s] = GAP; cnt[s] = 0;
          end
          XFER: begin in_dir[s] = 1'b1; st[s] = TURN; end
          TURN: begin in_dir[s] = 1'b0; in_req[s] = 1'b0; st[s] = GAP; cnt[s] = 0; n_release++; end
          GAP:  if (cnt[s] >= 2) st[s] = IDLE;
          default: st[s] = IDLE;
        endcase
      end
      #1;
      for (int s = 0; s < NP; s++) begin
        if (st[s] == XFER) chk(out_fdata[dst[s]] == word[s], $sformatf("traffic word %0d->%0d", s, dst[s]));
        if (st[s] == TURN) begin
          chk(in_bdata[s] == answer(dst[s], word[s]), $sformatf("traffic answer %0d->%0d", dst[s], s));
          n_turn++;
        end
      end
    end
    tick(4);
    chk(out_req == '0, "no connection left after traffic");
  endtask

  // ---------------- sequence ----------------
  initial begin
    int s1, s2, d1, d2, n;
    logic [7:0] m;
    done = 1'b0; checks = 0; failures = 0;
    n_conn = 0; n_turn = 0; n_release = 0; n_blocked = 0; n_timeout = 0; n_lb = 0;
    rst_n = 1'b0; scan_in = '0;
    in_req = '0; in_lb = '0; in_dir = '0; in_fdata = '0;
    for (int d = 0; d < NP; d++) load[d] = 8'(100 + (d * 37) % 100);
    tick(3); rst_n = 1'b1; tick();

    // 1. sequential connections
    chk(in_bdata[0] == rep(min_load()), "idle network offers the minimum load");
    if (PAIRS == 0) begin
      for (int s = 0; s < NP; s++) for (int d = 0; d < NP; d++) one_pair(s, d);
    end else begin
      for (int p = 0; p < PAIRS; p++) one_pair($urandom_range(0, NP - 1), $urandom_range(0, NP - 1));
    end

    // 2. blocking on a busy destination
    s1 = 5; s2 = NP - 3; d1 = 17;
    in_req[s1] = 1'b1; in_fdata[s1] = rep(8'(d1)); tick(E);
    chk(in_ack[s1], "first request connected");
    in_req[s2] = 1'b1; in_fdata[s2] = rep(8'(d1)); tick(6);
    chk(!in_ack[s2], "second request for a busy PE is blocked");
    chk(out_fdata[d1] == rep(8'(d1)) && in_ack[s1], "first connection undisturbed");
    n_blocked++;
    in_req[s1] = 1'b0;
    n = 0;
    while (!in_ack[s2] && n < 20) begin tick(); n++; end
    chk(in_ack[s2], "blocked request connects after the release");
    in_fdata[s2] = 32'hCAFE0001; #1;
    chk(out_fdata[d1] == 32'hCAFE0001, "data from the formerly blocked PE");
    in_req[s2] = 1'b0; tick(3);

    // 3. load balancing
    for (int d = 0; d < NP; d++) load[d] = 8'(50 + $urandom_range(0, 150));
    d1 = $urandom_range(0, NP - 1); load[d1] = 8'd3;
    d2 = (d1 + NP / 2 + 1) % NP;    load[d2] = 8'd9;
    #1;
    chk(in_bdata[0] == rep(8'd3), "minimum load offered to every idle PE");
    s1 = 0; s2 = (NP - 1) / 3;     // base-4 digits all 1: no link shared with PE 0
    in_req[s1] = 1'b1; in_lb[s1] = 1'b1; in_fdata[s1] = rep(8'hEE);
    tick(E);
    chk(in_ack[s1] && out_req[d1] && out_lb[d1], "lowest-load request reached the least loaded PE");
    n_lb++;
    m = '1;
    for (int d = 0; d < NP; d++) if (d != d1 && load[d] < m) m = load[d];
    #1;
    chk(in_bdata[s2] == rep(m), "next minimum offered once the least loaded PE is taken");
    in_req[s2] = 1'b1; in_lb[s2] = 1'b1; in_fdata[s2] = rep(8'hDD);
    tick(E);
    chk(in_ack[s2] && out_req[d2] && out_fdata[d2] == rep(8'hDD), "second lowest-load request reached the next least loaded PE");
    n_lb++;
    in_req = '0; in_lb = '0; tick(3);

    // 4. concurrent random traffic
    traffic(TRAFFIC);

    done = 1'b1;
  end

endmodule
