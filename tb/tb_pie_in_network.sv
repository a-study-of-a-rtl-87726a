// tb_pie_in_network: end-to-end check of the 64-port multistage network in two
// configurations, each driven by pie_net_harness:
//   * 64 ports, one clock phase: all 4096 source/destination pairs, each
//     connecting in 4 clock edges;
//   * 64 ports, two clock phases (first and third stage on the inverted
//     clock): random pairs connecting in 2 clock edges;
// Every configuration also runs blocking, load balancing and concurrent
// traffic; each mechanism must have happened at least once.
module tb_pie_in_network;
  logic clk;
  initial clk = 1'b0;
  always #50 clk = ~clk;   // 10 MHz global clock

  localparam int H = 2;
  logic done [H];
  int checks_h [H], failures_h [H], n_conn [H], n_turn [H], n_rel [H], n_blk [H], n_to [H], n_lb [H];

  pie_net_harness #(.STAGES(3), .TWO_PHASE(1'b0), .PAIRS(0),   .TRAFFIC(2000)) h0 (
    .clk, .done(done[0]), .checks(checks_h[0]), .failures(failures_h[0]), .n_conn(n_conn[0]),
    .n_turn(n_turn[0]), .n_release(n_rel[0]), .n_blocked(n_blk[0]), .n_timeout(n_to[0]), .n_lb(n_lb[0]));
  pie_net_harness #(.STAGES(3), .TWO_PHASE(1'b1), .PAIRS(300), .TRAFFIC(3000)) h1 (
    .clk, .done(done[1]), .checks(checks_h[1]), .failures(failures_h[1]), .n_conn(n_conn[1]),
    .n_turn(n_turn[1]), .n_release(n_rel[1]), .n_blocked(n_blk[1]), .n_timeout(n_to[1]), .n_lb(n_lb[1]));
  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int h = 0; h < H; h++) begin
      checks += checks_h[h]; failures += failures_h[h];
      $display("config %0d: connections=%0d turns=%0d releases=%0d blocked=%0d timeouts=%0d lowest_load=%0d",
               h, n_conn[h], n_turn[h], n_rel[h], n_blk[h], n_to[h], n_lb[h]);
      checks += 6;
      if (n_conn[h] == 0) failures++;
      if (n_turn[h] == 0) failures++;
      if (n_rel[h] == 0) failures++;
      if (n_blk[h] == 0) failures++;
      if (n_to[h] == 0) failures++;
      if (n_lb[h] == 0) failures++;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
