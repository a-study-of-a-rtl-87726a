// tb_pie_in_network_256: the network expanded to 256 ports in four stages,
// the largest size the 8-bit address in each byte allows, with two clock
// phases (stages 1 and 3 on the inverted clock, so a connection takes 3
// clock edges). Driven by pie_net_harness: random source/destination pairs
// with timing, data both ways and release; blocking; lowest-load requests;
// random concurrent traffic from all 256 PEs. Every mechanism must occur.
module tb_pie_in_network_256;
  logic clk;
  initial clk = 1'b0;
  always #50 clk = ~clk;

  logic done;
  int checks, failures, n_conn, n_turn, n_rel, n_blk, n_to, n_lb;

  pie_net_harness #(.STAGES(4), .TWO_PHASE(1'b1), .PAIRS(300), .TRAFFIC(1500)) h (
    .clk, .done, .checks, .failures, .n_conn, .n_turn, .n_release(n_rel),
    .n_blocked(n_blk), .n_timeout(n_to), .n_lb);

  task automatic report();
    $display("connections=%0d turns=%0d releases=%0d blocked=%0d timeouts=%0d lowest_load=%0d",
             n_conn, n_turn, n_rel, n_blk, n_to, n_lb);
    checks += 6;
    if (n_conn == 0) failures++;
    if (n_turn == 0) failures++;
    if (n_rel == 0) failures++;
    if (n_blk == 0) failures++;
    if (n_to == 0) failures++;
    if (n_lb == 0) failures++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
