// tb_pie_load_comparator: random and directed check of the load comparator.
// The expected minimum, its port (lowest port on a tie) and the "any free"
// flag are recomputed here from the stimulus. It includes the case of the
// load-balancing figure: loads 20, busy, 8, 1 give port 3 and value 1; with
// port 3 taken the comparator moves to port 2 and value 8.
module tb_pie_load_comparator;
  localparam int unsigned N = 4, W = 8;

  logic [N-1:0][W-1:0] load;
  logic [N-1:0]        free;
  logic [W-1:0]        min_load;
  logic [1:0]          min_port;
  logic                any_free;
  int checks = 0, failures = 0;

  pie_load_comparator #(.N(N), .W(W)) dut (.*);

  task automatic check_one();
    logic [W-1:0] e_load = '1;
    int           e_port = 0;
    logic         e_any  = 1'b0;
    #1;
    for (int p = 0; p < N; p++)
      if (free[p] && (!e_any || load[p] < e_load)) begin
        e_load = load[p]; e_port = p; e_any = 1'b1;
      end
    checks++;
    if (any_free !== e_any || (e_any && (min_load !== e_load || min_port !== 2'(e_port)))
        || (!e_any && min_load !== '1)) begin
      failures++;
      $display("FAIL load=%h free=%b got %0d/%0d/%b exp %0d/%0d/%b",
               load, free, min_load, min_port, any_free, e_load, e_port, e_any);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Load-balancing example: 20, communicating, 8, 1.
    load = {8'd1, 8'd8, 8'd0, 8'd20}; free = 4'b1101;
    check_one();
    if (min_port != 2'd3 || min_load != 8'd1) begin failures++; $display("FAIL fig example 1"); end
    free = 4'b0101;
    check_one();
    if (min_port != 2'd2 || min_load != 8'd8) begin failures++; $display("FAIL fig example 2"); end
    free = 4'b0000;
    check_one();
    for (int t = 0; t < 2000; t++) begin
      for (int p = 0; p < N; p++) load[p] = W'($urandom_range(0, (t % 3 == 0) ? 3 : 255));
      free = N'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
