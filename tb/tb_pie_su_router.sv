// tb_pie_su_router: random and directed check of the SU router.
// Reference: an input that requests and is not connected wants output
// addr digit (bits [3:2] at the middle stage of a three-stage network) or,
// with LB, the comparator's port (only if some output is free); each free
// output goes to the lowest-numbered input that wants it.
module tb_pie_su_router;
  localparam int unsigned N = 4, W = 8;

  logic [N-1:0]        req, lb, in_used, out_free;
  logic [N-1:0][W-1:0] addr;
  logic [1:0]          min_port;
  logic                any_free;
  logic [N-1:0]        grant_v;
  logic [N-1:0][1:0]   grant_src;
  int checks = 0, failures = 0;

  pie_su_router #(.STAGE(1), .STAGES(3), .N(N), .W(W)) dut (.*);

  task automatic check_one();
    logic [N-1:0]      e_v;
    logic [N-1:0][1:0] e_src;
    int                want;
    #1;
    e_v = '0; e_src = '0;
    for (int i = 0; i < N; i++) begin
      if (!req[i] || in_used[i] || (lb[i] && !any_free)) continue;
      want = lb[i] ? int'(min_port) : int'(addr[i][3:2]);
      if (out_free[want] && !e_v[want]) begin
        e_v[want] = 1'b1; e_src[want] = 2'(i);
      end
    end
    for (int o = 0; o < N; o++) begin
      checks++;
      if (grant_v[o] !== e_v[o] || (e_v[o] && grant_src[o] !== e_src[o])) begin
        failures++;
        $display("FAIL o=%0d req=%b lb=%b used=%b free=%b addr=%h got %b/%0d exp %b/%0d",
                 o, req, lb, in_used, out_free, addr, grant_v[o], grant_src[o], e_v[o], e_src[o]);
      end
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
    // Directed: inputs 0 and 2 both address output 1 (digit in bits 3:2).
    req = 4'b0101; lb = '0; in_used = '0; out_free = '1; min_port = 2'd3; any_free = 1'b1;
    addr = '{8'h00, 8'h04, 8'h00, 8'h34};
    check_one();
    if (!(grant_v[1] && grant_src[1] == 2'd0)) begin failures++; $display("FAIL priority"); end
    // Directed: lowest-load request goes to the comparator's port.
    req = 4'b1000; lb = 4'b1000;
    check_one();
    if (!(grant_v[3] && grant_src[3] == 2'd3)) begin failures++; $display("FAIL lb"); end
    for (int t = 0; t < 3000; t++) begin
      req = N'($urandom); lb = N'($urandom); in_used = N'($urandom & $urandom);
      out_free = N'($urandom | $urandom);
      for (int i = 0; i < N; i++) addr[i] = W'($urandom);
      min_port = 2'($urandom); any_free = |out_free;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
