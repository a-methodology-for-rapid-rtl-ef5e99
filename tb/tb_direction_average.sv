// Self-checking test of direction_average: pairs (S, N) are delivered as at
// the end of a frame, N first or in the same clock as S. Cases: no edges
// (N = 0), every edge at full weight (S = 255 N), S = 0, exact and inexact
// quotients and random values. A = floor(S / N) and INV(A) are computed here
// and compared; res_valid must follow s_valid after 9 clocks and busy must be
// high in between.
module tb_direction_average;
  import dd_pkg::*;
  import dd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [27:0] s_total = 0;
  logic        s_valid = 0, n_valid = 0;
  logic [19:0] n_total = 0;
  logic [7:0]  avg, inv;
  logic        res_valid, busy;

  direction_average dut (.*);

  task automatic check(string what, longint act, longint exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  task automatic run(longint s, int n, bit same_cycle);
    int start, a;
    @(negedge clk);
    n_total = 20'(n); n_valid = 1;
    if (!same_cycle) begin
      @(negedge clk) n_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    s_total = 28'(s); s_valid = 1;
    start = cyc;
    @(negedge clk) s_valid = 0; n_valid = 0;
    check("busy while dividing", busy, 1);
    while (!res_valid) @(posedge clk) #1;
    a = (n == 0) ? 0 : int'(s / n);
    check($sformatf("avg %0d/%0d", s, n), avg, a);
    check($sformatf("inv of %0d", a), inv, inv_of(a));
    check("latency", cyc - start, 9);
  endtask

  initial begin
    longint s;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    #1 check("inv after reset", inv, 255);
    run(1234, 0, 0);
    run(255 * 439296, 439296, 0);
    run(0, 77, 1);
    run(100 * 37, 37, 0);
    run(100 * 37 + 36, 37, 1);
    run(5, 3, 0);
    for (int i = 0; i < 60; i++) begin
      n = $urandom_range(500000, 1);
      s = longint'(n) * $urandom_range(255) + $urandom_range(n - 1);
      run(s, n, i % 2);
    end
    check("inv table spot 16", inv_of(16), 255);
    check("inv table spot 100", inv_of(100), 41);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
