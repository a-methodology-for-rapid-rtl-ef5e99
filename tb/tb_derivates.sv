// Self-checking test of derivates: random and corner-case pixel triples
// (equal pixels, 0 against 255) are applied with idle cycles in between;
// the scaled magnitudes |a-b| >> 3 and the sign-difference flag are worked
// out here from the integers and compared, together with the one-clock latency.
module tb_derivates;
  import dd_pkg::*;
  localparam int NTOK = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t in_ctl = '0, out_ctl;
  logic [7:0] cur = 0, d1p = 0, d1l = 0;
  logic [4:0] adx, ady;
  logic       angle;

  derivates dut (.*);

  typedef struct { int adx, ady, angle, cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  function automatic int absi(int v); return v < 0 ? -v : v; endfunction

  initial begin
    int a, b, c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTOK; n++) begin
      @(negedge clk);
      in_ctl.valid = 0;
      if (n % 7 == 3) continue;
      case (n % 5)
        0: begin a = 255; b = 0; c = 255; end
        1: begin a = $urandom_range(255); b = a; c = 0; end
        default: begin a = $urandom_range(255); b = $urandom_range(255); c = $urandom_range(255); end
      endcase
      if (n % 11 == 0) begin a = 0; b = 255; c = 8; end
      cur = 8'(a); d1p = 8'(b); d1l = 8'(c);
      in_ctl.valid = 1;
      q.push_back('{absi(a - b) / 8, absi(a - c) / 8, int'((a < b) != (a < c)), cyc});
    end
    @(negedge clk) in_ctl.valid = 0;
    repeat (4) @(posedge clk);
    check("all tokens out", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      exp_t e;
      e = q.pop_front();
      check("adx", int'(adx), e.adx);
      check("ady", int'(ady), e.ady);
      check("angle", int'(angle), e.angle);
      check("latency", cyc - e.cyc, 1);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
