// Self-checking test of edge_thresh: random magnitude pairs and thresholds,
// plus the cases where the larger magnitude equals the threshold, is one
// below it, and a threshold above the magnitude range. The expected pixel is
// 255 when max(adx, ady) >= threshold and 0 otherwise; latency is one clock.
module tb_edge_thresh;
  import dd_pkg::*;
  localparam int NTOK = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t in_ctl = '0, out_ctl;
  logic [4:0] adx = 0, ady = 0;
  logic [7:0] threshold = 0, edge_pix;

  edge_thresh dut (.*);

  typedef struct { int pix, cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  initial begin
    int x, y, t, m;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTOK; n++) begin
      @(negedge clk);
      x = $urandom_range(31); y = $urandom_range(31);
      m = x > y ? x : y;
      case (n % 4)
        0: t = m;
        1: t = m + 1;
        2: t = $urandom_range(255);
        default: t = $urandom_range(32);
      endcase
      adx = 5'(x); ady = 5'(y); threshold = 8'(t); in_ctl.valid = 1;
      q.push_back('{(m >= t) ? 255 : 0, cyc});
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
      check("edge", int'(edge_pix), e.pix);
      check("latency", cyc - e.cyc, 1);
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
