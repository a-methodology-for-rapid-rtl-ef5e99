// Self-checking test of max_tree with four inputs: random values, all equal,
// and the maximum placed at each position in turn. The largest value and the
// lowest index holding it are worked out here; latency is one clock.
module tb_max_tree;
  import dd_pkg::*;
  localparam int NTOK = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t            in_ctl = '0, out_ctl;
  logic [3:0][7:0] in_pix = '0;
  logic [7:0]      max_pix;
  logic [2:0]      max_idx;

  max_tree #(.N(4)) dut (.*);

  typedef struct { int m, idx, cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  initial begin
    int m, idx;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NTOK; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) in_pix[i] = 8'($urandom);
      if (n % 10 == 0) for (int i = 0; i < 4; i++) in_pix[i] = 8'd77;
      if (n % 10 == 1) in_pix[n % 4] = 8'd255;
      m = 0; idx = 0;
      for (int i = 0; i < 4; i++) if (int'(in_pix[i]) > m || i == 0) begin
        if (i == 0 || int'(in_pix[i]) > m) begin m = in_pix[i]; idx = i; end
      end
      in_ctl.valid = 1;
      q.push_back('{m, idx, cyc});
    end
    @(negedge clk) in_ctl.valid = 0;
    repeat (3) @(posedge clk);
    check("all tokens out", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      exp_t e;
      e = q.pop_front();
      check("max", int'(max_pix), e.m);
      check("index", int'(max_idx), e.idx);
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
