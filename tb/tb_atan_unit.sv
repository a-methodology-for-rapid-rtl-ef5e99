// Self-checking test of atan_unit: every one of the 1024 magnitude pairs is
// applied with both quadrant flags. The expected direction is computed here
// with real arithmetic, angle = round(atan2(ady, adx) * 254 / pi), folded to
// (254 - angle) mod 254 when the flag is set; a few values are also checked
// against constants (0, 90 and 45 degrees) and the latency of one clock.
module tb_atan_unit;
  import dd_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t in_ctl = '0, out_ctl;
  logic [4:0] adx = 0, ady = 0;
  logic       angle = 0;
  logic [7:0] direction;

  atan_unit dut (.*);

  typedef struct { int dir, cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  function automatic int ref_dir(int x, int y, int flag);
    int a;
    a = $rtoi($atan2(real'(y), real'(x)) * 254.0 / 3.141592653589793 + 0.5);
    if (flag != 0) a = (254 - a) % 254;
    return a;
  endfunction

  task automatic apply(int x, int y, int flag);
    @(negedge clk);
    adx = 5'(x); ady = 5'(y); angle = flag[0]; in_ctl.valid = 1;
    q.push_back('{ref_dir(x, y, flag), cyc});
    @(negedge clk) in_ctl.valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fixed points of the scale
    check("0 deg", ref_dir(31, 0, 0), 0);
    check("90 deg", ref_dir(0, 31, 0), 127);
    check("45 deg", ref_dir(20, 20, 0), 64);
    check("135 deg", ref_dir(20, 20, 1), 190);
    for (int flag = 0; flag < 2; flag++)
      for (int x = 0; x < 32; x++)
        for (int y = 0; y < 32; y++)
          apply(x, y, flag);
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
      check("direction", int'(direction), e.dir);
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
