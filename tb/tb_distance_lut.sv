// Self-checking test of distance_lut: four instances (k = 0..3 of four
// directions) see every direction code 0..255 with and without the edge
// flag. Expected weights are max(0, 255 - 4 d) for the circular distance d
// to round(k * 254 / 4), from the reference model, plus hand-worked values:
// 255 on the centre, 251 one code away across the 253/0 wrap, 0 a quarter
// turn away, and 0 for every non-edge pixel. Latency is one clock.
module tb_distance_lut;
  import dd_pkg::*;
  import dd_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t       in_ctl = '0;
  ctl_t       out_ctl [4];
  logic [7:0] direction = 0, edge_pix = 0;
  logic [7:0] wout [4];
  logic       out_edge [4];

  for (genvar k = 0; k < 4; k++) begin : g_k
    distance_lut #(.K(k), .NDIR(4)) dut (
      .clk, .rst_n, .in_ctl, .direction, .edge_pix,
      .out_ctl(out_ctl[k]), .weight(wout[k]), .out_edge(out_edge[k])
    );
  end

  typedef struct { int d, e, cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check("k0 centre", dd_ref_pkg::weight(0, 4, 0), 255);
    check("k0 across wrap", dd_ref_pkg::weight(0, 4, 253), 251);
    check("k1 centre", dd_ref_pkg::weight(1, 4, 64), 255);
    check("k2 quarter away", dd_ref_pkg::weight(2, 4, 0), 0);
    check("k3 centre", dd_ref_pkg::weight(3, 4, 191), 255);
    for (int e = 0; e < 2; e++)
      for (int d = 0; d < 256; d++) begin
        @(negedge clk);
        direction = 8'(d);
        edge_pix = e ? 8'd255 : 8'd0;
        in_ctl.valid = 1;
        q.push_back('{d, e, cyc});
        if (d % 5 == 0) begin
          @(negedge clk) in_ctl.valid = 0;
        end
      end
    @(negedge clk) in_ctl.valid = 0;
    repeat (4) @(posedge clk);
    check("all tokens out", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl[0].valid) begin
      exp_t x;
      x = q.pop_front();
      for (int k = 0; k < 4; k++)
        check($sformatf("weight k=%0d dir=%0d", k, x.d), int'(wout[k]),
              x.e ? dd_ref_pkg::weight(k, 4, x.d) : 0);
      check("edge flag", int'(out_edge[0]), x.e);
      check("latency", cyc - x.cyc, 1);
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
