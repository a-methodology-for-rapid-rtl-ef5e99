// Self-checking test of direction_macro for direction k = 1 of 4, with
// 16-word line memories and 5-token lines. Five frames of direction/edge
// tokens are applied: random, one dominated by direction k (so its average
// is high and later contributions small), one with no edge at all (average
// 0), and random again. The edge count of each frame is delivered one clock
// after its last token, as the extraction macro does. Every contribution and
// every frame average is compared with the reference model, which applies
// the statistics of frame f to frame f+1; the 6-clock latency is checked.
module tb_direction_macro;
  import dd_pkg::*;
  import dd_ref_pkg::*;
  localparam int K = 1, DEPTH = 16, L = 5, H = 6, NF = 5;
  localparam int FL = L * H, NTOK = FL * NF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [4:0]  line_len = 5'(L);
  ctl_t        in_ctl = '0, out_ctl;
  logic [7:0]  direction = 0, edge_pix = 0, contrib, avg;
  logic [19:0] edge_count = 0;
  logic        edge_count_valid = 0, avg_valid;

  direction_macro #(.K(K), .NDIR(4), .DEPTH(DEPTH)) dut (.*);

  int dirs[], edgs[], eofs[], rcon[], ravg[], in_cyc[];
  int got = 0, frames_out = 0, nonzero = 0;

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s (token %0d): got %0d expected %0d", what, got, act, exp);
    end
  endtask

  initial begin
    int n;
    dirs = new[NTOK]; edgs = new[NTOK]; eofs = new[NF]; in_cyc = new[NTOK];
    for (int t = 0; t < NTOK; t++) begin
      int f;
      f = t / FL;
      dirs[t] = $urandom_range(253);
      edgs[t] = ($urandom_range(9) < 6) ? 255 : 0;
      if (f == 1) dirs[t] = 60 + $urandom_range(8);
      if (f == 2) edgs[t] = 0;
    end
    for (int f = 0; f < NF; f++) eofs[f] = (f + 1) * FL - 1;
    dd_ref_pkg::dir_macro(dirs, edgs, eofs, L, K, 4, rcon, ravg);
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < NTOK; t++) begin
      @(negedge clk);
      in_ctl = '0; edge_count_valid = 0;
      while ($urandom_range(4) == 0) @(negedge clk);
      direction = 8'(dirs[t]);
      edge_pix = 8'(edgs[t]);
      n += (edgs[t] != 0);
      in_ctl.valid = 1;
      in_ctl.eof = (t % FL == FL - 1);
      in_cyc[t] = cyc;
      if (in_ctl.eof) begin
        @(negedge clk);
        in_ctl = '0;
        edge_count = 20'(n); edge_count_valid = 1; n = 0;
        @(negedge clk) edge_count_valid = 0;
        repeat (16) @(negedge clk);
      end
    end
    @(negedge clk) in_ctl = '0;
    repeat (12) @(posedge clk);
    check("tokens out", got, NTOK);
    check("frame averages out", frames_out, NF);
    check("some contributions non-zero", int'(nonzero > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      check("contrib", int'(contrib), rcon[got]);
      check("latency", cyc - in_cyc[got], 6);
      nonzero += (contrib != 0);
      got++;
    end
    if (avg_valid) begin
      if (frames_out < NF) check($sformatf("average of frame %0d", frames_out), int'(avg), ravg[frames_out]);
      frames_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
