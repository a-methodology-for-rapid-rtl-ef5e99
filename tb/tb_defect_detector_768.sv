// The defect detector on the image size of the original application,
// 572 lines of 768 pixels. Lines that long do not fit the 512-word on-chip
// line memory, so the detector is built here with 1024-word line memories,
// standing for the external FIFO such lines require. Two mesh frames and
// one black frame; the checks are those of the full-size test, including
// that the patch stands out on the second mesh frame.
module tb_defect_detector_768;
  import dd_pkg::*;
  import dd_ref_pkg::*;
  localparam int L = 768, H = 572, NF = 3, THR = 3, PERIOD = 16, GAP = 20, NOISE = 12;
  localparam int FL = L * H, NTOK = FL * NF;
  localparam int WATCHDOG = 4 * NTOK + 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [10:0]      line_len = 11'(L);
  logic [7:0]       threshold = 8'(THR);
  ctl_t             in_ctl = '0, out_ctl;
  logic [7:0]       picture = 0, defect;
  logic [2:0]       dominant;
  logic [19:0]      edge_count;
  logic             edge_count_valid;
  logic [3:0][7:0]  dir_avg;

  defect_detector #(.DEPTH(1024)) dut (.*);

  int pix[], rdir[], redg[], eofs[], in_cyc[];
  int rcon[4][], ravg[4][], rmax[], ridx[], nref[];
  int got = 0, frames_out = 0;
  // mechanism counters
  int n_edge = 0, n_flat = 0, n_sat = 0, n_stats = 0, n_idle = 0, n_noedge_frame = 0;
  int n_win[4] = '{0, 0, 0, 0};
  // detection quality on the last mesh frame: bright outputs in the patch
  int patch_hi = 0, patch_n = 0, mesh_hi = 0, mesh_n = 0;

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s (token %0d): got %0d expected %0d", what, got, act, exp);
    end
  endtask

  initial begin
    pix = new[NTOK]; in_cyc = new[NTOK]; eofs = new[NF]; nref = new[NF];
    rmax = new[NTOK]; ridx = new[NTOK];
    for (int t = 0; t < NTOK; t++)
      pix[t] = (t / FL == NF - 1) ? 0
             : mesh_pixel((t % FL) % L, (t % FL) / L, L, H, PERIOD, NOISE);
    for (int f = 0; f < NF; f++) eofs[f] = (f + 1) * FL - 1;
    extract(pix, L, THR, rdir, redg);
    for (int k = 0; k < 4; k++) begin
      int c[], a[];
      dir_macro(rdir, redg, eofs, L, k, 4, c, a);
      rcon[k] = c;
      ravg[k] = a;
    end
    for (int t = 0; t < NTOK; t++) begin
      rmax[t] = rcon[0][t]; ridx[t] = 0;
      for (int k = 1; k < 4; k++) if (rcon[k][t] > rmax[t]) begin rmax[t] = rcon[k][t]; ridx[t] = k; end
    end
    for (int f = 0; f < NF; f++) begin
      nref[f] = 0;
      for (int i = 0; i < FL; i++) nref[f] += (redg[f*FL + i] != 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTOK; t++) begin
      @(negedge clk);
      in_ctl = '0;
      while (NOISE > 0 && $urandom_range(15) == 0) begin
        n_idle++;
        @(negedge clk);
      end
      picture = 8'(pix[t]);
      in_ctl.valid = 1;
      in_ctl.eof = (t % FL == FL - 1);
      in_cyc[t] = cyc;
      if (in_ctl.eof) begin
        @(negedge clk) in_ctl = '0;
        repeat (GAP) @(negedge clk);
        // statistics of the frame just finished are in place now
        for (int k = 0; k < 4; k++)
          check($sformatf("average k=%0d frame %0d", k, t / FL), int'(dir_avg[k]), ravg[k][t / FL]);
        n_stats++;
        if (nref[t / FL] == 0) n_noedge_frame++;
      end
    end
    @(negedge clk) in_ctl = '0;
    repeat (20) @(posedge clk);
    check("pixels out", got, NTOK);
    check("edge counts out", frames_out, NF);
    // every mechanism must have happened
    check("edge pixels seen", int'(n_edge > 0), 1);
    check("non-edge pixels seen", int'(n_flat > 0), 1);
    for (int k = 0; k < 4; k++) check($sformatf("direction %0d dominant somewhere", k), int'(n_win[k] > 0), 1);
    check("saturated output seen", int'(n_sat > 0), 1);
    check("statistics renewed", int'(n_stats >= 2), 1);
    check("frame without edges", int'(n_noedge_frame > 0 || NOISE == 0), 1);
    check("idle input cycles", int'(n_idle > 0 || NOISE == 0), 1);
    // the defect must stand out: over a third of the patch bright, and a
    // bright fraction at least ten times that of the rest of the picture
    check("patch detected", int'(patch_hi * 3 > patch_n), 1);
    check("patch stands out", int'(longint'(patch_hi) * mesh_n > 10 * longint'(mesh_hi) * patch_n), 1);
    $display("detection: patch %0d of %0d bright, rest %0d of %0d", patch_hi, patch_n, mesh_hi, mesh_n);
    $display("mechanisms: edge=%0d flat=%0d saturated=%0d stats=%0d idle=%0d wins=%0d/%0d/%0d/%0d",
             n_edge, n_flat, n_sat, n_stats, n_idle, n_win[0], n_win[1], n_win[2], n_win[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      check("defect", int'(defect), rmax[got]);
      if (rmax[got] > 0) begin
        check("dominant", int'(dominant), ridx[got]);
        n_win[ridx[got]]++;
      end
      check("latency", cyc - in_cyc[got], 10);
      if (redg[got] != 0) n_edge++; else n_flat++;
      if (rmax[got] == 255) n_sat++;
      if (got / FL == NF - 2) begin
        if (in_patch((got % FL) % L, (got % FL) / L, L, H)) begin
          patch_n++; patch_hi += (defect >= 128);
        end else begin
          mesh_n++; mesh_hi += (defect >= 128);
        end
      end
      got++;
    end
    if (edge_count_valid) begin
      if (frames_out < NF) check("edge count", int'(edge_count), nref[frames_out]);
      frames_out++;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
