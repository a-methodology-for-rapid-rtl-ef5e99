// Self-checking test of extraction_macro at its full 512-word line memory,
// run with 24-pixel lines: three frames of 16 lines (a mesh picture, a
// random one and a flat one, whose only edges come from the line
// above reaching back into the previous frame), with idle cycles inside lines and
// between frames. Direction and edge of every pixel are compared with the
// reference model, the edge count of every frame with the model's count, and
// the latencies (3 clocks for pixels, count one clock after the last pixel
// leaves) are checked.
module tb_extraction_macro;
  import dd_pkg::*;
  import dd_ref_pkg::*;
  localparam int L = 24, H = 16, NF = 3, THR = 3;
  localparam int NTOK = L * H * NF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [9:0]  line_len = 10'(L);
  logic [7:0]  threshold = 8'(THR);
  ctl_t        in_ctl = '0, out_ctl;
  logic [7:0]  image = 0, direction, edge_pix;
  logic [19:0] edge_count;
  logic        edge_count_valid;

  extraction_macro dut (.*);

  int pix[], rdir[], redg[], in_cyc[], eof_cyc[NF], nref[NF];
  int got = 0, frames_out = 0;

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s (token %0d): got %0d expected %0d", what, got, act, exp);
    end
  endtask

  initial begin
    pix = new[NTOK];
    in_cyc = new[NTOK];
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < L * H; i++)
        case (f)
          0: pix[f*L*H + i] = mesh_pixel(i % L, i / L, L, H, 6, 10);
          1: pix[f*L*H + i] = $urandom_range(255);
          default: pix[f*L*H + i] = 90;
        endcase
    extract(pix, L, THR, rdir, redg);
    for (int f = 0; f < NF; f++) begin
      nref[f] = 0;
      for (int i = 0; i < L * H; i++) nref[f] += (redg[f*L*H + i] != 0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTOK; t++) begin
      @(negedge clk);
      in_ctl = '0;
      while ($urandom_range(5) == 0) @(negedge clk);
      image = 8'(pix[t]);
      in_ctl.valid = 1;
      in_ctl.eof = ((t + 1) % (L * H) == 0);
      in_cyc[t] = cyc;
      if (in_ctl.eof) eof_cyc[t / (L * H)] = cyc;
      if (in_ctl.eof) begin
        @(negedge clk) in_ctl = '0;
        repeat (20) @(negedge clk);
      end
    end
    @(negedge clk) in_ctl = '0;
    repeat (10) @(posedge clk);
    check("pixels out", got, NTOK);
    check("frames out", frames_out, NF);
    check("flat frame: edges only where the previous frame is in reach", int'(nref[2] <= L + 1), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      check("edge", int'(edge_pix), redg[got]);
      check("direction", int'(direction), rdir[got]);
      check("eof marker", int'(out_ctl.eof), int'((got + 1) % (L * H) == 0));
      check("latency", cyc - in_cyc[got], 3);
      got++;
    end
    if (edge_count_valid) begin
      if (frames_out < NF) begin
        check("edge count", int'(edge_count), nref[frames_out]);
        check("count latency", cyc - eof_cyc[frames_out], 4);
      end
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
