// Self-checking test of line_pixel_delay: a random pixel stream with random
// idle cycles passes through a small delay (16 words, 5-pixel lines); each
// output is compared with the token itself, the one before it and the one a
// line before, taken from a record of the input, with 0 before the stream
// has gone that far. The one-clock latency is checked on every token.
module tb_line_pixel_delay;
  import dd_pkg::*;
  localparam int W = 8, DEPTH = 16, L = 5, NTOK = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [$clog2(DEPTH+1)-1:0] line_len = 5'(L);
  ctl_t in_ctl = '0, out_ctl;
  logic [W-1:0] in_data = '0, out_cur, out_d1p, out_d1l;

  line_pixel_delay #(.W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] hist [NTOK];
  int sent = 0, got = 0, cyc = 0, in_cyc [NTOK];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s token %0d: got %0d expected %0d", what, got, act, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < NTOK) begin
      @(negedge clk);
      if ($urandom_range(3) != 0) begin
        in_ctl.valid = 1;
        in_data = W'($urandom);
        hist[sent] = in_data;
        in_cyc[sent] = cyc;
        sent++;
      end else begin
        in_ctl.valid = 0;
      end
    end
    @(negedge clk) in_ctl.valid = 0;
    repeat (5) @(posedge clk);
    check("token count", got, NTOK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      check("cur", int'(out_cur), int'(hist[got]));
      check("d1p", int'(out_d1p), got >= 1 ? int'(hist[got-1]) : 0);
      check("d1l", int'(out_d1l), got >= L ? int'(hist[got-L]) : 0);
      check("latency", cyc - in_cyc[got], 1);
      got++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
