// Self-checking test of box_sum3x3 with 16-word line memories and 6-token
// lines: random 8-bit tokens (a run of 255 to reach the largest sum) with
// idle cycles. Each output is compared with the trailing 3x3 sum formed
// here from the recorded input, CH(i) = I(i)+I(i-1)+I(i-2) and
// CV(i) = CH(i)+CH(i-6)+CH(i-12), tokens before the stream counting as 0.
// The pipeline latency of four clocks is checked on every token.
module tb_box_sum3x3;
  import dd_pkg::*;
  localparam int DEPTH = 16, L = 6, NTOK = 600;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [4:0]  line_len = 5'(L);
  ctl_t        in_ctl = '0, out_ctl;
  logic [7:0]  in_data = 0;
  logic [11:0] sum;

  box_sum3x3 #(.W(8), .DEPTH(DEPTH)) dut (.*);

  int hist [NTOK], in_cyc [NTOK];
  int sent = 0, got = 0;

  function automatic int h(int i); return i >= 0 ? hist[i] : 0; endfunction
  function automatic int ch(int i); return h(i) + h(i - 1) + h(i - 2); endfunction

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
      in_ctl.valid = 0;
      if ($urandom_range(3) == 0) continue;
      in_data = (sent >= 100 && sent < 140) ? 8'd255 : 8'($urandom);
      hist[sent] = in_data;
      in_cyc[sent] = cyc;
      in_ctl.valid = 1;
      sent++;
    end
    @(negedge clk) in_ctl.valid = 0;
    repeat (8) @(posedge clk);
    check("token count", got, NTOK);
    check("largest sum reached", int'(ch(139) + ch(139 - L) + ch(139 - 2 * L)), 9 * 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_ctl.valid) begin
      check("sum", int'(sum), ch(got) + ch(got - L) + ch(got - 2 * L));
      check("latency", cyc - in_cyc[got], 4);
      got++;
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
