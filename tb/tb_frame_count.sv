// Self-checking test of frame_count (8-bit increments, 28-bit total):
// frames of random length, one of them a single token, with random values
// and idle cycles. Each total is compared with the sum formed here, and
// total_valid must pulse exactly one clock after the last token of a frame.
module tb_frame_count;
  import dd_pkg::*;
  localparam int NFRAMES = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  ctl_t        in_ctl = '0;
  logic [7:0]  inc = 0;
  logic [27:0] total;
  logic        total_valid;

  frame_count #(.IN_W(8), .ACC_W(28)) dut (.*);

  typedef struct { longint sum; int cyc; } exp_t;
  exp_t q[$];

  task automatic check(string what, longint act, longint exp);
    checks++;
    if (act != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  initial begin
    int len;
    longint sum;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      len = (f == 2) ? 1 : $urandom_range(300, 1);
      sum = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_ctl = '0;
        while ($urandom_range(4) == 0) @(negedge clk);
        inc = 8'($urandom);
        if (f == 5) inc = 8'hff;
        sum += inc;
        in_ctl.valid = 1;
        in_ctl.eof = (i == len - 1);
        if (in_ctl.eof) q.push_back('{sum, cyc});
      end
      @(negedge clk) in_ctl = '0;
    end
    repeat (4) @(posedge clk);
    check("all frames out", q.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (total_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        check("unexpected total", 1, 0);
      end else begin
        e = q.pop_front();
        check("total", total, e.sum);
        check("latency", cyc - e.cyc, 1);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
