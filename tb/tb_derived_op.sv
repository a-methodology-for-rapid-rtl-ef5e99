// Self-checking test of derived_op: one instance per operation (add, abs,
// and, max). Phase 1 sends random tokens with random gaps on both inputs and
// random back-pressure on the output, and compares every result and eof flag
// with the expected value. Phase 2 keeps every input valid and the output
// ready, and checks that one result leaves per clock and that the first
// result appears 2 clocks after its operands are taken.
module tb_derived_op;
  import dfp_pkg::*;

  localparam int NT = 400;
  localparam int NS = 64;      // tokens of the streaming phase

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0, n_stall = 0;
  bit phase2 = 0;

  task automatic chk(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  function automatic int f(int op, int a, int b);
    case (op)
      0: return (a + b) % 256;
      1: return (a >= 128) ? 256 - a : a;
      2: return a & b;
      default: return (a > b) ? a : b;
    endcase
  endfunction

  for (genvar k = 0; k < 4; k++) begin : g_op
    localparam op_e OP = op_e'(k);
    logic a_valid = 0, a_ready, b_valid = 0, b_ready, y_valid, y_ready = 0;
    tok_t a_data = '0, b_data = '0, y_data;
    int av [NT + NS], bv [NT + NS];
    bit ae [NT + NS];

    derived_op #(.OP(OP)) dut (.*);

    initial begin
      for (int i = 0; i < NT + NS; i++) begin
        av[i] = $urandom_range(255);
        bv[i] = $urandom_range(255);
        ae[i] = ($urandom_range(9) == 0);
      end
      av[0] = 128; av[1] = 255; av[2] = 0; bv[0] = 128; bv[1] = 1; bv[2] = 255;
    end

    initial begin
      #1;
      wait (rst_n);
      for (int i = 0; i < NT + NS; i++) begin
        @(negedge clk);
        a_valid = 0;
        if (i < NT) while ($urandom_range(3) == 0) @(negedge clk);
        else if (i == NT) wait (phase2);
        a_valid = 1;
        a_data = '{eof: ae[i], data: 8'(av[i])};
        #1;
        while (!a_ready) begin
          n_stall++;
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk) a_valid = 0;
    end

    if (k != 1) begin : g_b
      initial begin
        #1;
        wait (rst_n);
        for (int i = 0; i < NT + NS; i++) begin
          @(negedge clk);
          b_valid = 0;
          if (i < NT) while ($urandom_range(3) == 0) @(negedge clk);
          else if (i == NT) wait (phase2);
          b_valid = 1;
          b_data = '{eof: 1'b0, data: 8'(bv[i])};
          #1;
          while (!b_ready) @(negedge clk);
        end
        @(negedge clk) b_valid = 0;
      end
    end else begin : g_nob
      initial begin
        #1;
        wait (rst_n);
        repeat (3) @(negedge clk);
        chk("abs unit b_ready", int'(b_ready), 0);
      end
    end

    initial begin
      int got, t0, first;
      got = 0;
      #1;
      wait (rst_n);
      while (got < NT + NS) begin
        @(negedge clk);
        y_ready = (got >= NT) ? 1'b1 : ($urandom_range(3) != 0);
        #1;
        if (y_valid && y_ready) begin
          chk($sformatf("op %0d token %0d", k, got), int'(y_data.data),
              f(k, av[got], (k == 1) ? 0 : bv[got]));
          chk($sformatf("op %0d eof %0d", k, got), int'(y_data.eof), int'(ae[got]));
          got++;
          if (got == NT) wait (phase2);
        end
      end
    end

    // phase 2 timing: the first operands are offered at the negedge where
    // phase2 rises and taken at the next posedge
    initial begin
      int t_in, t_first, t_last, n;
      #1;
      wait (phase2);
      @(posedge clk);
      t_in = $time;
      n = 0;
      while (n < NS) begin
        @(negedge clk);
        if (y_valid && y_ready) begin
          if (n == 0) t_first = $time;
          n++;
          t_last = $time;
        end
      end
      chk($sformatf("op %0d latency", k), (t_first - t_in + 5) / 10, 2);
      chk($sformatf("op %0d throughput", k), (t_last - t_first) / 10, NS - 1);
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: 400 tokens at about 3 in 4 clocks fit well within 1600 clocks
    repeat (4 * NT) @(posedge clk);
    @(negedge clk) phase2 = 1;
    wait (finished == 4);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL inputs never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
