// Self-checking test of derived_delay with D = 1 and D = 5. Random tokens
// arrive with random gaps and leave under random back-pressure. Output token
// i must carry the data of input token i-D (0 for the first D tokens after
// reset) and the eof flag of input token i. A final streaming phase checks
// one token per clock.
module tb_derived_delay;
  import dfp_pkg::*;

  localparam int NT = 300;
  localparam int NS = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;
  bit phase2 = 0;

  task automatic chk(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  for (genvar k = 0; k < 2; k++) begin : g_d
    localparam int D = (k == 0) ? 1 : 5;
    logic a_valid = 0, a_ready, y_valid, y_ready = 0;
    tok_t a_data = '0, y_data;
    int av [NT + NS];
    bit ae [NT + NS];

    derived_delay #(.D(D)) dut (.*);

    initial begin
      for (int i = 0; i < NT + NS; i++) begin
        av[i] = $urandom_range(1, 255);
        ae[i] = ($urandom_range(7) == 0);
      end
    end

    initial begin
      #1;
      wait (rst_n);
      for (int i = 0; i < NT + NS; i++) begin
        @(negedge clk);
        a_valid = 0;
        if (i < NT) while ($urandom_range(2) == 0) @(negedge clk);
        else if (i == NT) wait (phase2);
        a_valid = 1;
        a_data = '{eof: ae[i], data: 8'(av[i])};
        #1;
        while (!a_ready) @(negedge clk);
      end
      @(negedge clk) a_valid = 0;
    end

    initial begin
      int got, n2, t_first, t_last;
      got = 0; n2 = 0;
      #1;
      wait (rst_n);
      while (got < NT + NS) begin
        @(negedge clk);
        y_ready = (got >= NT) ? 1'b1 : ($urandom_range(3) != 0);
        #1;
        if (y_valid && y_ready) begin
          chk($sformatf("D=%0d token %0d", D, got), int'(y_data.data), (got >= D) ? av[got - D] : 0);
          chk($sformatf("D=%0d eof %0d", D, got), int'(y_data.eof), int'(ae[got]));
          if (got >= NT) begin
            if (n2 == 0) t_first = $time;
            t_last = $time;
            n2++;
          end
          got++;
          if (got == NT) wait (phase2);
        end
      end
      chk($sformatf("D=%0d throughput", D), (t_last - t_first) / 10, NS - 1);
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * NT) @(posedge clk);
    @(negedge clk) phase2 = 1;
    wait (finished == 2);
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
