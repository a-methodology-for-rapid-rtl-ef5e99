// Self-checking test of df_fifo at depth 2 (the operator FIFO) and depth 5.
// Random writes and random reads run against a queue model; every clock
// checks the output word, out_valid and in_ready against the model, and the
// test requires that each FIFO was seen both full and empty. A streaming
// phase checks one word per clock through the depth-2 FIFO.
module tb_df_fifo;
  localparam int W = 9;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;

  task automatic chk(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  for (genvar k = 0; k < 2; k++) begin : g_f
    localparam int DEPTH = (k == 0) ? 2 : 5;
    logic in_valid = 0, in_ready, out_valid, out_ready = 0;
    logic [W-1:0] in_data = '0, out_data;
    int n_full = 0, n_empty = 0;

    df_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

    initial begin
      logic [W-1:0] q[$];
      int in_rate, out_rate, nstream;
      bit push, pop;
      push = 0;
      #1;
      wait (rst_n);
      for (int cyc = 0; cyc < 3000; cyc++) begin
        // change the traffic mix every 200 clocks so the FIFO fills and drains
        in_rate = (cyc / 200) % 3;
        out_rate = (cyc / 300) % 3;
        if (cyc >= 2800) begin in_rate = 3; out_rate = 3; end
        @(negedge clk);
        // a new word is offered only once the previous one was taken
        if (!in_valid || push) begin
          in_valid = ($urandom_range(3) < in_rate + 1);
          in_data = W'($urandom);
        end
        out_ready = ($urandom_range(3) < out_rate + 1);
        #1;
        chk($sformatf("depth %0d in_ready", DEPTH), int'(in_ready), int'(q.size() < DEPTH));
        chk($sformatf("depth %0d out_valid", DEPTH), int'(out_valid), int'(q.size() > 0));
        if (q.size() == DEPTH) n_full++;
        if (q.size() == 0) n_empty++;
        push = in_valid && in_ready;
        pop = out_valid && out_ready;
        if (pop) begin
          chk($sformatf("depth %0d data", DEPTH), int'(out_data), int'(q[0]));
          void'(q.pop_front());
        end
        if (push) q.push_back(in_data);
        if (cyc >= 2900 && DEPTH == 2) begin
          chk("stream one word per clock", int'(pop), 1);
        end
      end
      checks++;
      if (n_full == 0 || n_empty == 0) begin
        failures++;
        $display("FAIL depth %0d never full or never empty", DEPTH);
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
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
