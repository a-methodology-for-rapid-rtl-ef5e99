// Self-checking test of derived_histogram. Four frames are sent: 500 random
// values; 1000 values of which 700 are the same value (that count must stop
// at 511); a frame of a single token; and 300 random values sent at full
// rate. After each frame the 256 counts must come out in value order, with
// eof on the last. Random gaps and back-pressure are used on the first three
// frames; on the last, input must be taken one token per clock and the 256
// counts must leave one per clock.
module tb_derived_histogram;
  import dfp_pkg::*;

  localparam int NF = 4;
  localparam int FL [NF] = '{500, 1000, 1, 300};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       a_valid = 0, a_ready, y_valid, y_ready = 0;
  tok_t       a_data = '0;
  logic [9:0] y_data;

  derived_histogram dut (.*);

  int checks = 0, failures = 0, n_sat = 0;
  int v [NF][1000];
  int t_in0, t_in1, t_out0, t_out1;
  int dumped = 0;

  task automatic chk(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < FL[f]; i++)
        v[f][i] = (f == 1 && i % 10 < 7) ? 9 : $urandom_range(255);
  end

  initial begin
    #1;
    wait (rst_n);
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < FL[f]; i++) begin
        // the full-rate frame starts once the previous counts are out
        if (f == NF - 1 && i == 0) begin
          @(negedge clk) a_valid = 0;
          wait (dumped == NF - 1);
        end
        @(negedge clk);
        a_valid = 0;
        if (f < NF - 1) while ($urandom_range(3) == 0) @(negedge clk);
        a_valid = 1;
        a_data = '{eof: (i == FL[f] - 1), data: 8'(v[f][i])};
        #1;
        while (!a_ready) @(negedge clk);
        if (f == NF - 1 && i == 0) t_in0 = $time;
        if (f == NF - 1 && i == FL[f] - 1) t_in1 = $time;
      end
    @(negedge clk) a_valid = 0;
  end

  initial begin
    int cnt [256];
    int bin, exp;
    #1;
    wait (rst_n);
    for (int f = 0; f < NF; f++) begin
      foreach (cnt[b]) cnt[b] = 0;
      for (int i = 0; i < FL[f]; i++) cnt[v[f][i]]++;
      bin = 0;
      while (bin < 256) begin
        @(negedge clk);
        y_ready = (f == NF - 1) ? 1'b1 : ($urandom_range(3) != 0);
        #1;
        if (y_valid && y_ready) begin
          exp = cnt[bin] > 511 ? 511 : cnt[bin];
          chk($sformatf("frame %0d bin %0d", f, bin), int'(y_data[8:0]), exp);
          chk($sformatf("frame %0d eof %0d", f, bin), int'(y_data[9]), int'(bin == 255));
          if (exp == 511) n_sat++;
          if (f == NF - 1 && bin == 0) t_out0 = $time;
          if (f == NF - 1 && bin == 255) t_out1 = $time;
          bin++;
        end
      end
      dumped++;
    end
    chk("input one token per clock", (t_in1 - t_in0) / 10, FL[NF - 1] - 1);
    chk("counts one per clock", (t_out1 - t_out0) / 10, 255);
    chk("saturated bin seen", n_sat, 1);
    repeat (5) @(negedge clk);
    chk("idle after dump", int'(y_valid), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
