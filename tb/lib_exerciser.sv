// Drives and checks every unit of derived_dfp_set through its ports, for use
// inside testbenches. Each unit gets its own random token stream with random
// gaps, and its output is taken with random back-pressure, so FIFOs fill and
// the handshake stalls. Expected outputs are computed here: add (mod 256),
// abs of a two's-complement byte, and, max, the unchanged stream for the
// FIFO, the stream shifted by 1 and by LINE tokens (0 before the start, eof
// kept in place) for the delays, and for the histogram the 256 per-frame
// counts, saturating at 511, after each frame. It reports how many checks
// failed and counts the mechanisms seen: stalls on input and output, a full
// 256-word FIFO and a saturated histogram bin.
module lib_exerciser
  import dfp_pkg::*;
#(
  parameter int LINE = 512,
  parameter int QUEUE = 256
) (
  input  logic       clk,
  output logic [6:0] a_valid,
  input  logic [6:0] a_ready,
  output tok_t [6:0] a_data,
  output logic [2:0] b_valid,
  input  logic [2:0] b_ready,
  output tok_t [2:0] b_data,
  input  logic [6:0] y_valid,
  output logic [6:0] y_ready,
  input  tok_t [6:0] y_data,
  output logic       h_valid,
  input  logic       h_ready,
  output tok_t       h_data,
  input  logic       hy_valid,
  output logic       hy_ready,
  input  logic [9:0] hy_data,
  output int         checks,
  output int         failures,
  output bit         done,
  output int         n_in_stall,
  output int         n_out_stall,
  output int         n_fifo_full,
  output int         n_hist_sat
);
  localparam int NT = LINE + 300;        // tokens per unit
  localparam int HF = 3;                 // histogram frames
  localparam int HL = 700;               // tokens per histogram frame

  int av [7][NT], bv [4][NT];
  bit ae [7][NT];
  int unit_done = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    n_in_stall = 0; n_out_stall = 0; n_fifo_full = 0; n_hist_sat = 0;
    a_valid = '0; b_valid = '0; y_ready = '0; h_valid = 0; hy_ready = 0;
    a_data = '0; b_data = '0; h_data = '0;
    for (int u = 0; u < 7; u++)
      for (int i = 0; i < NT; i++) begin
        av[u][i] = $urandom_range(255);
        ae[u][i] = (i % 37 == 36);
        if (u < 4) bv[u][i] = $urandom_range(255);
      end
  end

  task automatic chk(string what, int act, int exp);
    checks++;
    if (act != exp) begin
      failures++;
      if (failures < 20) $display("FAIL library %s: got %0d expected %0d", what, act, exp);
    end
  endtask

  function automatic int expect_y(int u, int i);
    int a, b;
    a = av[u][i];
    b = (u < 4) ? bv[u][i] : 0;
    case (u)
      0: return (a + b) % 256;
      1: return (a >= 128) ? 256 - a : a;
      2: return a & b;
      3: return (a > b) ? a : b;
      4: return a;
      5: return (i >= 1) ? av[u][i - 1] : 0;
      default: return (i >= LINE) ? av[u][i - LINE] : 0;
    endcase
  endfunction

  for (genvar u = 0; u < 7; u++) begin : g_unit
    // input a; unit 4 (the deep FIFO) is filled before anything is read
    initial begin
      #1;
      repeat (5) @(negedge clk);
      for (int i = 0; i < NT; i++) begin
        @(negedge clk);
        a_valid[u] = 0;
        if (u != 4) while ($urandom_range(3) == 0) @(negedge clk);
        a_valid[u] = 1;
        a_data[u] = '{eof: ae[u][i], data: 8'(av[u][i])};
        #1;
        while (!a_ready[u]) begin
          n_in_stall++;
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk) a_valid[u] = 0;
    end
    // input b of the binary operators
    if (u == 0 || u == 2 || u == 3) begin : g_b
      localparam int BI = (u == 0) ? 0 : u - 1;
      initial begin
        #1;
        repeat (5) @(negedge clk);
        for (int i = 0; i < NT; i++) begin
          @(negedge clk);
          b_valid[BI] = 0;
          while ($urandom_range(2) == 0) @(negedge clk);
          b_valid[BI] = 1;
          b_data[BI] = '{eof: 1'b0, data: 8'(bv[u][i])};
          #1;
          while (!b_ready[BI]) @(negedge clk);
        end
        @(negedge clk) b_valid[BI] = 0;
      end
    end
    // output y
    initial begin
      int got;
      got = 0;
      #1;
      if (u == 4) begin
        // let the 256-word FIFO fill up before reading it
        wait (a_valid[4] === 1'b1);
        repeat (QUEUE + 40) @(negedge clk);
      end
      while (got < NT) begin
        @(negedge clk);
        y_ready[u] = ($urandom_range(4) != 0);
        #1;
        if (y_valid[u] && !y_ready[u]) n_out_stall++;
        if (u == 4 && !a_ready[4] && a_valid[4]) n_fifo_full++;
        if (y_valid[u] && y_ready[u]) begin
          chk($sformatf("unit %0d token %0d data", u, got), int'(y_data[u].data), expect_y(u, got));
          chk($sformatf("unit %0d token %0d eof", u, got), int'(y_data[u].eof), int'(ae[u][got]));
          got++;
        end
      end
      @(negedge clk) y_ready[u] = 0;
      unit_done++;
    end
  end

  // histogram
  int hv [HF][HL];
  initial begin
    for (int f = 0; f < HF; f++)
      for (int i = 0; i < HL; i++)
        hv[f][i] = (f == 1 && i < 600) ? 7 : $urandom_range(255);
  end

  initial begin
    #1;
    repeat (5) @(negedge clk);
    for (int f = 0; f < HF; f++)
      for (int i = 0; i < HL; i++) begin
        @(negedge clk);
        h_valid = 0;
        while ($urandom_range(5) == 0) @(negedge clk);
        h_valid = 1;
        h_data = '{eof: (i == HL - 1), data: 8'(hv[f][i])};
        #1;
        while (!h_ready) @(negedge clk);
      end
    @(negedge clk) h_valid = 0;
  end

  initial begin
    int cnt [256];
    int bin;
    #1;
    for (int f = 0; f < HF; f++) begin
      foreach (cnt[v]) cnt[v] = 0;
      for (int i = 0; i < HL; i++) cnt[hv[f][i]]++;
      bin = 0;
      while (bin < 256) begin
        @(negedge clk);
        hy_ready = ($urandom_range(3) != 0);
        #1;
        if (hy_valid && hy_ready) begin
          chk($sformatf("histogram frame %0d bin %0d", f, bin), int'(hy_data[8:0]),
              cnt[bin] > 511 ? 511 : cnt[bin]);
          chk("histogram eof", int'(hy_data[9]), int'(bin == 255));
          if (hy_data[8:0] == 9'd511) n_hist_sat++;
          bin++;
        end
      end
    end
    @(negedge clk) hy_ready = 0;
    wait (unit_done == 7);
    done = 1;
  end
endmodule
