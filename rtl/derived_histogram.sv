// Derived histogram operator: counts how often each 8-bit value occurs in a
// frame and, when the frame ends, sends the 256 counts out in value order.
//
// The counts live in a 256 x CW memory (CW = 9, the width of the original
// processor's 256 x 9 RAM); a count stops at 2**CW - 1 instead of wrapping.
// After reset the memory is cleared in 256 clocks (in_ready low). Counting
// takes one token per clock. The token carrying eof is counted, then the
// operator stops taking input and sends 256 tokens {eof, count}, eof set on
// the last, clearing each word as it is read, one per clock while the output
// has room, and then takes input again. Input and output each pass through a
// two-word FIFO, as in the other derived operators. That the histogram is
// per frame, the saturation and the read-out order are this design's choices;
// the original only names an 8-bit histogrammer built on one processor.
module derived_histogram
  import dfp_pkg::*;
#(
  parameter int unsigned CW         = 9,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_valid,
  output logic          a_ready,
  input  tok_t          a_data,
  output logic          y_valid,
  input  logic          y_ready,
  output logic [CW:0]   y_data     // {eof, count}
);
  localparam int unsigned BINS = 1 << DW;

  typedef enum logic [1:0] {S_CLEAR, S_COUNT, S_DUMP} state_e;

  state_e          state;
  logic [DW-1:0]   idx;
  logic [CW-1:0]   hist [BINS];
  logic            q_valid, q_pop, y_room, push;
  tok_t            q;
  logic [CW:0]     out_tok;
  logic [CW-1:0]   cur;

  df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q)
  );

  assign q_pop   = (state == S_COUNT) && q_valid;
  assign push    = (state == S_DUMP) && y_room;
  assign cur     = hist[q.data];
  assign out_tok = {idx == DW'(BINS - 1), hist[idx]};

  always_ff @(posedge clk) begin
    if (state == S_CLEAR || push) hist[idx] <= '0;
    else if (q_pop)               hist[q.data] <= (&cur) ? cur : cur + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR;
      idx   <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          idx <= idx + 1'b1;
          if (idx == DW'(BINS - 1)) state <= S_COUNT;
        end
        S_COUNT: begin
          if (q_pop && q.eof) state <= S_DUMP;
        end
        default: begin
          if (push) begin
            idx <= idx + 1'b1;
            if (idx == DW'(BINS - 1)) state <= S_COUNT;
          end
        end
      endcase
    end
  end

  df_fifo #(.W(CW + 1), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(push), .in_ready(y_room), .in_data(out_tok),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(y_data)
  );

endmodule
