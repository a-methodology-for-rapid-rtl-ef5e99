// 1-line 1-pixel delay (R1L1P): for each token of a stream it returns the
// token itself, the token one position earlier (pixel delay) and the token
// LINE_LEN positions earlier (line delay).
//
// The line delay is a circular buffer of DEPTH words, playing the role of
// the 512-word FIFO of the extraction chip: the word at the pointer is read
// (it was written LINE_LEN tokens ago) and overwritten with the new token,
// and the pointer wraps at line_len - 1. The stream is delayed as a whole,
// ignoring line and frame boundaries, as a FIFO in the data-flow graph would.
// Until the buffer has been filled once after reset the line output is 0,
// and the pixel delay starts from 0, so no stale memory is ever read.
//
// Interface: in_ctl/in_data enter, out_* leave one clock later with out_ctl.
// line_len must lie in 1..DEPTH and be stable while a stream runs; the
// depth of 512 follows the document, the zero start is this design's choice.
module line_pixel_delay
  import dd_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  ctl_t                       in_ctl,
  input  logic [W-1:0]               in_data,
  output ctl_t                       out_ctl,
  output logic [W-1:0]               out_cur,   // token i
  output logic [W-1:0]               out_d1p,   // token i-1
  output logic [W-1:0]               out_d1l    // token i-line_len
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          primed;   // the buffer has been written all the way round once
  logic [W-1:0]  last;

  always_ff @(posedge clk) begin
    if (in_ctl.valid) begin
      mem[ptr] <= in_data;
      out_d1l  <= primed ? mem[ptr] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= '0;
      primed  <= 1'b0;
      last    <= '0;
      out_cur <= '0;
      out_d1p <= '0;
      out_ctl <= '0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid) begin
        out_cur <= in_data;
        out_d1p <= last;
        last    <= in_data;
        if (32'(ptr) + 1 >= 32'(line_len)) begin
          ptr    <= '0;
          primed <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

  // line_len is a run-time setting bounded by the buffer
  always_ff @(posedge clk) begin
    if (rst_n && in_ctl.valid)
      a_len_ok: assert (line_len >= 1 && 32'(line_len) <= DEPTH)
        else $error("line_len %0d outside 1..%0d", line_len, DEPTH);
  end

endmodule
