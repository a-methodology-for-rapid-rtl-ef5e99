// Synchronous FIFO with valid/ready on both sides: the I/O queue of a
// derived processor (two words deep by default) and, at 256 words, the
// stand-alone FIFO operator of the operator library.
//
// Words are written at the tail when in_valid and in_ready meet, and the head
// is offered on out_data with out_valid. in_ready is low only when the FIFO is
// full; a word can be written and another read in the same clock. There is no
// bypass: a word written in one clock is offered from the next. Two-word and
// 256-word depths come from the original design; the handshake and the
// absence of bypass are this design's choices.
module df_fifo #(
  parameter int unsigned W     = 9,
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] level;   // words held
  logic          push, pop;

  assign in_ready  = (32'(level) < DEPTH);
  assign out_valid = (level != '0);
  assign out_data  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (push) wptr <= next_ptr(wptr);
      if (pop)  rptr <= next_ptr(rptr);
      case ({push, pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  // handshake rule on the write side: an offered word stays until taken
  logic          held_valid;
  logic [W-1:0]  held_data;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_valid <= 1'b0;
      held_data  <= '0;
    end else begin
      held_valid <= in_valid && !in_ready;
      held_data  <= in_data;
      if (held_valid)
        a_hold: assert (in_valid && in_data == held_data)
          else $error("word withdrawn or changed before the FIFO took it");
    end
  end

endmodule
