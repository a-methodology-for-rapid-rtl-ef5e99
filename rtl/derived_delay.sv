// Derived delay operator: the pixel delay (D = 1) and line delay (D = one
// line) of the operator library, reduced to an input FIFO, a delay memory
// and an output FIFO. Output token i carries the value of input token i - D
// (0 for the first D tokens after reset) and the eof flag of input token i,
// so frames keep their length. The operator fires when the input FIFO holds
// a token and the output FIFO has room: the memory word at the pointer is
// read out and replaced by the new value. One token per clock; two clocks
// from input port to output port. The memory is a single register for D = 1.
// The delays come from the original library; the handshake, the zero start
// and the default line of 512 tokens are this design's choices.
module derived_delay
  import dfp_pkg::*;
#(
  parameter int unsigned D          = 1,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  input  tok_t a_data,
  output logic y_valid,
  input  logic y_ready,
  output tok_t y_data
);
  localparam int unsigned AW = (D > 1) ? $clog2(D) : 1;

  logic          q_valid, y_room, fire, primed;
  tok_t          q, res;
  logic [DW-1:0] mem [D];
  logic [AW-1:0] ptr;

  df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(q_valid), .out_ready(fire), .out_data(q)
  );

  assign fire     = q_valid && y_room;
  assign res.eof  = q.eof;
  assign res.data = primed ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (fire) mem[ptr] <= q.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (fire) begin
      if (32'(ptr) == D - 1) begin
        ptr    <= '0;
        primed <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(fire), .in_ready(y_room), .in_data(res),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(y_data)
  );

endmodule
