// Derived single-processor operator: what remains of a programmable
// data-flow processor once it is reduced to one function. A 16-bit adder
// whose upper byte is unused, for instance, becomes a one-stage pipeline
// holding an 8-bit adder and three two-word I/O FIFOs (two inputs, one
// output). The function is frozen by the OP parameter: add, abs, and, max.
//
// The operator fires when every input FIFO it uses holds a token and the
// output FIFO has room; it then pops one token from each input and writes the
// result, with the eof flag of input a, into the output FIFO. That write is
// the pipeline's single stage, so with inputs always present and the output
// always taken it passes one token per clock, and a token needs two clocks
// from a's input port to y's output port. abs has one input: port b is not
// used and b_ready stays low. The reduced structure follows the original
// design; handshake, token layout and the abs convention are this design's.
module derived_op
  import dfp_pkg::*;
#(
  parameter op_e         OP         = OP_ADD,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  input  tok_t a_data,
  input  logic b_valid,
  output logic b_ready,
  input  tok_t b_data,
  output logic y_valid,
  input  logic y_ready,
  output tok_t y_data
);
  localparam bit UNARY = (OP == OP_ABS);

  logic qa_valid, qb_valid, qa_pop, qb_pop, qy_ready, fire;
  tok_t qa, qb, res;

  df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_in_a (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(qa_valid), .out_ready(qa_pop), .out_data(qa)
  );

  if (UNARY) begin : g_unary
    assign qb_valid = 1'b1;
    assign qb       = '0;
    assign b_ready  = 1'b0;
  end else begin : g_binary
    df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_in_b (
      .clk, .rst_n, .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
      .out_valid(qb_valid), .out_ready(qb_pop), .out_data(qb)
    );
  end

  assign fire   = qa_valid && qb_valid && qy_ready;
  assign qa_pop = fire;
  assign qb_pop = fire && !UNARY;

  always_comb begin
    res.eof = qa.eof;
    unique case (OP)
      OP_ADD:  res.data = qa.data + qb.data;
      OP_ABS:  res.data = qa.data[DW-1] ? DW'(-qa.data) : qa.data;
      OP_AND:  res.data = qa.data & qb.data;
      default: res.data = (qa.data > qb.data) ? qa.data : qb.data;
    endcase
  end

  df_fifo #(.W($bits(tok_t)), .DEPTH(FIFO_DEPTH)) u_out (
    .clk, .rst_n, .in_valid(fire), .in_ready(qy_ready), .in_data(res),
    .out_valid(y_valid), .out_ready(y_ready), .out_data(y_data)
  );

endmodule
