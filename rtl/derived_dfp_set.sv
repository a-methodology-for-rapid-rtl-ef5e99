// The derived single-processor operators side by side: add, abs, and, max,
// the 256-word FIFO, the pixel delay, the line delay and the 8-bit
// histogram, each a separate data-flow node with its own ports. This is the
// set of derived operators whose sizes the original design reports; nothing
// connects them here, so each can be used or replaced on its own.
//
// Unit index on the a/y arrays: 0 add, 1 abs, 2 and, 3 max, 4 256-word FIFO,
// 5 pixel delay, 6 line delay. The b arrays carry the second operand of the
// binary units: b[0] for add, b[1] for and, b[2] for max (abs has none). The histogram has its own ports. Every
// port is a valid/ready token stream; see the unit modules for timing.
module derived_dfp_set
  import dfp_pkg::*;
#(
  parameter int unsigned LINE  = 512,   // line delay, tokens
  parameter int unsigned QUEUE = 256    // FIFO operator depth
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [6:0]      a_valid,
  output logic [6:0]      a_ready,
  input  tok_t [6:0]      a_data,
  input  logic [2:0]      b_valid,
  output logic [2:0]      b_ready,
  input  tok_t [2:0]      b_data,
  output logic [6:0]      y_valid,
  input  logic [6:0]      y_ready,
  output tok_t [6:0]      y_data,
  input  logic            h_valid,
  output logic            h_ready,
  input  tok_t            h_data,
  output logic            hy_valid,
  input  logic            hy_ready,
  output logic [9:0]      hy_data
);
  localparam op_e OPS [4] = '{OP_ADD, OP_ABS, OP_AND, OP_MAX};

  for (genvar i = 0; i < 4; i++) begin : g_op
    if (OPS[i] == OP_ABS) begin : g_unary
      logic b_unused;
      derived_op #(.OP(OPS[i])) u_op (
        .clk, .rst_n,
        .a_valid(a_valid[i]), .a_ready(a_ready[i]), .a_data(a_data[i]),
        .b_valid(1'b0), .b_ready(b_unused), .b_data('0),
        .y_valid(y_valid[i]), .y_ready(y_ready[i]), .y_data(y_data[i])
      );
    end else begin : g_binary
      localparam int BI = (i == 0) ? 0 : i - 1;
      derived_op #(.OP(OPS[i])) u_op (
        .clk, .rst_n,
        .a_valid(a_valid[i]), .a_ready(a_ready[i]), .a_data(a_data[i]),
        .b_valid(b_valid[BI]), .b_ready(b_ready[BI]), .b_data(b_data[BI]),
        .y_valid(y_valid[i]), .y_ready(y_ready[i]), .y_data(y_data[i])
      );
    end
  end

  df_fifo #(.W($bits(tok_t)), .DEPTH(QUEUE)) u_fifo (
    .clk, .rst_n,
    .in_valid(a_valid[4]), .in_ready(a_ready[4]), .in_data(a_data[4]),
    .out_valid(y_valid[4]), .out_ready(y_ready[4]), .out_data(y_data[4])
  );

  derived_delay #(.D(1)) u_pixel_delay (
    .clk, .rst_n,
    .a_valid(a_valid[5]), .a_ready(a_ready[5]), .a_data(a_data[5]),
    .y_valid(y_valid[5]), .y_ready(y_ready[5]), .y_data(y_data[5])
  );

  derived_delay #(.D(LINE)) u_line_delay (
    .clk, .rst_n,
    .a_valid(a_valid[6]), .a_ready(a_ready[6]), .a_data(a_data[6]),
    .y_valid(y_valid[6]), .y_ready(y_ready[6]), .y_data(y_data[6])
  );

  derived_histogram #(.CW(9)) u_hist (
    .clk, .rst_n,
    .a_valid(h_valid), .a_ready(h_ready), .a_data(h_data),
    .y_valid(hy_valid), .y_ready(hy_ready), .y_data(hy_data)
  );

endmodule
