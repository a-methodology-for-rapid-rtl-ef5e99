// Top level: the hardware obtained by turning a validated data-flow
// prototype into fixed-function logic, in two independent parts side by side.
//
//  * defect_detector: the edge-direction defect detector (extraction macro,
//    four direction macros, max), a pixel-clocked stream with no
//    back-pressure. Ports without a prefix; see defect_detector.
//  * derived_dfp_set: the derived single-processor operators (add, abs, and,
//    max, 256-word FIFO, pixel delay, line delay, histogram), each a
//    valid/ready data-flow node. Ports prefixed lib_; see derived_dfp_set.
//
// The two parts share only clock and reset. Parameters are those of the
// parts: DEPTH for the detector's line memories (512, the on-chip limit) and
// LINE for the library's line delay (512 tokens).
module derived_chipset
  import dd_pkg::*;
  import dfp_pkg::*;
#(
  parameter int unsigned DEPTH = LINE_DEPTH,
  parameter int unsigned NDIR  = 4,
  parameter int unsigned LINE  = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // defect detector
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  logic [PIX_W-1:0]           threshold,
  input  ctl_t                       in_ctl,
  input  logic [PIX_W-1:0]           picture,
  output ctl_t                       out_ctl,
  output logic [PIX_W-1:0]           defect,
  output logic [$clog2(NDIR+1)-1:0]  dominant,
  output logic [CNT_W-1:0]           edge_count,
  output logic                       edge_count_valid,
  output logic [NDIR-1:0][PIX_W-1:0] dir_avg,
  // derived operator set
  input  logic [6:0]                 lib_a_valid,
  output logic [6:0]                 lib_a_ready,
  input  tok_t [6:0]                 lib_a_data,
  input  logic [2:0]                 lib_b_valid,
  output logic [2:0]                 lib_b_ready,
  input  tok_t [2:0]                 lib_b_data,
  output logic [6:0]                 lib_y_valid,
  input  logic [6:0]                 lib_y_ready,
  output tok_t [6:0]                 lib_y_data,
  input  logic                       lib_h_valid,
  output logic                       lib_h_ready,
  input  tok_t                       lib_h_data,
  output logic                       lib_hy_valid,
  input  logic                       lib_hy_ready,
  output logic [9:0]                 lib_hy_data
);

  defect_detector #(.DEPTH(DEPTH), .NDIR(NDIR)) u_detector (
    .clk, .rst_n, .line_len, .threshold, .in_ctl, .picture,
    .out_ctl, .defect, .dominant, .edge_count, .edge_count_valid, .dir_avg
  );

  derived_dfp_set #(.LINE(LINE)) u_library (
    .clk, .rst_n,
    .a_valid(lib_a_valid), .a_ready(lib_a_ready), .a_data(lib_a_data),
    .b_valid(lib_b_valid), .b_ready(lib_b_ready), .b_data(lib_b_data),
    .y_valid(lib_y_valid), .y_ready(lib_y_ready), .y_data(lib_y_data),
    .h_valid(lib_h_valid), .h_ready(lib_h_ready), .h_data(lib_h_data),
    .hy_valid(lib_hy_valid), .hy_ready(lib_hy_ready), .hy_data(lib_hy_data)
  );

endmodule
