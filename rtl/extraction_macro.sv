// Direction extraction macro: the derived chip at the front of the defect
// detector. From a pixel stream it produces, per pixel, the direction of the
// local edge (0..253 for 0..180 degrees) and a boolean edge flag, and per
// frame the number of edge pixels.
//
// Pipeline (one register per stage, three clocks from image to outputs):
//   1  line_pixel_delay  previous pixel and pixel one line above
//   2  derivates         dx, dy, quadrant flag, scaled |dx|, |dy|
//   3  atan_unit         1024x8 arc-tangent ROM + quadrant fold -> direction
//      edge_thresh       max(|dx|,|dy|) >= threshold           -> edge
//   4  frame_count       edge count, edge_count_valid one clock after the
//                        last pixel of a frame leaves on out_ctl
// The blocks and their order follow the operator graph of the macro and the
// chip floorplan (line delay with its 512-word FIFO, SUB, SUB, XOR, ABS, ABS,
// ATAN LUT, ADD, MAX, GEQ, COUNT). Only lines of at most LINE_DEPTH pixels
// fit; longer lines need a deeper line memory.
module extraction_macro
  import dd_pkg::*;
#(
  parameter int unsigned DEPTH = LINE_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  logic [PIX_W-1:0]           threshold,
  input  ctl_t                       in_ctl,
  input  logic [PIX_W-1:0]           image,
  output ctl_t                       out_ctl,
  output logic [DIR_W-1:0]           direction,
  output logic [PIX_W-1:0]           edge_pix,
  output logic [CNT_W-1:0]           edge_count,
  output logic                       edge_count_valid
);
  ctl_t             c1, c2, c3a;
  logic [PIX_W-1:0] cur, d1p, d1l;
  logic [MAG_W-1:0] adx, ady;
  logic             angle;

  line_pixel_delay #(.W(PIX_W), .DEPTH(DEPTH)) u_delay (
    .clk, .rst_n, .line_len, .in_ctl, .in_data(image),
    .out_ctl(c1), .out_cur(cur), .out_d1p(d1p), .out_d1l(d1l)
  );

  derivates u_deriv (
    .clk, .rst_n, .in_ctl(c1), .cur, .d1p, .d1l,
    .out_ctl(c2), .adx, .ady, .angle
  );

  atan_unit u_atan (
    .clk, .rst_n, .in_ctl(c2), .adx, .ady, .angle,
    .out_ctl(c3a), .direction
  );

  edge_thresh u_thresh (
    .clk, .rst_n, .in_ctl(c2), .adx, .ady, .threshold,
    .out_ctl, .edge_pix
  );

  frame_count #(.IN_W(1), .ACC_W(CNT_W)) u_count (
    .clk, .rst_n, .in_ctl(out_ctl), .inc(edge_pix[0]),
    .total(edge_count), .total_valid(edge_count_valid)
  );

  // both branches of stage 3 carry the same sideband
  always_ff @(posedge clk) begin
    if (rst_n)
      a_aligned: assert (c3a == out_ctl) else $error("stage 3 sideband mismatch");
  end

endmodule
