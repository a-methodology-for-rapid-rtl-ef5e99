// Defect detector: finds the places in a strongly patterned image (a wafer,
// a mesh) where the local edge directions are ones the image as a whole
// rarely shows, and outputs an image that is bright there.
//
// Structure: one extraction macro (edge direction, edge flag, edge count
// per frame) feeds four direction macros, one per direction 0, 45, 90 and
// 135 degrees; each weights local edges by the inverse of the global
// frequency of its direction in the previous frame; a MAX tree keeps the
// largest contribution per pixel.
//
// Interface: one pixel per clock at most, qualified by in_ctl.valid, with
// in_ctl.eof on the last pixel of each frame. line_len (1..DEPTH) is the
// number of pixels per line and threshold the edge threshold, compared with
// the larger scaled gradient magnitude (0..31). defect leaves 10 clocks after
// its pixel enters (3 extraction + 6 direction + 1 max), with out_ctl.
// Between two frames at least 6 idle clocks are needed so that the frame
// statistics are in place before the next frame begins. edge_count reports
// the number of edge pixels of the last frame and dominant the index of the
// direction that produced the output pixel.
module defect_detector
  import dd_pkg::*;
#(
  parameter int unsigned DEPTH = LINE_DEPTH,
  parameter int unsigned NDIR  = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  logic [PIX_W-1:0]           threshold,
  input  ctl_t                       in_ctl,
  input  logic [PIX_W-1:0]           picture,
  output ctl_t                       out_ctl,
  output logic [PIX_W-1:0]           defect,
  output logic [$clog2(NDIR+1)-1:0]  dominant,
  output logic [CNT_W-1:0]           edge_count,
  output logic                       edge_count_valid,
  output logic [NDIR-1:0][PIX_W-1:0] dir_avg     // per-direction average A
);
  ctl_t                       ext_ctl;
  logic [DIR_W-1:0]           direction;
  logic [PIX_W-1:0]           edge_pix;
  ctl_t                       dir_ctl [NDIR];
  logic [NDIR-1:0][PIX_W-1:0] contrib;
  logic [NDIR-1:0]            avg_valid;

  extraction_macro #(.DEPTH(DEPTH)) u_extract (
    .clk, .rst_n, .line_len, .threshold, .in_ctl, .image(picture),
    .out_ctl(ext_ctl), .direction, .edge_pix, .edge_count, .edge_count_valid
  );

  for (genvar k = 0; k < int'(NDIR); k++) begin : g_dir
    direction_macro #(.K(k), .NDIR(NDIR), .DEPTH(DEPTH)) u_dirk (
      .clk, .rst_n, .line_len, .in_ctl(ext_ctl), .direction, .edge_pix,
      .edge_count, .edge_count_valid,
      .out_ctl(dir_ctl[k]), .contrib(contrib[k]),
      .avg(dir_avg[k]), .avg_valid(avg_valid[k])
    );
  end

  max_tree #(.N(NDIR)) u_max (
    .clk, .rst_n, .in_ctl(dir_ctl[0]), .in_pix(contrib),
    .out_ctl, .max_pix(defect), .max_idx(dominant)
  );

endmodule
