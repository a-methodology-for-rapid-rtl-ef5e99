// Thresh: marks a pixel as an edge when the larger of its two scaled
// gradient magnitudes reaches the threshold (MAX followed by GEQ).
// The result is a boolean pixel, 255 for an edge and 0 otherwise.
//
// The MAX/GEQ pair is the derived chip's; comparing the scaled magnitudes
// (0..31) with the 8-bit threshold follows the operator graph literally.
// One register stage, aligned with the atan unit so that direction and
// edge leave the extraction macro together.
module edge_thresh
  import dd_pkg::*;
#(
  parameter int unsigned M = MAG_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctl_t             in_ctl,
  input  logic [M-1:0]     adx,
  input  logic [M-1:0]     ady,
  input  logic [PIX_W-1:0] threshold,
  output ctl_t             out_ctl,
  output logic [PIX_W-1:0] edge_pix
);
  logic [M-1:0] mx;
  assign mx = (adx > ady) ? adx : ady;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl  <= '0;
      edge_pix <= PIX_FALSE;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid)
        edge_pix <= (PIX_W'(mx) >= threshold) ? PIX_TRUE : PIX_FALSE;
    end
  end
endmodule
