// Derivates: horizontal and vertical differences of the image and the
// quantities the direction and edge logic need from them.
//
//   dx    = pixel - previous pixel          (SUB)
//   dy    = pixel - pixel one line above     (SUB)
//   angle = sign(dx) XOR sign(dy)            (XOR): 1 when the gradient
//           lies in the second or fourth quadrant
//   adx, ady = |dx|, |dy| scaled to MAG_W bits (ABS), keeping the upper
//           bits so that {adx, ady} addresses the 1024-word atan table.
//
// The operator list follows the extraction macro; the 5-bit scaling of the
// magnitudes is this design's reading of how a 10-bit table address is
// formed from the two magnitudes. One register stage: outputs appear one
// clock after the inputs, together with out_ctl.
module derivates
  import dd_pkg::*;
#(
  parameter int unsigned W = PIX_W,   // pixel width
  parameter int unsigned M = MAG_W    // magnitude width after scaling
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctl_t         in_ctl,
  input  logic [W-1:0] cur,
  input  logic [W-1:0] d1p,
  input  logic [W-1:0] d1l,
  output ctl_t         out_ctl,
  output logic [M-1:0] adx,
  output logic [M-1:0] ady,
  output logic         angle
);
  logic signed [W:0] dx, dy;
  logic [W-1:0]      mdx, mdy;

  always_comb begin
    dx  = $signed({1'b0, cur}) - $signed({1'b0, d1p});
    dy  = $signed({1'b0, cur}) - $signed({1'b0, d1l});
    mdx = dx[W] ? W'(-dx) : W'(dx);
    mdy = dy[W] ? W'(-dy) : W'(dy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl <= '0;
      adx     <= '0;
      ady     <= '0;
      angle   <= 1'b0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid) begin
        adx   <= mdx[W-1 -: M];
        ady   <= mdy[W-1 -: M];
        angle <= dx[W] ^ dy[W];
      end
    end
  end
endmodule
