// Distance from k: weights each edge pixel by how close its direction lies
// to direction k, and gives 0 for pixels that are not edges (the RAM lookup
// followed by MUX(0) of the direction macro).
//
// Direction k of NDIR has the code c = round(k * 254 / NDIR). The circular
// distance d between a direction code and c (at most 127, i.e. 90 degrees)
// gives the weight max(0, 255 - SLOPE * d): 255 on the direction itself,
// falling to 0 a quarter turn away, so that with four directions every edge
// feeds its two nearest directions. The document loads this table into a
// DFP RAM without giving its contents; the triangular profile is this
// design's choice, computed at elaboration. One register stage.
module distance_lut
  import dd_pkg::*;
#(
  parameter int unsigned K     = 0,   // direction index
  parameter int unsigned NDIR  = 4,   // number of directions
  parameter int unsigned SLOPE = 4    // weight lost per direction code
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctl_t             in_ctl,
  input  logic [DIR_W-1:0] direction,
  input  logic [PIX_W-1:0] edge_pix,
  output ctl_t             out_ctl,
  output logic [PIX_W-1:0] weight,     // I: masked weight
  output logic             out_edge    // edge flag of the same token
);
  localparam int unsigned CENTER = (K * DIR_MOD + NDIR / 2) / NDIR;
  typedef logic [PIX_W-1:0] tbl_t [1 << DIR_W];

  function automatic tbl_t gen_tbl();
    tbl_t t;
    for (int d = 0; d < (1 << DIR_W); d++) begin
      int dd, w;
      dd = (d >= int'(CENTER)) ? d - int'(CENTER) : int'(CENTER) - d;
      dd = dd % int'(DIR_MOD);
      if (dd > int'(DIR_MOD) / 2) dd = int'(DIR_MOD) - dd;
      w    = 255 - int'(SLOPE) * dd;
      t[d] = (w > 0) ? PIX_W'(w) : '0;
    end
    return t;
  endfunction

  localparam tbl_t DIST_TBL = gen_tbl();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl  <= '0;
      weight   <= '0;
      out_edge <= 1'b0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid) begin
        out_edge <= (edge_pix != PIX_FALSE);
        weight   <= (edge_pix != PIX_FALSE) ? DIST_TBL[direction] : '0;
      end
    end
  end
endmodule
