// Max: the defect image is, per pixel, the largest contribution of the
// direction macros (two MAX operators on pairs, then one on their results).
// Written as a scan over N inputs, which gives the same maximum as the pairwise
// tree, computed in one clock;
// out_ctl travels with the result. N = 4 follows the four directions.
module max_tree
  import dd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  ctl_t                      in_ctl,
  input  logic [N-1:0][PIX_W-1:0]   in_pix,
  output ctl_t                      out_ctl,
  output logic [PIX_W-1:0]          max_pix,
  output logic [$clog2(N+1)-1:0]    max_idx   // lowest index holding the maximum
);
  logic [PIX_W-1:0]         m;
  logic [$clog2(N+1)-1:0]   mi;

  always_comb begin
    m  = in_pix[0];
    mi = '0;
    for (int i = 1; i < int'(N); i++) begin
      if (in_pix[i] > m) begin
        m  = in_pix[i];
        mi = ($clog2(N+1))'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl <= '0;
      max_pix <= '0;
      max_idx <= '0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid) begin
        max_pix <= m;
        max_idx <= mi;
      end
    end
  end
endmodule
