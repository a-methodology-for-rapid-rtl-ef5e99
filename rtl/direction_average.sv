// Average: global weight of direction k over a frame, and its inverse.
//
// At the end of each frame the direction macro delivers S, the sum of the
// distance weights of all edge pixels, and the extraction macro delivers N,
// the number of edge pixels. The mean weight A = floor(S / N) (0..255; 0 when
// the frame had no edge) measures how strongly direction k is represented in
// the whole image. Its inverse, INV(A) = min(255, round(INV_NUM / A)) with
// INV(0) = 255, scales the local measure so that rare directions stand out.
//
// The document obtains A through a reciprocal table and a multiplier and
// then looks up INV in a second DFP RAM. Here A is computed by an 8-step
// restoring divider (one quotient bit per clock, since A < 256 by
// construction) and INV by a table computed at elaboration; both are this
// design's choices. Timing: s_valid starts a division with the latest N
// (n_valid must come no later than s_valid); avg, inv and res_valid appear
// 9 clocks after s_valid. A new s_valid while busy is ignored (asserted).
module direction_average
  import dd_pkg::*;
#(
  parameter int unsigned S_W     = CNT_W + PIX_W,
  parameter int unsigned N_W     = CNT_W,
  parameter int unsigned INV_NUM = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [S_W-1:0]   s_total,
  input  logic             s_valid,
  input  logic [N_W-1:0]   n_total,
  input  logic             n_valid,
  output logic [PIX_W-1:0] avg,
  output logic [PIX_W-1:0] inv,
  output logic             res_valid,
  output logic             busy
);
  typedef logic [PIX_W-1:0] tbl_t [1 << PIX_W];

  function automatic tbl_t gen_inv();
    tbl_t t;
    t[0] = '1;
    for (int a = 1; a < (1 << PIX_W); a++) begin
      int q;
      q    = (int'(INV_NUM) + a / 2) / a;
      t[a] = (q > 255) ? 8'd255 : PIX_W'(q);
    end
    return t;
  endfunction

  localparam tbl_t INV_TBL = gen_inv();
  localparam int unsigned RW = S_W + 1;

  logic [N_W-1:0]   n_q;
  logic [RW-1:0]    rem;
  logic [N_W-1:0]   div;
  logic [PIX_W-1:0] q, q_next;
  logic [3:0]       bitn;
  logic [RW-1:0]    trial;
  logic             take;

  // one restoring-division step: subtract div << bitn when it fits
  always_comb begin
    trial  = RW'(div) << bitn;
    take   = (div != '0) && (rem >= trial);
    q_next = q | (take ? (PIX_W'(1) << bitn) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q       <= '0;
      rem       <= '0;
      div       <= '0;
      q         <= '0;
      bitn      <= '0;
      busy      <= 1'b0;
      avg       <= '0;
      inv       <= INV_TBL[0];
      res_valid <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (n_valid) n_q <= n_total;
      if (s_valid && !busy) begin
        rem  <= RW'(s_total);
        div  <= n_valid ? n_total : n_q;
        q    <= '0;
        bitn <= 4'(PIX_W - 1);
        busy <= 1'b1;
      end else if (busy) begin
        if (take) rem <= rem - trial;
        q <= q_next;
        if (bitn == 4'd0) begin
          busy      <= 1'b0;
          avg       <= q_next;
          inv       <= INV_TBL[q_next];
          res_valid <= 1'b1;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && s_valid)
      a_no_overrun: assert (!busy) else $error("frame total arrived during a division");
  end

endmodule
