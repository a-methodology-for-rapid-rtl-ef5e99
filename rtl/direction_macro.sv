// Direction macro for direction k: how strongly edges of direction k are
// present around each pixel, relative to how common that direction is in the
// whole previous frame. High values mark regions whose edge direction is
// rare in the image, i.e. candidate defects of a regular pattern.
//
//   distance_lut       I    = edge ? weight_k(direction) : 0
//   box_sum3x3         CV   = 3x3 trailing sum of I
//   mask               IF   = edge ? CV : 0
//   frame_count        S    = sum of I over the frame
//   direction_average  A    = S / N (N = edge count), INV = INV(A)
//   multiplier         contrib = min(255, (IF * INV) >> OUT_SHIFT)
//
// The frame statistics only exist once a frame has ended, so the INV used on
// frame f is the one computed from frame f-1 (INV(0) = 255 after reset). The
// new INV is in use 12 clocks after the frame's last token enters, and a token
// reaches the multiplier 5 clocks after it enters, so at least 6 idle clocks
// must separate two frames for the first pixels of the next one to see it.
// The chain of operators follows the direction macro of the original design
// (with edge_count arriving one clock after the last token, as the extraction
// macro delivers it); the table contents, the widths and the output scaling
// (OUT_SHIFT) are this design's choices. Latency: contrib leaves 6 clocks
// after its direction/edge token enters, with out_ctl.
module direction_macro
  import dd_pkg::*;
#(
  parameter int unsigned K         = 0,
  parameter int unsigned NDIR      = 4,
  parameter int unsigned DEPTH     = LINE_DEPTH,
  parameter int unsigned OUT_SHIFT = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  ctl_t                       in_ctl,
  input  logic [DIR_W-1:0]           direction,
  input  logic [PIX_W-1:0]           edge_pix,
  input  logic [CNT_W-1:0]           edge_count,
  input  logic                       edge_count_valid,
  output ctl_t                       out_ctl,
  output logic [PIX_W-1:0]           contrib,
  output logic [PIX_W-1:0]           avg,       // A of the last finished frame
  output logic                       avg_valid  // pulses when A and INV change
);
  localparam int unsigned SW = PIX_W + 4;          // 3x3 sum width
  localparam int unsigned PW = SW + PIX_W;         // product width
  localparam logic [PIX_W-1:0] INV_TBL_RESET = '1; // INV(0)

  ctl_t                   ca, cb;
  logic [PIX_W-1:0]       wgt;
  logic                   edge_a;
  logic [SW-1:0]          cv;
  logic [3:0]             edge_sr;                 // edge flag beside the box sum
  logic [CNT_W+PIX_W-1:0] s_total;
  logic                   s_valid, div_busy;
  logic [PIX_W-1:0]       inv, inv_cur;
  logic [PW-1:0]          prod, scaled;

  distance_lut #(.K(K), .NDIR(NDIR)) u_dist (
    .clk, .rst_n, .in_ctl, .direction, .edge_pix,
    .out_ctl(ca), .weight(wgt), .out_edge(edge_a)
  );

  box_sum3x3 #(.W(PIX_W), .DEPTH(DEPTH)) u_box (
    .clk, .rst_n, .line_len, .in_ctl(ca), .in_data(wgt),
    .out_ctl(cb), .sum(cv)
  );

  frame_count #(.IN_W(PIX_W), .ACC_W(CNT_W + PIX_W)) u_count (
    .clk, .rst_n, .in_ctl(ca), .inc(wgt),
    .total(s_total), .total_valid(s_valid)
  );

  direction_average #(.S_W(CNT_W + PIX_W), .N_W(CNT_W)) u_avg (
    .clk, .rst_n, .s_total, .s_valid,
    .n_total(edge_count), .n_valid(edge_count_valid),
    .avg, .inv, .res_valid(avg_valid), .busy(div_busy)
  );

  // the box sum is a fixed 4-clock pipeline: carry the edge flag beside it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) edge_sr <= '0;
    else        edge_sr <= {edge_sr[2:0], ca.valid & edge_a};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         inv_cur <= INV_TBL_RESET;
    else if (avg_valid) inv_cur <= inv;
  end

  always_comb begin
    prod   = (edge_sr[3] ? PW'(cv) : '0) * PW'(inv_cur);
    scaled = prod >> OUT_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl <= '0;
      contrib <= '0;
    end else begin
      out_ctl <= cb;
      if (cb.valid) contrib <= (scaled > PW'(255)) ? 8'd255 : PIX_W'(scaled);
    end
  end

endmodule
