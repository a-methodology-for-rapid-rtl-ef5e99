// 3x3 sum of a pixel stream: the local measure of the direction macro.
//
//   CH(i) = I(i) + I(i-1) + I(i-2)             (ADD1P2P then ADD)
//   CV(i) = CH(i) + CH(i-L) + CH(i-2L)          (two line delays, ADD1L2L)
//
// where i counts tokens and L = line_len. The window trails the current
// pixel (it covers the current pixel, the two before it, and the same
// columns on the two lines above), as the stream operators compute it; it is
// not re-centred. The two line delays are line_pixel_delay instances of
// DEPTH words each. Stages: CH (1), line delay 1 (1), line delay 2 (1), CV (1),
// so CV leaves four clocks after I enters, with out_ctl.
module box_sum3x3
  import dd_pkg::*;
#(
  parameter int unsigned W     = PIX_W,
  parameter int unsigned DEPTH = LINE_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] line_len,
  input  ctl_t                       in_ctl,
  input  logic [W-1:0]               in_data,
  output ctl_t                       out_ctl,
  output logic [W+3:0]               sum
);
  localparam int unsigned HW = W + 2;   // horizontal sum width

  ctl_t          c1, c2, c3;
  logic [W-1:0]  p1, p2;
  logic [HW-1:0] ch, cur1, l1, cur2, l2, cur1_d, unused_d1p1, unused_d1p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0; ch <= '0; p1 <= '0; p2 <= '0;
    end else begin
      c1 <= in_ctl;
      if (in_ctl.valid) begin
        ch <= HW'(in_data) + HW'(p1) + HW'(p2);
        p1 <= in_data;
        p2 <= p1;
      end
    end
  end

  line_pixel_delay #(.W(HW), .DEPTH(DEPTH)) u_line1 (
    .clk, .rst_n, .line_len, .in_ctl(c1), .in_data(ch),
    .out_ctl(c2), .out_cur(cur1), .out_d1p(unused_d1p1), .out_d1l(l1)
  );

  line_pixel_delay #(.W(HW), .DEPTH(DEPTH)) u_line2 (
    .clk, .rst_n, .line_len, .in_ctl(c2), .in_data(l1),
    .out_ctl(c3), .out_cur(cur2), .out_d1p(unused_d1p2), .out_d1l(l2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur1_d <= '0; out_ctl <= '0; sum <= '0;
    end else begin
      out_ctl <= c3;
      if (c2.valid) cur1_d <= cur1;
      if (c3.valid) sum <= (W+4)'(cur1_d) + (W+4)'(cur2) + (W+4)'(l2);
    end
  end
endmodule
