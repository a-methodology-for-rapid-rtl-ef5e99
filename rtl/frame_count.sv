// Count: accumulates a value over every token of a frame and delivers the
// total when the frame's last token arrives. Fed with 1 per edge pixel it is
// the edge counter of the extraction macro; fed with the distance weight it
// is the per-direction count of the direction macro.
//
// total/total_valid are registered: total_valid pulses one clock after the
// token marked eof, and total holds until the next frame ends. The
// accumulator restarts from zero with the next token. Widths are this
// design's choice (20 bits cover 572x768 pixels); overflow is not expected.
module frame_count
  import dd_pkg::*;
#(
  parameter int unsigned IN_W  = 1,
  parameter int unsigned ACC_W = CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctl_t             in_ctl,
  input  logic [IN_W-1:0]  inc,
  output logic [ACC_W-1:0] total,
  output logic             total_valid
);
  logic [ACC_W-1:0] acc, acc_n;
  assign acc_n = acc + ACC_W'(inc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      total       <= '0;
      total_valid <= 1'b0;
    end else begin
      total_valid <= 1'b0;
      if (in_ctl.valid) begin
        if (in_ctl.eof) begin
          total       <= acc_n;
          total_valid <= 1'b1;
          acc         <= '0;
        end else begin
          acc <= acc_n;
        end
      end
    end
  end
endmodule
