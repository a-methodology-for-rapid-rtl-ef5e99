// Self-checking test of derived_dfp_set with its default sizes (512-token
// line delay, 256-word FIFO): every unit is driven and checked by
// lib_exerciser, and the test also requires that input stalls, output
// back-pressure, a full 256-word FIFO and a saturated histogram bin occurred.
module tb_derived_dfp_set;
  import dfp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [6:0] a_valid, a_ready, y_valid, y_ready;
  logic [2:0] b_valid, b_ready;
  tok_t [6:0] a_data, y_data;
  tok_t [2:0] b_data;
  logic       h_valid, h_ready, hy_valid, hy_ready;
  tok_t       h_data;
  logic [9:0] hy_data;
  int         checks, failures, n_in_stall, n_out_stall, n_fifo_full, n_hist_sat;
  bit         done;

  derived_dfp_set dut (.*);
  lib_exerciser #(.LINE(512), .QUEUE(256)) u_ex (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    repeat (2) @(posedge clk);
    checks++; if (n_in_stall == 0) begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("FAIL FIFO never full"); end
    checks++; if (n_hist_sat == 0) begin failures++; $display("FAIL no saturated bin"); end
    $display("mechanisms: in_stall=%0d out_stall=%0d fifo_full=%0d hist_sat=%0d",
             n_in_stall, n_out_stall, n_fifo_full, n_hist_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
