// Atan: edge direction from the scaled gradient magnitudes and quadrant flag.
//
// A 1024x8 ROM addressed by {adx, ady} holds round(atan2(ady, adx) * 254/pi),
// the first-quadrant angle on a scale where 127 is 90 degrees. The ADD stage
// folds the quadrant in: when dx and dy have opposite signs the direction is
// 180 degrees minus the table angle, taken modulo 254, so that directions
// cover 0..180 degrees as codes 0..253 (orientation, not sense, of an edge).
//
// The 1024x8 table and the following ADD come from the derived chip; the
// angle scale and the table contents are this design's choice and are
// computed at elaboration from the formula above. One register stage.
module atan_unit
  import dd_pkg::*;
#(
  parameter int unsigned M = MAG_W   // magnitude width, table has 2**(2M) words
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctl_t             in_ctl,
  input  logic [M-1:0]     adx,
  input  logic [M-1:0]     ady,
  input  logic             angle,
  output ctl_t             out_ctl,
  output logic [DIR_W-1:0] direction
);
  localparam int unsigned WORDS = 1 << (2 * M);
  typedef logic [DIR_W-1:0] rom_t [WORDS];

  function automatic rom_t gen_rom();
    rom_t r;
    for (int unsigned a = 0; a < WORDS; a++) begin
      real x, y;
      x    = real'(a >> M);
      y    = real'(a & ((1 << M) - 1));
      r[a] = DIR_W'($rtoi($atan2(y, x) * real'(DIR_MOD) / 3.141592653589793 + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ATAN_ROM = gen_rom();

  logic [DIR_W-1:0] at, dir_n;

  always_comb begin
    at = ATAN_ROM[{adx, ady}];
    if (angle && at != '0) dir_n = DIR_W'(DIR_MOD) - at;
    else                   dir_n = at;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ctl   <= '0;
      direction <= '0;
    end else begin
      out_ctl <= in_ctl;
      if (in_ctl.valid) direction <= dir_n;
    end
  end
endmodule
