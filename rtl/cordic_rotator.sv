// cordic_rotator - one vectoring-mode CORDIC micro-rotation (a ROTATOR of the coarse pipeline).
//
// Step i rotates the vector (x, y) by -atan(2^-i) when y >= 0 and by +atan(2^-i) when y < 0, so
// the vector is driven towards the positive x axis:
//     y >= 0 : x' = x + (y >>> i),  y' = y - (x >>> i),  d = 0
//     y <  0 : x' = x - (y >>> i),  y' = y + (x >>> i),  d = 1
// The scale factor K_i is not applied: only the sign of y is ever used, and the growth is covered
// by the datapath width. The decision bit d is what the rotation register stores; the angle itself
// is not accumulated. The shift is arithmetic (floor), a choice of this design.
//
// Timing: one register stage; x_o, y_o and d_o appear one clock after x_i, y_i.
module cordic_rotator #(
  parameter int unsigned DW    = lutcor_pkg::rot_width(lutcor_pkg::IN_W, lutcor_pkg::GUARD),
  parameter int unsigned SHIFT = 0
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] x_i,
  input  logic signed [DW-1:0] y_i,
  output logic signed [DW-1:0] x_o,
  output logic signed [DW-1:0] y_o,
  output logic                 d_o   // 1: vector was below the x axis, rotated counter-clockwise
);

  logic                 neg;
  logic signed [DW-1:0] xs, ys;

  always_comb begin
    neg = y_i[DW-1];
    xs  = x_i >>> SHIFT;
    ys  = y_i >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (neg) begin
      x_o <= x_i - ys;
      y_o <= y_i + xs;
    end else begin
      x_o <= x_i + ys;
      y_o <= y_i - xs;
    end
    d_o <= neg;
  end

endmodule
