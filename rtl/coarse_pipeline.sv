// coarse_pipeline - the coarse part of the LUT-CORDIC core: input conditioning followed by K
// vectoring micro-rotations applied to A and to B side by side.
//
// Stage 0 (conditioning, this design's own addition): each input is sign-extended to the rotator
// width with GUARD fraction bits. A vector in the left half plane (x < 0) is negated, which is a
// rotation by 180 degrees; CORDIC vectoring starting at atan(1) only converges for |angle| below
// about 100 degrees. Turning both A and B by 180 degrees leaves arg A - arg B unchanged, turning only
// one of them changes it by pi, so the single bit flip_o = (A negated) xor (B negated) is all that
// has to be remembered; the output stage negates XP and YP when it is set.
// Stages 1..K: rotator i (shift i = 0..K-1) for A and rotator i for B. Their decision bits are the
// two bits per step of the rotation register; no angle accumulator exists in this part.
//
// Timing: fully pipelined, one sample per clock. flip_o is valid 1 clock after the inputs, the
// decisions da_o[i]/db_o[i] 2+i clocks after, the vectors xa_o..yb_o K+1 clocks after. The
// rotation_register realigns the decisions.
module coarse_pipeline #(
  parameter int unsigned IN_W  = lutcor_pkg::IN_W,
  parameter int unsigned GUARD = lutcor_pkg::GUARD,
  parameter int unsigned K     = lutcor_pkg::K_COARSE,
  parameter int unsigned DW    = lutcor_pkg::rot_width(IN_W, GUARD)
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] xa_i,
  input  logic signed [IN_W-1:0] ya_i,
  input  logic signed [IN_W-1:0] xb_i,
  input  logic signed [IN_W-1:0] yb_i,
  output logic signed [DW-1:0]   xa_o,
  output logic signed [DW-1:0]   ya_o,
  output logic signed [DW-1:0]   xb_o,
  output logic signed [DW-1:0]   yb_o,
  output logic        [K-1:0]    da_o,   // decision of A at step i (1: rotated counter-clockwise)
  output logic        [K-1:0]    db_o,   // decision of B at step i
  output logic                   flip_o  // exactly one of A, B was turned by 180 degrees
);

  // Extend a sample to the rotator width with GUARD zero fraction bits.
  function automatic logic signed [DW-1:0] widen(logic signed [IN_W-1:0] v);
    logic signed [DW-1:0] w;
    w = DW'(v);
    return w <<< GUARD;
  endfunction

  logic signed [DW-1:0] xa [K+1];
  logic signed [DW-1:0] ya [K+1];
  logic signed [DW-1:0] xb [K+1];
  logic signed [DW-1:0] yb [K+1];

  // Stage 0: half-plane conditioning.
  always_ff @(posedge clk) begin
    logic fa, fb;
    fa = xa_i[IN_W-1];
    fb = xb_i[IN_W-1];
    xa[0]  <= fa ? -widen(xa_i) : widen(xa_i);
    ya[0]  <= fa ? -widen(ya_i) : widen(ya_i);
    xb[0]  <= fb ? -widen(xb_i) : widen(xb_i);
    yb[0]  <= fb ? -widen(yb_i) : widen(yb_i);
    flip_o <= fa ^ fb;
  end

  for (genvar i = 0; i < K; i++) begin : g_step
    cordic_rotator #(.DW(DW), .SHIFT(i)) u_rot_a (
      .clk(clk), .x_i(xa[i]), .y_i(ya[i]), .x_o(xa[i+1]), .y_o(ya[i+1]), .d_o(da_o[i])
    );
    cordic_rotator #(.DW(DW), .SHIFT(i)) u_rot_b (
      .clk(clk), .x_i(xb[i]), .y_i(yb[i]), .x_o(xb[i+1]), .y_o(yb[i+1]), .d_o(db_o[i])
    );
  end

  assign xa_o = xa[K];
  assign ya_o = ya[K];
  assign xb_o = xb[K];
  assign yb_o = yb[K];

endmodule
