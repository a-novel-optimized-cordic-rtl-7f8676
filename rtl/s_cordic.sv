// s_cordic - one stage of the fine part (S-CORDIC step i, K <= i < N).
//
// A and B are each given the same vectoring micro-rotation as in the coarse part, shift i. From
// step K on, atan(2^-i) is taken as 2^-i, so the phase difference changes by 0 when A and B turn
// the same way and by +-2*2^-i when they turn opposite ways. The stage records that in two bit
// registers instead of an accumulator:
//     A above the axis, B below  -> alpha bit i set (arg A - arg B larger than estimated so far)
//     A below the axis, B above  -> beta  bit i set (smaller)
// Both words are phase words with PHI_FRAC fraction bits; bit i sits at position PHI_FRAC+1-i,
// which gives it the weight 2*2^-i. Nothing is added inside the stage; alpha and beta are only
// subtracted at the end.
//
// Timing: one register stage for vectors and bit words.
module s_cordic #(
  parameter int unsigned DW       = lutcor_pkg::rot_width(lutcor_pkg::IN_W, lutcor_pkg::GUARD),
  parameter int unsigned SHIFT    = lutcor_pkg::K_COARSE,
  parameter int unsigned PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned PHI_W    = lutcor_pkg::phi_width(PHI_FRAC)
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] xa_i,
  input  logic signed [DW-1:0] ya_i,
  input  logic signed [DW-1:0] xb_i,
  input  logic signed [DW-1:0] yb_i,
  input  logic [PHI_W-1:0]     alpha_i,
  input  logic [PHI_W-1:0]     beta_i,
  output logic signed [DW-1:0] xa_o,
  output logic signed [DW-1:0] ya_o,
  output logic signed [DW-1:0] xb_o,
  output logic signed [DW-1:0] yb_o,
  output logic [PHI_W-1:0]     alpha_o,
  output logic [PHI_W-1:0]     beta_o
);

  localparam int unsigned POS = PHI_FRAC + 1 - SHIFT;

  logic da, db;

  cordic_rotator #(.DW(DW), .SHIFT(SHIFT)) u_rot_a (
    .clk(clk), .x_i(xa_i), .y_i(ya_i), .x_o(xa_o), .y_o(ya_o), .d_o(da)
  );
  cordic_rotator #(.DW(DW), .SHIFT(SHIFT)) u_rot_b (
    .clk(clk), .x_i(xb_i), .y_i(yb_i), .x_o(xb_o), .y_o(yb_o), .d_o(db)
  );

  // The rotators register their decisions; the incoming bit words are registered alongside and
  // the new bit is merged after the register.
  logic [PHI_W-1:0] alpha_q, beta_q;

  always_ff @(posedge clk) begin
    alpha_q <= alpha_i;
    beta_q  <= beta_i;
  end

  always_comb begin
    alpha_o      = alpha_q;
    beta_o       = beta_q;
    alpha_o[POS] = alpha_q[POS] | (!da &&  db);
    beta_o[POS]  = beta_q[POS]  | ( da && !db);
  end

endmodule
