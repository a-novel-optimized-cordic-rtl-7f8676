// fine_pipeline - the fine part of the LUT-CORDIC core: S-CORDIC steps K .. N-1.
//
// The vectors leaving the coarse part enter step K with alpha = beta = 0. Each step turns A and B
// by a further +-atan(2^-i) and sets at most one bit of alpha or beta (see s_cordic). At the end
// the two bit registers are the phase words phi_add = sum alpha_i*2*2^-i and
// phi_sub = sum beta_i*2*2^-i; their difference is the fine correction phi_d.
// The vectors of the last step are not needed by anything and are not brought out.
// Only bits PHI_FRAC+1-(N-1) .. PHI_FRAC+1-K of the two words can ever be set; the others are
// constant zero and kept only so that both words have the phase-word format.
//
// Timing: N-K register stages, one sample per clock.
module fine_pipeline #(
  parameter int unsigned DW       = lutcor_pkg::rot_width(lutcor_pkg::IN_W, lutcor_pkg::GUARD),
  parameter int unsigned K        = lutcor_pkg::K_COARSE,
  parameter int unsigned N        = lutcor_pkg::N_ITER,
  parameter int unsigned PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned PHI_W    = lutcor_pkg::phi_width(PHI_FRAC)
) (
  input  logic                 clk,
  input  logic signed [DW-1:0] xa_i,
  input  logic signed [DW-1:0] ya_i,
  input  logic signed [DW-1:0] xb_i,
  input  logic signed [DW-1:0] yb_i,
  output logic [PHI_W-1:0]     phi_add_o,
  output logic [PHI_W-1:0]     phi_sub_o
);

  localparam int unsigned M = N - K;   // number of fine steps

  logic signed [DW-1:0] xa [M+1];
  logic signed [DW-1:0] ya [M+1];
  logic signed [DW-1:0] xb [M+1];
  logic signed [DW-1:0] yb [M+1];
  logic [PHI_W-1:0]     al [M+1];
  logic [PHI_W-1:0]     be [M+1];

  assign xa[0] = xa_i;
  assign ya[0] = ya_i;
  assign xb[0] = xb_i;
  assign yb[0] = yb_i;
  assign al[0] = '0;
  assign be[0] = '0;

  for (genvar j = 0; j < M; j++) begin : g_step
    s_cordic #(.DW(DW), .SHIFT(K + j), .PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W)) u_s (
      .clk(clk),
      .xa_i(xa[j]), .ya_i(ya[j]), .xb_i(xb[j]), .yb_i(yb[j]), .alpha_i(al[j]), .beta_i(be[j]),
      .xa_o(xa[j+1]), .ya_o(ya[j+1]), .xb_o(xb[j+1]), .yb_o(yb[j+1]),
      .alpha_o(al[j+1]), .beta_o(be[j+1])
    );
  end

  assign phi_add_o = al[M];
  assign phi_sub_o = be[M];

endmodule
