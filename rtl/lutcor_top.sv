// lutcor_top - LUT-CORDIC core computing the normalized product of two complex samples.
//
// For every pair A = XA + jYA, B = XB + jYB the core returns XP + jYP = exp(j*phi) with
// phi = arg A - arg B, which equals A*conj(B) / |A*conj(B)| without any multiplication, division
// or square root. Both vectors are driven to the x axis by the same sequence of CORDIC
// micro-rotations; only the pair of turn directions at each step matters for phi:
//   * conditioning: vectors in the left half plane are negated; a lone negation adds pi (flip).
//   * coarse part, steps 0..K-1: the decision pairs form the rotation register, which addresses
//     the phi_a look-up table (2^(2K) entries).
//   * fine part, steps K..N-1: with atan(2^-i) ~ 2^-i, opposite turns set a bit of alpha or beta;
//     phi_d = alpha - beta.
//   * phi = phi_a + phi_d addresses a cosine and a sine table; flip negates both outputs.
// The structure (rotators, rotation register, phi_a table, S-CORDIC stages with alpha/beta
// registers, the subtract/add and the cos/sin tables) and the 12-bit / 12-iteration defaults follow
// the published LUT-CORDIC architecture; the half-plane conditioning, the widths of internal words,
// the output scale, the pipeline registers and the valid signal are this design's own choices.
//
// Interface: a sample is accepted in every cycle in which in_valid is high (no back-pressure);
// out_valid marks the result, LATENCY = N + 3 clocks later. XP, YP are signed with full scale
// 2^(OUT_W-1)-1; phi_o is the phase estimate (radians, PHI_FRAC fraction bits) before the flip and
// flip_o says that pi has been added to it in XP, YP. rst_n (active low, synchronous) clears only
// the valid pipeline; the datapath registers need no reset.
module lutcor_top #(
  parameter int unsigned IN_W     = lutcor_pkg::IN_W,
  parameter int unsigned N        = lutcor_pkg::N_ITER,
  parameter int unsigned K        = lutcor_pkg::K_COARSE,
  parameter int unsigned GUARD    = lutcor_pkg::GUARD,
  parameter int unsigned PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned OUT_W    = lutcor_pkg::OUT_W,
  localparam int unsigned DW      = lutcor_pkg::rot_width(IN_W, GUARD),
  localparam int unsigned PHI_W   = lutcor_pkg::phi_width(PHI_FRAC),
  localparam int unsigned LATENCY = N + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  xa,
  input  logic signed [IN_W-1:0]  ya,
  input  logic signed [IN_W-1:0]  xb,
  input  logic signed [IN_W-1:0]  yb,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] xp,
  output logic signed [OUT_W-1:0] yp,
  output logic signed [PHI_W-1:0] phi_o,
  output logic                    flip_o
);

  // Parameter rules: at least one coarse and one fine step, and room for the finest alpha bit.
  if (K < 1 || K >= N || PHI_FRAC + 1 < N - 1) begin : g_bad_param
    $error("lutcor_top: need 1 <= K < N and PHI_FRAC >= N-2");
  end

  logic signed [DW-1:0]    xa_c, ya_c, xb_c, yb_c;
  logic [K-1:0]            da, db;
  logic                    flip_c, flip_r, flip_q;
  logic [2*K-1:0]          rot;
  logic [PHI_W-1:0]        phi_add, phi_sub;
  logic signed [PHI_W-1:0] phi_a, phi;

  coarse_pipeline #(.IN_W(IN_W), .GUARD(GUARD), .K(K), .DW(DW)) u_coarse (
    .clk(clk), .xa_i(xa), .ya_i(ya), .xb_i(xb), .yb_i(yb),
    .xa_o(xa_c), .ya_o(ya_c), .xb_o(xb_c), .yb_o(yb_c),
    .da_o(da), .db_o(db), .flip_o(flip_c)
  );

  rotation_register #(.K(K), .TAIL(N - K)) u_rotreg (
    .clk(clk), .da_i(da), .db_i(db), .flip_i(flip_c), .rot_o(rot), .flip_o(flip_r)
  );

  fine_pipeline #(.DW(DW), .K(K), .N(N), .PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W)) u_fine (
    .clk(clk), .xa_i(xa_c), .ya_i(ya_c), .xb_i(xb_c), .yb_i(yb_c),
    .phi_add_o(phi_add), .phi_sub_o(phi_sub)
  );

  phi_a_lut #(.K(K), .PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W)) u_phi_a (
    .rot_i(rot), .phi_a_o(phi_a)
  );

  phase_combiner #(.PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W)) u_comb (
    .clk(clk), .phi_a_i(phi_a), .phi_add_i(phi_add), .phi_sub_i(phi_sub), .phi_o(phi)
  );

  always_ff @(posedge clk) flip_q <= flip_r;

  trig_lut #(.FN(lutcor_pkg::TRIG_COS), .PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W), .OUT_W(OUT_W)) u_cos (
    .clk(clk), .phi_i(phi), .neg_i(flip_q), .val_o(xp)
  );

  trig_lut #(.FN(lutcor_pkg::TRIG_SIN), .PHI_FRAC(PHI_FRAC), .PHI_W(PHI_W), .OUT_W(OUT_W)) u_sin (
    .clk(clk), .phi_i(phi), .neg_i(flip_q), .val_o(yp)
  );

  // The phase estimate and flip bit are registered once more to line up with XP, YP.
  always_ff @(posedge clk) begin
    phi_o  <= phi;
    flip_o <= flip_q;
  end

  // Valid pipeline: the only state that is reset.
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= LATENCY'({vld, in_valid});
  end
  assign out_valid = vld[LATENCY-1];

  // Every accepted sample leaves exactly LATENCY clocks later; nothing can stall it.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> ##LATENCY (out_valid || !rst_n))
    else $error("lutcor_top: result not delivered after %0d clocks", LATENCY);

endmodule
