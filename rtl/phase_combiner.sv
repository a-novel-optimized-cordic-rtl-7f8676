// phase_combiner - forms the final phase difference phi = phi_a + (phi_add - phi_sub).
//
// phi_a is the coarse estimate read from the look-up table, phi_add and phi_sub the two bit
// registers of the fine part. All three are phase words with the same fraction bits, so the
// combination is one subtraction and one addition. The result is registered.
//
// Timing: one register stage.
module phase_combiner #(
  parameter int unsigned PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned PHI_W    = lutcor_pkg::phi_width(PHI_FRAC)
) (
  input  logic                    clk,
  input  logic signed [PHI_W-1:0] phi_a_i,
  input  logic [PHI_W-1:0]        phi_add_i,
  input  logic [PHI_W-1:0]        phi_sub_i,
  output logic signed [PHI_W-1:0] phi_o
);

  logic signed [PHI_W-1:0] phi_d;

  always_comb phi_d = $signed(phi_add_i) - $signed(phi_sub_i);

  always_ff @(posedge clk) phi_o <= phi_a_i + phi_d;

endmodule
