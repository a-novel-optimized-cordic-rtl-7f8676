// phi_a_lut - coarse phase-difference look-up table.
//
// Indexed by the rotation register (bit 2i = A's decision, bit 2i+1 = B's decision at step i,
// 1 meaning the vector was below the x axis). With s = +1 for a decision of 0 and -1 for 1, the
// angle removed from a vector by the coarse steps is sum_i s_i * atan(2^-i), so the table holds
//     phi_a = round( 2^PHI_FRAC * sum_{i<K} (sA_i - sB_i) * atan(2^-i) )
// Steps where A and B turned the same way contribute nothing; opposite turns contribute twice the
// step angle. The table has 2^(2K) entries, built at start-up from that formula.
//
// Interface: purely combinational read, rot_i -> phi_a_o.
module phi_a_lut #(
  parameter int unsigned K        = lutcor_pkg::K_COARSE,
  parameter int unsigned PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned PHI_W    = lutcor_pkg::phi_width(PHI_FRAC)
) (
  input  logic [2*K-1:0]          rot_i,
  output logic signed [PHI_W-1:0] phi_a_o
);

  // Table entry for rotation register value r.
  function automatic logic signed [PHI_W-1:0] entry(logic [2*K-1:0] r);
    real acc, sa, sb;
    acc = 0.0;
    for (int i = 0; i < K; i++) begin
      sa  = r[2*i]   ? -1.0 : 1.0;
      sb  = r[2*i+1] ? -1.0 : 1.0;
      acc = acc + (sa - sb) * $atan(2.0 ** (-i));
    end
    return PHI_W'($rtoi($floor(acc * (2.0 ** PHI_FRAC) + 0.5)));
  endfunction

  logic signed [PHI_W-1:0] rom [2**(2*K)];

  initial begin
    for (int a = 0; a < 2**(2*K); a++) rom[a] = entry((2*K)'(a));
  end

  assign phi_a_o = rom[rot_i];

endmodule
