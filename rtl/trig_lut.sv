// trig_lut - cosine or sine look-up table producing one component of the output unit vector.
//
// The address is the phase word phi itself (two's-complement radians, PHI_FRAC fraction bits), so
// the table has 2^PHI_W entries and needs no range reduction: every phase word the core can
// produce lies inside -4 .. +4 rad. Entry a holds
//     round( (2^(OUT_W-1) - 1) * f(a / 2^PHI_FRAC) ),   f = cos (FN = TRIG_COS) or sin (TRIG_SIN)
// and is built at start-up from that formula. When neg_i is set the value is negated, which adds
// pi to the phase (used for the 180-degree input conditioning).
//
// Timing: one register stage, phi_i/neg_i -> val_o.
module trig_lut #(
  parameter lutcor_pkg::trig_fn_e FN       = lutcor_pkg::TRIG_COS,
  parameter int unsigned          PHI_FRAC = lutcor_pkg::PHI_FRAC,
  parameter int unsigned          PHI_W    = lutcor_pkg::phi_width(PHI_FRAC),
  parameter int unsigned          OUT_W    = lutcor_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic signed [PHI_W-1:0] phi_i,
  input  logic                    neg_i,
  output logic signed [OUT_W-1:0] val_o
);

  // Table entry for address a.
  function automatic logic signed [OUT_W-1:0] entry(logic [PHI_W-1:0] a);
    real ang, f;
    ang = real'($signed(a)) / (2.0 ** PHI_FRAC);
    f   = (FN == lutcor_pkg::TRIG_SIN) ? $sin(ang) : $cos(ang);
    return OUT_W'($rtoi($floor(f * (2.0 ** (OUT_W - 1) - 1.0) + 0.5)));
  endfunction

  logic signed [OUT_W-1:0] rom [2**PHI_W];

  initial begin
    for (int a = 0; a < 2**PHI_W; a++) rom[a] = entry(PHI_W'(a));
  end

  logic signed [OUT_W-1:0] raw;

  always_comb raw = rom[$unsigned(phi_i)];

  always_ff @(posedge clk) val_o <= neg_i ? -raw : raw;

endmodule
