// lutcor_pkg - shared constants and helpers of the LUT-CORDIC phase-difference core.
//
// The core takes two complex samples A = XA + jYA and B = XB + jYB and returns the unit vector
// XP + jYP = exp(j*(arg A - arg B)), i.e. the normalized product A*conj(B)/|A*conj(B)| that phase
// plane correlation needs for every frequency bin. The defaults follow the configuration the
// design is characterised in: 12-bit samples and 12 CORDIC iterations. The split point between the
// coarse (look-up) and fine (bit-register) parts, K_COARSE = 6, is one of the two values ("5 or 6")
// suggested for it. Guard bits, the phase format and the output scale are this design's own choices.
//
// Phase format: phases are signed two's-complement radians with PHI_FRAC fraction bits and two
// integer bits (range -4 .. +4 rad), PHI_W = PHI_FRAC + 3 bits wide.
package lutcor_pkg;

  // Input sample width (12 bits in the published architecture).
  localparam int unsigned IN_W     = 12;
  // Total number of CORDIC iterations n (12 for the published core).
  localparam int unsigned N_ITER   = 12;
  // Number of coarse steps k handled by the rotation register and phi_a look-up table.
  localparam int unsigned K_COARSE = 6;
  // Fraction guard bits added below the input LSB inside the rotators.
  localparam int unsigned GUARD    = 2;
  // Fraction bits of the phase word; the finest step 2*2^-(n-1) needs PHI_FRAC >= n-2.
  localparam int unsigned PHI_FRAC = N_ITER - 1;
  // Output width of XP and YP; full scale 1.0 maps to 2^(OUT_W-1)-1.
  localparam int unsigned OUT_W    = 12;

  // Width of the rotator datapath: sign extension for the 180-degree pre-rotation (+1 bit),
  // CORDIC growth of at most sqrt(2)*1.65 (+2 bits) and the fraction guard bits.
  function automatic int unsigned rot_width(int unsigned in_w, int unsigned guard);
    return in_w + 3 + guard;
  endfunction

  // Width of a phase word with the given number of fraction bits.
  function automatic int unsigned phi_width(int unsigned phi_frac);
    return phi_frac + 3;
  endfunction

  // Selects which function a trig_lut instance holds.
  typedef enum logic {TRIG_COS = 1'b0, TRIG_SIN = 1'b1} trig_fn_e;

endpackage
