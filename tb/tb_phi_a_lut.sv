// tb_phi_a_lut - reads every entry of the coarse phase table and compares it with the angle
// sum worked out here: for each step i the pair (A decision, B decision) adds 0 when equal,
// +2*atan(2^-i) for (0,1) and -2*atan(2^-i) for (1,0); the result in units of 2^-PHI_FRAC rad
// must be within one unit of the table entry. A few entries are also checked against constants
// (all decisions equal gives 0).
module tb_phi_a_lut;
  import lutcor_pkg::*;
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);
  localparam int unsigned K     = K_COARSE;

  logic [2*K-1:0] rot;
  logic signed [PHI_W-1:0] phi_a;

  phi_a_lut dut (.rot_i(rot), .phi_a_o(phi_a));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** (2 * K); a++) begin
      real e;
      e = 0.0;
      for (int i = 0; i < K; i++) begin
        case ({a[2*i], a[2*i+1]})
          2'b01:   e = e + 2.0 * $atan(1.0 / (2.0 ** i));
          2'b10:   e = e - 2.0 * $atan(1.0 / (2.0 ** i));
          default: ;
        endcase
      end
      e = e * (2.0 ** PHI_FRAC);
      rot = (2 * K)'(a);
      #1;
      checks++;
      if ($itor(phi_a) - e > 1.0 || e - $itor(phi_a) > 1.0) begin
        failures++;
        if (failures < 20) $display("FAIL: rot %h phi_a %0d expected %f", rot, phi_a, e);
      end
    end
    // Fixed points: equal decisions in every step.
    rot = '0;                 #1; checks++; if (phi_a != 0) failures++;
    rot = '1;                 #1; checks++; if (phi_a != 0) failures++;
    // A never below the axis, B always below: the largest positive difference.
    rot = {K{2'b10}};         #1; checks++;
    if (phi_a <= 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
