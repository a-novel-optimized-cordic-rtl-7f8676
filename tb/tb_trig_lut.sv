// tb_trig_lut - reads every entry of a cosine and a sine table, with and without negation, and
// compares it with (2^(OUT_W-1)-1)*cos/sin(phi) computed here; the difference must not exceed one
// unit. The one-clock read latency is respected by applying at the falling edge and reading at
// the next falling edge.
module tb_trig_lut;
  import lutcor_pkg::*;
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);
  localparam real         FS    = 2.0 ** (OUT_W - 1) - 1.0;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [PHI_W-1:0] phi;
  logic neg;
  logic signed [OUT_W-1:0] c, s;

  trig_lut #(.FN(TRIG_COS)) dut_cos (.clk(clk), .phi_i(phi), .neg_i(neg), .val_o(c));
  trig_lut #(.FN(TRIG_SIN)) dut_sin (.clk(clk), .phi_i(phi), .neg_i(neg), .val_o(s));

  int checks = 0, failures = 0;

  function automatic bit close(input int got, input real want);
    return ($itor(got) - want <= 1.0) && (want - $itor(got) <= 1.0);
  endfunction

  initial begin : watchdog
    repeat (2 ** (PHI_W + 2) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** (PHI_W + 1); a++) begin
      real ang, sg;
      @(negedge clk);
      phi = PHI_W'(a);
      neg = a[PHI_W];
      @(negedge clk);
      ang = $itor($signed(PHI_W'(a))) / (2.0 ** PHI_FRAC);
      sg  = a[PHI_W] ? -1.0 : 1.0;
      checks += 2;
      if (!close(c, sg * FS * $cos(ang))) begin
        failures++;
        if (failures < 20) $display("FAIL: cos(%f) neg=%0d got %0d", ang, a[PHI_W], c);
      end
      if (!close(s, sg * FS * $sin(ang))) begin
        failures++;
        if (failures < 20) $display("FAIL: sin(%f) neg=%0d got %0d", ang, a[PHI_W], s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
