// tb_iteration_sweep - runs the core at several iteration counts N (with the coarse/fine split
// K = min(6, N-1)) side by side on the same random sample stream, as in a design-space sweep over
// the number of CORDIC iterations.
//
// For each configuration the phase estimate (phi_o, plus pi when flip_o is set) is compared with
// the true difference arg A - arg B. After N steps each vector is left within atan(2^-(N-1)) of
// the axis, so the error bound checked is 2*2^-(N-1) plus 0.0015 rad for table rounding and
// datapath quantisation. The largest error must also shrink as N grows.
module tb_iteration_sweep;
  import lutcor_pkg::*;

  localparam int  NCFG   = 5;
  localparam int  NS     = 3000;
  localparam real PI     = 3.14159265358979323846;
  localparam int  NV[NCFG] = '{4, 6, 8, 10, 12};

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] xa = '0, ya = '0, xb = '0, yb = '0;

  logic                    ov   [NCFG];
  logic                    fl   [NCFG];
  logic signed [OUT_W-1:0] xp   [NCFG];
  logic signed [OUT_W-1:0] yp   [NCFG];
  logic signed [PHI_FRAC+2:0] ph [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int unsigned NN = NV[g];
    localparam int unsigned KK = (NN - 1 < 6) ? NN - 1 : 6;
    lutcor_top #(.N(NN), .K(KK)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .xa(xa), .ya(ya), .xb(xb), .yb(yb),
      .out_valid(ov[g]), .xp(xp[g]), .yp(yp[g]), .phi_o(ph[g]), .flip_o(fl[g])
    );
  end

  int  checks = 0, failures = 0;
  real exp_q[NCFG][$];
  real maxerr[NCFG];
  int  nres[NCFG];

  function automatic real wrap(input real a);
    real r;
    r = a;
    while (r > PI)   r = r - 2.0 * PI;
    while (r <= -PI) r = r + 2.0 * PI;
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid)
      for (int g = 0; g < NCFG; g++)
        exp_q[g].push_back(wrap($atan2($itor(ya), $itor(xa)) - $atan2($itor(yb), $itor(xb))));
    for (int g = 0; g < NCFG; g++) begin
      if (rst_n && ov[g]) begin
        real e, got, err, bound;
        e     = exp_q[g].pop_front();
        got   = $itor(ph[g]) / (2.0 ** PHI_FRAC) + (fl[g] ? PI : 0.0);
        err   = wrap(got - e);
        if (err < 0.0) err = -err;
        bound = 2.0 / (2.0 ** (NV[g] - 1)) + 0.0015;
        if (err > maxerr[g]) maxerr[g] = err;
        nres[g]++;
        checks++;
        if (err > bound) begin
          failures++;
          if (failures < 20) $display("FAIL: N=%0d error %f above %f", NV[g], err, bound);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (maxerr[g]) begin maxerr[g] = 0.0; nres[g] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NS; i++) begin
      logic signed [IN_W-1:0] v[4];
      do begin
        foreach (v[j]) v[j] = IN_W'($urandom);
      end while ($itor(v[0]) ** 2 + $itor(v[1]) ** 2 < 2.0 ** (2 * (IN_W - 3)) ||
                 $itor(v[2]) ** 2 + $itor(v[3]) ** 2 < 2.0 ** (2 * (IN_W - 3)));
      xa <= v[0]; ya <= v[1]; xb <= v[2]; yb <= v[3];
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (30) @(posedge clk);
    for (int g = 0; g < NCFG; g++) begin
      $display("N=%0d: %0d results, max phase error %f rad", NV[g], nres[g], maxerr[g]);
      checks++;
      if (nres[g] != NS) begin failures++; $display("FAIL: N=%0d returned %0d results", NV[g], nres[g]); end
      if (g > 0) begin
        checks++;
        if (!(maxerr[g] < maxerr[g-1])) begin failures++; $display("FAIL: error did not shrink from N=%0d to N=%0d", NV[g-1], NV[g]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
