// tb_lutcor_top - end-to-end test of the LUT-CORDIC core at its default parameters.
//
// Streams random sample pairs (A, B) into the core, with bursts of back-to-back samples and gaps,
// and compares every result with exp(j*(arg A - arg B)) computed with real arithmetic ($atan2,
// $cos, $sin). XP and YP must be within TOL_LSB of the rounded ideal values, and the phase
// estimate (plus pi when flip_o is set) within TOL_PHI radians of the true difference modulo 2*pi.
// It also checks that out_valid follows in_valid exactly LATENCY = N+3 clocks later, i.e. one
// result per clock at full rate. Counted mechanisms: a single half-plane flip, both vectors flipped,
// fine steps that raised (alpha) and lowered (beta) the estimate, samples where all fine steps
// agreed, full-rate bursts and gaps; each must occur at least once.
module tb_lutcor_top;
  import lutcor_pkg::*;

  localparam int unsigned PHI_W   = phi_width(PHI_FRAC);
  localparam int unsigned LATENCY = N_ITER + 3;
  localparam int          NSAMP   = 4000;
  localparam int          TOL_LSB = 6;
  localparam real         TOL_PHI = 0.004;
  localparam real         PI      = 3.14159265358979323846;
  localparam real         FS      = 2.0 ** (OUT_W - 1) - 1.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0] xa = '0, ya = '0, xb = '0, yb = '0;
  logic out_valid, flip_o;
  logic signed [OUT_W-1:0] xp, yp;
  logic signed [PHI_W-1:0] phi_o;

  lutcor_top dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_flip1 = 0, n_flip2 = 0, n_alpha = 0, n_beta = 0, n_agree = 0, n_burst = 0, n_gap = 0;
  real max_err_lsb = 0.0, max_err_phi = 0.0;

  // Expected results, queued in the order the samples went in.
  real exp_phi_q[$];
  int  exp_cyc_q[$];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real wrap(input real a);
    real r;
    r = a;
    while (r > PI)   r = r - 2.0 * PI;
    while (r <= -PI) r = r + 2.0 * PI;
    return r;
  endfunction

  // Random sample of magnitude at least about 2^(IN_W-4) so that the angle is well defined.
  task automatic rand_sample(output logic signed [IN_W-1:0] x, output logic signed [IN_W-1:0] y);
    int mode;
    mode = $urandom_range(0, 9);
    do begin
      x = IN_W'($urandom);
      y = IN_W'($urandom);
      if (mode == 0) begin           // on an axis or diagonal, including the most negative value
        case ($urandom_range(0, 3))
          0: y = '0;
          1: x = '0;
          2: y = x;
          default: begin x = {1'b1, {(IN_W-1){1'b0}}}; y = IN_W'($urandom_range(0, 1) * 2 - 1) * x; end
        endcase
      end
    end while (($itor(x) ** 2 + $itor(y) ** 2) < (2.0 ** (2 * (IN_W - 4))));
  endtask

  // Monitor: every valid result must be the oldest expected sample, on the expected cycle.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ep, gx, gy, ph;
      if (exp_phi_q.size() == 0) begin
        check(1'b0, "out_valid with nothing in flight");
      end else begin
        int ec;
        ep = exp_phi_q.pop_front();
        ec = exp_cyc_q.pop_front();
        check(cyc == ec + LATENCY, $sformatf("latency %0d, expected %0d", cyc - ec, LATENCY));
        gx = $floor(FS * $cos(ep) + 0.5);
        gy = $floor(FS * $sin(ep) + 0.5);
        check(fabs($itor(xp) - gx) <= TOL_LSB, $sformatf("XP %0d expected %0.0f (phi %f)", xp, gx, ep));
        check(fabs($itor(yp) - gy) <= TOL_LSB, $sformatf("YP %0d expected %0.0f (phi %f)", yp, gy, ep));
        ph = $itor(phi_o) / (2.0 ** PHI_FRAC) + (flip_o ? PI : 0.0);
        check(fabs(wrap(ph - ep)) <= TOL_PHI, $sformatf("phi %f expected %f", wrap(ph), ep));
        if (fabs($itor(xp) - gx) > max_err_lsb) max_err_lsb = fabs($itor(xp) - gx);
        if (fabs($itor(yp) - gy) > max_err_lsb) max_err_lsb = fabs($itor(yp) - gy);
        if (fabs(wrap(ph - ep)) > max_err_phi) max_err_phi = fabs(wrap(ph - ep));
        if (flip_o) n_flip1++;
      end
    end
    // The input side is sampled here too, so both ends see the same clock edges.
    if (rst_n && in_valid) begin
      exp_cyc_q.push_back(cyc);
      if (xa[IN_W-1] && xb[IN_W-1]) n_flip2++;
      exp_phi_q.push_back(wrap($atan2($itor(ya), $itor(xa)) - $atan2($itor(yb), $itor(xb))));
    end
    if (rst_n && !out_valid && exp_cyc_q.size() > 0)
      check(cyc < exp_cyc_q[0] + LATENCY, "result missing");
  end

  // Mechanism counters observed inside the core.
  always @(posedge clk) begin
    if (rst_n && dut.vld[N_ITER]) begin   // phi_add / phi_sub of a real sample are on the wires
      if (dut.phi_add != '0) n_alpha++;
      if (dut.phi_sub != '0) n_beta++;
      if (dut.phi_add == '0 && dut.phi_sub == '0) n_agree++;
    end
  end

  initial begin : watchdog
    repeat (20 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    sent = 0;
    while (sent < NSAMP) begin
      int burst, gap;
      burst = $urandom_range(1, 40);
      gap   = $urandom_range(0, 3);
      if (burst >= LATENCY) n_burst++;
      for (int b = 0; b < burst && sent < NSAMP; b++) begin
        logic signed [IN_W-1:0] sxa, sya, sxb, syb;
        rand_sample(sxa, sya);
        rand_sample(sxb, syb);
        xa <= sxa; ya <= sya; xb <= sxb; yb <= syb;
        in_valid <= 1'b1;
        sent++;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      if (gap > 0) n_gap++;
      repeat (gap) @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    check(exp_phi_q.size() == 0, "results outstanding at the end");
    $display("max error: %0.1f LSB, %f rad", max_err_lsb, max_err_phi);
    $display("mechanisms: flip=%0d both_flipped=%0d alpha=%0d beta=%0d agree=%0d bursts=%0d gaps=%0d",
             n_flip1, n_flip2, n_alpha, n_beta, n_agree, n_burst, n_gap);
    check(n_flip1 > 0, "single half-plane flip never happened");
    check(n_flip2 > 0, "double half-plane flip never happened");
    check(n_alpha > 0, "alpha bit never set");
    check(n_beta  > 0, "beta bit never set");
    check(n_agree > 0, "no sample with all fine steps agreeing");
    check(n_burst > 0, "no full-rate burst longer than the latency");
    check(n_gap   > 0, "no gap in the input stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
