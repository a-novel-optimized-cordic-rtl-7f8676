// tb_ppc_block32 - phase plane correlation of one 32x32 block through the core at its defaults.
//
// The testbench builds a random 32x32 reference block and a current block that is the reference
// circularly shifted by (DX, DY). It takes the 2-D DFT of both with real arithmetic, scales the
// spectra to 12-bit samples, and streams all 1024 bin pairs (A = current, B = reference) through
// the core at one pair per clock. The core's unit vectors XP + jYP are collected, an inverse 2-D
// DFT is taken here, and the peak of the correlation surface must sit at (DX, DY) and stand well
// above the next highest value. It also checks that the whole block leaves the core in
// 1024 + LATENCY clocks. Several shifts are tried, first as circular shifts of one block and then
// as two 32x32 windows cut from a larger 64x64 picture, where the content at the edges differs;
// there the peak must still be at (DX, DY) and at least three times the next value.
module tb_ppc_block32;
  import lutcor_pkg::*;

  localparam int  B       = 32;
  localparam int  NB      = B * B;
  localparam int  LATENCY = N_ITER + 3;
  localparam int  NSHIFT  = 6;
  localparam int  NCIRC   = 4;   // the first NCIRC shifts are circular, the rest windowed
  localparam real PI      = 3.14159265358979323846;
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] xa = '0, ya = '0, xb = '0, yb = '0;
  logic out_valid, flip_o;
  logic signed [OUT_W-1:0] xp, yp;
  logic signed [PHI_W-1:0] phi_o;

  lutcor_top dut (.*);

  int checks = 0, failures = 0;

  real ref_img[B][B], cur_img[B][B], pic[2*B][2*B];
  real fr_re[B][B], fr_im[B][B], fc_re[B][B], fc_im[B][B];
  real p_re[B][B], p_im[B][B];
  int  qxa[NB], qya[NB], qxb[NB], qyb[NB];
  int  n_out;
  int  first_in, last_out, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // 2-D DFT (sgn = -1) or inverse without 1/N scaling (sgn = +1), row-column.
  task automatic dft2(input real ire[B][B], input real iim[B][B], input real sgn,
                      output real ore[B][B], output real oim[B][B]);
    real tre[B][B], tim[B][B];
    for (int r = 0; r < B; r++)
      for (int k = 0; k < B; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < B; n++) begin
          real w;
          w = sgn * 2.0 * PI * $itor(k * n) / $itor(B);
          sr = sr + ire[r][n] * $cos(w) - iim[r][n] * $sin(w);
          si = si + ire[r][n] * $sin(w) + iim[r][n] * $cos(w);
        end
        tre[r][k] = sr; tim[r][k] = si;
      end
    for (int c = 0; c < B; c++)
      for (int k = 0; k < B; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < B; n++) begin
          real w;
          w = sgn * 2.0 * PI * $itor(k * n) / $itor(B);
          sr = sr + tre[n][c] * $cos(w) - tim[n][c] * $sin(w);
          si = si + tre[n][c] * $sin(w) + tim[n][c] * $cos(w);
        end
        ore[k][c] = sr; oim[k][c] = si;
      end
  endtask

  // Collect results in bin order.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (n_out < NB) begin
        p_re[n_out / B][n_out % B] = $itor(xp);
        p_im[n_out / B][n_out % B] = $itor(yp);
      end
      n_out++;
      last_out = cyc;
    end
    if (rst_n && in_valid && first_in < 0) first_in = cyc;
  end

  initial begin : watchdog
    repeat (NSHIFT * (NB + 200) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dxs[NSHIFT], dys[NSHIFT];
    real zero[B][B];
    dxs = '{3, 0, 29, 11, 4, 2};
    dys = '{5, 7, 30, 0, 2, 6};
    foreach (zero[r, c]) zero[r][c] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < NSHIFT; s++) begin
      real mx, pk, second, cr[B][B], ci[B][B];
      int pr, pc;
      if (s < NCIRC) begin
        foreach (ref_img[r, c]) ref_img[r][c] = $itor($urandom_range(0, 255));
        foreach (cur_img[r, c]) cur_img[r][c] = ref_img[(r - dys[s] + B) % B][(c - dxs[s] + B) % B];
      end else begin
        // The picture moves by (DX, DY) between the frames; the window stays put.
        foreach (pic[r, c]) pic[r][c] = $itor($urandom_range(0, 255));
        foreach (ref_img[r, c]) ref_img[r][c] = pic[r + 16][c + 16];
        foreach (cur_img[r, c]) cur_img[r][c] = pic[r + 16 - dys[s]][c + 16 - dxs[s]];
      end
      dft2(ref_img, zero, -1.0, fr_re, fr_im);
      dft2(cur_img, zero, -1.0, fc_re, fc_im);
      mx = 1.0;
      foreach (fr_re[r, c]) begin
        if (fr_re[r][c] > mx) mx = fr_re[r][c];  if (-fr_re[r][c] > mx) mx = -fr_re[r][c];
        if (fr_im[r][c] > mx) mx = fr_im[r][c];  if (-fr_im[r][c] > mx) mx = -fr_im[r][c];
      end
      // Same scale for both blocks: a circular shift does not change magnitudes.
      for (int i = 0; i < NB; i++) begin
        real sc;
        sc = (2.0 ** (IN_W - 1) - 1.0) / mx;
        qxa[i] = $rtoi(fc_re[i / B][i % B] * sc);
        qya[i] = $rtoi(fc_im[i / B][i % B] * sc);
        qxb[i] = $rtoi(fr_re[i / B][i % B] * sc);
        qyb[i] = $rtoi(fr_im[i / B][i % B] * sc);
      end
      n_out = 0;
      first_in = -1;
      @(posedge clk);
      for (int i = 0; i < NB; i++) begin
        xa <= IN_W'(qxa[i]); ya <= IN_W'(qya[i]);
        xb <= IN_W'(qxb[i]); yb <= IN_W'(qyb[i]);
        in_valid <= 1'b1;
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (LATENCY + 5) @(posedge clk);
      check(n_out == NB, $sformatf("shift %0d: %0d results, expected %0d", s, n_out, NB));
      check(last_out - first_in == NB - 1 + LATENCY,
            $sformatf("shift %0d: block took %0d clocks, expected %0d", s, last_out - first_in + 1, NB + LATENCY));
      dft2(p_re, p_im, 1.0, cr, ci);
      pk = -1.0e30; pr = 0; pc = 0;
      foreach (cr[r, c]) if (cr[r][c] > pk) begin pk = cr[r][c]; pr = r; pc = c; end
      second = -1.0e30;
      foreach (cr[r, c]) if ((r != pr || c != pc) && cr[r][c] > second) second = cr[r][c];
      $display("shift (%0d,%0d): peak at (%0d,%0d), height %0.3f of ideal, next %0.3f",
               dxs[s], dys[s], pc, pr, pk / (2047.0 * NB), second / (2047.0 * NB));
      check(pc == dxs[s] && pr == dys[s], $sformatf("peak at (%0d,%0d), expected (%0d,%0d)", pc, pr, dxs[s], dys[s]));
      if (s < NCIRC) begin
        check(pk > 0.9 * 2047.0 * NB, "peak lower than 0.9 of the ideal height");
        check(second < 0.1 * pk, "second value above 0.1 of the peak");
      end else begin
        check(second < pk / 3.0, "windowed: second value above a third of the peak");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
