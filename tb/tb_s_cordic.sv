// tb_s_cordic - checks one fine step: both vectors are rotated like a coarse rotator would, and
// exactly the right bit register changes. With a = (A above the axis), b = (B above the axis),
// alpha gains bit PHI_FRAC+1-i when a && !b and beta gains it when !a && b; all other bits pass
// through unchanged. Checked for the first fine step (i = K) and the last (i = N-1), at full rate.
module tb_s_cordic;
  import lutcor_pkg::*;
  localparam int unsigned DW    = rot_width(IN_W, GUARD);
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);
  localparam int unsigned SL    = N_ITER - 1;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [DW-1:0] xa, ya, xb, yb;
  logic [PHI_W-1:0] al, be;
  logic signed [DW-1:0] xa_f, ya_f, xb_f, yb_f, xa_l, ya_l, xb_l, yb_l;
  logic [PHI_W-1:0] al_f, be_f, al_l, be_l;

  s_cordic dut_f (.clk(clk), .xa_i(xa), .ya_i(ya), .xb_i(xb), .yb_i(yb), .alpha_i(al), .beta_i(be),
                  .xa_o(xa_f), .ya_o(ya_f), .xb_o(xb_f), .yb_o(yb_f), .alpha_o(al_f), .beta_o(be_f));
  s_cordic #(.SHIFT(SL)) dut_l (.clk(clk), .xa_i(xa), .ya_i(ya), .xb_i(xb), .yb_i(yb), .alpha_i(al), .beta_i(be),
                  .xa_o(xa_l), .ya_o(ya_l), .xb_o(xb_l), .yb_o(yb_l), .alpha_o(al_l), .beta_o(be_l));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic rot(input int x, input int y, input int sh, output int xo, output int yo);
    if (y < 0) begin xo = x - (y >>> sh); yo = y + (x >>> sh); end
    else       begin xo = x + (y >>> sh); yo = y - (x >>> sh); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim, pxa, pya, pxb, pyb, e1, e2, e3, e4;
    logic [PHI_W-1:0] pal, pbe, ea, eb;
    int n_alpha = 0, n_beta = 0;
    lim = 1 << (DW - 3);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t > 0) begin
        rot(pxa, pya, K_COARSE, e1, e2); rot(pxb, pyb, K_COARSE, e3, e4);
        check(xa_f == DW'(e1) && ya_f == DW'(e2) && xb_f == DW'(e3) && yb_f == DW'(e4), "vectors, first fine step");
        rot(pxa, pya, SL, e1, e2); rot(pxb, pyb, SL, e3, e4);
        check(xa_l == DW'(e1) && ya_l == DW'(e2) && xb_l == DW'(e3) && yb_l == DW'(e4), "vectors, last fine step");
        for (int s = 0; s < 2; s++) begin
          int pos;
          pos = PHI_FRAC + 1 - (s == 0 ? K_COARSE : SL);
          ea = pal; eb = pbe;
          if (pya >= 0 && pyb < 0) begin ea[pos] = 1'b1; if (s == 0) n_alpha++; end
          if (pya < 0 && pyb >= 0) begin eb[pos] = 1'b1; if (s == 0) n_beta++; end
          if (s == 0) check(al_f == ea && be_f == eb, $sformatf("alpha/beta first step %h %h expected %h %h", al_f, be_f, ea, eb));
          else        check(al_l == ea && be_l == eb, $sformatf("alpha/beta last step %h %h expected %h %h", al_l, be_l, ea, eb));
        end
      end
      pxa = $urandom_range(0, lim - 1);
      pya = $urandom_range(0, 2 * lim - 1) - lim;
      pxb = $urandom_range(0, lim - 1);
      pyb = $urandom_range(0, 2 * lim - 1) - lim;
      pal = (t % 3 == 0) ? '0 : PHI_W'($urandom);
      pbe = (t % 3 == 0) ? '0 : PHI_W'($urandom);
      xa = DW'(pxa); ya = DW'(pya); xb = DW'(pxb); yb = DW'(pyb); al = pal; be = pbe;
    end
    check(n_alpha > 0 && n_beta > 0, "both alpha and beta cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
