// tb_fine_pipeline - drives the fine part with vectors like those the coarse part delivers
// (x > 0, angle within +-atan(2^-(K-1))) at one per clock and checks, N-K clocks later:
//  * phi_add / phi_sub exactly equal to a bit-register model of steps K..N-1;
//  * (phi_add - phi_sub) * 2^-PHI_FRAC within TOL rad of the true angle difference
//    atan2(yA, xA) - atan2(yB, xB), i.e. the fine part really measures the residual difference.
module tb_fine_pipeline;
  import lutcor_pkg::*;
  localparam int unsigned DW    = rot_width(IN_W, GUARD);
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);
  localparam int unsigned K     = K_COARSE;
  localparam int unsigned L     = N_ITER - K_COARSE;
  localparam int          NS    = 3000;
  localparam real         TOL   = 0.003;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [DW-1:0] xa, ya, xb, yb;
  logic [PHI_W-1:0] padd, psub;

  fine_pipeline dut (.clk(clk), .xa_i(xa), .ya_i(ya), .xb_i(xb), .yb_i(yb), .phi_add_o(padd), .phi_sub_o(psub));

  int checks = 0, failures = 0;
  longint ma[NS], mb[NS];
  real    md[NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic model(input int xa0, input int ya0, input int xb0, input int yb0, output longint al, output longint be);
    int x1, y1, x2, y2, t1, t2;
    x1 = xa0; y1 = ya0; x2 = xb0; y2 = yb0;
    al = 0; be = 0;
    for (int i = K; i < N_ITER; i++) begin
      if (y1 >= 0 && y2 < 0) al = al + (longint'(1) << (PHI_FRAC + 1 - i));
      if (y1 < 0 && y2 >= 0) be = be + (longint'(1) << (PHI_FRAC + 1 - i));
      t1 = (y1 < 0) ? x1 - (y1 >>> i) : x1 + (y1 >>> i);
      t2 = (y1 < 0) ? y1 + (x1 >>> i) : y1 - (x1 >>> i);
      x1 = t1; y1 = t2;
      t1 = (y2 < 0) ? x2 - (y2 >>> i) : x2 + (y2 >>> i);
      t2 = (y2 < 0) ? y2 + (x2 >>> i) : y2 - (x2 >>> i);
      x2 = t1; y2 = t2;
    end
  endtask

  initial begin : watchdog
    repeat (4 * NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real amax, maxerr;
    amax = $atan(1.0 / (2.0 ** (K - 1)));
    maxerr = 0.0;
    for (int t = 0; t < NS; t++) begin
      real r, a1, a2, err;
      @(negedge clk);
      if (t >= L) begin
        check(padd == PHI_W'(ma[t-L]) && psub == PHI_W'(mb[t-L]),
              $sformatf("sample %0d: add %h sub %h expected %h %h", t - L, padd, psub, ma[t-L], mb[t-L]));
        err = real'(int'(padd) - int'(psub)) / (2.0 ** PHI_FRAC) - md[t-L];
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
        check(err <= TOL, $sformatf("sample %0d: phase error %f", t - L, err));
      end
      r  = 2.0 ** (DW - 4) * (0.5 + 0.5 * $itor($urandom_range(0, 1000)) / 1000.0);
      a1 = amax * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
      a2 = amax * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
      xa = DW'($rtoi(r * $cos(a1))); ya = DW'($rtoi(r * $sin(a1)));
      xb = DW'($rtoi(r * $cos(a2))); yb = DW'($rtoi(r * $sin(a2)));
      md[t] = $atan2($itor(ya), $itor(xa)) - $atan2($itor(yb), $itor(xb));
      model(int'(xa), int'(ya), int'(xb), int'(yb), ma[t], mb[t]);
    end
    $display("max phase error %f rad", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
