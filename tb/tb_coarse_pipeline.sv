// tb_coarse_pipeline - checks the conditioning stage and the K coarse rotators against an integer
// model, at one new sample per clock.
//
// The model widens each sample by GUARD fraction bits, negates it when x < 0, then applies the
// micro-rotations i = 0..K-1 (decision 1 when y < 0). The pipeline timing is checked as well:
// flip_o belongs to the sample applied 1 clock earlier, decision i to the sample 2+i clocks earlier
// and the vectors to the sample K+1 clocks earlier.
module tb_coarse_pipeline;
  import lutcor_pkg::*;
  localparam int unsigned K  = K_COARSE;
  localparam int unsigned DW = rot_width(IN_W, GUARD);
  localparam int          NS = 3000;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [IN_W-1:0] xa, ya, xb, yb;
  logic signed [DW-1:0] xa_o, ya_o, xb_o, yb_o;
  logic [K-1:0] da, db;
  logic flip;

  coarse_pipeline dut (
    .clk(clk), .xa_i(xa), .ya_i(ya), .xb_i(xb), .yb_i(yb),
    .xa_o(xa_o), .ya_o(ya_o), .xb_o(xb_o), .yb_o(yb_o), .da_o(da), .db_o(db), .flip_o(flip)
  );

  int checks = 0, failures = 0;

  // Model results per sample.
  int  mxa[NS], mya[NS], mxb[NS], myb[NS];
  bit  mda[NS][K], mdb[NS][K], mflip[NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic model_one(input int x0, input int y0, output int xr, output int yr, output bit d[K], output bit f);
    int x, y, xs, ys;
    f = (x0 < 0);
    x = (f ? -x0 : x0) * (1 << GUARD);
    y = (f ? -y0 : y0) * (1 << GUARD);
    for (int i = 0; i < K; i++) begin
      xs = x >>> i;
      ys = y >>> i;
      d[i] = (y < 0);
      if (d[i]) begin x = x - ys; y = y + xs; end
      else      begin x = x + ys; y = y - xs; end
    end
    xr = x;
    yr = y;
  endtask

  initial begin : watchdog
    repeat (4 * NS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NS; t++) begin
      int sxa, sya, sxb, syb;
      bit fa, fb;
      @(negedge clk);
      // Outputs now belong to earlier samples.
      if (t >= 1)
        check(flip == mflip[t-1], $sformatf("flip of sample %0d", t - 1));
      for (int i = 0; i < K; i++)
        if (t >= 2 + i)
          check(da[i] == mda[t-2-i][i] && db[i] == mdb[t-2-i][i], $sformatf("decision %0d of sample %0d", i, t - 2 - i));
      if (t >= K + 1)
        check(xa_o == DW'(mxa[t-K-1]) && ya_o == DW'(mya[t-K-1]) && xb_o == DW'(mxb[t-K-1]) && yb_o == DW'(myb[t-K-1]),
              $sformatf("vectors of sample %0d: A (%0d,%0d) expected (%0d,%0d)", t - K - 1, xa_o, ya_o, mxa[t-K-1], mya[t-K-1]));
      sxa = $urandom_range(0, 2 ** IN_W - 1) - 2 ** (IN_W - 1);
      sya = $urandom_range(0, 2 ** IN_W - 1) - 2 ** (IN_W - 1);
      sxb = $urandom_range(0, 2 ** IN_W - 1) - 2 ** (IN_W - 1);
      syb = $urandom_range(0, 2 ** IN_W - 1) - 2 ** (IN_W - 1);
      if (t == 5) begin sxa = -(2 ** (IN_W - 1)); sya = -(2 ** (IN_W - 1)); end
      xa = IN_W'(sxa); ya = IN_W'(sya); xb = IN_W'(sxb); yb = IN_W'(syb);
      model_one(sxa, sya, mxa[t], mya[t], mda[t], fa);
      model_one(sxb, syb, mxb[t], myb[t], mdb[t], fb);
      mflip[t] = fa ^ fb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
