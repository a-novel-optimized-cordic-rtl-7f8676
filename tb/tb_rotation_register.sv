// tb_rotation_register - feeds random decision bits every clock and checks the alignment: bit 2i
// of the output word must be A's decision i applied (K-1-i)+TAIL clocks earlier, bit 2i+1 B's,
// and the flip bit must come out K+TAIL clocks after it went in. Run with the core's TAIL = N-K and
// with TAIL = 0, where the last decision passes straight through.
module tb_rotation_register;
  import lutcor_pkg::*;
  localparam int unsigned K  = K_COARSE;
  localparam int unsigned T1 = N_ITER - K_COARSE;
  localparam int          NS = 2000;

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic [K-1:0] da, db;
  logic flip;
  logic [2*K-1:0] rot1, rot0;
  logic flip1, flip0;

  rotation_register dut1 (.clk(clk), .da_i(da), .db_i(db), .flip_i(flip), .rot_o(rot1), .flip_o(flip1));
  rotation_register #(.K(K), .TAIL(0)) dut0 (.clk(clk), .da_i(da), .db_i(db), .flip_i(flip), .rot_o(rot0), .flip_o(flip0));

  int checks = 0, failures = 0;
  logic [K-1:0] ha[NS], hb[NS];
  logic hf[NS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
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
    for (int t = 0; t < NS; t++) begin
      @(negedge clk);
      da = K'($urandom);
      db = K'($urandom);
      flip = 1'($urandom);
      ha[t] = da; hb[t] = db; hf[t] = flip;
      #0.5;
      // After the inputs of cycle t settle, a bit with delay D shows the value applied at t-D.
      for (int i = 0; i < K; i++) begin
        int d1, d0;
        d1 = K - 1 - i + T1;
        d0 = K - 1 - i;
        if (t >= d1)
          check(rot1[2*i] == ha[t-d1][i] && rot1[2*i+1] == hb[t-d1][i], $sformatf("TAIL=%0d bit %0d at %0d", T1, i, t));
        if (t >= d0)
          check(rot0[2*i] == ha[t-d0][i] && rot0[2*i+1] == hb[t-d0][i], $sformatf("TAIL=0 bit %0d at %0d", i, t));
      end
      if (t >= K + T1) check(flip1 == hf[t-K-T1], "flip TAIL=N-K");
      if (t >= K)      check(flip0 == hf[t-K], "flip TAIL=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
