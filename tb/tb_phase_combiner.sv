// tb_phase_combiner - checks phi = phi_a + phi_add - phi_sub with its one-clock latency.
//
// A new random triple is applied at every falling edge (full rate); the output read at the falling
// edge after the next rising edge must equal the integer sum, wrapped to the phase word width.
module tb_phase_combiner;
  import lutcor_pkg::*;
  localparam int unsigned PHI_W = phi_width(PHI_FRAC);

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [PHI_W-1:0] phi_a, phi;
  logic [PHI_W-1:0] phi_add, phi_sub;

  phase_combiner dut (.clk(clk), .phi_a_i(phi_a), .phi_add_i(phi_add), .phi_sub_i(phi_sub), .phi_o(phi));

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    bit have;
    have = 0;
    prev = 0;
    for (int n = 0; n < 2000; n++) begin
      int a, p, s;
      @(negedge clk);
      if (have) begin
        checks++;
        if (phi !== PHI_W'(prev)) begin
          failures++;
          if (failures < 20) $display("FAIL: phi %0d expected %0d", phi, $signed(PHI_W'(prev)));
        end
      end
      a = $urandom_range(0, 2 ** PHI_W - 1) - 2 ** (PHI_W - 1);
      p = $urandom_range(0, 2 ** (PHI_W - 2) - 1);
      s = $urandom_range(0, 2 ** (PHI_W - 2) - 1);
      phi_a   = PHI_W'(a);
      phi_add = PHI_W'(p);
      phi_sub = PHI_W'(s);
      prev = a + p - s;
      have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
