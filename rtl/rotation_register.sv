// rotation_register - collects the coarse CORDIC decisions of one sample into a single word.
//
// In the pipelined core every coarse step produces its decision pair one clock after the previous
// step, so the register is built as a set of shift registers: decision i is delayed by
// (K-1-i) + TAIL clocks and the 180-degree flip bit by K + TAIL clocks. All bits of one sample
// then leave together, TAIL clocks after the last coarse step, which lines them up with the end of
// the fine pipeline (TAIL = N-K in the core). The word holds two bits per step, as the published
// rotation register does: bit 2i is A's decision and bit 2i+1 is B's decision at step i.
//
// Interface: da_i[i]/db_i[i] arrive in the clock cycle rotator i presents them; rot_o/flip_o
// hold the aligned word. Timing: bit i leaves (K-1-i)+TAIL clocks after it entered.
module rotation_register #(
  parameter int unsigned K    = lutcor_pkg::K_COARSE,
  parameter int unsigned TAIL = lutcor_pkg::N_ITER - lutcor_pkg::K_COARSE
) (
  input  logic           clk,
  input  logic [K-1:0]   da_i,
  input  logic [K-1:0]   db_i,
  input  logic           flip_i,
  output logic [2*K-1:0] rot_o,
  output logic           flip_o
);

  for (genvar i = 0; i < K; i++) begin : g_bit
    localparam int unsigned DEPTH = K - 1 - i + TAIL;
    if (DEPTH == 0) begin : g_wire
      assign rot_o[2*i]   = da_i[i];
      assign rot_o[2*i+1] = db_i[i];
    end else begin : g_sr
      logic [DEPTH-1:0] sa, sb;
      always_ff @(posedge clk) begin
        sa <= DEPTH'({sa, da_i[i]});
        sb <= DEPTH'({sb, db_i[i]});
      end
      assign rot_o[2*i]   = sa[DEPTH-1];
      assign rot_o[2*i+1] = sb[DEPTH-1];
    end
  end

  // The flip bit has a delay of K + TAIL >= 1 clocks.
  logic [K+TAIL-1:0] sf;
  always_ff @(posedge clk) sf <= (K + TAIL)'({sf, flip_i});
  assign flip_o = sf[K+TAIL-1];

endmodule
