// tb_cordic_rotator - checks one vectoring micro-rotation against an integer model.
//
// Two instances (shift 0 and shift 3) are fed random vectors at the falling clock edge; after the
// next rising edge the outputs must equal the model: for y >= 0 x + (y>>i), y - (x>>i), d = 0,
// for y < 0 x - (y>>i), y + (x>>i), d = 1 (arithmetic shifts). Zero, axis and boundary values are
// included.
module tb_cordic_rotator;
  localparam int unsigned DW = lutcor_pkg::rot_width(lutcor_pkg::IN_W, lutcor_pkg::GUARD);

  logic clk = 1'b0;
  always #1 clk = ~clk;

  logic signed [DW-1:0] x, y;
  logic signed [DW-1:0] x0, y0, x3, y3;
  logic d0, d3;

  cordic_rotator #(.DW(DW), .SHIFT(0)) dut0 (.clk(clk), .x_i(x), .y_i(y), .x_o(x0), .y_o(y0), .d_o(d0));
  cordic_rotator #(.DW(DW), .SHIFT(3)) dut3 (.clk(clk), .x_i(x), .y_i(y), .x_o(x3), .y_o(y3), .d_o(d3));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Integer model with values kept inside 2^(DW-3) so nothing overflows.
  task automatic model(input int xi, input int yi, input int sh, output int xo, output int yo, output bit d);
    int xs, ys;
    xs = xi >>> sh;
    ys = yi >>> sh;
    d  = (yi < 0);
    xo = d ? xi - ys : xi + ys;
    yo = d ? yi + xs : yi - xs;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim, xi, yi, xe, ye;
    bit de;
    lim = 1 << (DW - 3);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      case (n)
        0: begin xi = 0;       yi = 0;       end
        1: begin xi = 5;       yi = -1;      end
        2: begin xi = -lim;    yi = lim - 1; end
        3: begin xi = lim - 1; yi = -lim;    end
        default: begin
          xi = $urandom_range(0, 2 * lim - 1) - lim;
          yi = $urandom_range(0, 2 * lim - 1) - lim;
        end
      endcase
      x = DW'(xi);
      y = DW'(yi);
      @(negedge clk);
      model(xi, yi, 0, xe, ye, de);
      check(x0 == DW'(xe) && y0 == DW'(ye) && d0 == de,
            $sformatf("shift 0 (%0d,%0d) -> (%0d,%0d,%0d) expected (%0d,%0d,%0d)", xi, yi, x0, y0, d0, xe, ye, de));
      model(xi, yi, 3, xe, ye, de);
      check(x3 == DW'(xe) && y3 == DW'(ye) && d3 == de,
            $sformatf("shift 3 (%0d,%0d) -> (%0d,%0d,%0d) expected (%0d,%0d,%0d)", xi, yi, x3, y3, d3, xe, ye, de));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
