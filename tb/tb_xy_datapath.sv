// Testbench of xy_datapath (DW = 14, 12 iterations). For random angles z in
// [-1/2, 1/2] the testbench runs the CORDIC angle recursion in floating point
// to get the rotation directions, feeds direction k two clocks after
// direction k-1 (one angle per clock), and checks that 2*N_ITER clocks after
// direction 0 the carry-save outputs add up to cos(pi*z) and sin(pi*z) within
// 2^-10 and that the negate flag came along with them.
module tb_xy_datapath;
  import dcordic_pkg::*;
  localparam int DW = 14, N_ITER = 12, N = DW + 2, NW = 2000;
  localparam real TOL = 2.0 ** (-10);
  logic clk = 0, reset = 1, negate_in = 0, negate;
  logic [N_ITER-1:0] d = '0;
  logic [N-1:0] xc, xs, yc, ys;
  int checks = 0, failures = 0;
  real za [0:NW+2*N_ITER+4];
  logic [N_ITER-1:0] dirs [0:NW+2*N_ITER+4];
  logic ng [0:NW+2*N_ITER+4];
  real max_err = 0.0;

  xy_datapath #(.DW(DW), .N_ITER(N_ITER)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (NW + 200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w <= NW + 2 * N_ITER + 4; w++) begin
      real z;
      z = (real'($urandom % 20001) - 10000.0) / 20000.0;
      za[w] = z;
      ng[w] = 1'($urandom);
      for (int i = 0; i < N_ITER; i++) begin
        dirs[w][i] = (z < 0.0);
        z = z - (z < 0.0 ? -1.0 : 1.0) * $atan(2.0 ** (-i)) / PI;
      end
    end
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + 2 * N_ITER + 2; k++) begin
      // direction i of word w is presented in clock w+2i
      for (int i = 0; i < N_ITER; i++) d[i] = (k - 2 * i >= 0) ? dirs[k-2*i][i] : 1'b0;
      negate_in = ng[k];
      @(negedge clk);
      if (k + 1 - 2 * N_ITER >= 0 && k + 1 - 2 * N_ITER < NW) begin
        int w;
        real x, y, e;
        w = k + 1 - 2 * N_ITER;
        x = real'($signed(N'(xc + xs))) / (2.0 ** DW);
        y = real'($signed(N'(yc + ys))) / (2.0 ** DW);
        e = (x - $cos(PI * za[w])) ** 2 + (y - $sin(PI * za[w])) ** 2;
        e = $sqrt(e);
        if (e > max_err) max_err = e;
        checks++;
        if (e > TOL || negate !== ng[w]) begin
          failures++;
          if (failures < 8) $display("word %0d z=%f: got (%f,%f) negate %b", w, za[w], x, y, negate);
        end
      end
    end
    $display("max error %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
