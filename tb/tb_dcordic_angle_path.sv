// Testbench of dcordic_angle_path at a reduced size (8-digit accumulator
// input, 8 iterations, 10-bit alpha). Random carry-save angles stream in, one
// per clock, digits skewed MSD first. The testbench collects rotation
// direction d[k] at its own clock (two clocks per iteration), the negate flag
// and the de-skewed residue, then checks that the rotation they describe,
// (-1)^negate * exp(i*pi*sum_k (+-alpha_k)), lands within the CORDIC angle
// resolution of exp(i*pi*z), and that the residue stays within about
// alpha_{N-1}.
module tb_dcordic_angle_path;
  import dcordic_pkg::*;
  localparam int PA_W = 8, N_ITER = 8, AF = 10, R = AF + 2;
  localparam int NW = 2000;
  localparam int SPAN = R + 2 * N_ITER + 8;
  logic clk = 0, reset = 1;
  logic [PA_W-1:0] acc_c = '0, acc_s = '0;
  logic [N_ITER-1:0] d;
  logic negate;
  logic [AF+1:0] residue_c, residue_s;
  int checks = 0, failures = 0, n_neg = 0;
  logic [PA_W-1:0] wc [0:NW+SPAN], ws [0:NW+SPAN];
  logic [N_ITER-1:0] od [0:NW+SPAN];
  logic on [0:NW+SPAN];
  logic [R-1:0] rc [0:NW+SPAN], rs [0:NW+SPAN];

  dcordic_angle_path #(.PA_W(PA_W), .N_ITER(N_ITER), .AF(AF)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (NW + SPAN + 100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w <= NW + SPAN; w++) begin wc[w] = PA_W'($urandom); ws[w] = PA_W'($urandom); end
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + SPAN; k++) begin
      for (int j = 0; j < PA_W; j++) begin
        acc_c[PA_W-1-j] = (k - j >= 0) ? wc[k-j][PA_W-1-j] : 1'b0;
        acc_s[PA_W-1-j] = (k - j >= 0) ? ws[k-j][PA_W-1-j] : 1'b0;
      end
      @(negedge clk);
      // d[i] of word w at edge w+R+2+2i, negate at w+R+2, residue row j at w+2N+3+j
      for (int i = 0; i < N_ITER; i++) if (k + 1 - R - 2 - 2 * i >= 0) od[k+1-R-2-2*i][i] = d[i];
      if (k + 1 - R - 2 >= 0) on[k+1-R-2] = negate;
      for (int j = 0; j < R; j++) if (k + 1 - 2 * N_ITER - 3 - j >= 0) begin
        rc[k+1-2*N_ITER-3-j][R-1-j] = residue_c[R-1-j];
        rs[k+1-2*N_ITER-3-j][R-1-j] = residue_s[R-1-j];
      end
    end
    for (int w = 0; w < NW; w++) begin
      logic signed [PA_W-1:0] x;
      logic signed [R-1:0] rv;
      real z, th, sg, e, lim, rr;
      x = wc[w] + ws[w];
      z = real'(x) / (2.0 ** (PA_W - 1));
      th = 0.0;
      for (int i = 0; i < N_ITER; i++)
        th += (od[w][i] ? -1.0 : 1.0) * real'(alpha_q(i, AF)) / (2.0 ** AF);
      sg = on[w] ? -1.0 : 1.0;
      e = (sg * $cos(PI * th) - $cos(PI * z)) ** 2 + (sg * $sin(PI * th) - $sin(PI * z)) ** 2;
      e = $sqrt(e);
      lim = PI * (real'(alpha_q(N_ITER - 1, AF)) + N_ITER) / (2.0 ** AF);
      checks++;
      if (e > lim) begin
        failures++;
        if (failures < 8) $display("word %0d z=%f: theta=%f negate=%b error %f", w, z, th, on[w], e);
      end
      rv = rc[w] + rs[w];
      rr = real'(rv) / (2.0 ** (AF + 1));
      checks++;
      if ((rr < 0 ? -rr : rr) > 2.0 * real'(alpha_q(N_ITER - 1, AF)) / (2.0 ** AF)) begin
        failures++;
        if (failures < 8) $display("word %0d residue %f", w, rr);
      end
      if (on[w]) n_neg++;
    end
    checks++;
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
