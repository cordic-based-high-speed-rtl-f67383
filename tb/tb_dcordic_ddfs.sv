// End-to-end testbench of the DCORDIC frequency synthesizer at its default
// size (15-digit accumulator, 15 iterations, 16-bit alpha, 17-bit datapath).
//
// It loads an odd phase increment from reset (off-line load), runs past
// 2^PA_W samples so that every accumulator phase appears, then switches
// frequency on the fly twice, the second time to the largest increment.
// For every sample it predicts the phase from the load times alone,
// converts the carry-save outputs to numbers, applies the negate flag and
// compares with cos(pi*phase) and sin(pi*phase). It checks the fixed
// latency AF + 2*N_ITER + 5 by requiring the prediction to hold exactly at
// that cycle, bounds the de-skewed angle residue, and counts how often each
// mechanism occurred: off-line load, on-the-fly switch, negate, accumulator
// wrap-around, the singular phases -1 and -1/2, and the phase +1/2.
module tb_dcordic_ddfs;
  import dcordic_pkg::*;

  localparam int PA_W   = 15;
  localparam int N_ITER = 15;
  localparam int AF     = 16;
  localparam int DW     = 17;
  localparam int LAT    = AF + 2 * N_ITER + 5;
  localparam int R      = AF + 2;
  localparam int MAXC   = 120000;
  localparam real TOL   = 2.0 ** (-12);

  logic clk = 1'b0, reset = 1'b1;
  logic [PA_W-2:0] phase_inc = '0;
  logic load_phase_inc = 1'b0;
  logic negate;
  logic [DW+1:0] cx, sx, cy, sy;
  logic [AF+1:0] rc, rs;

  dcordic_ddfs dut (
    .clk, .reset, .phase_inc, .load_phase_inc, .negate,
    .datapath_carry_x(cx), .datapath_sum_x(sx), .datapath_carry_y(cy), .datapath_sum_y(sy),
    .angle_residue_carry(rc), .angle_residue_sum(rs)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  // expected phase of each sample, in accumulator LSBs (mod 2^PA_W)
  int unsigned ph [0:MAXC+200];
  bit          known [0:MAXC+200];
  int unsigned p_cur = 0;
  real max_err = 0.0;
  int n_offline = 0, n_switch = 0, n_negate = 0, n_wrap = 0, n_m1 = 0, n_mhalf = 0, n_phalf = 0;
  // residue history for de-skewing: rc_h[c] holds cycle c+1; row j of sample w
  // is valid in cycle w+2N+4+j
  logic [AF+1:0] rc_h [0:MAXC+200];
  logic [AF+1:0] rs_h [0:MAXC+200];

  // watchdog
  initial begin
    repeat (MAXC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(logic [DW+1:0] c, logic [DW+1:0] s);
    logic [DW+1:0] v;
    v = c + s;
    return real'($signed(v)) / (2.0 ** DW);
  endfunction

  // sample w is the one whose digit 0 is added in cycle w; cycle numbers count
  // rising edges, an input driven before edge c belongs to cycle c.
  task automatic load(int unsigned p);
    int t;
    @(negedge clk);
    phase_inc = (PA_W-1)'(p);
    load_phase_inc = 1'b1;
    t = cyc + 1;                      // the cycle whose end samples the pulse
    @(negedge clk);
    load_phase_inc = 1'b0;
    // predict: sample t+2+n = ph[t] + (n+1)*p (ph[t] = 0 from reset)
    for (int w = t + 2; w <= MAXC + 200; w++) begin
      ph[w]    = (ph[t] + (w - t - 1) * p) % (1 << PA_W);
      known[w] = 1'b1;
    end
    p_cur = p;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rc_h[cyc] <= rc;
    rs_h[cyc] <= rs;
  end

  // at a falling edge with cyc = c the outputs of cycle c+1 are visible
  always @(negedge clk) begin
    int w;
    w = cyc + 1 - LAT;
    if (!reset && w >= 0 && known[w]) begin
      real x, y, ex, ey, ang, e;
      int unsigned p;
      p = ph[w];
      ang = real'($signed(PA_W'(p))) / (2.0 ** (PA_W - 1));
      ex = $cos(PI * ang);
      ey = $sin(PI * ang);
      x = to_real(cx, sx);
      y = to_real(cy, sy);
      if (negate) begin x = -x; y = -y; n_negate++; end
      e = (x - ex) < 0 ? ex - x : x - ex;
      if (((y - ey) < 0 ? ey - y : y - ey) > e) e = (y - ey) < 0 ? ey - y : y - ey;
      if (e > max_err) max_err = e;
      checks++;
      if (e > TOL) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d sample %0d phase %0d: got (%f,%f) want (%f,%f) negate=%b",
                   cyc, w, p, x, y, ex, ey, negate);
      end
      if (p == (1 << (PA_W - 1))) n_m1++;
      if (p == (3 << (PA_W - 2))) n_mhalf++;
      if (p == (1 << (PA_W - 2))) n_phalf++;
      if (known[w-1] && ph[w] < ph[w-1]) n_wrap++;
    end
  end

  // residue: |residue| stays within about alpha_{N-1}
  always @(negedge clk) begin
    int w;
    w = cyc - (2 * N_ITER + 4) - (R - 1);
    if (!reset && w >= 0 && known[w] && cyc > 0) begin
      logic [AF+1:0] vc, vs, v;
      real r, lim;
      for (int j = 0; j < R; j++) begin
        vc[R-1-j] = rc_h[w + 2 * N_ITER + 3 + j][R-1-j];
        vs[R-1-j] = rs_h[w + 2 * N_ITER + 3 + j][R-1-j];
      end
      v = vc + vs;
      r = real'($signed(v)) / (2.0 ** (AF + 1));
      lim = 2.0 * real'(alpha_q(N_ITER - 1, AF)) / (2.0 ** AF) + 2.0 ** (-(PA_W - 1));
      checks++;
      if ((r < 0 ? -r : r) > lim) begin
        failures++;
        if (failures < 10) $display("sample %0d residue %f beyond %f", w, r, lim);
      end
    end
  end

  initial begin
    for (int i = 0; i <= MAXC + 200; i++) begin known[i] = 1'b0; ph[i] = 0; end
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    load(12345);                     // odd: visits all 2^15 phases
    n_offline++;
    repeat ((1 << PA_W) + 200) @(negedge clk);
    load(3001);                      // on-the-fly switch
    n_switch++;
    repeat (20000) @(negedge clk);
    load((1 << (PA_W - 1)) - 1);     // largest increment, just under half the clock rate
    n_switch++;
    repeat (20000) @(negedge clk);
    $display("max error %e (%.2f bits); offline=%0d switch=%0d negate=%0d wrap=%0d z=-1:%0d z=-1/2:%0d z=+1/2:%0d",
             max_err, -$ln(max_err) / $ln(2.0), n_offline, n_switch, n_negate, n_wrap, n_m1, n_mhalf, n_phalf);
    if (n_offline == 0 || n_switch == 0 || n_negate == 0 || n_wrap == 0 || n_m1 == 0 || n_mhalf == 0 || n_phalf == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
