// Accuracy probe used by the workload testbench: one synthesizer instance
// at a given size, swept over every accumulator phase.
//
// After reset it loads phase increment INC off-line and records 2^PA_W
// consecutive samples. For each sample it
// converts the carry-save cosine and sine to numbers, applies the negate
// flag and measures the length of the error vector against
// (cos(pi*phase), sin(pi*phase)). The worst length over one whole turn gives
// the number of effective fractional bits, -log2(max |error|), the figure of
// merit used by the document's precision tables. The probe counts one
// failure if that number is below MIN_BITS, and one if any sample's outputs
// hold X. The phase step INC is odd, so the 2^PA_W samples of one run visit
// every phase once and hold exactly INC periods. When MIN_SFDR is set the
// probe also takes a fast Fourier transform over the run and, separately
// for the cosine and the sine, finds the largest bin other than the tone
// (bin INC); it counts a failure if that spur is less than MIN_SFDR dB below
// the tone in either output. Timing: the probe runs by itself from its own reset and raises
// done about 2^PA_W + AF + 2*N_ITER + 10 clocks later.
module ddfs_ebits_probe
  import dcordic_pkg::*;
#(
  parameter int  PA_W     = 8,
  parameter int  N_ITER   = 9,
  parameter int  AF       = 14,
  parameter int  DW       = 13,
  parameter real MIN_BITS = 7.0,
  parameter real MIN_SFDR = 0.0,   // dB; 0 skips the spectrum
  parameter int  INC      = 1       // phase step; odd, so that a run visits every phase
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  bits,
  output real  sfdr
);
  localparam int LAT = AF + 2 * N_ITER + 5;
  localparam int M   = 1 << PA_W;

  real zr [M], zi [M], tw_c [M/2], tw_s [M/2];

  // in-place radix-2 decimation-in-time FFT of zr + j*zi
  task automatic fft();
    int j, half, step;
    real tr, ti, wr, wi;
    for (int k = 0; k < M / 2; k++) begin
      tw_c[k] = $cos(2.0 * PI * k / M);
      tw_s[k] = -$sin(2.0 * PI * k / M);
    end
    j = 0;
    for (int i = 0; i < M - 1; i++) begin     // bit-reversal permutation
      int b;
      if (i < j) begin
        tr = zr[i]; zr[i] = zr[j]; zr[j] = tr;
        ti = zi[i]; zi[i] = zi[j]; zi[j] = ti;
      end
      b = M >> 1;
      while (j & b) begin j ^= b; b >>= 1; end
      j |= b;
    end
    for (half = 1; half < M; half *= 2) begin
      step = M / (2 * half);
      for (int base = 0; base < M; base += 2 * half)
        for (int k = 0; k < half; k++) begin
          wr = tw_c[k * step]; wi = tw_s[k * step];
          tr = zr[base + k + half] * wr - zi[base + k + half] * wi;
          ti = zr[base + k + half] * wi + zi[base + k + half] * wr;
          zr[base + k + half] = zr[base + k] - tr;
          zi[base + k + half] = zi[base + k] - ti;
          zr[base + k] += tr;
          zi[base + k] += ti;
        end
    end
  endtask

  // SFDR in dB of the cosine (sel 0) or the sine (sel 1) alone, taken from
  // the spectrum Z of x + jy: X[k] = (Z[k] + conj Z[-k]) / 2 and
  // Y[k] = (Z[k] - conj Z[-k]) / 2j; bins 0..M/2 of a real signal
  function automatic real spur_free(bit sel);
    real car, spur, ar, ai, m2;
    car = 0.0; spur = 0.0;
    for (int k = 0; k <= M / 2; k++) begin
      int nk;
      nk = (M - k) % M;
      if (!sel) begin
        ar = (zr[k] + zr[nk]) / 2.0;
        ai = (zi[k] - zi[nk]) / 2.0;
      end else begin
        ar = (zi[k] + zi[nk]) / 2.0;
        ai = (zr[nk] - zr[k]) / 2.0;
      end
      m2 = ar * ar + ai * ai;
      if (k == INC) car = m2;
      else if (m2 > spur) spur = m2;
    end
    return 10.0 * $log10(car / spur);
  endfunction

  logic reset = 1'b1;
  logic [PA_W-2:0] phase_inc = '0;
  logic load_phase_inc = 1'b0;
  logic negate;
  logic [DW+1:0] cx, sx, cy, sy;
  logic [AF+1:0] rc, rs;

  dcordic_ddfs #(.PA_W(PA_W), .N_ITER(N_ITER), .AF(AF), .DW(DW)) dut (
    .clk, .reset, .phase_inc, .load_phase_inc, .negate,
    .datapath_carry_x(cx), .datapath_sum_x(sx), .datapath_carry_y(cy), .datapath_sum_y(sy),
    .angle_residue_carry(rc), .angle_residue_sum(rs)
  );

  function automatic real to_real(logic [DW+1:0] c, logic [DW+1:0] s);
    logic [DW+1:0] v;
    v = c + s;
    return real'($signed(v)) / (2.0 ** DW);
  endfunction

  initial begin
    real max_err, x, y, ex, ey, ang, e;
    done = 1'b0; checks = 0; failures = 0; bits = 0.0; max_err = 0.0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    phase_inc = (PA_W-1)'(INC);
    load_phase_inc = 1'b1;
    @(negedge clk);
    load_phase_inc = 1'b0;
    // LAT clocks later the outputs hold the sample of phase 0, and each
    // following clock advances the phase by one accumulator step
    repeat (LAT) @(negedge clk);
    for (int n = 0; n < (1 << PA_W); n++) begin
      ang = real'($signed(PA_W'(n * INC))) / (2.0 ** (PA_W - 1));
      ex = $cos(PI * ang);
      ey = $sin(PI * ang);
      x = to_real(cx, sx);
      y = to_real(cy, sy);
      if (negate) begin x = -x; y = -y; end
      zr[n] = x;
      zi[n] = y;
      e = $sqrt((x - ex) * (x - ex) + (y - ey) * (y - ey));
      if (e > max_err) max_err = e;
      checks++;
      if ($isunknown({cx, sx, cy, sy, negate})) failures++;
      @(negedge clk);
    end
    bits = -$ln(max_err) / $ln(2.0);
    checks++;
    if (bits < MIN_BITS) failures++;
    sfdr = 0.0;
    if (MIN_SFDR > 0.0) begin
      fft();
      sfdr = spur_free(1'b0);
      if (spur_free(1'b1) < sfdr) sfdr = spur_free(1'b1);
      checks++;
      if (sfdr < MIN_SFDR) failures++;
    end
    done = 1'b1;
  end
endmodule
