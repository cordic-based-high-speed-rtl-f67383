// Testbench of online_phase_acc (PA_W = 8). The testbench plays the loader's
// part itself: it writes P and then 2P into the increment latch row by row,
// one clock apart, jamming each row's feedback while it writes 2P. It
// de-skews the output (digit j read j clocks after digit 0), adds carry and
// sum, and checks: the first sample after an off-line load from reset is P at
// the expected clock, every later sample advances by P mod 2 (wrapping many
// times), and an on-the-fly switch gives x+3P0, x+2P0+P1, x+2P0+2P1, ...
module tb_online_phase_acc;
  localparam int PA_W = 8;
  localparam int NC = 700;
  logic clk = 0, reset = 1;
  logic [PA_W-1:0] inc = '0, en = '1, acc_c, acc_s;
  int checks = 0, failures = 0, wraps = 0;
  logic [PA_W-1:0] oc [0:NC+PA_W+2], os [0:NC+PA_W+2];

  online_phase_acc #(.PA_W(PA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (NC + 50) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int m = 0;           // falling-edge count
  int l0 = -100, l1 = -100;
  logic [PA_W-2:0] p0 = 7'd37, p1 = 7'd101;

  // skewed load as seen from the accumulator: row j shows P at edge l+2+j
  // (feedback jammed then), 2P from edge l+3+j on
  function automatic void drive(int l, logic [PA_W-2:0] p);
    for (int j = 0; j < PA_W; j++) begin
      if (m == l + 2 + j) begin inc[PA_W-1-j] = {1'b0, p}[PA_W-1-j]; en[PA_W-1-j] = 1'b0; end
      else if (m == l + 3 + j) begin inc[PA_W-1-j] = {p, 1'b0}[PA_W-1-j]; en[PA_W-1-j] = 1'b1; end
    end
  endfunction

  initial begin
    @(negedge clk); @(negedge clk); reset = 0;
    l0 = 5; l1 = 400;
    for (m = 0; m < NC + PA_W; m++) begin
      for (int j = 0; j < PA_W; j++) en[j] = 1'b1;
      drive(l0, p0);
      drive(l1, p1);
      for (int j = 0; j < PA_W; j++) begin
        if (m == l0 + 2 + j || m == l1 + 2 + j) en[PA_W-1-j] = 1'b0;
      end
      #1;
      // digit j of the sample whose digit 0 shows at edge m-j
      for (int j = 0; j < PA_W; j++) if (m - j >= 0) begin
        oc[m-j][PA_W-1-j] = acc_c[PA_W-1-j];
        os[m-j][PA_W-1-j] = acc_s[PA_W-1-j];
      end
      @(negedge clk);
    end
    begin
      logic [PA_W-1:0] v [0:NC];
      for (int k = 0; k < NC; k++) v[k] = oc[k] + os[k];
      // off-line load: samples stay 0, then P at edge l0+3
      for (int k = 1; k < l0 + 3; k++) begin checks++; if (v[k] !== '0) failures++; end
      for (int k = l0 + 3; k < l1 + 3; k++) begin
        logic [PA_W-1:0] e;
        e = PA_W'((k - l0 - 2) * int'(p0));
        checks++;
        if (v[k] !== e) begin failures++; if (failures < 6) $display("k=%0d got %0d want %0d", k, v[k], e); end
        if (v[k] < v[k-1]) wraps++;
      end
      // on-the-fly: v[l1] = x+P0, v[l1+2] = x+3P0, then x+2P0+nP1
      checks++;
      if (v[l1+2] !== PA_W'(v[l1] + 2 * p0)) failures++;
      for (int k = l1 + 3; k < NC; k++) begin
        logic [PA_W-1:0] e;
        e = PA_W'(int'(v[l1]) + int'(p0) + (k - l1 - 2) * int'(p1));
        checks++;
        if (v[k] !== e) begin failures++; if (failures < 6) $display("k=%0d got %0d want %0d", k, v[k], e); end
      end
      checks++;
      if (wraps < 10) begin failures++; $display("only %0d wrap-arounds", wraps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
