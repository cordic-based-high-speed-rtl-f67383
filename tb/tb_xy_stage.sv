// Testbench of xy_stage (DW = 10) for shifts K = 0 and K = 3, random operands
// and directions, one rotation per clock. The expected vector is computed at
// word level: x' = x -/+ (jam(yc >>> K) + jam(ys >>> K)), y' likewise, mod
// 2^(DW+2), where jam forces the LSB of the shifted vector to 1 (K > 0). The
// result must leave exactly two clocks after the inputs.
module tb_xy_stage;
  localparam int DW = 10, N = DW + 2, NW = 3000;
  logic clk = 0, reset = 1, d = 0;
  logic [N-1:0] xc = '0, xs = '0, yc = '0, ys = '0;
  logic [N-1:0] xc0, xs0, yc0, ys0, xc3, xs3, yc3, ys3;
  int checks = 0, failures = 0;
  logic [N-1:0] ixc [0:NW+4], ixs [0:NW+4], iyc [0:NW+4], iys [0:NW+4];
  logic id [0:NW+4];

  xy_stage #(.DW(DW), .K(0)) dut0 (.clk, .reset, .d, .xc, .xs, .yc, .ys, .xc_o(xc0), .xs_o(xs0), .yc_o(yc0), .ys_o(ys0));
  xy_stage #(.DW(DW), .K(3)) dut3 (.clk, .reset, .d, .xc, .xs, .yc, .ys, .xc_o(xc3), .xs_o(xs3), .yc_o(yc3), .ys_o(ys3));
  always #5 clk = ~clk;
  initial begin
    repeat (NW + 100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [N-1:0] jam(logic [N-1:0] v, int k);
    logic [N-1:0] r;
    r = N'($signed(v) >>> k);
    if (k > 0) r[0] = 1'b1;
    return r;
  endfunction

  function automatic void check(int w, int k, logic [N-1:0] oxc, oxs, oyc, oys);
    logic [N-1:0] ex, ey;
    if (id[w]) begin
      ex = ixc[w] + ixs[w] + jam(iyc[w], k) + jam(iys[w], k);
      ey = iyc[w] + iys[w] - jam(ixc[w], k) - jam(ixs[w], k);
    end else begin
      ex = ixc[w] + ixs[w] - jam(iyc[w], k) - jam(iys[w], k);
      ey = iyc[w] + iys[w] + jam(ixc[w], k) + jam(ixs[w], k);
    end
    checks++;
    if (N'(oxc + oxs) !== ex || N'(oyc + oys) !== ey) begin
      failures++;
      if (failures < 8) $display("K=%0d word %0d: got %h %h want %h %h", k, w, N'(oxc + oxs), N'(oyc + oys), ex, ey);
    end
  endfunction

  initial begin
    for (int w = 0; w <= NW + 4; w++) begin
      ixc[w] = N'($urandom); ixs[w] = N'($urandom); iyc[w] = N'($urandom); iys[w] = N'($urandom);
      id[w] = 1'($urandom);
    end
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + 2; k++) begin
      xc = ixc[k]; xs = ixs[k]; yc = iyc[k]; ys = iys[k]; d = id[k];
      @(negedge clk);
      if (k >= 1) begin
        check(k - 1, 0, xc0, xs0, yc0, ys0);
        check(k - 1, 3, xc3, xs3, yc3, ys3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
