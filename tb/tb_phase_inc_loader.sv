// Testbench of phase_inc_loader (PA_W = 6). After a load pulse it checks, row
// by row and clock by clock, that the increment latch first shows P (row j =
// p_{j-1}), one clock later 2P (row j = p_j), that the feedback enable of the
// row is low in exactly the clock it shows P before 2P is written, that busy
// covers the load, and that a second load switches on the fly.
module tb_phase_inc_loader;
  localparam int PA_W = 6;
  logic clk = 0, reset = 1, load_phase_inc = 0, busy;
  logic [PA_W-2:0] phase_inc = '0;
  logic [PA_W-1:0] inc, en;
  int checks = 0, failures = 0;

  phase_inc_loader #(.PA_W(PA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_load(logic [PA_W-2:0] p, logic [PA_W-1:0] old2p);
    logic [PA_W-1:0] once, twice;
    once  = {1'b0, p};
    twice = {p, 1'b0};
    @(negedge clk);
    phase_inc = p; load_phase_inc = 1;
    @(negedge clk);
    load_phase_inc = 0; phase_inc = '0;        // the loader keeps its own copy
    // m counts falling edges after the one that drove the pulse
    for (int m = 1; m <= PA_W + 3; m++) begin
      for (int j = 0; j < PA_W; j++) begin
        logic ei, ee;
        if (m < j + 2)       begin ei = old2p[PA_W-1-j]; ee = 1'b1; end
        else if (m == j + 2) begin ei = once[PA_W-1-j];  ee = 1'b0; end
        else                 begin ei = twice[PA_W-1-j]; ee = 1'b1; end
        checks++;
        if (inc[PA_W-1-j] !== ei || en[PA_W-1-j] !== ee) begin
          failures++;
          $display("m=%0d row %0d: inc %b en %b want %b %b", m, j, inc[PA_W-1-j], en[PA_W-1-j], ei, ee);
        end
      end
      checks++;
      if (busy !== (m <= PA_W + 1)) begin failures++; $display("m=%0d busy %b", m, busy); end
      @(negedge clk);
    end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); reset = 0;
    checks++; if (inc !== '0 || en !== '1) failures++;
    run_load(5'b10110, '0);
    run_load(5'b01011, {5'b10110, 1'b0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
