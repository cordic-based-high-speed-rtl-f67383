// Workload testbench: the precision experiments of the document rerun on
// this design at their sizes.
//
// Each probe builds a complete synthesizer with the parameters of one
// experiment and sweeps all 2^PA_W phases (b-bit angle resolution is taken
// as a b-digit accumulator). The datapath-width tables give, for an angle
// resolution, iteration count, alpha precision and datapath width, the
// number of effective fractional bits; the probe must reach that number less
// half a bit (the document's datapath details, such as where the guard digit
// sits, are not given exactly, so bit-exact agreement is not expected).
// The two synthesized instances (12/10/11/10 and the default 15/15/16/17)
// are rated only by their worst-case SFDR, "about 60 dB" and "about 90 dB":
// each is run at an odd step (all phases) and at an even step (a subset),
// and the spurious-free dynamic range of the cosine and of the sine must be
// no more than 3 dB below the rated figure. For effective bits the small instance
// must reach the nearest table entry (9 iterations, 10-bit datapath: 6.934)
// less half a bit, and the default instance 12 bits (the bound the
// end-to-end test uses per component).
// All probes run in parallel on one clock; a watchdog ends the run if any of
// them hangs.
module tb_ddfs_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NP = 9;
  logic done [NP];
  int   chk [NP], fl [NP];
  real  bits [NP], sfdr [NP];

  // 8-bit angle resolution, 9 iterations, alpha 14 bits, datapath 13: 7.977
  ddfs_ebits_probe #(.PA_W(8),  .N_ITER(9),  .AF(14), .DW(13), .MIN_BITS(7.977 - 0.5))
    p0 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .bits(bits[0]), .sfdr(sfdr[0]));
  // 8-bit, 8 iterations, datapath 15: 7.044
  ddfs_ebits_probe #(.PA_W(8),  .N_ITER(8),  .AF(14), .DW(15), .MIN_BITS(7.044 - 0.5))
    p1 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .bits(bits[1]), .sfdr(sfdr[1]));
  // 12-bit, 13 iterations, alpha 21, datapath 17: 11.782
  ddfs_ebits_probe #(.PA_W(12), .N_ITER(13), .AF(21), .DW(17), .MIN_BITS(11.782 - 0.5))
    p2 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .bits(bits[2]), .sfdr(sfdr[2]));
  // 12-bit, 12 iterations, alpha 21, datapath 19: 10.991
  ddfs_ebits_probe #(.PA_W(12), .N_ITER(12), .AF(21), .DW(19), .MIN_BITS(10.991 - 0.5))
    p3 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .bits(bits[3]), .sfdr(sfdr[3]));
  // 16-bit, 17 iterations, alpha 30, datapath 21: 15.618
  ddfs_ebits_probe #(.PA_W(16), .N_ITER(17), .AF(30), .DW(21), .MIN_BITS(15.618 - 0.5))
    p4 (.clk, .done(done[4]), .checks(chk[4]), .failures(fl[4]), .bits(bits[4]), .sfdr(sfdr[4]));
  // second synthesized instance: 12-digit accumulator, 10 iterations,
  // alpha 11 bits, datapath 10 bits
  ddfs_ebits_probe #(.PA_W(12), .N_ITER(10), .AF(11), .DW(10), .MIN_BITS(6.934 - 0.5), .MIN_SFDR(60.0 - 3.0))
    p5 (.clk, .done(done[5]), .checks(chk[5]), .failures(fl[5]), .bits(bits[5]), .sfdr(sfdr[5]));
  // same instance at an even step (a different subset of phases)
  ddfs_ebits_probe #(.PA_W(12), .N_ITER(10), .AF(11), .DW(10), .MIN_BITS(6.934 - 0.5), .MIN_SFDR(60.0 - 3.0), .INC(6))
    p6 (.clk, .done(done[6]), .checks(chk[6]), .failures(fl[6]), .bits(bits[6]), .sfdr(sfdr[6]));
  // first synthesized instance (the default size): about 90 dB
  ddfs_ebits_probe #(.PA_W(15), .N_ITER(15), .AF(16), .DW(17), .MIN_BITS(12.0), .MIN_SFDR(90.0 - 3.0))
    p7 (.clk, .done(done[7]), .checks(chk[7]), .failures(fl[7]), .bits(bits[7]), .sfdr(sfdr[7]));
  ddfs_ebits_probe #(.PA_W(15), .N_ITER(15), .AF(16), .DW(17), .MIN_BITS(12.0), .MIN_SFDR(90.0 - 3.0), .INC(1000))
    p8 (.clk, .done(done[8]), .checks(chk[8]), .failures(fl[8]), .bits(bits[8]), .sfdr(sfdr[8]));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < NP; i++) wait (done[i] === 1'b1);
    for (int i = 0; i < NP; i++) begin
      $display("probe %0d: %.3f effective bits, SFDR %.1f dB, %0d failures", i, bits[i], sfdr[i], fl[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
