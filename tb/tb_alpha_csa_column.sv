// Testbench of alpha_csa_column (R = 8 rows, a fixed alpha pattern) fed with
// random skewed carry-save words and random two-ulp corrections. Checks that
// each output word equals input + alpha + 2*sigma_tld (mod 2^R), with digit j
// read one clock after it went in (sum latched, carry from the row below),
// and that sigma_in leaves one clock later.
module tb_alpha_csa_column;
  localparam int R = 8;
  localparam logic [R-1:0] ALPHA = 8'b1011_0110;
  localparam int NW = 3000;
  logic clk = 0, reset = 1;
  logic [R-1:0] c_in = '0, s_in = '0, c_out, s_out;
  logic sigma_tld_in = 0, sigma_in = 0, sigma_q;
  int checks = 0, failures = 0;
  logic [R-1:0] wc [0:NW+R+4], ws [0:NW+R+4], oc [0:NW+R+4], os [0:NW+R+4];
  logic tl [0:NW+R+4], sg [0:NW+R+4];

  alpha_csa_column #(.R(R), .ALPHA(ALPHA)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (NW + 100) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int w = 0; w <= NW + R + 4; w++) begin
      wc[w] = R'($urandom); ws[w] = R'($urandom); tl[w] = 1'($urandom); sg[w] = 1'($urandom);
    end
    @(negedge clk); @(negedge clk); reset = 0;
    for (int k = 0; k < NW + R + 2; k++) begin
      @(negedge clk);
      for (int j = 0; j < R; j++) begin
        c_in[R-1-j] = (k - j >= 0) ? wc[k-j][R-1-j] : 1'b0;
        s_in[R-1-j] = (k - j >= 0) ? ws[k-j][R-1-j] : 1'b0;
      end
      sigma_tld_in = (k >= R - 1) ? tl[k-(R-1)] : 1'b0;
      sigma_in     = (k >= R - 1) ? sg[k-(R-1)] : 1'b0;
      #1;
      // output row j now belongs to word k-1-j: its sum bit was latched at the
      // last edge, its carry comes from row j+1 of the inputs just driven
      for (int j = 0; j < R; j++) if (k - 1 - j >= 0) begin
        oc[k-1-j][R-1-j] = c_out[R-1-j];
        os[k-1-j][R-1-j] = s_out[R-1-j];
      end
      if (k - 1 - (R - 1) >= 0) begin
        checks++;
        if (sigma_q !== sg[k-1-(R-1)]) failures++;
      end
    end
    for (int w = 0; w < NW; w++) begin
      logic [R-1:0] e, y;
      e = wc[w] + ws[w] + {ALPHA[R-1:1], 1'b0} + (tl[w] ? R'(2) : R'(0));
      y = oc[w] + os[w];
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 8) $display("word %0d: got %0d want %0d", w, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
