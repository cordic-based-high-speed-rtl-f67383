// Testbench of oc_csa (N = 8): every combination of three operands over a
// random sample plus all cin values. Checks carry + sum = a + b + c + cin
// (mod 2^N), that cin sits in the carry LSB, and that the MSD of the carry
// vector is the MSD full adder's own carry.
module tb_oc_csa;
  localparam int N = 8;
  logic [N-1:0] a, b, c, carry, sum;
  logic cin;
  int checks = 0, failures = 0;

  oc_csa #(.N(N)) dut (.*);

  initial begin
    fork begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end join_none
    for (int k = 0; k < 40000; k++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom); cin = 1'($urandom);
      if (k < 512) begin a = N'(k); b = N'(k * 37); c = N'(~k); end
      #1;
      checks++;
      if (N'(carry + sum) !== N'(a + b + c + N'(cin)) || carry[0] !== cin
          || carry[N-1] !== ((a[N-1] & b[N-1]) | (c[N-1] & (a[N-1] ^ b[N-1])))) begin
        failures++;
        if (failures < 8) $display("a=%h b=%h c=%h cin=%b: carry=%h sum=%h", a, b, c, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
