// tb_bank_adder: every read-enable mask on random register contents, against
// an XOR computed register by register in the testbench.
module tb_bank_adder;
  localparam int unsigned M = 64;
  logic [3:0]   re;
  logic [M-1:0] d [4];
  logic [M-1:0] sum, e;
  int checks = 0, failures = 0;

  bank_adder #(.M(M)) dut (.re, .d, .sum);

  initial begin
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < 4; i++) d[i] = {$urandom, $urandom};
      for (int m = 0; m < 16; m++) begin
        re = 4'(m);
        #1;
        e = '0;
        if (m[0]) e = e ^ d[0];
        if (m[1]) e = e ^ d[1];
        if (m[2]) e = e ^ d[2];
        if (m[3]) e = e ^ d[3];
        checks++;
        if (sum !== e) begin failures++; $display("FAIL mask %0d", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
