// tb_mba_csa: random operands at two widths; checks sum = a^b^c and
// sum + carry = a + b + c modulo 2^W.
module tb_mba_csa;
  int checks = 0, failures = 0;

  logic [11:0] a1, b1, c1, s1, k1;
  logic [4:0]  a2, b2, c2, s2, k2;

  mba_csa #(.W(12)) u1 (.a(a1), .b(b1), .c(c1), .sum(s1), .carry(k1));
  mba_csa #(.W(5))  u2 (.a(a2), .b(b2), .c(c2), .sum(s2), .carry(k2));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a1 = 12'($urandom()); b1 = 12'($urandom()); c1 = 12'($urandom());
      a2 = 5'($urandom());  b2 = 5'($urandom());  c2 = 5'($urandom());
      #1;
      checks += 4;
      if (s1 !== (a1 ^ b1 ^ c1)) failures++;
      if (12'(s1 + k1) !== 12'(a1 + b1 + c1)) failures++;
      if (s2 !== (a2 ^ b2 ^ c2)) failures++;
      if (5'(s2 + k2) !== 5'(a2 + b2 + c2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
