// tb_mba_ripple_adder: exhaustive at 7 bits, random at the default 18 bits;
// compares with the built-in addition modulo 2^W.
module tb_mba_ripple_adder;
  int checks = 0, failures = 0;

  logic [6:0]  a1, b1, y1;
  logic [17:0] a2, b2, y2;

  mba_ripple_adder #(.W(7)) u1 (.a(a1), .b(b1), .y(y1));
  mba_ripple_adder          u2 (.a(a2), .b(b2), .y(y2));

  initial begin
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        a1 = 7'(i); b1 = 7'(j);
        #1;
        checks++;
        if (y1 !== 7'(i + j)) failures++;
      end
    for (int n = 0; n < 3000; n++) begin
      a2 = 18'($urandom()); b2 = 18'($urandom());
      #1;
      checks++;
      if (y2 !== 18'(a2 + b2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
