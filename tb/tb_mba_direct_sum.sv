// tb_mba_direct_sum: drives random ROM words every cycle and checks that the
// two output vectors add up (modulo 2^W) to the sum of the words, each taken
// from the cycle its partition's pipeline position implies:
//   out(c) = sum_k part_k(c - 1 - stage_k).
// Configurations: K=5, P=3, W=14 (stages 0,0,1,1,2, three CSAs) and the
// default K=2, P=1, W=12 (no CSA, one output register).
module tb_mba_direct_sum;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [4:0][13:0] p5;
  logic [13:0]      s5, c5;
  logic [1:0][11:0] p2;
  logic [11:0]      s2, c2;

  mba_direct_sum #(.K(5), .P(3), .W(14)) u5 (.clk(clk), .rst(rst), .part(p5), .ps(s5), .pc(c5));
  mba_direct_sum u2 (.clk(clk), .rst(rst), .part(p2), .ps(s2), .pc(c2));

  localparam int ST5 [5] = '{0, 0, 1, 1, 2};
  logic [13:0] h5 [0:599][5];
  logic [11:0] h2 [0:599][2];

  initial begin
    p5 = '0; p2 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 5; k++) begin
        p5[k] = 14'($urandom());
        h5[n][k] = p5[k];
      end
      for (int k = 0; k < 2; k++) begin
        p2[k] = 12'($urandom());
        h2[n][k] = p2[k];
      end
      @(posedge clk);
      #1;
      if (n >= 3) begin
        automatic logic [13:0] e5 = '0;
        for (int k = 0; k < 5; k++) e5 += h5[n - ST5[k]][k];
        checks++;
        if (14'(s5 + c5) !== e5) failures++;
      end
      checks++;
      if (12'(s2 + c2) !== 12'(h2[n][0] + h2[n][1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
