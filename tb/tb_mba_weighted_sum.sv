// tb_mba_weighted_sum: random slice pairs every cycle; checks
//   ts + tc (after cycle n) = sum_j 2^(j*M) * (ps_j + pc_j)(n - stage_j)
// modulo 2^LY, each WS-bit vector read as two's complement.
// u1: D=4, M=2, WS=12, LY=18, WPIPE=3 (stages 0,0,1,2: two internal registers);
// u2: the defaults (D=2, M=4, WS=12, LY=18, WPIPE=1).
module tb_mba_weighted_sum;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0][11:0] ps1, pc1;
  logic [1:0][11:0] ps2, pc2;
  logic [17:0]      ts1, tc1, ts2, tc2;

  mba_weighted_sum #(.D(4), .M(2), .WS(12), .LY(18), .WPIPE(3)) u1 (
    .clk(clk), .rst(rst), .ps(ps1), .pc(pc1), .ts(ts1), .tc(tc1));
  mba_weighted_sum u2 (.clk(clk), .rst(rst), .ps(ps2), .pc(pc2), .ts(ts2), .tc(tc2));

  localparam int ST1 [4] = '{0, 0, 1, 2};
  longint h1 [0:599][4];   // ps_j + pc_j, as signed values
  longint h2 [0:599][2];

  initial begin
    ps1 = '0; pc1 = '0; ps2 = '0; pc2 = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < 4; j++) begin
        ps1[j] = 12'($urandom()); pc1[j] = 12'($urandom());
        h1[n][j] = longint'(signed'(ps1[j])) + longint'(signed'(pc1[j]));
      end
      for (int j = 0; j < 2; j++) begin
        ps2[j] = 12'($urandom()); pc2[j] = 12'($urandom());
        h2[n][j] = longint'(signed'(ps2[j])) + longint'(signed'(pc2[j]));
      end
      @(posedge clk);
      #1;
      if (n >= 3) begin
        automatic longint e1 = 0;
        for (int j = 0; j < 4; j++) e1 += h1[n - ST1[j]][j] <<< (2 * j);
        checks++;
        if (18'(ts1 + tc1) !== 18'(e1)) failures++;
      end
      checks++;
      if (18'(ts2 + tc2) !== 18'(h2[n][0] + (h2[n][1] <<< 4))) failures++;
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
