// tb_mba_fir: end-to-end test of the memory-based FIR filter.
//
// Seven configurations run side by side, each through mba_fir_harness, which
// compares every output with a direct-form reference and checks latency and
// output rate:
//   A  the default design example: N=15, D=2, K=2, P=1, WPIPE=1
//   B  bit-serial, one ROM (D=1, K=1, P=1)
//   C  fully parallel: D=8 (one cycle per sample), K=15 single-line ROMs,
//      P=8 cut-sets, WPIPE=4
//   D  D=4, K=4 (partitions of 3,4,4,4 lines), P=3, WPIPE=3
//   E  N=18, K=5 (partitions 3,3,4,4,4), P=5, WPIPE=2, random weights and a
//      16-bit output, so results wrap modulo 2^16
//   F  Lx=12, La=6, D=3, N=7, K=3, P=2, WPIPE=3, Ly=20
//   G  unsigned samples (SIGNED_X=0, no offset, no preload correction),
//      D=2, K=3, P=2, WPIPE=2
// Mechanism counts: accumulator preloads, output-switch captures, inputs with
// the MSB set and clear; each must occur, and the configurations together
// cover internal cut-sets (P>1), internal weighted-summation stages
// (WPIPE>1), CSA chains (K>2), uneven partitions and output wrap-around.
module tb_mba_fir;
  localparam int NCFG = 7;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int chk [NCFG], fail [NCFG], npre [NCFG], ncap [NCFG], nneg [NCFG], npos [NCFG];

  localparam logic [17:0][7:0] COEF_E = {
    8'sd112, -8'sd97, 8'sd45, -8'sd128, 8'sd127, 8'sd3, -8'sd66, 8'sd81, -8'sd19,
    8'sd54, 8'sd99, -8'sd7, -8'sd120, 8'sd33, 8'sd76, -8'sd41, 8'sd18, -8'sd101
  };
  localparam logic [6:0][5:0] COEF_F = {
    -6'sd32, 6'sd31, 6'sd5, -6'sd17, 6'sd22, 6'sd9, -6'sd1
  };

  mba_fir_harness #(.NSAMP(80), .SEED(11)) u_a (
    .clk(clk), .rst(rst), .done(done[0]), .checks(chk[0]), .failures(fail[0]),
    .n_preload(npre[0]), .n_capture(ncap[0]), .n_neg(nneg[0]), .n_pos(npos[0]));

  mba_fir_harness #(.D(1), .K(1), .P(1), .WPIPE(1), .NSAMP(50), .SEED(12)) u_b (
    .clk(clk), .rst(rst), .done(done[1]), .checks(chk[1]), .failures(fail[1]),
    .n_preload(npre[1]), .n_capture(ncap[1]), .n_neg(nneg[1]), .n_pos(npos[1]));

  mba_fir_harness #(.D(8), .K(15), .P(8), .WPIPE(4), .NSAMP(200), .SEED(13)) u_c (
    .clk(clk), .rst(rst), .done(done[2]), .checks(chk[2]), .failures(fail[2]),
    .n_preload(npre[2]), .n_capture(ncap[2]), .n_neg(nneg[2]), .n_pos(npos[2]));

  mba_fir_harness #(.D(4), .K(4), .P(3), .WPIPE(3), .NSAMP(100), .SEED(14)) u_d (
    .clk(clk), .rst(rst), .done(done[3]), .checks(chk[3]), .failures(fail[3]),
    .n_preload(npre[3]), .n_capture(ncap[3]), .n_neg(nneg[3]), .n_pos(npos[3]));

  mba_fir_harness #(.N(18), .LY(16), .D(2), .K(5), .P(5), .WPIPE(2), .COEF(COEF_E),
                    .NSAMP(80), .SEED(15)) u_e (
    .clk(clk), .rst(rst), .done(done[4]), .checks(chk[4]), .failures(fail[4]),
    .n_preload(npre[4]), .n_capture(ncap[4]), .n_neg(nneg[4]), .n_pos(npos[4]));

  mba_fir_harness #(.N(7), .LX(12), .LA(6), .LY(20), .D(3), .K(3), .P(2), .WPIPE(3),
                    .COEF(COEF_F), .NSAMP(60), .SEED(16)) u_f (
    .clk(clk), .rst(rst), .done(done[5]), .checks(chk[5]), .failures(fail[5]),
    .n_preload(npre[5]), .n_capture(ncap[5]), .n_neg(nneg[5]), .n_pos(npos[5]));

  mba_fir_harness #(.K(3), .P(2), .WPIPE(2), .SIGNED_X(1'b0), .NSAMP(60), .SEED(17)) u_g (
    .clk(clk), .rst(rst), .done(done[6]), .checks(chk[6]), .failures(fail[6]),
    .n_preload(npre[6]), .n_capture(ncap[6]), .n_neg(nneg[6]), .n_pos(npos[6]));

  int checks, failures;

  task automatic report();
    checks = 0;
    failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      checks   += chk[c] + 4;
      failures += fail[c];
      if (done[c] == 1'b0) failures++;
      if (npre[c] == 0) begin failures++; $display("cfg %0d: no preload", c); end
      if (ncap[c] == 0) begin failures++; $display("cfg %0d: no capture", c); end
      if (nneg[c] == 0) begin failures++; $display("cfg %0d: no negative input", c); end
      if (npos[c] == 0) begin failures++; $display("cfg %0d: no positive input", c); end
      $display("cfg %0d: checks=%0d failures=%0d preloads=%0d captures=%0d neg=%0d pos=%0d",
               c, chk[c], fail[c], npre[c], ncap[c], nneg[c], npos[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (&done);
    repeat (2) @(posedge clk);
    report();
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog: not all configurations finished (done=%b)", done);
    report();
    $finish;
  end
endmodule
