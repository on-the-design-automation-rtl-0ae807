// tb_mba_controller: checks the sequencing cycle by cycle against a model.
// Counting cycles from reset release (cycle 0):
//   x_ready   when cycle mod M = M-1;
//   acc_first when cycle >= M+LAT and (cycle - M - LAT) mod M = 0;
//   capture   at every acc_first but the first;
//   y_valid   one cycle after the capture of sample m, for m >= N-1.
// u1: M=4, N=3, LAT=2; u2: the defaults (M=4, N=15, LAT=2).
module tb_mba_controller;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic r1, f1, c1, v1, r2, f2, c2, v2;

  mba_controller #(.M(4), .N(3), .LAT(2)) u1 (
    .clk(clk), .rst(rst), .x_ready(r1), .acc_first(f1), .capture(c1), .y_valid(v1));
  mba_controller u2 (
    .clk(clk), .rst(rst), .x_ready(r2), .acc_first(f2), .capture(c2), .y_valid(v2));

  int  nv1 = 0, nv2 = 0;

  function automatic bit is_first(int c);
    return (c >= 6) && ((c - 6) % 4 == 0);
  endfunction

  function automatic bit is_valid(int c, int n);
    // capture of sample m happens at cycle 10 + 4m
    automatic int cc = c - 1;
    if (cc < 10 || (cc - 10) % 4 != 0) return 0;
    return ((cc - 10) / 4) >= n - 1;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int c = 0; c < 300; c++) begin
      checks += 8;
      if (r1 !== (c % 4 == 3)) failures++;
      if (r2 !== (c % 4 == 3)) failures++;
      if (f1 !== is_first(c)) failures++;
      if (f2 !== is_first(c)) failures++;
      if (c1 !== (is_first(c) && c > 6)) failures++;
      if (c2 !== (is_first(c) && c > 6)) failures++;
      if (v1 !== is_valid(c, 3)) failures++;
      if (v2 !== is_valid(c, 15)) failures++;
      nv1 += v1; nv2 += v2;
      @(posedge clk);
      #1;
    end
    checks++;
    if (nv1 == 0 || nv2 == 0) failures++;
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
