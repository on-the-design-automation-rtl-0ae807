// tb_mba_slice: feeds a random bit stream into two slices and checks their
// carry-save output against the inner product of the tap weights with the
// delayed bits:
//   ps + pc (at cycle c) = sum_i a_i * bit(c - 1 - IN_DELAY - M*i)
// u1: the default slice (N=15, M=4, K=2, P=1, W=12, default weights);
// u2: K=4, P=3 (internal retimed cuts), IN_DELAY=1, W=18.
module tb_mba_slice;
  import mba_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        b;
  logic [11:0] s1, c1;
  logic [17:0] s2, c2;

  mba_slice u1 (.clk(clk), .rst(rst), .bit_in(b), .ps(s1), .pc(c1));
  mba_slice #(.K(4), .P(3), .IN_DELAY(1), .W(18)) u2 (
    .clk(clk), .rst(rst), .bit_in(b), .ps(s2), .pc(c2));

  logic hist [0:999];

  function automatic int expect_at(int c, int in_delay);
    int acc = 0;
    for (int i = 0; i < 15; i++) begin
      automatic int src = c - 1 - in_delay - 4 * i;
      if (src >= 0 && hist[src]) acc += int'(signed'(DEFAULT_COEF[i]));
    end
    return acc;
  endfunction

  initial begin
    b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < 500; n++) begin
      b = 1'($urandom());
      hist[n] = b;
      @(posedge clk);
      #1;
      // outputs now belong to cycle n + 1
      if (n >= 64) begin
        checks += 2;
        if (12'(s1 + c1) !== 12'(expect_at(n + 1, 0))) failures++;
        if (18'(s2 + c2) !== 18'(expect_at(n + 1, 1))) failures++;
      end
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
