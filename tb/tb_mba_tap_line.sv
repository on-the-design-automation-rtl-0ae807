// tb_mba_tap_line: feeds a random bit stream and checks every tap against the
// stream's history. Two lines of 15 taps with M = 4:
//   u1: K=2, P=1 (no internal cut): tap i is delayed by 4*i cycles;
//   u2: K=4 (partitions start at taps 0, 3, 7, 11), P=3 (stages 0,0,1,2),
//       IN_DELAY=2: tap i is delayed by 2 + 4*i - stage(i).
module tb_mba_tap_line;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        b;
  logic [14:0] t1, t2;

  mba_tap_line u1 (.clk(clk), .rst(rst), .bit_in(b), .taps(t1));
  mba_tap_line #(.N(15), .M(4), .K(4), .P(3), .IN_DELAY(2)) u2 (
    .clk(clk), .rst(rst), .bit_in(b), .taps(t2));

  logic hist [0:999];
  int   n = 0;

  function automatic int delay2(int i);
    int st;
    st = (i < 7) ? 0 : (i < 11) ? 1 : 2;
    return 2 + 4 * i - st;
  endfunction

  initial begin
    b = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (n = 0; n < 400; n++) begin
      b = 1'($urandom());
      hist[n] = b;
      #1;
      for (int i = 0; i < 15; i++) begin
        if (n >= 4 * i) begin
          checks++;
          if (t1[i] !== hist[n - 4*i]) begin failures++; if (failures < 5) $display("u1 n%0d i%0d", n, i); end
        end
        if (n >= delay2(i)) begin
          checks++;
          if (t2[i] !== hist[n - delay2(i)]) begin failures++; if (failures < 5) $display("u2 n%0d i%0d", n, i); end
        end
      end
      @(posedge clk);
      #1;
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
