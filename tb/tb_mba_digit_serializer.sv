// tb_mba_digit_serializer: loads random samples (and the extremes) once per
// sample period and checks that slice j receives bits j*M+M-1 down to j*M of
// the sample with its MSB inverted, one per cycle, in the M cycles after the
// load. Two configurations: Lx=8, D=2 (default) and Lx=12, D=3.
module tb_mba_digit_serializer;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        load1, load2;
  logic [7:0]  x1;
  logic [11:0] x2;
  logic [1:0]  bits1;
  logic [2:0]  bits2;

  mba_digit_serializer u1 (.clk(clk), .rst(rst), .load(load1), .x(x1), .bits(bits1));
  mba_digit_serializer #(.LX(12), .D(3)) u2 (
    .clk(clk), .rst(rst), .load(load2), .x(x2), .bits(bits2));
  logic [1:0] bits3;
  mba_digit_serializer #(.SIGNED(1'b0)) u3 (
    .clk(clk), .rst(rst), .load(load1), .x(x1), .bits(bits3));

  logic [7:0]  cur1;
  logic [11:0] cur2;

  initial begin
    load1 = 0; load2 = 0; x1 = 0; x2 = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 60; s++) begin
      // one sample: M = 4 cycles for both configurations
      x1 <= (s % 5 == 1) ? 8'h80 : (s % 5 == 2) ? 8'h7F : 8'($urandom());
      x2 <= (s % 5 == 3) ? 12'h800 : 12'($urandom());
      load1 <= 1; load2 <= 1;
      @(posedge clk);
      cur1 = x1 ^ 8'h80;
      cur2 = x2 ^ 12'h800;
      load1 <= 0; load2 <= 0;
      for (int t = 0; t < 4; t++) begin
        #1;
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (bits1[j] !== cur1[j*4 + 3 - t]) failures++;
        end
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (bits3[j] !== x1[j*4 + 3 - t]) failures++;
        end
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (bits2[j] !== cur2[j*4 + 3 - t]) failures++;
        end
        if (t == 3) begin
          load1 <= 1; load2 <= 1;
        end
        if (t < 3) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
