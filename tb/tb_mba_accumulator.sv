// tb_mba_accumulator: random carry-save inputs; `first` every 4 cycles and
// `capture` with it (except the first time). A reference accumulator,
// A = first ? PRELOAD + T : 2*A + T (modulo 2^18), predicts every captured
// value: hold_s + hold_c must equal the finished A of the previous sample,
//   PRELOAD * 2^3 + T_0 * 2^3 + T_1 * 2^2 + T_2 * 2 + T_3.
module tb_mba_accumulator;
  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  localparam logic [17:0] PRE = 18'h3F00A;

  logic [17:0] ts, tc, hs, hc;
  logic        first, capture;

  mba_accumulator #(.LY(18), .PRELOAD(PRE)) dut (
    .clk(clk), .rst(rst), .ts(ts), .tc(tc), .first(first), .capture(capture),
    .hold_s(hs), .hold_c(hc));

  logic [17:0] model, finished;
  int          nfirst = 0, ncap = 0;

  initial begin
    ts = 0; tc = 0; first = 0; capture = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    #1;
    for (int n = 0; n < 400; n++) begin
      ts = 18'($urandom());
      tc = 18'($urandom());
      first   = (n % 4 == 0);
      capture = first && (n > 0);
      finished = model;
      model = first ? 18'(PRE + ts + tc) : 18'((model << 1) + ts + tc);
      @(posedge clk);
      #1;
      if (capture) begin
        checks++;
        ncap++;
        if (18'(hs + hc) !== finished) begin
          failures++;
          $display("capture %0d: got %h, expected %h", ncap, 18'(hs + hc), finished);
        end
      end
    end
    checks++;
    if (ncap == 0) failures++;
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
