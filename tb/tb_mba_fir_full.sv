// tb_mba_fir_full: the filter at its default configuration (the worked design
// example: N=15, Lx=La=8, Ly=18, D=2, K=2, P=1, WPIPE=1, default weights),
// instantiated without parameter overrides.
//
// Random samples, with the extreme values -128 and 127 mixed in, are fed at
// the full rate of one per 4 cycles. Every valid output is compared with the
// direct-form sum y_k = sum_i a_i x_{k-i}; its cycle is checked against the
// latency of WPIPE + M + 3 = 8 cycles and the output spacing of 4 cycles.
module tb_mba_fir_full;
  import mba_pkg::*;

  localparam int NSAMP = 400;
  localparam int M     = DEF_LX / DEF_D;
  localparam int LAT   = DEF_WPIPE + M + 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [DEF_LX-1:0] x_in = '0;
  logic              x_ready, y_valid;
  logic [DEF_LY-1:0] y;

  mba_fir dut (
    .clk(clk), .rst(rst), .x_in(x_in), .x_ready(x_ready), .y(y), .y_valid(y_valid)
  );

  int     checks = 0, failures = 0;
  int     n_taken = 0, n_out = 0, n_min = 0, n_max = 0;
  longint cycle = 0, last_valid = -1;
  longint xs [NSAMP + 16];
  longint taken_at [NSAMP + 16];
  bit     finished = 0;

  function automatic longint gen(int idx);
    if (idx % 9 == 2) return -128;
    if (idx % 13 == 6) return 127;
    return longint'($urandom_range(255)) - 128;
  endfunction

  function automatic logic [DEF_LY-1:0] reference(int k);
    longint acc = 0;
    for (int i = 0; i < int'(DEF_N); i++)
      if (k - i >= 0) acc += longint'(signed'(DEFAULT_COEF[i])) * xs[k-i];
    return DEF_LY'(acc);
  endfunction

  always @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      if (x_ready && n_taken < NSAMP + 16) begin
        xs[n_taken]       = longint'(signed'(x_in));
        taken_at[n_taken] = cycle;
        if (signed'(x_in) == -128) n_min++;
        if (signed'(x_in) == 127)  n_max++;
        n_taken++;
        x_in <= DEF_LX'(gen(n_taken));
      end
      if (y_valid && !finished) begin
        automatic int k = int'(DEF_N) - 1 + n_out;
        checks += 3;
        if (y !== reference(k)) begin
          failures++;
          $display("y_%0d = %0d, expected %0d", k, signed'(y), signed'(reference(k)));
        end
        if (cycle != taken_at[k] + LAT) begin
          failures++;
          $display("y_%0d at cycle %0d, expected %0d", k, cycle, taken_at[k] + LAT);
        end
        if (last_valid >= 0 && cycle - last_valid != M) begin
          failures++;
          $display("outputs %0d cycles apart, expected %0d", cycle - last_valid, M);
        end
        last_valid = cycle;
        n_out++;
        if (k >= NSAMP - 1) finished = 1;
      end
    end
  end

  task automatic finish_run();
    checks += 2;
    if (n_min == 0 || n_max == 0) begin
      failures++;
      $display("extreme inputs not fed: min %0d max %0d", n_min, n_max);
    end
    if (!finished) begin
      failures++;
      $display("only %0d outputs seen", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    x_in = DEF_LX'(gen(0));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (finished);
    @(posedge clk);
    finish_run();
  end

  initial begin
    repeat (NSAMP * M + 200) @(posedge clk);
    $display("watchdog expired");
    finish_run();
  end
endmodule
