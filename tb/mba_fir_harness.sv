// mba_fir_harness: drives one mba_fir instance with random samples at the full
// rate and checks every valid output against a direct-form reference,
//   y_k = sum_i a_i * x_{k-i}  (modulo 2^LY),
// computed here with plain integer arithmetic. It also checks the timing:
// y_k must be flagged exactly WPIPE + M + 3 cycles after x_k was taken, the
// first valid output must be y_{N-1}, and valid outputs must be M cycles apart.
// Every 7th sample is the most negative value and every 11th the most
// positive one (for unsigned samples: all ones and zero), so both ends of the
// input range are exercised.
// Counts of the run-time mechanisms are reported on the ports.
module mba_fir_harness #(
  parameter int unsigned N     = 15,
  parameter int unsigned LX    = 8,
  parameter int unsigned LA    = 8,
  parameter int unsigned LY    = 18,
  parameter int unsigned D     = 2,
  parameter int unsigned K     = 2,
  parameter int unsigned P     = 1,
  parameter int unsigned WPIPE = 1,
  parameter bit          SIGNED_X = 1'b1,
  parameter logic [N-1:0][LA-1:0] COEF = mba_pkg::DEFAULT_COEF,
  parameter int unsigned NSAMP = 60,
  parameter int unsigned SEED  = 1
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_preload,   // accumulator preloads seen
  output int   n_capture,   // output-switch captures seen
  output int   n_neg,       // samples with the MSB set (negative when signed)
  output int   n_pos        // samples with the MSB clear
);
  localparam int unsigned M   = LX / D;
  localparam int unsigned LAT = WPIPE + M + 3;

  logic [LX-1:0] x_in;
  logic          x_ready, y_valid;
  logic [LY-1:0] y;

  mba_fir #(
    .N(N), .LX(LX), .LA(LA), .LY(LY), .D(D), .K(K), .P(P), .WPIPE(WPIPE), .SIGNED_X(SIGNED_X), .COEF(COEF)
  ) dut (
    .clk(clk), .rst(rst), .x_in(x_in), .x_ready(x_ready), .y(y), .y_valid(y_valid)
  );

  longint xs [NSAMP + 64];     // samples in order taken
  longint taken_at [NSAMP + 64];
  int     n_taken, n_out, last_valid;
  longint cycle;

  function automatic longint next_sample(int idx, int unsigned r);
    longint v;
    if (!SIGNED_X) begin
      if (idx % 7 == 3)       v = (longint'(1) << LX) - 1;
      else if (idx % 11 == 5) v = 0;
      else                    v = longint'(r % (1 << LX));
      return v;
    end
    if (idx % 7 == 3)       v = -(longint'(1) << (LX - 1));
    else if (idx % 11 == 5) v = (longint'(1) << (LX - 1)) - 1;
    else                    v = longint'(r % (1 << LX)) - (longint'(1) << (LX - 1));
    return v;
  endfunction

  function automatic logic [LY-1:0] reference(int k);
    longint acc;
    acc = 0;
    for (int i = 0; i < int'(N); i++)
      if (k - i >= 0) acc += longint'(signed'(COEF[i])) * xs[k-i];
    return LY'(acc);
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      cycle      <= 0;
      n_taken    <= 0;
      n_out      <= 0;
      last_valid <= -1;
      done       <= 1'b0;
      checks     <= 0;
      failures   <= 0;
      n_preload  <= 0;
      n_capture  <= 0;
      n_neg      <= 0;
      n_pos      <= 0;
      x_in       <= LX'(next_sample(0, $urandom(SEED)));
    end else begin
      cycle <= cycle + 1;
      if (dut.acc_first) n_preload <= n_preload + 1;
      if (dut.capture)   n_capture <= n_capture + 1;
      if (x_ready && n_taken < NSAMP + 64) begin
        xs[n_taken]       = SIGNED_X ? longint'(signed'(x_in)) : longint'(x_in);
        taken_at[n_taken] = cycle;
        if (x_in[LX-1]) n_neg <= n_neg + 1;
        else                   n_pos <= n_pos + 1;
        n_taken <= n_taken + 1;
        x_in    <= LX'(next_sample(n_taken + 1, $urandom()));
      end
      if (y_valid && !done) begin
        automatic int k = int'(N) - 1 + n_out;
        automatic logic [LY-1:0] exp_y = reference(k);
        checks <= checks + 3;
        if (y !== exp_y) begin
          failures <= failures + 1;
          $display("cfg D%0d K%0d P%0d: y_%0d = %0d, expected %0d", D, K, P, k,
                   signed'(y), signed'(exp_y));
        end
        if (cycle != taken_at[k] + LAT) begin
          failures <= failures + 1;
          $display("cfg D%0d K%0d P%0d: y_%0d flagged at cycle %0d, expected %0d", D, K, P,
                   k, cycle, taken_at[k] + LAT);
        end
        if (last_valid >= 0 && cycle - last_valid != M) begin
          failures <= failures + 1;
          $display("cfg D%0d K%0d P%0d: outputs %0d cycles apart", D, K, P, cycle - last_valid);
        end
        last_valid <= int'(cycle);
        n_out <= n_out + 1;
        if (k >= int'(NSAMP) - 1) done <= 1'b1;
      end
    end
  end
endmodule
