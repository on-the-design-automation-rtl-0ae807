// mba_fir: parameterized memory-based FIR filter, y_k = sum_{i<N} a_i * x_{k-i}.
//
// Idea: with time-invariant weights, the products a_i * x are replaced by
// table look-ups. Each sample is split into bits (distributed arithmetic), so
// y_k = sum_b 2^b * (a^T x^b), where x^b holds bit b of the last N samples and
// a^T x^b is read from a ROM addressed by those N bits. Three parameters set
// the speed/area trade-off:
//   D     slices working in parallel; slice j handles bits j*M..j*M+M-1
//         (M = Lx/D), one per cycle, so a sample takes M cycles;
//   K     ROM partitions per slice: the N address lines are split over K ROMs
//         of about N/K lines, whose words are added by K-2 carry-save adders;
//   P     pipeline cut-sets per slice (retimed so that they add no latency).
// WPIPE, the number of pipeline stages of the weighted summation, follows
// from the sample period: ceil(2*Lx*T_FA/Ts).
//
// Datapath: serializer (MSB inversion, D bit streams) -> D slices (tapped
// delay line, K ROMs, direct summation) -> weighted summation (CSA series,
// shifts of M) -> carry-save shift-accumulator with preload -> output switch
// -> carry-ripple adder.
//
// Interface and timing: one sample every M cycles. The sample on `x_in`
// (two's complement, LX bits) is taken at the end of each cycle in which
// `x_ready` is high; the source must have it there, as the filter does not
// stall. y_k (two's complement, LY bits, modulo 2^LY) is on `y` from the cycle
// `y_valid` pulses, WPIPE + M + 3 cycles after x_k was taken, and stays until
// the next pulse M cycles later. The carry-ripple adder behind `y` has those M
// cycles to settle (a multicycle path). After reset, the outputs of the first
// N-1 samples are suppressed; the state is reset to zero.
//
// SIGNED_X = 0 takes the samples as unsigned numbers (no MSB inversion, no
// preload). COEF[i] holds a_i as LA-bit two's complement. Constraints: D divides LX,
// 1 <= P <= K <= N, 1 <= WPIPE <= D. The defaults are the worked design
// example (N=15, Lx=La=8, Ly=18, D=2, K=2, P=1); its tap weights are not
// published, so DEFAULT_COEF is an illustrative set.
module mba_fir
  import mba_pkg::*;
#(
  parameter int unsigned N     = DEF_N,
  parameter int unsigned LX    = DEF_LX,
  parameter int unsigned LA    = DEF_LA,
  parameter int unsigned LY    = DEF_LY,
  parameter int unsigned D     = DEF_D,
  parameter int unsigned K     = DEF_K,
  parameter int unsigned P     = DEF_P,
  parameter int unsigned WPIPE = DEF_WPIPE,
  parameter bit          SIGNED_X = 1'b1,   // 0: unsigned samples, no offset/preload
  parameter logic [N-1:0][LA-1:0] COEF = DEFAULT_COEF
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LX-1:0] x_in,
  output logic          x_ready,
  output logic [LY-1:0] y,
  output logic          y_valid
);
  localparam int unsigned M  = LX / D;
  // Wordlength of a slice result. A slice result is a true value only while
  // K <= 2 (the two vectors are plain ROM words); min(Ly, La + ceil(log2 N))
  // bits then hold it. For K > 2 the vectors come out of CSAs and are only
  // correct modulo 2^WS as a pair, so they cannot be sign-extended one by one:
  // the slices then work at the full output width LY.
  localparam int unsigned WMIN = (LY < LA + $clog2(N)) ? LY : LA + $clog2(N);
  localparam int unsigned WS   = (K <= 2) ? WMIN : LY;

  // Two's-complement correction, preloaded into the accumulator:
  // -2^(LX-M) * sum(a_i), modulo 2^LY.
  function automatic logic [LY-1:0] preload_value();
    longint s;
    if (!SIGNED_X) return '0;
    s = 0;
    for (int unsigned i = 0; i < N; i++) s += longint'(signed'(COEF[i]));
    return LY'(-(s <<< (LX - M)));
  endfunction
  localparam logic [LY-1:0] PRELOAD = preload_value();

  logic                 load, acc_first, capture;
  logic [D-1:0]         bits;
  logic [D-1:0][WS-1:0] ps, pc;
  logic [LY-1:0]        ts, tc, hold_s, hold_c;

  mba_controller #(.M(M), .N(N), .LAT(WPIPE + 1)) u_ctrl (
    .clk(clk), .rst(rst), .x_ready(load), .acc_first(acc_first),
    .capture(capture), .y_valid(y_valid)
  );

  always_comb x_ready = load;

  mba_digit_serializer #(.LX(LX), .D(D), .M(M), .SIGNED(SIGNED_X)) u_ser (
    .clk(clk), .rst(rst), .load(load), .x(x_in), .bits(bits)
  );

  for (genvar j = 0; j < D; j++) begin : g_slice
    mba_slice #(
      .N(N), .M(M), .K(K), .P(P), .LA(LA), .W(WS),
      .IN_DELAY(WPIPE - 1 - stage_of(j, WPIPE, D)), .COEF(COEF)
    ) u_slice (
      .clk(clk), .rst(rst), .bit_in(bits[j]), .ps(ps[j]), .pc(pc[j])
    );
  end

  mba_weighted_sum #(.D(D), .M(M), .WS(WS), .LY(LY), .WPIPE(WPIPE)) u_wsum (
    .clk(clk), .rst(rst), .ps(ps), .pc(pc), .ts(ts), .tc(tc)
  );

  mba_accumulator #(.LY(LY), .PRELOAD(PRELOAD)) u_acc (
    .clk(clk), .rst(rst), .ts(ts), .tc(tc), .first(acc_first),
    .capture(capture), .hold_s(hold_s), .hold_c(hold_c)
  );

  mba_ripple_adder #(.W(LY)) u_cra (.a(hold_s), .b(hold_c), .y(y));

  initial begin
    assert (M * D == LX)              else $error("mba_fir: D must divide LX");
    assert (P >= 1 && P <= K && K <= N) else $error("mba_fir: need 1 <= P <= K <= N");
    assert (WPIPE >= 1 && WPIPE <= D) else $error("mba_fir: need 1 <= WPIPE <= D");
  end
endmodule
