// mba_pkg: shared constants and elaboration-time helper functions of the
// memory-based FIR filter (MBA).
//
// The default configuration is the worked design example: a 15-tap filter with
// 8-bit input samples, 8-bit tap weights and an 18-bit output, built with
// D = 2 slices, K = 2 ROM partitions per slice and P = 1 pipeline cut per slice.
// The weighted summation is pipelined into WPIPE = ceil(2*Lx*T_FA/Ts) stages,
// which is 1 for the example (Ts = 60 ns, T_FA = 1.1 ns).
//
// The tap weights are not given with the design example; DEFAULT_COEF is an
// illustrative symmetric low-pass set, chosen so that no output can exceed the
// 18-bit output range (sum of |a_i| * 128 < 2^17).
//
// The helper functions fix how taps are split among partitions and where the
// pipeline cuts go; every module that needs those answers calls the same
// function, so the tapped delay line, the ROMs and the adder chains agree.
package mba_pkg;

  localparam int unsigned DEF_N     = 15;  // filter length (taps)
  localparam int unsigned DEF_LX    = 8;   // input wordlength
  localparam int unsigned DEF_LA    = 8;   // tap-weight wordlength
  localparam int unsigned DEF_LY    = 18;  // output wordlength
  localparam int unsigned DEF_D     = 2;   // slices (bits processed per cycle)
  localparam int unsigned DEF_K     = 2;   // ROM partitions per slice
  localparam int unsigned DEF_P     = 1;   // pipeline cuts per slice
  localparam int unsigned DEF_WPIPE = 1;   // pipeline stages of the weighted summation

  // COEF[i] = a_i multiplies x_{k-i}; the concatenation lists a_14 down to a_0.
  localparam logic [DEF_N-1:0][DEF_LA-1:0] DEFAULT_COEF = {
    -8'sd3, -8'sd6, -8'sd4, 8'sd9, 8'sd31, 8'sd61, 8'sd87, 8'sd98,
    8'sd87, 8'sd61, 8'sd31, 8'sd9, -8'sd4, -8'sd6, -8'sd3
  };

  // Number of taps addressing partition k when N taps are split into K parts.
  // The sizes differ by at most one: (K - N mod K) partitions of floor(N/K)
  // lines come first, then (N mod K) partitions of ceil(N/K) lines.
  function automatic int unsigned part_size(int unsigned n, int unsigned k_parts,
                                            int unsigned k);
    int unsigned fl, rem;
    fl  = n / k_parts;
    rem = n % k_parts;
    return (k < k_parts - rem) ? fl : fl + 1;
  endfunction

  // Index of the first tap of partition k.
  function automatic int unsigned part_start(int unsigned n, int unsigned k_parts,
                                             int unsigned k);
    int unsigned s;
    s = 0;
    for (int unsigned q = 0; q < k; q++) s += part_size(n, k_parts, q);
    return s;
  endfunction

  // Partition that tap i belongs to.
  function automatic int unsigned part_of_tap(int unsigned n, int unsigned k_parts,
                                              int unsigned i);
    int unsigned p;
    p = 0;
    for (int unsigned q = 0; q < k_parts; q++)
      if (i >= part_start(n, k_parts, q)) p = q;
    return p;
  endfunction

  // A chain of `len` elements, element 0 nearest the output, cut evenly into
  // `stages` pipeline stages whose last register sits at the chain output.
  // Returns how many of the internal stage registers lie between element e and
  // the output (0 for the output-side stage). Requires 1 <= stages <= len.
  function automatic int unsigned stage_of(int unsigned e, int unsigned stages,
                                           int unsigned len);
    return (e * stages) / len;
  endfunction

endpackage
