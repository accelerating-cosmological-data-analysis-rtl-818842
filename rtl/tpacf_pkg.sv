// tpacf_pkg: types, sizes and helper functions shared by the two-point angular
// correlation function (TPACF) bin-count kernel.
//
// The kernel works on IEEE-754 binary64 values, as the kernel it follows does:
// point coordinates, jackknife labels, bin boundaries and the final counts all
// live in the external SRAM arrays as doubles. The sizes below are those of that
// kernel: 32 bins separated by 31 boundaries, 10 jackknife samples plus one
// full-sample histogram (11 in all), 4 interleaved counter banks per histogram,
// and SRAM arrays of N1+N2 = 65,536 doubles each.
//
// Pipeline latencies of the arithmetic units are this design's own choice and
// are collected here so that the units that delay tags alongside them agree.
package tpacf_pkg;

  // ---- kernel sizes -------------------------------------------------------
  localparam int unsigned NBINS   = 32;          // bins per histogram
  localparam int unsigned NBOUND  = NBINS - 1;   // boundary registers binb00..binb30
  localparam int unsigned BIN_W   = $clog2(NBINS);
  localparam int unsigned NJK     = 10;          // jackknife subsamples
  localparam int unsigned NHIST   = NJK + 1;     // histogram 0 = full sample
  localparam int unsigned JK_W    = $clog2(NHIST + 1);
  localparam int unsigned NBANKS  = 4;           // bin_bank = j % 4
  localparam int unsigned BANK_W  = $clog2(NBANKS);
  localparam int unsigned MEM_DEPTH = 65536;     // N1pN2
  localparam int unsigned ADDR_W  = $clog2(MEM_DEPTH);
  localparam int unsigned COUNT_W = 32;          // 32-bit int counters, as in the original kernel

  // ---- arithmetic pipeline depths (design choice) ---------------------------
  localparam int unsigned MUL_LAT = 2;
  localparam int unsigned ADD_LAT = 2;
  localparam int unsigned DOT_LAT = MUL_LAT + 2 * ADD_LAT;

  // ---- SRAM array map of the kernel ----------------------------------------
  typedef enum logic [2:0] {
    ARR_X1 = 3'd0, ARR_Y1 = 3'd1, ARR_Z1 = 3'd2, ARR_JK = 3'd3,
    ARR_X2 = 3'd4, ARR_Y2 = 3'd5, ARR_Z2 = 3'd6, ARR_BINV = 3'd7
  } arr_e;
  localparam int unsigned NARR = 8;

  // ---- binary64 --------------------------------------------------------------
  typedef struct packed {
    logic        sign;
    logic [10:0] exp;
    logic [51:0] frac;
  } fp64_t;

  localparam logic [10:0] EXP_MAX = 11'h7FF;

  // True when the value is +0, -0 or a subnormal (which this design flushes to zero).
  function automatic logic fp64_is_zero(fp64_t a);
    return a.exp == 11'd0;
  endfunction

  // a < b for finite binary64 values; +0 and -0 compare equal, subnormals as zero.
  function automatic logic fp64_lt(fp64_t a, fp64_t b);
    logic [62:0] ma, mb;
    logic az, bz;
    az = fp64_is_zero(a);
    bz = fp64_is_zero(b);
    ma = az ? 63'd0 : {a.exp, a.frac};
    mb = bz ? 63'd0 : {b.exp, b.frac};
    if (az && bz)              return 1'b0;
    if ((a.sign & !az) != (b.sign & !bz))
      return a.sign & !az;      // negative < positive
    if (a.sign & !az)          return ma > mb;   // both negative
    return ma < mb;                              // both non-negative
  endfunction

  // (int)x for a non-negative double below 2^16, truncating toward zero; used
  // for the jackknife labels, which the SRAM holds as doubles.
  function automatic logic [15:0] fp64_to_u16(fp64_t a);
    logic [67:0] m;
    int          sh;
    if (a.sign || a.exp < 11'd1023) return 16'd0;
    if (a.exp > 11'd1038)           return 16'hFFFF;   // saturate
    sh = int'(a.exp) - 1023;                           // 0..15
    m  = {15'd0, 1'b1, a.frac} << sh;                  // integer part in m[67:52]
    return m[67:52];
  endfunction

  // Exact conversion of an unsigned integer below 2^53 to binary64; used for
  // the bin counts written back to SRAM. Wider inputs are truncated, not
  // rounded (cannot occur for COUNT_W + 2 <= 53).
  function automatic fp64_t u64_to_fp64(logic [63:0] v);
    fp64_t r;
    int    msb;
    logic [63:0] n;
    r   = '0;
    msb = -1;
    for (int i = 0; i < 64; i++) if (v[i]) msb = i;
    if (msb >= 0) begin
      n      = v << (63 - msb);          // leading one at bit 63
      r.exp  = 11'(1023 + msb);
      r.frac = n[62:11];
    end
    return r;
  endfunction

  // Tag carried through the pair pipeline alongside each dot product.
  typedef struct packed {
    logic [BANK_W-1:0] bank;   // j % 4
    logic [JK_W-1:0]   jk;     // jackknife label of the outer-loop point
  } pair_tag_t;

endpackage
