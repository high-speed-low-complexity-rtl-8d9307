// qmf_pkg: types, constants and elaboration-time functions shared by the
// multiplierless QMF (quadrature mirror filter) datapath.
//
// A coefficient is held as a signed integer C with CW fractional bits, so the
// real coefficient is h = C / 2**CW and a multiplier produces y = x * C.
// hcse_terms() turns C into its canonical signed digit (CSD) form and then
// replaces every digit pair of the form [1 0 1] or [1 0 -1] (and their negated
// forms) by one term of the shared subexpression x5 = 4x + x or x3 = 4x - x.
// The result is a list of signed terms ordered from the most to the least
// significant position; cp_coef_mult builds its adder tree from that list.
// The width functions give the exact range of every partial sum, so each
// adder is only as wide as its operands require.
//
// The prototype filter coefficients below are equiripple (Parks-McClellan)
// low-pass designs of 50, 80, 120 and 250 taps with pass band edge 0.5*pi
// and stop band edge 0.52*pi, equal weights, quantised to 24 fractional bits
// (rounded to nearest); proto_coef() rounds them to any shorter word length
// (8 to 24 bits). The band edges and lengths are those of the design
// examples this filter bank targets; the coefficient values are this
// design's own.
package qmf_pkg;

  localparam int MAX_TERMS = 16;   // a 24-bit CSD word has at most 13 digits

  // Which shared signal a term uses.
  typedef enum logic [1:0] {
    BASE_X1 = 2'd0,   // x
    BASE_X5 = 2'd1,   // x5 = (x << 2) + x, the [1 0 1] subexpression
    BASE_X3 = 2'd2    // x3 = (x << 2) - x, the [1 0 -1] subexpression
  } base_e;

  typedef struct packed {
    logic       neg;   // term is subtracted
    base_e      base;
    logic [5:0] pos;   // weight 2**pos in units of 2**-CW
  } term_t;

  typedef struct packed {
    logic [4:0]                  n;   // number of valid terms, t[0] .. t[n-1]
    term_t [MAX_TERMS-1:0]       t;   // t[0] is the most significant term
  } terms_t;

  // CSD recoding followed by horizontal common subexpression elimination.
  function automatic terms_t hcse_terms(input longint coef);
    terms_t      r;
    int          d [0:47];
    longint      c;
    int          i;
    int          hi;
    r = '0;
    c = coef;
    for (int k = 0; k < 48; k++) begin
      if (c[0]) begin
        d[k] = (c[1]) ? -1 : 1;     // 2 - (c mod 4)
        c    = c - longint'(d[k]);
      end else begin
        d[k] = 0;
      end
      c = c >>> 1;
    end
    hi = 47;
    while (hi > 0 && d[hi] == 0) hi--;
    i = hi;
    while (i >= 0) begin
      if (d[i] != 0) begin
        if (i >= 2 && d[i-2] != 0) begin
          r.t[r.n].neg  = (d[i] < 0);
          r.t[r.n].base = (d[i] == d[i-2]) ? BASE_X5 : BASE_X3;
          r.t[r.n].pos  = 6'(i - 2);
          i = i - 3;
        end else begin
          r.t[r.n].neg  = (d[i] < 0);
          r.t[r.n].base = BASE_X1;
          r.t[r.n].pos  = 6'(i);
          i = i - 1;
        end
        r.n = r.n + 5'd1;
      end else begin
        i = i - 1;
      end
    end
    return r;
  endfunction

  function automatic int max2(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Width of a shared base signal for an XW-bit signed input.
  function automatic int base_w(input base_e b, input int xw);
    return (b == BASE_X1) ? xw : xw + 3;
  endfunction

  // Width of (a << k) +/- b for a WA-bit a and a WB-bit b: the adder covers
  // only the bits where the two operands overlap, the k low bits come from b.
  function automatic int sa_w(input int wa, input int wb, input int k);
    int wbx;
    wbx = (wb > k) ? wb : k + 1;
    return max2(wa, wbx - k) + 1 + k;
  endfunction

  // Number of terms in the MSB half of the span (the LSB half gets the rest).
  function automatic int msb_terms(input terms_t tl);
    return int'(tl.n) / 2;
  endfunction

  // Width of partial sum j of a term list: a partial sum restarts at term 0
  // (MSB half) and at term msb_terms() (LSB half).
  function automatic int chain_w(input terms_t tl, input int xw, input int j);
    int nm;
    int start;
    int w;
    nm    = msb_terms(tl);
    start = (j >= nm) ? nm : 0;
    w     = base_w(tl.t[start].base, xw) + (tl.t[start].neg ? 1 : 0);
    for (int m = start + 1; m <= j; m++)
      w = sa_w(w, base_w(tl.t[m].base, xw), int'(tl.t[m-1].pos) - int'(tl.t[m].pos));
    return w;
  endfunction

  // Full adder bits of a term list: one per adder output bit that is
  // produced by an adder (the pass-through low bits cost nothing).
  function automatic int fa_count(input terms_t tl, input int xw);
    int nm;
    int n;
    int fa;
    int wbx;
    int k;
    n  = int'(tl.n);
    nm = msb_terms(tl);
    fa = 0;
    for (int m = 1; m < n; m++) begin
      if (m != nm) begin
        k   = int'(tl.t[m-1].pos) - int'(tl.t[m].pos);
        wbx = (base_w(tl.t[m].base, xw) > k) ? base_w(tl.t[m].base, xw) : k + 1;
        fa += max2(chain_w(tl, xw, m - 1), wbx - k) + 1;
      end
    end
    if (nm > 0 && n > nm) begin
      k   = int'(tl.t[nm-1].pos) - int'(tl.t[n-1].pos);
      wbx = (chain_w(tl, xw, n - 1) > k) ? chain_w(tl, xw, n - 1) : k + 1;
      fa += max2(chain_w(tl, xw, nm - 1), wbx - k) + 1;
    end
    return fa;
  endfunction

  // ---------------------------------------------------------------------
  // Prototype QMF low-pass filters of 50, 80, 120 and 250 taps. Each is
  // linear phase with even length, h[n] = h[N-1-n], so only the first N/2
  // coefficients are stored, as integers with 24 fraction bits.
  localparam int PROTO_TAPS = 50;   // the default filter length
  localparam int PROTO_WL   = 24;

  localparam int PROTO_H50 [25] = '{
      1410295,    -49208,   -265137,    -11675,    210727,    -82216,   -310007,     33147,
       268513,   -134250,   -375505,    102430,    352359,   -221018,   -484190,    227453,
       507674,   -402027,   -715414,    523076,    913383,   -984882,  -1655756,   2362795,
      7637092
  };

  localparam int PROTO_H80 [40] = '{
       172262,   -755777,   -185987,     78693,     32730,   -122691,    -35212,    133735,
        29122,   -147546,    -21938,    162492,     13534,   -178593,     -2863,    197225,
        -9593,   -216871,     25456,    240309,    -44120,   -266641,     67198,    297817,
       -97300,   -335999,    135392,    384529,   -186861,   -448393,    258828,    539119,
      -368961,   -681169,    555332,    945826,   -951992,  -1622927,   2395320,   7669966
  };

  localparam int PROTO_H120 [60] = '{
       212368,   -233584,   -168919,    -42555,      4006,    -61635,    -63829,     32864,
        44355,    -51616,    -52205,     54405,     50028,    -63587,    -50585,     71269,
        49595,    -80267,    -48259,     89434,     46459,    -99774,    -43725,    110869,
        39853,   -122328,    -35165,    135306,     29386,   -148923,    -22162,    164101,
        13553,   -180427,     -3084,    198541,     -9781,   -218696,     25328,    241606,
       -44401,   -267963,     67953,    299434,    -97612,   -337343,    135866,    385237,
      -187266,   -449029,    259435,    539752,   -368810,   -682252,    555608,    946019,
      -952208,  -1622758,   2395277,   7669792
  };

  localparam int PROTO_H250 [125] = '{
       -34073,      1213,      7818,        76,     -6702,      2223,      9027,     -1217,
        -8026,      3621,     10250,     -2910,     -9246,      5389,     11319,     -5013,
       -10367,      7658,     12249,     -7545,    -11220,     10352,     12870,    -10529,
       -11742,     13494,     13100,    -13967,    -11813,     17052,     12830,    -17808,
       -11317,     21029,     11956,    -22025,    -10139,     25352,     10343,    -26544,
        -8160,     29944,      7863,    -31284,     -5254,     34699,      4402,    -36115,
        -1301,     39493,      -159,    -40916,      3813,     44180,     -5931,    -45527,
        10190,     48588,    -13024,    -49769,     17944,     52528,    -21538,    -53428,
        27170,     55775,    -31570,    -56266,     37971,     58073,    -43225,    -58014,
        50446,     59136,    -56609,    -58364,     64721,     58636,    -71861,    -56960,
        80953,     56183,    -89167,    -53377,     99365,     51295,   -108804,    -47071,
       120297,     43355,   -131199,    -37320,    144293,     31504,   -157051,    -23086,
       172262,     14467,   -187552,     -2768,    205788,     -9825,   -224843,     26362,
       247813,    -45054,   -273051,     69444,    304292,    -98651,   -341055,    137666,
       389036,   -188345,   -451554,    261039,    542211,   -369709,   -683572,    556971,
       947451,   -952568,  -1623047,   2395858,   7670210
  };

  function automatic bit proto_supported(input int taps);
    return taps == 50 || taps == 80 || taps == 120 || taps == 250;
  endfunction

  // Coefficient n of the taps-long prototype at 24 fraction bits.
  function automatic longint proto_h24(input int taps, input int n);
    int k;
    k = (n < taps / 2) ? n : taps - 1 - n;
    case (taps)
      50:      return longint'(PROTO_H50[k]);
      80:      return longint'(PROTO_H80[k]);
      120:     return longint'(PROTO_H120[k]);
      250:     return longint'(PROTO_H250[k]);
      default: return 0;
    endcase
  endfunction

  // Coefficient n rounded to wl fraction bits (wl <= 24), nearest.
  function automatic longint proto_coef(input int taps, input int n, input int wl);
    longint v;
    v = proto_h24(taps, n);
    if (wl < PROTO_WL)
      v = (v + (longint'(1) <<< (PROTO_WL - wl - 1))) >>> (PROTO_WL - wl);
    return v;
  endfunction

  // Magnitude of prototype coefficient n at wl fractional bits.
  function automatic longint proto_mag(input int taps, input int n, input int wl);
    return (proto_coef(taps, n, wl) < 0) ? -proto_coef(taps, n, wl) : proto_coef(taps, n, wl);
  endfunction

  // Lowest tap index whose coefficient has the same magnitude as tap n: taps
  // that share it (the mirror half of a linear-phase filter, for one) reuse
  // one multiplier.
  function automatic int proto_first(input int taps, input int n, input int wl);
    for (int k = 0; k < n; k++)
      if (proto_mag(taps, k, wl) == proto_mag(taps, n, wl)) return k;
    return n;
  endfunction

  // Bits of growth of a filter with these coefficients: ceil(log2(sum |C|)).
  function automatic int proto_growth(input int taps, input int wl);
    longint s;
    s = 0;
    for (int n = 0; n < taps; n++) begin
      if (proto_coef(taps, n, wl) < 0) s -= proto_coef(taps, n, wl);
      else                             s += proto_coef(taps, n, wl);
    end
    return $clog2(s);
  endfunction

endpackage
