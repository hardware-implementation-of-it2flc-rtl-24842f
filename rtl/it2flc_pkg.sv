// it2flc_pkg: number formats, membership-function tables, rule base and
// consequent points shared by the interval type-2 fuzzy controller.
//
// Number formats (all two's complement unless marked unsigned):
//   SIG   16 bit Q5.11   controller I/O words (set point, plant output, control)
//   UNI   16 bit Q2.14   universe of discourse, inputs to the fuzzy systems, [-1,1]
//   GRADE 16 bit unsigned Q1.15, membership grades and firing strengths, 1.0 = 32768
//   GAIN  16 bit unsigned Q8.8, the six tunable gains
//   TS    25 bit unsigned Q11.14, sampling time in seconds (0.01 .. 1024 s)
//
// Membership functions. Every set of an input is an interval type-2 set whose
// upper (UMF) and lower (LMF) functions are trapezoids (a, b, c, d, height);
// a triangle has b == c, a shoulder set has a == b == -1 or c == d == 1. The
// breakpoints are kept in hundredths of the universe and mirrored about zero:
// only the left half of each partition is written, set m-1-i is set i negated.
// The printed tick positions of the MF drawings are used where they exist;
// the remaining breakpoints and the LMF heights (0.8 for interior sets of the
// 3..6-set partitions) are this design's own reading of the drawings.
//
// Rule base. The same diagonal table is used for every partition size: the
// consequent of rule (i, j) is the set (i + j) / 2; when i + j is odd the tie
// is broken toward the index of the first input. This keeps the table
// antisymmetric, so zero error and zero rate give zero output. The rule table
// itself is this design's choice; a tuned table can replace rule_out.
//
// Consequents. Each output set is represented by one crisp point: the position
// where its upper MF reaches 1 nearest to zero, so consequent intervals are
// degenerate (y_lower == y_upper).
package it2flc_pkg;

  localparam int SIG_W     = 16;
  localparam int SIG_FRAC  = 11;
  localparam int UNI_W     = 16;
  localparam int UNI_FRAC  = 14;
  localparam int GRADE_W   = 16;
  localparam int GRADE_FRAC = 15;
  localparam int GAIN_W    = 16;
  localparam int GAIN_FRAC = 8;
  localparam int TS_W      = 25;
  localparam int TS_FRAC   = 14;
  localparam int MAX_MF    = 7;
  localparam int MIN_MF    = 2;
  // summed firing strength of one consequent set: up to 49 rules of 1.0
  localparam int WSUM_W    = GRADE_W + 6;
  // weighted sums in the type reducer
  localparam int ACC_W     = 48;
  // rate of change of the error, Q21.11
  localparam int DE_W      = 32;
  // integral of the PI branch, Q?.28 (UNI_FRAC + TS_FRAC fraction bits)
  localparam int INT_W     = 40;
  localparam int INT_FRAC  = UNI_FRAC + TS_FRAC;

  localparam logic signed [UNI_W-1:0] UNI_ONE  = 16'sd16384;
  localparam logic signed [UNI_W-1:0] UNI_MONE = -16'sd16384;
  localparam logic [GRADE_W-1:0]      GRADE_ONE = 16'd32768;

  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [UNI_W-1:0]  uni_t;
  typedef logic [GRADE_W-1:0]       grade_t;
  typedef logic [GAIN_W-1:0]        gain_t;
  typedef logic [TS_W-1:0]          ts_t;
  typedef logic [WSUM_W-1:0]        wsum_t;

  // controller structure selected by {C1, C2}
  typedef enum logic [1:0] {
    MODE_P   = 2'b00,
    MODE_PD  = 2'b01,
    MODE_PI  = 2'b10,
    MODE_PID = 2'b11
  } mode_e;

  // one trapezoid in hardware form: breakpoints in Q2.14, height in Q1.15,
  // rising and falling slopes in grade units per universe unit << 14
  typedef struct packed {
    logic signed [UNI_W-1:0] a;
    logic signed [UNI_W-1:0] b;
    logic signed [UNI_W-1:0] c;
    logic signed [UNI_W-1:0] d;
    logic [GRADE_W-1:0]      h;
    logic [31:0]             sl;
    logic [31:0]             sr;
  } mf_t;

  // number of sets selected by {C3, C4, C5}; codes below 2 select 2 sets
  function automatic logic [2:0] mf_count(input logic [2:0] code);
    return (code < 3'd2) ? 3'd2 : code;
  endfunction

  // one trapezoid in hundredths of the universe, height in percent
  typedef struct packed {
    int a;
    int b;
    int c;
    int d;
    int h;
  } hpts_t;

  // breakpoints of the left-half sets in hundredths: {a, b, c, d, h%}
  // upper selects the UMF, otherwise the LMF
  function automatic hpts_t mf_left_pts(input int m, input int i, input bit upper);
    int a, b, c, d, h;
    hpts_t r;
    a = 0; b = 0; c = 0; d = 0; h = 0;
    case (m)
      2: if (i == 0) begin
           if (upper) begin a=-100; b=-100; c=-35; d=100; h=100; end
           else       begin a=-100; b=-100; c=-100; d=35; h=100; end
         end
      3: case (i)
           0: if (upper) begin a=-100; b=-100; c=-70; d=-10; h=100; end
              else       begin a=-100; b=-100; c=-100; d=-40; h=100; end
           1: if (upper) begin a=-100; b=0; c=0; d=100; h=100; end
              else       begin a=-70; b=0; c=0; d=70; h=80; end
           default: ;
         endcase
      4: case (i)
           0: if (upper) begin a=-100; b=-100; c=-80; d=-40; h=100; end
              else       begin a=-100; b=-100; c=-100; d=-60; h=100; end
           1: if (upper) begin a=-100; b=-40; c=-40; d=40; h=100; end
              else       begin a=-80; b=-40; c=-40; d=0; h=80; end
           default: ;
         endcase
      5: case (i)
           0: if (upper) begin a=-100; b=-100; c=-80; d=-30; h=100; end
              else       begin a=-100; b=-100; c=-100; d=-50; h=100; end
           1: if (upper) begin a=-90; b=-40; c=-40; d=10; h=100; end
              else       begin a=-70; b=-40; c=-40; d=-10; h=80; end
           2: if (upper) begin a=-50; b=0; c=0; d=50; h=100; end
              else       begin a=-30; b=0; c=0; d=30; h=80; end
           default: ;
         endcase
      6: case (i)
           0: if (upper) begin a=-100; b=-100; c=-80; d=-40; h=100; end
              else       begin a=-100; b=-100; c=-100; d=-60; h=100; end
           1: if (upper) begin a=-100; b=-60; c=-60; d=-20; h=100; end
              else       begin a=-80; b=-60; c=-60; d=-40; h=80; end
           2: if (upper) begin a=-60; b=-20; c=-20; d=20; h=100; end
              else       begin a=-40; b=-20; c=-20; d=0; h=80; end
           default: ;
         endcase
      7: case (i)
           0: if (upper) begin a=-100; b=-100; c=-100; d=-65; h=100; end
              else       begin a=-100; b=-100; c=-100; d=-75; h=100; end
           1: if (upper) begin a=-105; b=-70; c=-70; d=-35; h=100; end
              else       begin a=-95; b=-70; c=-70; d=-45; h=100; end
           2: if (upper) begin a=-85; b=-50; c=-50; d=-15; h=100; end
              else       begin a=-75; b=-50; c=-50; d=-25; h=100; end
           3: if (upper) begin a=-35; b=0; c=0; d=35; h=100; end
              else       begin a=-25; b=0; c=0; d=25; h=100; end
           default: ;
         endcase
      default: ;
    endcase
    r.a = a; r.b = b; r.c = c; r.d = d; r.h = h;
    return r;
  endfunction

  // breakpoints of any set of an m-set partition, in hundredths
  function automatic hpts_t mf_pts(input int m, input int i, input bit upper);
    hpts_t l, r;
    r = '0;
    if (i >= 0 && i < m) begin
      if (2 * i <= m - 1) begin
        r = mf_left_pts(m, i, upper);
      end else begin
        l = mf_left_pts(m, m - 1 - i, upper);
        r.a = -l.d; r.b = -l.c; r.c = -l.b; r.d = -l.a; r.h = l.h;
      end
    end
    return r;
  endfunction

  // hundredths to Q2.14, rounded to nearest
  function automatic int hund_to_uni(input int v);
    int s;
    s = v * 16384;
    return (s >= 0) ? (s + 50) / 100 : -((-s + 50) / 100);
  endfunction

  // hardware form of one trapezoid (used at elaboration only)
  function automatic mf_t mf_shape(input int m, input int i, input bit upper);
    hpts_t p;
    int ua, ub, uc, ud, uh;
    mf_t r;
    p  = mf_pts(m, i, upper);
    ua = hund_to_uni(p.a); ub = hund_to_uni(p.b);
    uc = hund_to_uni(p.c); ud = hund_to_uni(p.d);
    uh = (p.h * 32768 + 50) / 100;
    r.a = UNI_W'(ua); r.b = UNI_W'(ub); r.c = UNI_W'(uc); r.d = UNI_W'(ud);
    r.h = GRADE_W'(uh);
    r.sl = (ub > ua) ? (uh * 16384) / (ub - ua) : 32'd0;
    r.sr = (ud > uc) ? (uh * 16384) / (ud - uc) : 32'd0;
    return r;
  endfunction

  // grade of x on one trapezoid: h on [b, c], 0 outside (a, d), linear between
  function automatic grade_t mf_eval(input uni_t x, input mf_t t);
    logic signed [UNI_W:0] dx;
    logic [47:0] p;
    grade_t g;
    if (x >= t.b && x <= t.c) begin
      g = t.h;
    end else if (x <= t.a || x >= t.d) begin
      g = '0;
    end else begin
      if (x < t.b) dx = (UNI_W+1)'(x) - (UNI_W+1)'(t.a);
      else         dx = (UNI_W+1)'(t.d) - (UNI_W+1)'(x);
      p = 48'(unsigned'(dx[UNI_W-1:0])) * 48'((x < t.b) ? t.sl : t.sr);
      p = p >> UNI_FRAC;
      g = (p > 48'(t.h)) ? t.h : GRADE_W'(p);
    end
    return g;
  endfunction

  // consequent set of rule (i, j) for an m-set partition
  function automatic logic [2:0] rule_out(input logic [2:0] m, input logic [2:0] i,
                                          input logic [2:0] j);
    logic [3:0] s;
    logic [2:0] o;
    s = 4'(i) + 4'(j);
    if (!s[0])      o = 3'(s >> 1);
    else if (i > j) o = 3'((s + 4'd1) >> 1);
    else            o = 3'((s - 4'd1) >> 1);
    if (o > m - 3'd1) o = m - 3'd1;
    return o;
  endfunction

  // crisp consequent point of output set k, in hundredths (left half mirrored)
  function automatic int cons_hund(input int m, input int k);
    int kk, v;
    if (k < 0 || k >= m) return 0;
    kk = (2 * k <= m - 1) ? k : m - 1 - k;
    case (m)
      2: v = -35;
      3: v = (kk == 0) ? -70 : 0;
      4: v = (kk == 0) ? -80 : -40;
      5: v = (kk == 0) ? -80 : (kk == 1) ? -40 : 0;
      6: v = (kk == 0) ? -80 : (kk == 1) ? -60 : -20;
      7: v = (kk == 0) ? -100 : (kk == 1) ? -70 : (kk == 2) ? -50 : 0;
      default: v = 0;
    endcase
    return (kk == k) ? v : -v;
  endfunction

endpackage
