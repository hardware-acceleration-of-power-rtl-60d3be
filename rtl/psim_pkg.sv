// psim_pkg: number format and arithmetic shared by the power-system
// accelerator kernels.
//
// All values are IEEE-754 double precision (1 sign, 11 exponent and 52
// fraction bits), the format of the original kernels, and complex numbers
// are pairs of them. The operators are written out as integer logic:
//   fadd / fsub / fmul / fdiv : round to nearest, ties to even
//   subnormal inputs and results are flushed to zero, overflow gives an
//   infinity of the right sign; NaN inputs are not treated specially.
// Each complex operation is built from these and rounds after every real
// operation, as a floating-point dataflow graph would:
//   cmul(a, b) = (ar*br - ai*bi) + j(ar*bi + ai*br)
//   cdiv(n, d) = ((nr*dr + ni*di) + j(ni*dr - nr*di)) / (dr*dr + di*di)
// Flushing subnormals is this design's simplification.
//
// The LU schedules are selected by lu_sched_e:
//   LU_MULTI_TICK : one element of A is processed every N loops
//   LU_PIPE1      : a new element enters every loop ("LU pipeline 1")
//   LU_PIPE2      : elements enter in groups, two groups per matrix row
//                   ("LU pipeline 2")
package psim_pkg;

  typedef logic [63:0] num_t;  // IEEE-754 binary64

  typedef struct packed {
    num_t re;
    num_t im;
  } cplx_t;

  typedef enum logic [1:0] {
    LU_MULTI_TICK = 2'd0,
    LU_PIPE1      = 2'd1,
    LU_PIPE2      = 2'd2
  } lu_sched_e;

  // One generator's record for the machine-update kernel: its states, its
  // currents and field voltage, its machine constants, and the enable field
  // (the update is applied only when enable > 0). All fields are real.
  typedef struct packed {
    num_t enable;
    num_t delta;   num_t omega;
    num_t eq_dash; num_t ed_dash; num_t psid; num_t psiq;
    num_t i_d;     num_t i_q;     num_t efd;
    num_t x_d;     num_t x_d_p;   num_t x_d_dp;
    num_t x_q;     num_t x_q_p;   num_t x_q_dp;  num_t x_ls;
    num_t t_do_p;  num_t t_do_dp; num_t t_qo_p;
  } mach_in_t;

  typedef struct packed {
    num_t delta;
    num_t eq_dash;
    num_t psid;
    num_t ed_dash;
  } mach_out_t;

  localparam num_t NUM_ZERO = 64'h0000_0000_0000_0000;
  localparam num_t NUM_ONE  = 64'h3FF0_0000_0000_0000;  // 1.0
  localparam cplx_t CPLX_ZERO = '{re: NUM_ZERO, im: NUM_ZERO};

  // ------------------------------------------------------------- helpers
  function automatic logic is_zero(num_t a);
    return a[62:52] == 11'd0;  // zero or subnormal (flushed)
  endfunction

  function automatic logic is_pos(num_t a);
    return !a[63] && !is_zero(a);
  endfunction

  function automatic num_t fneg(num_t a);
    return {~a[63], a[62:0]};
  endfunction

  // Rounds sign * m * 2^e to binary64. The exact value is m * 2^e plus a
  // positive amount below the last bit of m when sticky is set.
  function automatic num_t fpack(logic s, int e, logic [127:0] m, logic sticky);
    int          lead, be, sh;
    logic [53:0] mant;
    logic        rnd, stk;
    if (m == '0) return {s, 63'd0};
    lead = 0;
    for (int k = 0; k < 128; k++) if (m[k]) lead = k;
    be  = e + lead + 1023;
    stk = sticky;
    if (lead >= 53) begin
      sh   = lead - 52;
      mant = 54'(m >> sh);
      rnd  = m[sh-1];
      for (int k = 0; k < 128; k++) if (k < sh - 1 && m[k]) stk = 1'b1;
    end else begin
      mant = 54'(m << (52 - lead));
      rnd  = 1'b0;
    end
    if (rnd && (stk || mant[0])) mant = mant + 1'b1;
    if (mant[53]) begin
      mant = mant >> 1;
      be   = be + 1;
    end
    if (be >= 2047) return {s, 11'h7FF, 52'd0};
    if (be <= 0)    return {s, 63'd0};
    return {s, 11'(be), mant[51:0]};
  endfunction

  // ---------------------------------------------------------- operators
  function automatic num_t fmul(num_t a, num_t b);
    logic s;
    if (is_zero(a) || is_zero(b)) return {a[63] ^ b[63], 63'd0};
    s = a[63] ^ b[63];
    if (a[62:52] == 11'h7FF || b[62:52] == 11'h7FF) return {s, 11'h7FF, 52'd0};
    return fpack(s, int'(a[62:52]) + int'(b[62:52]) - 2 * 1075,
                 128'({1'b1, a[51:0]}) * 128'({1'b1, b[51:0]}), 1'b0);
  endfunction

  function automatic num_t fdiv(num_t a, num_t b);
    logic         s;
    logic [127:0] n, d, q;
    s = a[63] ^ b[63];
    if (is_zero(b) || a[62:52] == 11'h7FF) return {s, 11'h7FF, 52'd0};
    if (is_zero(a) || b[62:52] == 11'h7FF) return {s, 63'd0};
    n = 128'({1'b1, a[51:0]}) << 64;
    d = 128'({1'b1, b[51:0]});
    q = n / d;
    return fpack(s, int'(a[62:52]) - int'(b[62:52]) - 64, q, (n % d) != '0);
  endfunction

  function automatic num_t fadd(num_t a, num_t b);
    num_t         big, sml;
    int           diff;
    logic [127:0] mb, ms, r;
    logic         stk;
    if (is_zero(b)) return is_zero(a) ? {a[63] & b[63], 63'd0} : a;
    if (is_zero(a)) return b;
    if (a[62:0] >= b[62:0]) begin big = a; sml = b; end
    else                    begin big = b; sml = a; end
    if (big[62:52] == 11'h7FF) return big;
    diff = int'(big[62:52]) - int'(sml[62:52]);
    mb   = 128'({1'b1, big[51:0]}) << 64;
    ms   = 128'({1'b1, sml[51:0]}) << 64;
    stk  = 1'b0;
    if (diff > 117) begin
      stk = 1'b1;
      ms  = '0;
    end else begin
      for (int k = 0; k < 128; k++) if (k < diff && ms[k]) stk = 1'b1;
      ms = ms >> diff;
    end
    if (big[63] == sml[63]) begin
      r = mb + ms;
    end else begin
      // a lost tail of the smaller operand makes the exact difference
      // slightly smaller: take one unit off and keep the sticky bit
      r = mb - ms - 128'(stk);
      if (r == '0 && !stk) return 64'd0;
    end
    return fpack(big[63], int'(big[62:52]) - 1075 - 64, r, stk);
  endfunction

  function automatic num_t fsub(num_t a, num_t b);
    return fadd(a, fneg(b));
  endfunction

  // ------------------------------------------------------------ complex
  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    return '{re: fadd(a.re, b.re), im: fadd(a.im, b.im)};
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    return '{re: fsub(a.re, b.re), im: fsub(a.im, b.im)};
  endfunction

  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    return '{re: fsub(fmul(a.re, b.re), fmul(a.im, b.im)),
             im: fadd(fmul(a.re, b.im), fmul(a.im, b.re))};
  endfunction

  function automatic cplx_t cdiv(cplx_t n, cplx_t d);
    num_t den;
    den = fadd(fmul(d.re, d.re), fmul(d.im, d.im));
    return '{re: fdiv(fadd(fmul(n.re, d.re), fmul(n.im, d.im)), den),
             im: fdiv(fsub(fmul(n.im, d.re), fmul(n.re, d.im)), den)};
  endfunction

endpackage
