// lu_datapath: the arithmetic of one LU kernel tick.
//
// Element (x, y) of A is decomposed with the column-oriented Doolittle form
// used by the original kernels (lower factor L with its diagonal, upper
// factor U with a unit diagonal):
//   sum      = sum over i < min(x, y) of L[x][i] * U[i][y]
//   L[x][y]  = A[x][y] - sum               when x >= y
//   U[x][y]  = (A[x][y] - sum) / L[x][x]   when x <  y
// One tick performs step i of one element: while i < z = min(x, y) it adds
// L[x][i] * U[i][y] to the carried sum (carriedSum -> newSum); on the step
// where i reaches the final step (z in the pipelined schedules, N-1 in the
// multi-tick schedule, which always runs N steps) it forms the result. The
// divisor is 1 for the lower triangle and L[x][x] for the upper one, chosen
// from the real and imaginary parts separately as in the original kernel.
//
// Purely combinational; the kernel registers the carried state. Operands are
// psim_pkg double-precision complex numbers.
module lu_datapath
  import psim_pkg::*;
#(
  parameter int        N     = 11,
  parameter lu_sched_e SCHED = LU_PIPE1,
  localparam int XW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [XW-1:0] x,
  input  logic [XW-1:0] y,
  input  logic [XW-1:0] i,
  input  cplx_t         a_in,      // AIn
  input  cplx_t         sum_in,    // carriedSum
  input  cplx_t         l_xi,      // L[x][i]
  input  cplx_t         u_iy,      // U[i][y]
  input  cplx_t         l_xx,      // L[x][x]
  output cplx_t         sum_out,   // newSum
  output logic          finish,    // this step produces the result
  output logic          lower,     // result belongs to L (x >= y)
  output cplx_t         result     // lcontent / ucontent
);

  logic [XW-1:0] z;
  logic [XW-1:0] last;
  cplx_t         division;

  assign z     = (x >= y) ? y : x;
  assign last  = (SCHED == LU_MULTI_TICK) ? XW'(N - 1) : z;
  assign lower = (x >= y);

  assign sum_out = (i < z) ? cadd(sum_in, cmul(l_xi, u_iy)) : sum_in;
  assign finish  = (i == last);

  // division: real and imaginary parts selected apart, then recombined
  num_t div_re, div_im;
  assign div_re   = lower ? NUM_ONE  : l_xx.re;
  assign div_im   = lower ? NUM_ZERO : l_xx.im;
  assign division = '{re: div_re, im: div_im};

  cplx_t diff;
  assign diff   = csub(a_in, sum_out);
  assign result = lower ? diff : cdiv(diff, division);

endmodule
