// lu_run: drives one lu_kernel through a full decomposition and checks it.
//
// Builds a pseudo-random complex N x N matrix shaped like a bus admittance
// matrix (small off-diagonal couplings, a dominant diagonal), works out the
// expected L and U with real arithmetic (column-oriented Doolittle, unit
// diagonal in U), streams A in row by row, and compares every result with
// the expected value. With STALL = 0 the input is always valid and the output
// always ready, so the tick count from start to the last result must equal
// the schedule's formula; with STALL = 1 both sides are throttled at random
// and only the values are checked. Results arrive on finished/checks/failures.
module lu_run
  import psim_pkg::*;
#(
  parameter int        N        = 11,
  parameter int        LOOP_LEN = 128,
  parameter lu_sched_e SCHED    = LU_PIPE1,
  parameter bit        STALL    = 1'b0,
  parameter int        SEED     = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   in_stalls,
  output int   out_stalls
);
  localparam int XW = (N > 1) ? $clog2(N) : 1;

  logic          start, busy, done;
  logic          a_valid, a_ready;
  cplx_t         a_data;
  logic          fc_we;
  logic [XW-1:0] fc_addr;
  cplx_t         fc_data;
  logic          out_valid, out_ready, out_lower;
  logic [XW-1:0] out_x, out_y;
  cplx_t         out_data;

  lu_kernel #(.N(N), .LOOP_LEN(LOOP_LEN), .SCHED(SCHED)) dut (.*);

  real ar [N][N], ai [N][N];
  real lr [N][N], li [N][N], ur [N][N], ui [N][N];
  bit  seen [N][N];

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 1000000) / 1000000.0;
  endfunction

  function automatic num_t to_num(input real v);
    return $realtobits(v);
  endfunction

  function automatic real to_real(input num_t v);
    return $bitstoreal(v);
  endfunction

  task automatic make_matrix();
    real sr, si, nr, ni, d, qr, qi;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        ar[r][c] = rnd(-2.0, 2.0);
        ai[r][c] = rnd(-6.0, 6.0);
      end
      ar[r][r] = rnd(8.0, 12.0) * N / 4.0;
      ai[r][r] = -rnd(20.0, 40.0) * N / 4.0;
    end
    // expected factors, as in the original algorithm
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int z;
        z = (x < y) ? x : y;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < z; i++) begin
          sr += lr[x][i] * ur[i][y] - li[x][i] * ui[i][y];
          si += lr[x][i] * ui[i][y] + li[x][i] * ur[i][y];
        end
        nr = ar[x][y] - sr;
        ni = ai[x][y] - si;
        if (x >= y) begin
          lr[x][y] = nr; li[x][y] = ni;
        end else begin
          d  = lr[x][x] * lr[x][x] + li[x][x] * li[x][x];
          qr = (nr * lr[x][x] + ni * li[x][x]) / d;
          qi = (ni * lr[x][x] - nr * li[x][x]) / d;
          ur[x][y] = qr; ui[x][y] = qi;
        end
      end
  endtask

  // expected tick count from start to the last result, no stalls
  function automatic int expected_ticks();
    case (SCHED)
      LU_MULTI_TICK: return (N * N * N - 1) * LOOP_LEN + 1;
      LU_PIPE1:      return ((N * N - 1) + (N - 1)) * LOOP_LEN + N;
      default:       return 3 * (N - 1) * LOOP_LEN + N * N;
    endcase
  endfunction

  int next_in;
  int got;
  bit running;

  initial begin
    void'($urandom(SEED));
    finished = 0; checks = 0; failures = 0;
    in_stalls = 0; out_stalls = 0;
    start = 0; a_valid = 0; a_data = CPLX_ZERO; out_ready = 0;
    fc_we = 0; fc_addr = '0; fc_data = CPLX_ZERO;
    next_in = 0; got = 0; running = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) seen[r][c] = 0;
    make_matrix();
    wait (rst_n && go);
    @(posedge clk);
    // first column of A through the memory-mapped port
    for (int r = 0; r < N; r++) begin
      fc_we   <= 1;
      fc_addr <= XW'(r);
      fc_data <= '{re: to_num(ar[r][0]), im: to_num(ai[r][0])};
      @(posedge clk);
    end
    fc_we <= 0;
    start <= 1;
    @(posedge clk);
    start   <= 0;
    running = 1;
    wait (done);
    for (int k = 0; k < 20 && got < N * N; k++) @(posedge clk);
    @(posedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (!seen[r][c]) begin
          failures++;
          $display("lu_run sched=%0d: no result for (%0d,%0d)", SCHED, r, c);
        end
      end
    checks++;
    if (got != N * N) begin
      failures++;
      $display("lu_run sched=%0d: %0d results, expected %0d", SCHED, got, N * N);
    end
    if (!STALL) begin
      checks++;
      if (cycles != expected_ticks()) begin
        failures++;
        $display("lu_run sched=%0d: %0d ticks, expected %0d (t0=%0d tl=%0d stalls %0d %0d)", SCHED, cycles, expected_ticks(), t0, t_last, in_stalls, out_stalls);
      end else
        $display("lu_run sched=%0d: %0d ticks as expected", SCHED, cycles);
    end
    finished = 1;
  end

  // input stream and output sink
  int cyc, t0, t_last;
  bit busy_seen;
  initial begin cyc = 0; t0 = 0; t_last = 0; busy_seen = 0; end

  always @(posedge clk) begin
    cyc++;
    if (start && !busy_seen) begin
      busy_seen = 1;
      t0 = cyc + 1;  // end of the first busy tick
    end
    if (out_valid && out_ready) t_last = cyc;
    cycles = t_last - t0;  // the output register adds one tick
  end

  always @(posedge clk) begin
    if (go && rst_n && !finished) begin
      if (a_valid && a_ready) next_in = next_in + 1;
      if (next_in < N * N && (!STALL || ($urandom % 4) != 0)) begin
        a_valid <= 1;
        a_data  <= '{re: to_num(ar[next_in / N][next_in % N]),
                     im: to_num(ai[next_in / N][next_in % N])};
      end else
        a_valid <= 0;
      out_ready <= !STALL || (($urandom % 3) != 0);
      if (busy && a_ready && !a_valid) in_stalls <= in_stalls + 1;
      if (out_valid && !out_ready) out_stalls <= out_stalls + 1;
    end
  end

  always @(posedge clk) begin
    if (running && out_valid && out_ready) begin
      real er, ei, gr, gi, tol;
      int x, y;
      x = int'(out_x); y = int'(out_y);
      er = (x >= y) ? lr[x][y] : ur[x][y];
      ei = (x >= y) ? li[x][y] : ui[x][y];
      gr = to_real(out_data.re);
      gi = to_real(out_data.im);
      tol = 1e-9 * (1.0 + ((er < 0 ? -er : er) + (ei < 0 ? -ei : ei)));
      checks++;
      got++;
      seen[x][y] = 1;
      if (out_lower != (x >= y) || (gr - er > tol) || (er - gr > tol)
          || (gi - ei > tol) || (ei - gi > tol)) begin
        failures++;
        $display("lu_run sched=%0d: (%0d,%0d) lower=%0b got (%f, %f) expected (%f, %f)",
                 SCHED, x, y, out_lower, gr, gi, er, ei);
      end
    end
  end

endmodule
