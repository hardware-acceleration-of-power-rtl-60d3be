// tb_psim_accel_top: end-to-end test of the accelerator at its default size.
//
// Plays the host for two simulation steps on an 11-bus network. Each step
// streams a fresh admittance-like complex matrix into the LU kernel
// (pipeline-1 schedule, 128-tick loops) and, at the same time, the four
// generator records into the machine-update kernel. Every L and U entry and
// every updated state is compared with real arithmetic. The first step runs
// with the input always valid and the output always ready and must take
// [(N*N - 1) + (N - 1)] * 128 + N ticks; the second throttles both streams.
// The mechanisms of the design are counted and each must occur: input-side
// stalls, output back-pressure, lower-triangle results, upper-triangle
// results (the divided ones), enabled machine updates and disabled ones.
module tb_psim_accel_top;
  import psim_pkg::*;

  localparam int N = 11, LOOP_LEN = 128, XW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          lu_start, lu_busy, lu_done;
  logic          a_valid, a_ready;
  cplx_t         a_data;
  logic          fc_we;
  logic [XW-1:0] fc_addr;
  cplx_t         fc_data;
  logic          lu_valid, lu_ready, lu_lower;
  logic [XW-1:0] lu_x, lu_y;
  cplx_t         lu_data;
  logic          m_in_valid, m_out_valid;
  mach_in_t      m_in_rec;
  mach_out_t     m_out_rec;

  psim_accel_top dut (.*);

  int checks = 0, failures = 0;
  int n_in_stall = 0, n_out_stall = 0, n_lower = 0, n_upper = 0, n_m_on = 0, n_m_off = 0;

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic num_t to_num(input real v);
    return $realtobits(v);
  endfunction
  function automatic real to_real(input num_t v);
    return $bitstoreal(v);
  endfunction
  function automatic bit near(input real g, input real e, input real rel);
    real t;
    t = rel * (1.0 + (e < 0 ? -e : e));
    return (g - e <= t) && (e - g <= t);
  endfunction

  // ------------------------------------------------------------ LU reference
  real ar [N][N], ai [N][N], er [N][N], ei [N][N];
  int  got;
  bit  stall_mode;

  task automatic new_matrix();
    real lr [N][N], li [N][N], ur [N][N], ui [N][N];
    real sr, si, nr, ni, d;
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) begin
        ar[r][c] = rnd(-2.0, 2.0);
        ai[r][c] = rnd(-8.0, 8.0);
      end
      ar[r][r] = rnd(20.0, 30.0);
      ai[r][r] = -rnd(60.0, 90.0);
    end
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int z;
        z = (x < y) ? x : y;
        sr = 0; si = 0;
        for (int i = 0; i < z; i++) begin
          sr += lr[x][i] * ur[i][y] - li[x][i] * ui[i][y];
          si += lr[x][i] * ui[i][y] + li[x][i] * ur[i][y];
        end
        nr = ar[x][y] - sr; ni = ai[x][y] - si;
        if (x >= y) begin
          lr[x][y] = nr; li[x][y] = ni; er[x][y] = nr; ei[x][y] = ni;
        end else begin
          d = lr[x][x] * lr[x][x] + li[x][x] * li[x][x];
          ur[x][y] = (nr * lr[x][x] + ni * li[x][x]) / d;
          ui[x][y] = (ni * lr[x][x] - nr * li[x][x]) / d;
          er[x][y] = ur[x][y]; ei[x][y] = ui[x][y];
        end
      end
  endtask

  // ------------------------------------------------------- machine reference
  real mexp [$];

  task automatic send_machine(input bit enable);
    real delta, omega, eq, ed, psid, psiq, id, iq, efd;
    real xd, xdp, xddp, xq, xqp, xqdp, xls, tdop, tdodp, tqop, kd, kq, h;
    mach_in_t r;
    h = 0.001;
    if (enable) n_m_on++; else n_m_off++;
    delta = rnd(-1, 1.5); omega = 377.0 + rnd(-1, 1); eq = rnd(0.8, 1.1); ed = rnd(-0.1, 0.6);
    psid = rnd(0.7, 1.0); psiq = rnd(-0.8, -0.4); id = rnd(-0.5, 1); iq = rnd(-1, 1);
    efd = rnd(1.5, 2.5); xd = 1.8; xdp = 0.3; xddp = 0.25; xq = 1.7; xqp = 0.55;
    xqdp = 0.25; xls = 0.2; tdop = 8.0; tdodp = 0.03; tqop = 0.4;
    r = '{enable: enable ? NUM_ONE : '0, delta: to_num(delta), omega: to_num(omega),
          eq_dash: to_num(eq), ed_dash: to_num(ed), psid: to_num(psid), psiq: to_num(psiq),
          i_d: to_num(id), i_q: to_num(iq), efd: to_num(efd), x_d: to_num(xd),
          x_d_p: to_num(xdp), x_d_dp: to_num(xddp), x_q: to_num(xq), x_q_p: to_num(xqp),
          x_q_dp: to_num(xqdp), x_ls: to_num(xls), t_do_p: to_num(tdop),
          t_do_dp: to_num(tdodp), t_qo_p: to_num(tqop)};
    kd = (xdp - xddp) / ((xdp - xls) * (xdp - xls));
    kq = (xqp - xqdp) / ((xqp - xls) * (xqp - xls));
    if (enable) begin
      mexp.push_back(delta + (omega - 377.0) * h);
      mexp.push_back(eq + (-eq - (xd - xdp) * (-id - kd * (psid - (xdp - xls) * id - eq)) + efd) / tdop * h);
      mexp.push_back(psid + (-psid + eq + (xdp - xls) * id) / tdodp * h);
      mexp.push_back(ed - (ed + (xq - xqp) * (iq - kq * (-psiq + iq * (xqp - xls) - ed))) / tqop * h);
    end else begin
      mexp.push_back(delta); mexp.push_back(eq); mexp.push_back(psid); mexp.push_back(ed);
    end
    @(negedge clk);
    m_in_rec = r;
    m_in_valid = 1;
    @(negedge clk);
    m_in_valid = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && m_out_valid) begin
      real g [4];
      g[0] = to_real(m_out_rec.delta); g[1] = to_real(m_out_rec.eq_dash);
      g[2] = to_real(m_out_rec.psid);  g[3] = to_real(m_out_rec.ed_dash);
      for (int k = 0; k < 4; k++) begin
        real e;
        e = mexp.pop_front();
        checks++;
        if (!near(g[k], e, 1e-9)) begin
          failures++;
          $display("machine state %0d: got %f expected %f", k, g[k], e);
        end
      end
    end
  end

  // ---------------------------------------------------------- LU streams
  int next_in;
  bit feeding;
  always @(negedge clk) begin
    if (feeding && next_in < N * N && (!stall_mode || ($urandom % 4) != 0)) begin
      a_valid = 1;
      a_data  = '{re: to_num(ar[next_in / N][next_in % N]), im: to_num(ai[next_in / N][next_in % N])};
    end else
      a_valid = 0;
    lu_ready = !stall_mode || (($urandom % 3) != 0);
  end

  int cyc = 0, t_start = 0, t_last = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (lu_start) t_start <= cyc + 1;
    if (a_valid && a_ready) next_in <= next_in + 1;
    if (lu_busy && a_ready && !a_valid) n_in_stall++;
    if (lu_valid && !lu_ready) n_out_stall++;
    if (lu_valid && lu_ready) begin
      int x, y;
      x = int'(lu_x); y = int'(lu_y);
      got++;
      t_last <= cyc;
      checks++;
      if (lu_lower) n_lower++; else n_upper++;
      if (lu_lower != (x >= y) || !near(to_real(lu_data.re), er[x][y], 1e-9)
          || !near(to_real(lu_data.im), ei[x][y], 1e-9)) begin
        failures++;
        $display("LU (%0d,%0d): got (%f, %f) expected (%f, %f)", x, y,
                 to_real(lu_data.re), to_real(lu_data.im), er[x][y], ei[x][y]);
      end
    end
  end

  task automatic lu_step(input bit stalls);
    int expect_ticks;
    stall_mode = stalls;
    new_matrix();
    got = 0;
    next_in = 0;
    feeding = 1;
    @(negedge clk) lu_start = 1;
    @(negedge clk) lu_start = 0;
    // the generators are updated while the kernel works
    for (int m = 0; m < 4; m++) send_machine(!(stalls && m == 2));
    wait (lu_done);
    // the last result leaves the output register shortly after done
    for (int w = 0; w < 64 && got < N * N; w++) @(posedge clk);
    @(negedge clk);
    feeding = 0;
    checks++;
    if (got != N * N) begin
      failures++;
      $display("LU: %0d results, expected %0d", got, N * N);
    end
    if (!stalls) begin
      expect_ticks = ((N * N - 1) + (N - 1)) * LOOP_LEN + N;
      checks++;
      // the output register adds one tick to the last result
      if (t_last - t_start != expect_ticks) begin
        failures++;
        $display("LU: %0d ticks, expected %0d", t_last - t_start, expect_ticks);
      end else
        $display("LU: %0d ticks as expected", t_last - t_start);
    end
  endtask

  initial begin
    lu_start = 0; a_valid = 0; a_data = CPLX_ZERO; lu_ready = 0; feeding = 0;
    fc_we = 0; fc_addr = '0; fc_data = CPLX_ZERO; m_in_valid = 0; m_in_rec = '0;
    stall_mode = 0; next_in = 0; got = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    lu_step(1'b0);
    lu_step(1'b1);
    repeat (4) @(posedge clk);
    checks++;
    if (mexp.size() != 0) begin
      failures++;
      $display("%0d machine results missing", mexp.size() / 4);
    end
    $display("mechanisms: input stalls %0d, output stalls %0d, L results %0d, U results %0d, machine updates %0d, disabled %0d",
             n_in_stall, n_out_stall, n_lower, n_upper, n_m_on, n_m_off);
    checks += 6;
    if (n_m_on == 0) begin failures++; $display("no enabled machine update"); end
    if (n_m_off == 0) begin failures++; $display("no disabled machine record"); end
    if (n_in_stall == 0) begin failures++; $display("no input stall happened"); end
    if (n_out_stall == 0) begin failures++; $display("no output stall happened"); end
    if (n_lower == 0) begin failures++; $display("no L result"); end
    if (n_upper == 0) begin failures++; $display("no U result"); end
    $display("run length: %0d ticks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
