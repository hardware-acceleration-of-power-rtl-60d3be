// tb_machine_update: self-checking test of the machine-update kernel.
//
// Streams batches of four generator records (random but physically shaped
// machine constants and states) back to back, one per tick, plus records
// with the enable field at zero or negative. Every output is compared with a
// real-arithmetic evaluation of the same Euler step (step 0.001 s,
// synchronous speed 377 rad/s), and each output must appear exactly one tick
// after its input.
module tb_machine_update;
  import psim_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, out_valid;
  mach_in_t  in_rec;
  mach_out_t out_rec;

  machine_update dut (.*);

  int checks = 0, failures = 0;

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * real'($urandom % 1000000) / 1000000.0;
  endfunction
  function automatic num_t to_num(input real v);
    return $realtobits(v);
  endfunction
  function automatic real to_real(input num_t v);
    return $bitstoreal(v);
  endfunction

  typedef struct {
    real en, delta, omega, eq, ed, psid, psiq, id, iq, efd;
    real xd, xdp, xddp, xq, xqp, xqdp, xls, tdop, tdodp, tqop;
  } mrec_t;

  mrec_t q [$];
  real   e0_q [$], e1_q [$], e2_q [$], e3_q [$];

  function automatic mrec_t make_rec(input real en);
    mrec_t m;
    m.en = en;
    m.delta = rnd(-1.0, 1.5); m.omega = 377.0 + rnd(-2.0, 2.0);
    m.eq = rnd(0.8, 1.1); m.ed = rnd(-0.1, 0.6);
    m.psid = rnd(0.7, 1.0); m.psiq = rnd(-0.8, -0.4);
    m.id = rnd(-0.5, 1.0); m.iq = rnd(-1.0, 1.0); m.efd = rnd(1.5, 2.5);
    m.xd = rnd(1.7, 1.9); m.xdp = rnd(0.28, 0.32); m.xddp = rnd(0.24, 0.26);
    m.xq = rnd(1.6, 1.8); m.xqp = rnd(0.5, 0.6); m.xqdp = rnd(0.24, 0.26);
    m.xls = rnd(0.18, 0.21); m.tdop = rnd(6.0, 9.0); m.tdodp = rnd(0.02, 0.04);
    m.tqop = rnd(0.3, 0.5);
    return m;
  endfunction

  function automatic mach_in_t pack_rec(input mrec_t m);
    mach_in_t r;
    r.enable = to_num(m.en); r.delta = to_num(m.delta); r.omega = to_num(m.omega);
    r.eq_dash = to_num(m.eq); r.ed_dash = to_num(m.ed); r.psid = to_num(m.psid);
    r.psiq = to_num(m.psiq); r.i_d = to_num(m.id); r.i_q = to_num(m.iq);
    r.efd = to_num(m.efd); r.x_d = to_num(m.xd); r.x_d_p = to_num(m.xdp);
    r.x_d_dp = to_num(m.xddp); r.x_q = to_num(m.xq); r.x_q_p = to_num(m.xqp);
    r.x_q_dp = to_num(m.xqdp); r.x_ls = to_num(m.xls); r.t_do_p = to_num(m.tdop);
    r.t_do_dp = to_num(m.tdodp); r.t_qo_p = to_num(m.tqop);
    return r;
  endfunction

  // reference Euler step, written out from the update rules
  task automatic reference(input mrec_t m, output real r [4]);
    real h, kd, kq;
    h = 0.001;
    if (m.en <= 0.0) begin
      r[0] = m.delta; r[1] = m.eq; r[2] = m.psid; r[3] = m.ed;
      return;
    end
    kd = (m.xdp - m.xddp) / ((m.xdp - m.xls) * (m.xdp - m.xls));
    kq = (m.xqp - m.xqdp) / ((m.xqp - m.xls) * (m.xqp - m.xls));
    r[0] = m.delta + (m.omega - 377.0) * h;
    r[1] = m.eq + (-m.eq - (m.xd - m.xdp) * (-m.id - kd * (m.psid - (m.xdp - m.xls) * m.id - m.eq))
                   + m.efd) / m.tdop * h;
    r[2] = m.psid + (-m.psid + m.eq + (m.xdp - m.xls) * m.id) / m.tdodp * h;
    r[3] = m.ed - (m.ed + (m.xq - m.xqp) * (m.iq - kq * (-m.psiq + m.iq * (m.xqp - m.xls) - m.ed)))
                  / m.tqop * h;
  endtask

  int sent_cyc [$];

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e [4];
      real g [4];
      int  c0;
      e[0] = e0_q.pop_front(); e[1] = e1_q.pop_front();
      e[2] = e2_q.pop_front(); e[3] = e3_q.pop_front();
      c0 = sent_cyc.pop_front();
      g[0] = to_real(out_rec.delta); g[1] = to_real(out_rec.eq_dash);
      g[2] = to_real(out_rec.psid);  g[3] = to_real(out_rec.ed_dash);
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (g[k] - e[k] > 1e-9 || e[k] - g[k] > 1e-9) begin
          failures++;
          $display("state %0d: got %f expected %f", k, g[k], e[k]);
        end
      end
      checks++;
      // driven on a falling edge, sampled on the next rising edge, and
      // seen here one clock period (10 time units) later
      if (int'($time) - c0 != 15) begin
        failures++;
        $display("output %0d time units after its input, expected 15", int'($time) - c0);
      end
    end
  end

  initial begin
    mrec_t m;
    real   r [4];
    in_valid = 0; in_rec = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int b = 0; b < 25; b++) begin
      for (int it = 0; it < 4; it++) begin
        m = make_rec((b % 5 == 4 && it == 2) ? ((b % 2 == 0) ? 0.0 : -1.0) : 1.0);
        reference(m, r);
        e0_q.push_back(r[0]); e1_q.push_back(r[1]);
        e2_q.push_back(r[2]); e3_q.push_back(r[3]);
        @(negedge clk);
        in_rec   = pack_rec(m);
        in_valid = 1;
        sent_cyc.push_back(int'($time));
      end
      @(negedge clk);
      in_valid = 0;
      repeat (b % 3) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (e0_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", e0_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
