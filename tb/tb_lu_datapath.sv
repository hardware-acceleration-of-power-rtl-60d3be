// tb_lu_datapath: self-checking test of one LU kernel tick's arithmetic.
//
// Applies random complex operands and random element positions to the
// pipelined-schedule datapath (N = 11) and checks, against real arithmetic:
// the carried sum grows by L[x][i]*U[i][y] only while i < min(x, y); the
// step finishes exactly when i = min(x, y); lower-triangle results are
// A - sum and upper-triangle results are (A - sum) / L[x][x]. A second
// instance with the multi-tick schedule must finish only on step N-1.
module tb_lu_datapath;
  import psim_pkg::*;

  localparam int N = 11, XW = $clog2(N);

  logic [XW-1:0] x, y, i;
  cplx_t a_in, sum_in, l_xi, u_iy, l_xx;
  cplx_t sum_out, result, sum_out_m, result_m;
  logic  finish, lower, finish_m, lower_m;

  lu_datapath #(.N(N), .SCHED(LU_PIPE1)) dut (.*);
  lu_datapath #(.N(N), .SCHED(LU_MULTI_TICK)) dut_m (.x, .y, .i, .a_in, .sum_in,
    .l_xi, .u_iy, .l_xx, .sum_out(sum_out_m), .finish(finish_m), .lower(lower_m),
    .result(result_m));

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
  function automatic bit near(input real g, input real e);
    real t;
    t = 1e-9 * (1.0 + (e < 0 ? -e : e));
    return (g - e <= t) && (e - g <= t);
  endfunction

  initial begin
    real ar, ai, sr, si, lr, li, ur, ui, dr, di;
    real esr, esi, nr, ni, d, er, ei;
    int  z;
    for (int n = 0; n < 4000; n++) begin
      x = XW'($urandom % N); y = XW'($urandom % N); i = XW'($urandom % N);
      ar = rnd(-20, 20); ai = rnd(-20, 20); sr = rnd(-5, 5); si = rnd(-5, 5);
      lr = rnd(-3, 3); li = rnd(-3, 3); ur = rnd(-3, 3); ui = rnd(-3, 3);
      dr = rnd(2, 30); di = rnd(-30, 30);
      a_in = '{re: to_num(ar), im: to_num(ai)};
      sum_in = '{re: to_num(sr), im: to_num(si)};
      l_xi = '{re: to_num(lr), im: to_num(li)};
      u_iy = '{re: to_num(ur), im: to_num(ui)};
      l_xx = '{re: to_num(dr), im: to_num(di)};
      #1;
      z = (x < y) ? int'(x) : int'(y);
      esr = sr; esi = si;
      if (int'(i) < z) begin
        esr += lr * ur - li * ui;
        esi += lr * ui + li * ur;
      end
      nr = ar - esr; ni = ai - esi;
      if (x >= y) begin
        er = nr; ei = ni;
      end else begin
        d  = dr * dr + di * di;
        er = (nr * dr + ni * di) / d;
        ei = (ni * dr - nr * di) / d;
      end
      checks += 6;
      if (!near(to_real(sum_out.re), esr) || !near(to_real(sum_out.im), esi)) begin
        failures++;
        $display("sum mismatch at x=%0d y=%0d i=%0d", x, y, i);
      end
      if (finish != (int'(i) == z)) begin
        failures++;
        $display("finish wrong at x=%0d y=%0d i=%0d", x, y, i);
      end
      if (finish_m != (int'(i) == N - 1)) begin
        failures++;
        $display("multi-tick finish wrong at i=%0d", i);
      end
      if (lower != (x >= y) || lower_m != lower) begin
        failures++;
        $display("lower flag wrong at x=%0d y=%0d", x, y);
      end
      if (!near(to_real(result.re), er) || !near(to_real(result.im), ei)) begin
        failures++;
        $display("result mismatch at x=%0d y=%0d i=%0d: (%f, %f) vs (%f, %f)",
                 x, y, i, to_real(result.re), to_real(result.im), er, ei);
      end
      if (sum_out_m != sum_out) begin
        failures++;
        $display("multi-tick sum differs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
