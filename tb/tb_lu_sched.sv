// tb_lu_sched: self-checking test of the LU kernel's schedule counters.
//
// Runs one scheduler per schedule at N = 11 with 128-tick loops, with the
// advance enable dropped at random, and records the loop and tick on which
// each element of A is taken in. These must match the schedules worked out
// by hand: multi-tick, element a at loop a*N, tick 0; pipeline 1, loop a,
// tick a mod N; pipeline 2, loop 2x (y <= x) or 2x+1 (y > x), tick a. The
// row and column handed out must match the element's address, and the
// counters must not move while the advance enable is low.
module tb_lu_sched;
  import psim_pkg::*;

  localparam int N = 11, L = 128;
  localparam int TW = $clog2(L), GW = $clog2(N*N*N + 2), AW = $clog2(N*N + 1), XW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, stop;
  logic [2:0]    adv, busy, take_in;
  logic [TW-1:0] tick [3];
  logic [XW-1:0] loop_mod [3], in_x [3], in_y [3];
  logic [GW-1:0] loop_cnt [3];
  logic [AW-1:0] in_addr [3];

  lu_sched #(.N(N), .LOOP_LEN(L), .SCHED(LU_MULTI_TICK)) s0 (.clk, .rst_n, .start, .stop,
    .adv(adv[0]), .busy(busy[0]), .tick(tick[0]), .loop_mod(loop_mod[0]), .loop_cnt(loop_cnt[0]),
    .take_in(take_in[0]), .in_addr(in_addr[0]), .in_x(in_x[0]), .in_y(in_y[0]));
  lu_sched #(.N(N), .LOOP_LEN(L), .SCHED(LU_PIPE1)) s1 (.clk, .rst_n, .start, .stop,
    .adv(adv[1]), .busy(busy[1]), .tick(tick[1]), .loop_mod(loop_mod[1]), .loop_cnt(loop_cnt[1]),
    .take_in(take_in[1]), .in_addr(in_addr[1]), .in_x(in_x[1]), .in_y(in_y[1]));
  lu_sched #(.N(N), .LOOP_LEN(L), .SCHED(LU_PIPE2)) s2 (.clk, .rst_n, .start, .stop,
    .adv(adv[2]), .busy(busy[2]), .tick(tick[2]), .loop_mod(loop_mod[2]), .loop_cnt(loop_cnt[2]),
    .take_in(take_in[2]), .in_addr(in_addr[2]), .in_x(in_x[2]), .in_y(in_y[2]));

  int checks = 0, failures = 0;
  int taken [3];
  int prev_tick [3], prev_loop [3];

  function automatic void expect_slot(input int s, input int a, output int el, output int et);
    int x, y;
    x = a / N; y = a % N;
    case (s)
      0: begin el = a * N; et = 0; end
      1: begin el = a; et = a % N; end
      default: begin el = 2 * x + ((y > x) ? 1 : 0); et = a; end
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 3; s++) begin
        if (busy[s] && !adv[s]) begin
          // frozen counters are checked on the next edge
          prev_tick[s] <= int'(tick[s]);
          prev_loop[s] <= int'(loop_cnt[s]);
        end else begin
          prev_tick[s] <= -1;
        end
        if (prev_tick[s] >= 0 && busy[s]) begin
          checks++;
          if (int'(tick[s]) != prev_tick[s] || int'(loop_cnt[s]) != prev_loop[s]) begin
            failures++;
            $display("sched %0d: counters moved while stalled", s);
          end
        end
        if (busy[s] && adv[s] && take_in[s]) begin
          int el, et;
          expect_slot(s, taken[s], el, et);
          checks++;
          if (int'(loop_cnt[s]) != el || int'(tick[s]) != et || int'(in_addr[s]) != taken[s]
              || int'(in_x[s]) != taken[s] / N || int'(in_y[s]) != taken[s] % N
              || int'(loop_mod[s]) != int'(loop_cnt[s]) % N) begin
            failures++;
            $display("sched %0d element %0d: loop %0d tick %0d addr %0d (%0d,%0d), expected loop %0d tick %0d",
                     s, taken[s], loop_cnt[s], tick[s], in_addr[s], in_x[s], in_y[s], el, et);
          end
          taken[s]++;
        end
      end
    end
  end

  always @(negedge clk) adv <= 3'(($urandom % 8) != 0 ? 3'b111 : 3'($urandom));

  initial begin
    start = 0; stop = 0;
    for (int s = 0; s < 3; s++) begin taken[s] = 0; prev_tick[s] = -1; prev_loop[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (taken[0] == N * N && taken[1] == N * N && taken[2] == N * N);
    repeat (2 * L) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (take_in[s]) begin
        failures++;
        $display("sched %0d: still taking input after N*N elements", s);
      end
    end
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    @(posedge clk);
    checks++;
    if (busy != 3'b000) begin
      failures++;
      $display("busy did not drop on stop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
