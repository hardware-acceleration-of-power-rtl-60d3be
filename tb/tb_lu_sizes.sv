// tb_lu_sizes: the LU kernel at network sizes other than 11 buses.
//
// The tick count of the pipelined schedules is what sets the kernel's speed
// against software as the network grows. This testbench checks, at several
// matrix sizes, that the decomposition is still exact to the reference and
// that the tick counts still follow the formulae
//   pipeline 1: [(N*N - 1) + (N - 1)] * LOOP_LEN + N
//   pipeline 2: 3 * (N - 1) * LOOP_LEN + N*N      (needs LOOP_LEN >= N*N)
// for N = 4, 16 and 24 (pipeline 1) and N = 6 and 16 (pipeline 2, the
// latter with a 256-tick loop).
module tb_lu_sizes;
  import psim_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NR = 5;
  logic [NR-1:0] fin;
  int chk [NR], fail [NR], cyc [NR], ist [NR], ost [NR];

  lu_run #(.N(4), .SCHED(LU_PIPE1), .SEED(21)) r0 (.clk, .rst_n, .go(1'b1),
    .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]),
    .in_stalls(ist[0]), .out_stalls(ost[0]));
  lu_run #(.N(16), .SCHED(LU_PIPE1), .SEED(22)) r1 (.clk, .rst_n, .go(1'b1),
    .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]),
    .in_stalls(ist[1]), .out_stalls(ost[1]));
  lu_run #(.N(24), .SCHED(LU_PIPE1), .SEED(23)) r2 (.clk, .rst_n, .go(1'b1),
    .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]),
    .in_stalls(ist[2]), .out_stalls(ost[2]));
  lu_run #(.N(6), .SCHED(LU_PIPE2), .SEED(24)) r3 (.clk, .rst_n, .go(1'b1),
    .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]),
    .in_stalls(ist[3]), .out_stalls(ost[3]));
  lu_run #(.N(16), .LOOP_LEN(256), .SCHED(LU_PIPE2), .SEED(25)) r4 (.clk, .rst_n, .go(1'b1),
    .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .cycles(cyc[4]),
    .in_stalls(ist[4]), .out_stalls(ost[4]));

  int checks, failures;

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    repeat (2) @(posedge clk);
    for (int k = 0; k < NR; k++) begin
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
