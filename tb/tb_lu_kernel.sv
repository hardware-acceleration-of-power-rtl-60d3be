// tb_lu_kernel: self-checking test of the LU decomposition kernel.
//
// Runs the three schedules at the full matrix size (N = 11, 128-tick loops)
// without stalls, checking every L and U entry against a real-arithmetic
// reference and the tick count against each schedule's formula, then runs
// the pipelined schedules again with random gaps on the input stream and
// random back-pressure on the output to exercise the stall path.
module tb_lu_kernel;
  import psim_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NR = 5;
  logic [NR-1:0] fin;
  int chk [NR], fail [NR], cyc [NR], ist [NR], ost [NR];

  lu_run #(.SCHED(LU_MULTI_TICK), .SEED(11)) r0 (.clk, .rst_n, .go(1'b1),
    .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]),
    .in_stalls(ist[0]), .out_stalls(ost[0]));
  lu_run #(.SCHED(LU_PIPE1), .SEED(12)) r1 (.clk, .rst_n, .go(1'b1),
    .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]),
    .in_stalls(ist[1]), .out_stalls(ost[1]));
  lu_run #(.SCHED(LU_PIPE2), .SEED(13)) r2 (.clk, .rst_n, .go(1'b1),
    .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]),
    .in_stalls(ist[2]), .out_stalls(ost[2]));
  lu_run #(.SCHED(LU_PIPE1), .STALL(1'b1), .SEED(14)) r3 (.clk, .rst_n, .go(1'b1),
    .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]),
    .in_stalls(ist[3]), .out_stalls(ost[3]));
  lu_run #(.SCHED(LU_PIPE2), .STALL(1'b1), .SEED(15)) r4 (.clk, .rst_n, .go(1'b1),
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
    // the stalled runs must really have stalled on both sides
    for (int k = 3; k < NR; k++) begin
      checks++;
      if (ist[k] == 0 || ost[k] == 0) begin
        failures++;
        $display("run %0d: input stalls %0d, output stalls %0d", k, ist[k], ost[k]);
      end
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
