// lu_sched: loop counters and input condition of the LU decomposition kernel.
//
// The kernel runs in "loops" of LOOP_LEN ticks. Each tick of a loop is a
// slot that carries one element of A through its accumulation steps, one
// step per loop. This block keeps the counters that drive that schedule and
// decides on which tick the next element of A (read row by row) enters:
//   tick      : loopLengthCounter, the tick within the loop (0..LOOP_LEN-1)
//   loop_mod  : loopCounter, the loop number modulo N
//   loop_cnt  : the loop number since the start
//   in_addr   : addressCounter, row-major address of the next element of A,
//               with its row in_x and column in_y
// The input condition take_in depends on SCHED:
//   LU_MULTI_TICK : tick == 0 and loopCounter == 0 (one element per N loops)
//   LU_PIPE1      : tick == loopCounter (one element per loop, element a in
//                   slot a mod N)
//   LU_PIPE2      : on loop 2r, ticks r*N .. r*(N+1) (row r, columns 0..r);
//                   on loop 2r+1, ticks strictly between r*(N+1) and (r+1)*N
//                   (row r, columns r+1..N-1); element a sits in slot a.
// The counter names, the first two conditions and the pipeline-2 start/end
// formulae follow the original kernels (written there for N = 11, with 11
// and 12 generalised here to N and N+1).
//
// Interface: start (one-cycle pulse) clears the counters and raises busy;
// stop (from the kernel, when the last result is out) drops busy. The
// counters move only on ticks where adv is high, so the kernel can stall the
// whole schedule when the input stream is empty or the output is blocked.
module lu_sched
  import psim_pkg::*;
#(
  parameter int        N        = 11,
  parameter int        LOOP_LEN = 128,
  parameter lu_sched_e SCHED    = LU_PIPE1,
  localparam int TW = $clog2(LOOP_LEN),
  localparam int GW = $clog2(N*N*N + 2),
  localparam int AW = $clog2(N*N + 1),
  localparam int XW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop,
  input  logic          adv,
  output logic          busy,
  output logic [TW-1:0] tick,
  output logic [XW-1:0] loop_mod,
  output logic [GW-1:0] loop_cnt,
  output logic          take_in,
  output logic [AW-1:0] in_addr,
  output logic [XW-1:0] in_x,
  output logic [XW-1:0] in_y
);

  logic more;  // elements of A still to read
  assign more = int'(in_addr) < N*N;

  // pipeline-2 group bounds for the current loop (Fig. 5.6 formulae)
  logic [GW-1:0] r;
  int unsigned   lo, hi;
  logic          in_group;
  assign r = loop_cnt >> 1;

  always_comb begin
    lo = 0;
    hi = 0;
    in_group = 1'b0;
    if (loop_cnt[0] == 1'b0) begin
      lo = int'(r) * N;
      hi = int'(r) * (N + 1) + 1;
      in_group = (int'(tick) >= lo) && (int'(tick) < hi);
    end else begin
      lo = int'(r) * (N + 1);
      hi = (int'(r) + 1) * N;
      in_group = (int'(tick) > lo) && (int'(tick) < hi);
    end
  end

  always_comb begin
    unique case (SCHED)
      LU_MULTI_TICK: take_in = busy && more && (tick == '0) && (loop_mod == '0);
      LU_PIPE1:      take_in = busy && more && (TW'(loop_mod) == tick);
      default:       take_in = busy && more && in_group;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      tick     <= '0;
      loop_mod <= '0;
      loop_cnt <= '0;
      in_addr  <= '0;
      in_x     <= '0;
      in_y     <= '0;
    end else if (start) begin
      busy     <= 1'b1;
      tick     <= '0;
      loop_mod <= '0;
      loop_cnt <= '0;
      in_addr  <= '0;
      in_x     <= '0;
      in_y     <= '0;
    end else if (busy) begin
      if (stop) begin
        busy <= 1'b0;
      end else if (adv) begin
        if (int'(tick) == LOOP_LEN - 1) begin
          tick     <= '0;
          loop_cnt <= loop_cnt + 1'b1;
          loop_mod <= (int'(loop_mod) == N - 1) ? '0 : loop_mod + 1'b1;
        end else begin
          tick <= tick + 1'b1;
        end
        if (take_in) begin
          in_addr <= in_addr + 1'b1;
          if (int'(in_y) == N - 1) begin
            in_y <= '0;
            in_x <= in_x + 1'b1;
          end else begin
            in_y <= in_y + 1'b1;
          end
        end
      end
    end
  end

  // In pipeline 2 the slot of an element is its own address.
  property p_pipe2_slot;
    @(posedge clk) disable iff (!rst_n)
      (SCHED == LU_PIPE2 && take_in) |-> (int'(tick) == int'(in_addr));
  endproperty
  assert property (p_pipe2_slot);

  initial begin
    assert (SCHED != LU_PIPE2 || LOOP_LEN >= N * N)
      else $error("pipeline 2 needs LOOP_LEN >= N*N");
    assert (LOOP_LEN >= N) else $error("LOOP_LEN must be at least N");
  end

endmodule
