// lu_kernel: LU decomposition kernel for the network admittance matrix.
//
// Factors a complex N x N matrix A (the bus admittance matrix, read row by
// row) into a lower factor L with its own diagonal and an upper factor U with
// a unit diagonal, A = L * U, without pivoting. The machine is organised as
// in a statically scheduled dataflow kernel: time runs in loops of LOOP_LEN
// ticks, every tick of a loop is a slot, and the state of the element held
// in a slot (its row, column, step, A value and carried sum) is written back
// to a LOOP_LEN-deep circular buffer, so it returns to the datapath exactly
// one loop later. This is the "carried sum offset by one loop" of the
// original design. Each visit performs one accumulation step (see
// lu_datapath); on its last step the element's result is written to the L
// or U on-chip memory and sent out.
//
// SCHED selects when elements enter (see lu_sched):
//   LU_MULTI_TICK : one element every N loops, N steps each;
//                   the last result leaves after (N*N*N - 1)*LOOP_LEN + 1 ticks
//   LU_PIPE1      : one element every loop, min(x,y)+1 steps each;
//                   [(N*N - 1) + (N - 1)]*LOOP_LEN + N ticks
//   LU_PIPE2      : row x enters in two groups on loops 2x and 2x+1;
//                   3*(N - 1)*LOOP_LEN + N*N ticks, needs LOOP_LEN >= N*N.
//                   In this schedule L[x][0] is read from a separate memory
//                   holding the first column of A, loaded beforehand through
//                   the fc_* port.
// The tick counts of the two pipelines are the original's formulae; the
// multi-tick count differs from the original's N*N*N*LOOP_LEN only because
// the count here ends at the last result rather than at the end of its loop.
// Every schedule is dependency-safe: a value is always written on an earlier
// tick than the first tick that reads it.
//
// Interface: pulse start, then stream A on a_* (valid/ready, row-major) and
// take results on out_* (valid/ready), each tagged with its row, column and
// whether it belongs to L. Results of U's unit diagonal are not sent. The
// whole kernel stalls while an element is due and a_valid is low, or a
// result is due while the output register is still full. Results leave
// through that register one tick after they are formed; the tick counts
// above are counted to the tick that forms the last result. done pulses
// on the same cycle as the last result appears on out_*.
// The number format is double precision, as in the original; the handshakes
// are this design's own.
module lu_kernel
  import psim_pkg::*;
#(
  parameter int        N        = 11,
  parameter int        LOOP_LEN = 128,
  parameter lu_sched_e SCHED    = LU_PIPE1,
  localparam int TW = $clog2(LOOP_LEN),
  localparam int XW = (N > 1) ? $clog2(N) : 1,
  localparam int MW = $clog2(N*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // matrix A, row-major
  input  logic          a_valid,
  output logic          a_ready,
  input  cplx_t         a_data,
  // first column of A (pipeline-2 schedule only)
  input  logic          fc_we,
  input  logic [XW-1:0] fc_addr,
  input  cplx_t         fc_data,
  // results
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_lower,
  output logic [XW-1:0] out_x,
  output logic [XW-1:0] out_y,
  output cplx_t         out_data
);

  localparam int GW = $clog2(N*N*N + 2);
  localparam int AW = $clog2(N*N + 1);

  // ---------------------------------------------------------------- schedule
  logic          take_in, adv, stop;
  logic [TW-1:0] tick;
  logic [XW-1:0] loop_mod, in_x, in_y;
  logic [GW-1:0] loop_cnt;
  logic [AW-1:0] in_addr;

  lu_sched #(.N(N), .LOOP_LEN(LOOP_LEN), .SCHED(SCHED)) u_sched (
    .clk, .rst_n, .start, .stop, .adv, .busy, .tick, .loop_mod, .loop_cnt,
    .take_in, .in_addr, .in_x, .in_y
  );

  // ------------------------------------------------ carried state, one loop
  typedef struct packed {
    logic [XW-1:0] x;
    logic [XW-1:0] y;
    logic [XW-1:0] i;
    cplx_t         a;
    cplx_t         sum;
  } slot_t;

  logic [LOOP_LEN-1:0] slot_valid;
  slot_t               slot_mem [LOOP_LEN];

  logic  cur_valid;
  slot_t cur;

  always_comb begin
    if (take_in) begin
      cur_valid = 1'b1;
      cur       = '{x: in_x, y: in_y, i: '0, a: a_data, sum: CPLX_ZERO};
    end else begin
      cur_valid = slot_valid[tick];
      cur       = slot_mem[tick];
    end
  end

  // ----------------------------------------------------------- FMem: L, U
  logic  l_we, u_we;
  cplx_t l_xi_mem, l_xx, u_iy, u_unused, l_xi;
  cplx_t result, sum_next;
  logic  finish, lower;

  logic [MW-1:0] wr_addr;
  assign wr_addr = MW'(cur.x * N + cur.y);

  cplx_fmem #(.DEPTH(N*N)) u_lmem (
    .clk, .we(l_we), .waddr(wr_addr), .wdata(result),
    .raddr0(MW'(cur.x * N + cur.i)), .rdata0(l_xi_mem),
    .raddr1(MW'(cur.x * N + cur.x)), .rdata1(l_xx)
  );

  cplx_fmem #(.DEPTH(N*N)) u_umem (
    .clk, .we(u_we), .waddr(wr_addr), .wdata(result),
    .raddr0(MW'(cur.i * N + cur.y)), .rdata0(u_iy),
    .raddr1(MW'(cur.i * N + cur.y)), .rdata1(u_unused)
  );

  generate
    if (SCHED == LU_PIPE2) begin : g_fcol
      cplx_t fc_rd, fc_unused;
      cplx_fmem #(.DEPTH(N)) u_fcmem (
        .clk, .we(fc_we), .waddr(fc_addr), .wdata(fc_data),
        .raddr0(cur.x), .rdata0(fc_rd),
        .raddr1(cur.x), .rdata1(fc_unused)
      );
      assign l_xi = (cur.i == '0) ? fc_rd : l_xi_mem;
    end else begin : g_nofcol
      assign l_xi = l_xi_mem;
    end
  endgenerate

  // ---------------------------------------------------------------- datapath
  lu_datapath #(.N(N), .SCHED(SCHED)) u_dp (
    .x(cur.x), .y(cur.y), .i(cur.i), .a_in(cur.a), .sum_in(cur.sum),
    .l_xi, .u_iy, .l_xx, .sum_out(sum_next), .finish, .lower, .result
  );

  // --------------------------------------------------------- flow control
  // Results pass through one output register, so out_valid never depends on
  // the input stream and stays up until out_ready takes it.
  logic emit, out_free;
  assign emit     = busy && cur_valid && finish;
  assign out_free = !out_valid || out_ready;
  assign a_ready  = take_in && (!emit || out_free);
  assign adv      = busy && (!take_in || a_valid) && (!emit || out_free);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_lower <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_data  <= CPLX_ZERO;
    end else if (emit && adv) begin
      out_valid <= 1'b1;
      out_lower <= lower;
      out_x     <= cur.x;
      out_y     <= cur.y;
      out_data  <= result;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  assign l_we = emit && adv && lower;
  assign u_we = emit && adv && !lower;

  logic [AW-1:0] res_cnt;
  assign stop = emit && adv && (int'(res_cnt) == N*N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      res_cnt    <= '0;
      done       <= 1'b0;
    end else begin
      done <= stop;
      if (start) begin
        slot_valid <= '0;
        res_cnt    <= '0;
      end else if (adv) begin
        slot_valid[tick] <= cur_valid && !finish;
        if (emit) res_cnt <= res_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && adv && cur_valid && !finish)
      slot_mem[tick] <= '{x: cur.x, y: cur.y, i: cur.i + 1'b1, a: cur.a, sum: sum_next};
  end

  // A new element must never land on a slot that is still occupied.
  property p_slot_free;
    @(posedge clk) disable iff (!rst_n) (take_in && adv) |-> !slot_valid[tick];
  endproperty
  assert property (p_slot_free);

  // Handshake rule: a result offered stays offered until taken.
  property p_out_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> out_valid;
  endproperty
  assert property (p_out_hold);

endmodule
