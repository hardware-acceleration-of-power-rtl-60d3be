// psim_accel_top: dataflow engine for the power-system simulation step.
//
// Profiling of the simulation loop shows two parts worth moving off the
// host: the LU decomposition of the 11 x 11 complex bus admittance matrix,
// done once per simulation step before the network voltages are solved,
// and the per-generator state updates, which repeat the same arithmetic for
// every machine. This engine holds one kernel for each, side by side, as
// the original design does; the host streams data to both and takes the
// results back. Forward and back substitution stay on the host.
//
//   lu_kernel      : A in (row-major), L and U entries out; SCHED selects
//                    the schedule, pipeline 1 by default (the original's
//                    main pipelined design)
//   machine_update : one generator record in per tick, updated states out
//
// Interface: the kernels' stream ports are brought out unchanged, to be
// connected to the host link, which this design does not include. The two
// kernels share clock and reset and nothing else.
module psim_accel_top
  import psim_pkg::*;
#(
  parameter int        N        = 11,
  parameter int        LOOP_LEN = 128,
  parameter lu_sched_e SCHED    = LU_PIPE1,
  localparam int XW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // LU decomposition kernel
  input  logic          lu_start,
  output logic          lu_busy,
  output logic          lu_done,
  input  logic          a_valid,
  output logic          a_ready,
  input  cplx_t         a_data,
  input  logic          fc_we,
  input  logic [XW-1:0] fc_addr,
  input  cplx_t         fc_data,
  output logic          lu_valid,
  input  logic          lu_ready,
  output logic          lu_lower,
  output logic [XW-1:0] lu_x,
  output logic [XW-1:0] lu_y,
  output cplx_t         lu_data,
  // machine-update kernel
  input  logic          m_in_valid,
  input  mach_in_t      m_in_rec,
  output logic          m_out_valid,
  output mach_out_t     m_out_rec
);

  lu_kernel #(.N(N), .LOOP_LEN(LOOP_LEN), .SCHED(SCHED)) u_lu (
    .clk, .rst_n, .start(lu_start), .busy(lu_busy), .done(lu_done),
    .a_valid, .a_ready, .a_data, .fc_we, .fc_addr, .fc_data,
    .out_valid(lu_valid), .out_ready(lu_ready), .out_lower(lu_lower),
    .out_x(lu_x), .out_y(lu_y), .out_data(lu_data)
  );

  machine_update u_mach (
    .clk, .rst_n, .in_valid(m_in_valid), .in_rec(m_in_rec),
    .out_valid(m_out_valid), .out_rec(m_out_rec)
  );

endmodule
