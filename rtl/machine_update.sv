// machine_update: one explicit-Euler step of the generator states.
//
// The four generators of the study system all apply the same update rules,
// so the kernel streams them through one datapath, one machine per tick.
// For each machine it advances
//   delta   += (omega - OMEGA_SYNCH) * h
//   eq_dash += ( -eq_dash - (X_d - X_d_p) * ( -I_d - k_d * (psid
//                 - (X_d_p - X_ls) * I_d - eq_dash) ) + efd ) / T_do_p * h
//   psid    += ( -psid + eq_dash + (X_d_p - X_ls) * I_d ) / T_do_dp * h
//   ed_dash += -( ed_dash + (X_q - X_q_p) * ( I_q - k_q * ( -psiq
//                 + I_q * (X_q_p - X_ls) - ed_dash) ) ) / T_qo_p * h
// with k_d = (X_d_p - X_d_dp) / (X_d_p - X_ls)^2,
//      k_q = (X_q_p - X_q_dp) / (X_q_p - X_ls)^2 and h the step size.
// When the enable field is not positive the states pass unchanged, as in
// the original kernel. The rules, the synchronous speed (377 rad/s) and the
// step (0.001 s) and the double-precision format are the original's; the
// record layout and the single register stage are this design's own. Every
// real operation rounds on its own (psim_pkg operators), in the order the
// rules above are written.
//
// Interface: in_valid/in_rec, one machine per tick; out_valid/out_rec follow
// one tick later. There is no back-pressure.
module machine_update
  import psim_pkg::*;
#(
  parameter num_t OMEGA_SYNCH = 64'h4077_9000_0000_0000,  // 377.0
  parameter num_t STEP_SIZE   = 64'h3F50_624D_D2F1_A9FC   // 0.001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  mach_in_t    in_rec,
  output logic        out_valid,
  output mach_out_t   out_rec
);

  num_t xd_ls, xq_ls, k_d, k_q;
  num_t d_delta, d_eq, d_psid, d_ed;
  num_t inner_d, inner_q;
  mach_out_t nxt;

  always_comb begin
    xd_ls = fsub(in_rec.x_d_p, in_rec.x_ls);
    xq_ls = fsub(in_rec.x_q_p, in_rec.x_ls);
    k_d   = fdiv(fdiv(fsub(in_rec.x_d_p, in_rec.x_d_dp), xd_ls), xd_ls);
    k_q   = fdiv(fdiv(fsub(in_rec.x_q_p, in_rec.x_q_dp), xq_ls), xq_ls);

    d_delta = fmul(fsub(in_rec.omega, OMEGA_SYNCH), STEP_SIZE);

    // -I_d - k_d * (psid - (X_d' - X_ls) * I_d - eq_dash)
    inner_d = fsub(fneg(in_rec.i_d),
                   fmul(k_d, fsub(fsub(in_rec.psid, fmul(xd_ls, in_rec.i_d)), in_rec.eq_dash)));
    // (-eq_dash - (X_d - X_d') * inner_d + efd) / T_do' * h
    d_eq    = fmul(fdiv(fadd(fsub(fneg(in_rec.eq_dash),
                                  fmul(fsub(in_rec.x_d, in_rec.x_d_p), inner_d)),
                             in_rec.efd),
                        in_rec.t_do_p), STEP_SIZE);

    // (-psid + eq_dash + (X_d' - X_ls) * I_d) / T_do'' * h
    d_psid  = fmul(fdiv(fadd(fadd(fneg(in_rec.psid), in_rec.eq_dash), fmul(xd_ls, in_rec.i_d)),
                        in_rec.t_do_dp), STEP_SIZE);

    // I_q - k_q * (-psiq + I_q * (X_q' - X_ls) - ed_dash)
    inner_q = fsub(in_rec.i_q,
                   fmul(k_q, fsub(fadd(fneg(in_rec.psiq), fmul(in_rec.i_q, xq_ls)), in_rec.ed_dash)));
    // -(ed_dash + (X_q - X_q') * inner_q) / T_qo' * h
    d_ed    = fmul(fdiv(fneg(fadd(in_rec.ed_dash, fmul(fsub(in_rec.x_q, in_rec.x_q_p), inner_q))),
                        in_rec.t_qo_p), STEP_SIZE);

    if (is_pos(in_rec.enable)) begin
      nxt.delta   = fadd(in_rec.delta,   d_delta);
      nxt.eq_dash = fadd(in_rec.eq_dash, d_eq);
      nxt.psid    = fadd(in_rec.psid,    d_psid);
      nxt.ed_dash = fadd(in_rec.ed_dash, d_ed);
    end else begin
      nxt = '{delta: in_rec.delta, eq_dash: in_rec.eq_dash,
              psid: in_rec.psid, ed_dash: in_rec.ed_dash};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rec   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_rec <= nxt;
    end
  end

endmodule
