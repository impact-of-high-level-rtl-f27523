// Per-pixel Sigma-Delta background subtraction step.
//   M_t = M_{t-1} +/- 1 toward I_t
//   O_t = |M_t - I_t|
//   V_t = V_{t-1} +/- 1 toward N * O_t
//   E_t = 0 when O_t < V_t, else 1
// Both estimator steps use the inc_dec delta form. Combinational: one
// pixel per evaluation, so a surrounding stage can run at ii=1.
// Own choices: N * O_t is clamped to the largest 8-bit value before the
// comparison so that V saturates instead of wrapping; when init is high
// (first frame after reset) the estimators are seeded with M = I and
// V = V_INIT and the label is 0.
module sigma_delta_pe
  import sd_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned V_INIT = 2
) (
  input  logic   init,
  input  pixel_t i_pix,
  input  pixel_t m_prev,
  input  pixel_t v_prev,
  output pixel_t m_new,
  output pixel_t v_new,
  output pixel_t o_diff,
  output logic   e_label,
  output logic   v_sat    // N*O exceeded the 8-bit range and was clamped
);
  localparam int unsigned NO_W = PIX_W + $clog2(N + 1);

  pixel_t          m_step, v_step, v_target;
  logic [NO_W-1:0] n_times_o;

  inc_dec #(.W(PIX_W)) u_m (
    .r(m_prev), .x(i_pix), .y(m_step), .inc(), .dec()
  );

  always_comb begin
    m_new     = init ? i_pix : m_step;
    o_diff    = (m_new > i_pix) ? (m_new - i_pix) : (i_pix - m_new);
    n_times_o = NO_W'(o_diff) * NO_W'(N);
    v_sat     = (n_times_o > NO_W'({PIX_W{1'b1}}));
    v_target  = v_sat ? {PIX_W{1'b1}} : n_times_o[PIX_W-1:0];
  end

  inc_dec #(.W(PIX_W)) u_v (
    .r(v_prev), .x(v_target), .y(v_step), .inc(), .dec()
  );

  always_comb begin
    v_new   = init ? pixel_t'(V_INIT) : v_step;
    e_label = init ? 1'b0 : !(o_diff < v_new);
  end
endmodule
