// Checks sigma_delta_pe against the integer reference: corner values of
// I, M and V, random triples, and the init (seeding) case, for N = 2 and
// for N = 4 (where the clamp of N*O is reached more often).
module tb_sigma_delta_pe;
  import md_ref_pkg::*;
  logic       init;
  logic [7:0] i_pix, m_prev, v_prev;
  logic [7:0] m2, v2, o2, m4, v4, o4;
  logic       e2, e4, s2, s4;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_sat = 0, n_e1 = 0;

  sigma_delta_pe #(.N(2), .V_INIT(2)) dut2 (.init, .i_pix, .m_prev, .v_prev,
    .m_new(m2), .v_new(v2), .o_diff(o2), .e_label(e2), .v_sat(s2));
  sigma_delta_pe #(.N(4), .V_INIT(3)) dut4 (.init, .i_pix, .m_prev, .v_prev,
    .m_new(m4), .v_new(v4), .o_diff(o4), .e_label(e4), .v_sat(s4));

  task automatic check_one(bit in_init, int i, int m, int v);
    int mn, vn, e;
    init = in_init; i_pix = 8'(i); m_prev = 8'(m); v_prev = 8'(v);
    #1;
    sd_ref(2, 2, in_init, i, m, v, mn, vn, e);
    checks++;
    if (m2 !== 8'(mn) || v2 !== 8'(vn) || e2 !== 1'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL N=2 i=%0d m=%0d v=%0d -> %0d %0d %0d exp %0d %0d %0d",
                                  i, m, v, m2, v2, e2, mn, vn, e);
    end
    if (!in_init) begin
      if (mn > m) n_inc++;
      if (mn < m) n_dec++;
      if (e) n_e1++;
    end
    sd_ref(4, 3, in_init, i, m, v, mn, vn, e);
    checks++;
    if (m4 !== 8'(mn) || v4 !== 8'(vn) || e4 !== 1'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL N=4 i=%0d m=%0d v=%0d -> %0d %0d %0d exp %0d %0d %0d",
                                  i, m, v, m4, v4, e4, mn, vn, e);
    end
    if (s4) n_sat++;
  endtask

  initial begin
    int corner[6] = '{0, 1, 127, 128, 254, 255};
    foreach (corner[a]) foreach (corner[b]) foreach (corner[c]) begin
      check_one(1'b0, corner[a], corner[b], corner[c]);
      check_one(1'b1, corner[a], corner[b], corner[c]);
    end
    for (int k = 0; k < 20000; k++)
      check_one(($urandom % 16) == 0, $urandom % 256, $urandom % 256, $urandom % 256);
    // V already at 255 with a larger target must stay at 255
    check_one(1'b0, 255, 0, 255);
    checks++;
    if (v4 !== 8'd255) failures++;
    if (n_inc == 0 || n_dec == 0 || n_sat == 0 || n_e1 == 0) begin
      failures++;
      $display("FAIL coverage inc=%0d dec=%0d sat=%0d e=%0d", n_inc, n_dec, n_sat, n_e1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
