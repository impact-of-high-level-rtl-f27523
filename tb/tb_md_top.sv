// End-to-end test of md_top with every parameter at its default (352x288
// image, N = 2, four-lane custom logic). Motion detector: four frames of a moving
// bright rectangle over a grey gradient with isolated noise pixels. A
// reference model (Sigma-Delta step per pixel, then a direct 3x3 erosion
// and dilation) gives the expected mask of every frame; each mask pixel
// the design streams out is compared with it and must come exactly once.
// The input stalls at random in frame 2 and later; in stall-free frames
// the time from the first pixel to frame_done must be
// W*H + 4*H*(W+1) + 4 cycles. Mechanisms counted (each must occur):
// seeding frame, input stall, back-pressure during the morphological
// passes, M up/down, V up/down, V clamp, labelled pixels, pixels removed
// by the erosion, pixels added back by the dilation. In parallel the
// custom-instruction port is driven with random operands and opcodes and
// checked against a lane model (each opcode must be seen), and the three
// ii example adders are fed continuously for the first 600 cycles and
// checked for results, 3-cycle latency and acceptance every ii cycles.
module tb_md_top;
  import md_ref_pkg::*;
  localparam int W = 352, H = 288, NP = W * H, N = 2, VI = 2, NF = 4;
  localparam int AW = $clog2(NP);
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, pix_valid, pix_ready, mask_valid, mask_data, frame_done;
  logic [7:0]    pix_data;
  logic [AW-1:0] mask_addr;
  int checks = 0, failures = 0;

  logic [31:0]   ci_a, ci_b, ci_result;
  logic [2:0]    ci_n;
  logic [15:0]   sum_a, sum_b, sum_c, sum_d;
  logic [2:0]    sum_in_valid, sum_in_ready, sum_out_valid;
  logic [15:0]   sum_dout [3];

  md_top dut (.*);

  // reference state
  int ref_m [NP], ref_v [NP];
  img_t frame_pix [NF];
  img_t exp_mask [NF];
  int n_seed = 0, n_stall = 0, n_bp = 0, n_mup = 0, n_mdn = 0, n_vup = 0, n_vdn = 0;
  int n_vclamp = 0, n_label = 0, n_eroded = 0, n_dilated = 0;

  function automatic int gen_pix(int f, int x, int y);
    int ox = 60 + 25 * f, oy = 100 + 8 * f;
    if (x >= ox && x < ox + 48 && y >= oy && y < oy + 64) return 250;
    if (f > 0 && ((x * 7 + y * 13 + f * 5) % 37) == 0) return 255;   // isolated noise
    return 20 + (x + 2 * y) % 180;
  endfunction

  task automatic make_frame(int f);
    img_t e = new[NP], t;
    frame_pix[f] = new[NP];
    if (f == 0) n_seed++;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int k = y * W + x, p = gen_pix(f, x, y), mn, vn, lab;
        frame_pix[f][k] = p;
        if (f > 0) begin
          if (ref_m[k] < p) n_mup++;
          if (ref_m[k] > p) n_mdn++;
        end
        sd_ref(N, VI, f == 0, p, ref_m[k], ref_v[k], mn, vn, lab);
        if (f > 0) begin
          int o = (mn > p) ? mn - p : p - mn;
          if (vn > ref_v[k]) n_vup++;
          if (vn < ref_v[k]) n_vdn++;
          if (N * o > 255) n_vclamp++;
        end
        ref_m[k] = mn; ref_v[k] = vn; e[k] = lab;
        n_label += lab;
      end
    t = morph_ref(e, W, H, 1'b0, 1);
    exp_mask[f] = morph_ref(t, W, H, 1'b1, 1);
    for (int k = 0; k < NP; k++) begin
      if (e[k] == 1 && t[k] == 0) n_eroded++;
      if (t[k] == 0 && exp_mask[f][k] == 1) n_dilated++;
    end
  endtask

  // mask checker
  int out_frame = 0;
  int wcnt [NP];
  int cyc = 0;
  int first_acc [NF];
  int done_cyc [NF];
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (mask_valid) begin
      checks++;
      wcnt[mask_addr]++;
      if (out_frame >= NF || mask_data !== 1'(exp_mask[out_frame][mask_addr])) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d addr %0d got %0d", out_frame, mask_addr, mask_data);
      end
    end
    if (frame_done) begin
      for (int k = 0; k < NP; k++) begin
        checks++;
        if (wcnt[k] != 1) failures++;
        wcnt[k] = 0;
      end
      done_cyc[out_frame] = cyc;
      out_frame++;
    end
  end

  initial begin
    int f, idx;
    rst_n = 0; pix_valid = 0; pix_data = 0;
    foreach (wcnt[k]) wcnt[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    f = 0; idx = 0;
    make_frame(0);
    while (f < NF) begin
      @(negedge clk);
      if (f >= 2 && ($urandom % 5) == 0) begin
        pix_valid = 0; n_stall++;
      end else begin
        pix_valid = 1; pix_data = 8'(frame_pix[f][idx]);
      end
      #1;
      if (pix_valid && !pix_ready) n_bp++;
      if (pix_valid && pix_ready) begin
        if (idx == 0) first_acc[f] = cyc;
        idx++;
        if (idx == NP) begin
          idx = 0; f++;
          if (f < NF) make_frame(f);
        end
      end
    end
    @(negedge clk) pix_valid = 0;
    while (out_frame < NF) @(negedge clk);
    for (int g = 0; g < 2; g++) begin
      checks++;
      if (done_cyc[g] - first_acc[g] != NP + 4 * H * (W + 1) + 4) begin
        failures++; $display("FAIL frame %0d took %0d cycles", g, done_cyc[g] - first_acc[g]);
      end
    end
    $display("seed=%0d stall=%0d backpressure=%0d m_up=%0d m_dn=%0d v_up=%0d v_dn=%0d v_clamp=%0d label=%0d eroded=%0d dilated=%0d",
             n_seed, n_stall, n_bp, n_mup, n_mdn, n_vup, n_vdn, n_vclamp, n_label, n_eroded, n_dilated);
    $display("ci_ops_seen=%b sum_results=%0d/%0d/%0d", ci_seen, sum_outs[0], sum_outs[1], sum_outs[2]);
    checks++;
    if (ci_seen != 8'hff) begin failures++; $display("FAIL a custom opcode never ran"); end
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (sum_acc[u] != (600 + u) / (u + 1) || sum_outs[u] != sum_acc[u]) begin
        failures++; $display("FAIL ii=%0d accepts %0d results %0d", u + 1, sum_acc[u], sum_outs[u]);
      end
    end
    checks++;
    if (n_seed == 0 || n_stall == 0 || n_bp == 0 || n_mup == 0 || n_mdn == 0 || n_vup == 0 ||
        n_vdn == 0 || n_vclamp == 0 || n_label == 0 || n_eroded == 0 || n_dilated == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- custom-instruction port ----------------
  logic [7:0] ci_seen = '0;
  function automatic logic [31:0] ci_model(logic [31:0] x, logic [31:0] y, int op);
    logic [31:0] res = '0;
    if (op == 5) return {y[23:0], x[31:24]};
    if (op == 6) return {y[7:0], x[31:8]};
    if (op == 7) return '0;
    for (int l = 0; l < 4; l++) begin
      int p = x[8*l +: 8], q = y[8*l +: 8], o;
      case (op)
        0: o = (p < q) ? p + 1 : p;
        1: o = (p > q) ? p - 1 : p;
        2: o = (p < q) ? p + 1 : (p > q) ? p - 1 : p;
        3: o = (p < q) ? p : q;
        default: o = (p > q) ? p : q;
      endcase
      res[8*l +: 8] = 8'(o);
    end
    return res;
  endfunction

  initial begin
    ci_a = 0; ci_b = 0; ci_n = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ci_a = $urandom; ci_b = $urandom; ci_n = 3'($urandom);
      if (k % 3 == 0) ci_b[23:16] = ci_a[23:16];
      #2;
      checks++;
      ci_seen[ci_n] = 1'b1;
      if (ci_result !== ci_model(ci_a, ci_b, ci_n)) begin
        failures++;
        if (failures < 10) $display("FAIL ci n=%0d a=%h b=%h got %h", ci_n, ci_a, ci_b, ci_result);
      end
    end
  end

  // ---------------- ii example adders ----------------
  int sum_exp [3][$];
  int sum_t [3][$];
  int sum_acc [3] = '{0, 0, 0};
  int sum_outs [3] = '{0, 0, 0};
  initial begin
    sum_in_valid = 0; sum_a = 0; sum_b = 0; sum_c = 0; sum_d = 0;
    @(posedge rst_n);
    for (int k = 1; k <= 610; k++) begin
      @(negedge clk);
      sum_a = 16'($urandom); sum_b = 16'($urandom); sum_c = 16'($urandom); sum_d = 16'($urandom);
      sum_in_valid = (k <= 600) ? 3'b111 : 3'b000;
      #3;
      for (int u = 0; u < 3; u++) begin
        if (sum_out_valid[u]) begin
          int e, t;
          e = sum_exp[u].pop_front();
          t = sum_t[u].pop_front();
          sum_outs[u]++;
          checks++;
          if (sum_dout[u] !== 16'(e) || k - t != 3) begin
            failures++; if (failures < 10) $display("FAIL ii=%0d result %0d exp %0d lat %0d", u + 1, sum_dout[u], e, k - t);
          end
        end
        if (sum_in_valid[u] && sum_in_ready[u]) begin
          sum_acc[u]++;
          sum_exp[u].push_back(int'(16'(sum_a + sum_b + sum_c + sum_d)));
          sum_t[u].push_back(k);
        end
      end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
