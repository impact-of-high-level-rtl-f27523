// End-to-end test of md_asic on a 16x12 image: six frames of a moving
// bright square over a grey gradient with isolated noise pixels. A
// reference model (Sigma-Delta step per pixel, then a direct 3x3 erosion
// and dilation) gives the expected mask of every frame; each mask pixel
// the design streams out is compared with it and must come exactly once.
// The input stalls at random in frames 3 and later; in stall-free frames
// the time from the first pixel to frame_done must be
// W*H + 4*H*(W+1) + 4 cycles. Mechanisms counted (each must occur):
// seeding frame, input stall, back-pressure during the morphological
// passes, M up/down, V up/down, V clamp, labelled pixels, pixels removed
// by the erosion, pixels added back by the dilation.
module tb_md_asic;
  import md_ref_pkg::*;
  localparam int W = 16, H = 12, NP = W * H, N = 2, VI = 2, NF = 6;
  localparam int AW = $clog2(NP);
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, pix_valid, pix_ready, mask_valid, mask_data, frame_done;
  logic [7:0]    pix_data;
  logic [AW-1:0] mask_addr;
  int checks = 0, failures = 0;

  md_asic #(.W(W), .H(H), .N(N), .V_INIT(VI)) dut (.*);

  // reference state
  int ref_m [NP], ref_v [NP];
  img_t frame_pix [NF];
  img_t exp_mask [NF];
  int n_seed = 0, n_stall = 0, n_bp = 0, n_mup = 0, n_mdn = 0, n_vup = 0, n_vdn = 0;
  int n_vclamp = 0, n_label = 0, n_eroded = 0, n_dilated = 0;

  function automatic int gen_pix(int f, int x, int y);
    int ox = 2 + 2 * f, oy = 3 + f / 2;
    if (x >= ox && x < ox + 5 && y >= oy && y < oy + 4) return 250;
    if (f > 0 && ((x * 7 + y * 13 + f * 5) % 37) == 0) return 255;   // isolated noise
    return 20 + 3 * x + 2 * y;
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
      if (f >= 3 && ($urandom % 5) == 0) begin
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
    for (int g = 0; g < 3; g++) begin
      checks++;
      if (done_cyc[g] - first_acc[g] != NP + 4 * H * (W + 1) + 4) begin
        failures++; $display("FAIL frame %0d took %0d cycles", g, done_cyc[g] - first_acc[g]);
      end
    end
    $display("seed=%0d stall=%0d backpressure=%0d m_up=%0d m_dn=%0d v_up=%0d v_dn=%0d v_clamp=%0d label=%0d eroded=%0d dilated=%0d",
             n_seed, n_stall, n_bp, n_mup, n_mdn, n_vup, n_vdn, n_vclamp, n_label, n_eroded, n_dilated);
    checks++;
    if (n_seed == 0 || n_stall == 0 || n_bp == 0 || n_mup == 0 || n_mdn == 0 || n_vup == 0 ||
        n_vdn == 0 || n_vclamp == 0 || n_label == 0 || n_eroded == 0 || n_dilated == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
