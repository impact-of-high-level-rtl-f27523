// sigma_delta_stage on an 8x4 frame with behavioural M and V RAMs in the
// testbench. Runs five frames (the first seeds the estimators), checks
// every write-back against the reference step, the frame_done pulse, and
// one pixel per cycle when the input never stalls. Later frames insert
// random input stalls.
module tb_sigma_delta_stage;
  import md_ref_pkg::*;
  localparam int W = 8, H = 4, NP = W * H, N = 2, VI = 2;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, enable, init, in_valid, in_ready;
  logic [7:0] in_pix, m_rdata, v_rdata, m_wdata, v_wdata;
  logic       rd_en, wr_en, e_wdata, frame_done;
  logic [4:0] rd_addr, wr_addr;
  int checks = 0, failures = 0, stalls = 0;

  logic [7:0] mram [NP];
  logic [7:0] vram [NP];
  int ref_m [NP], ref_v [NP], ref_e [NP];

  sigma_delta_stage #(.W(W), .H(H), .N(N), .V_INIT(VI)) dut (.*);

  always_ff @(posedge clk) begin
    if (rd_en) begin m_rdata <= mram[rd_addr]; v_rdata <= vram[rd_addr]; end
    if (wr_en) begin mram[wr_addr] <= m_wdata; vram[wr_addr] <= v_wdata; end
  end

  // check each write-back
  always @(negedge clk) if (rst_n && wr_en) begin
    checks++;
    if (m_wdata !== 8'(ref_m[wr_addr]) || v_wdata !== 8'(ref_v[wr_addr]) ||
        e_wdata !== 1'(ref_e[wr_addr])) begin
      failures++;
      if (failures < 10) $display("FAIL addr=%0d got %0d %0d %0d exp %0d %0d %0d", wr_addr,
                                  m_wdata, v_wdata, e_wdata, ref_m[wr_addr], ref_v[wr_addr], ref_e[wr_addr]);
    end
  end

  int done_cnt = 0;
  always @(posedge clk) if (rst_n && frame_done) done_cnt++;

  initial begin
    int first, last, nd, idx, cyc;
    int pixq [NP];
    rst_n = 0; enable = 1; init = 1; in_valid = 0; in_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      init = (f == 0);
      nd = done_cnt;
      first = -1;
      for (int k = 0; k < NP; k++) begin
        int mn, vn, e;
        pixq[k] = (f < 3) ? (k * 7 + f * 40) % 256 : $urandom % 256;
        sd_ref(N, VI, f == 0, pixq[k], ref_m[k], ref_v[k], mn, vn, e);
        ref_m[k] = mn; ref_v[k] = vn; ref_e[k] = e;
      end
      idx = 0;
      cyc = 0;
      while (idx < NP) begin
        @(negedge clk);
        cyc++;
        if (f >= 2 && ($urandom % 3) == 0) begin
          in_valid = 0; stalls++;
        end else begin
          in_valid = 1; in_pix = 8'(pixq[idx]);
        end
        #1;
        if (in_valid && in_ready) begin
          if (first < 0) first = cyc;
          last = cyc;
          idx++;
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (done_cnt != nd + 1) begin failures++; $display("FAIL frame_done count"); end
      if (f < 2) begin
        checks++;
        // ii = 1: NP pixels are taken in NP consecutive cycles
        if (last - first != NP - 1) begin
          failures++; $display("FAIL cycles %0d", last - first);
        end
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
