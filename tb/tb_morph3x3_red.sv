// morph3x3_red against a direct 3x3 min/max filter. Two units are
// tested: binary pixels on a 9x6 image and 8-bit grey pixels on a 5x3
// image, each for erosion and dilation on several random images, and a
// third binary unit with its initiation interval stretched to 8 cycles. The
// source image sits in a behavioural two-port RAM; every write is
// checked, each output pixel must be written exactly once, and a pass
// must take II*H*(W+1) load cycles with done one cycle after.
module tb_morph3x3_red;
  import md_ref_pkg::*;
  import sd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  // ---------------- binary unit ----------------
  localparam int W1 = 9, H1 = 6, NP1 = W1 * H1;
  logic start1, busy1, done1, ea1, eb1, we1;
  morph_op_e op1;
  logic [5:0] aa1, ab1, wa1;
  logic da1, db1, wd1;
  logic src1 [NP1];
  int   out1 [NP1], wcnt1 [NP1];

  morph3x3_red #(.W(W1), .H(H1), .PW(1)) dut1 (
    .clk, .rst_n, .start(start1), .op(op1), .busy(busy1), .done(done1),
    .rd_en_a(ea1), .rd_addr_a(aa1), .rd_data_a(da1),
    .rd_en_b(eb1), .rd_addr_b(ab1), .rd_data_b(db1),
    .wr_en(we1), .wr_addr(wa1), .wr_data(wd1));

  always_ff @(posedge clk) begin
    if (ea1) da1 <= src1[aa1];
    if (eb1) db1 <= src1[ab1];
  end
  always @(posedge clk) if (rst_n && we1) begin
    out1[wa1] = wd1; wcnt1[wa1]++;
  end

  // ---------------- binary unit at ii = 8 ----------------
  logic busy4, done4, ea4, eb4, we4, da4, db4, wd4;
  logic [5:0] aa4, ab4, wa4;
  int   out4 [NP1], wcnt4 [NP1];
  int   cyc4;

  morph3x3_red #(.W(W1), .H(H1), .PW(1), .II(8)) dut4 (
    .clk, .rst_n, .start(start1), .op(op1), .busy(busy4), .done(done4),
    .rd_en_a(ea4), .rd_addr_a(aa4), .rd_data_a(da4),
    .rd_en_b(eb4), .rd_addr_b(ab4), .rd_data_b(db4),
    .wr_en(we4), .wr_addr(wa4), .wr_data(wd4));

  always_ff @(posedge clk) begin
    if (ea4) da4 <= src1[aa4];
    if (eb4) db4 <= src1[ab4];
  end
  always @(posedge clk) if (rst_n && we4) begin
    out4[wa4] = wd4; wcnt4[wa4]++;
  end

  // ---------------- grey-level unit ----------------
  localparam int W8 = 5, H8 = 3, NP8 = W8 * H8;
  logic start8, busy8, done8, ea8, eb8, we8;
  morph_op_e op8;
  logic [3:0] aa8, ab8, wa8;
  logic [7:0] da8, db8, wd8;
  logic [7:0] src8 [NP8];
  int   out8 [NP8], wcnt8 [NP8];

  morph3x3_red #(.W(W8), .H(H8), .PW(8)) dut8 (
    .clk, .rst_n, .start(start8), .op(op8), .busy(busy8), .done(done8),
    .rd_en_a(ea8), .rd_addr_a(aa8), .rd_data_a(da8),
    .rd_en_b(eb8), .rd_addr_b(ab8), .rd_data_b(db8),
    .wr_en(we8), .wr_addr(wa8), .wr_data(wd8));

  always_ff @(posedge clk) begin
    if (ea8) da8 <= src8[aa8];
    if (eb8) db8 <= src8[ab8];
  end
  always @(posedge clk) if (rst_n && we8) begin
    out8[wa8] = wd8; wcnt8[wa8]++;
  end

  int loads1 = 0;
  always @(posedge clk) if (rst_n) loads1 += int'(ea1) + int'(eb1);

  task automatic run1(bit dilate, int density);
    img_t img = new[NP1], exp_img;
    int t0, cyc, l0;
    for (int k = 0; k < NP1; k++) begin
      img[k] = (($urandom % 100) < density) ? 1 : 0;
      src1[k] = img[k][0];
      out1[k] = -1; wcnt1[k] = 0;
      out4[k] = -1; wcnt4[k] = 0;
    end
    exp_img = morph_ref(img, W1, H1, dilate, 1);
    @(negedge clk);
    start1 = 1; op1 = dilate ? MORPH_DILATE : MORPH_ERODE;
    l0 = loads1;
    @(negedge clk);
    start1 = 0;
    cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * H1 * (W1 + 1) + 1) begin failures++; $display("FAIL bin cycles %0d", cyc); end
    while (!done4) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 8 * H1 * (W1 + 1) + 1) begin failures++; $display("FAIL ii8 cycles %0d", cyc); end
    @(negedge clk);
    checks++;
    // 3 loads per pixel, border pixels excepted: 3*NP - 2*W (ii = 2 unit)
    if (loads1 - l0 != 3 * NP1 - 2 * W1) begin failures++; $display("FAIL loads %0d", loads1 - l0); end
    for (int k = 0; k < NP1; k++) begin
      checks++;
      if (out1[k] != exp_img[k] || wcnt1[k] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL bin dil=%0d k=%0d got %0d x%0d exp %0d", dilate, k, out1[k], wcnt1[k], exp_img[k]);
      end
      checks++;
      if (out4[k] != exp_img[k] || wcnt4[k] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL ii8 dil=%0d k=%0d got %0d exp %0d", dilate, k, out4[k], exp_img[k]);
      end
    end
  endtask

  task automatic run8(bit dilate);
    img_t img = new[NP8], exp_img;
    int cyc;
    for (int k = 0; k < NP8; k++) begin
      img[k] = $urandom % 256;
      src8[k] = 8'(img[k]);
      out8[k] = -1; wcnt8[k] = 0;
    end
    exp_img = morph_ref(img, W8, H8, dilate, 255);
    @(negedge clk);
    start8 = 1; op8 = dilate ? MORPH_DILATE : MORPH_ERODE;
    @(negedge clk);
    start8 = 0;
    cyc = 1;
    while (!done8) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2 * H8 * (W8 + 1) + 1) begin failures++; $display("FAIL grey cycles %0d", cyc); end
    @(negedge clk);
    for (int k = 0; k < NP8; k++) begin
      checks++;
      if (out8[k] != exp_img[k] || wcnt8[k] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL grey dil=%0d k=%0d got %0d exp %0d", dilate, k, out8[k], exp_img[k]);
      end
    end
  endtask

  initial begin
    rst_n = 0; start1 = 0; start8 = 0; op1 = MORPH_ERODE; op8 = MORPH_ERODE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      run1(1'b0, 85);
      run1(1'b1, 15);
      run1(1'b0, 50);
      run1(1'b1, 50);
      run8(1'b0);
      run8(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
