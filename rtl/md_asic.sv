// Motion detector: Sigma-Delta background subtraction followed by a 3x3
// morphological opening (erosion then dilation) of the binary label.
// A frame is processed in three passes over four dual-port RAM planes:
//   SD     : grey pixels I_t stream in at one per cycle (ii=1). M and V are
//            read on port A and written back on port B of their RAMs; the
//            label E goes to the E RAM through port A.
//   ERODE  : morph3x3_red reads E on both ports (ii=2) and writes the
//            eroded image to the T RAM through port A.
//   DILATE : the same operator, switched to dilation, reads T on both
//            ports and writes the opened mask back into the E RAM and out
//            on the mask stream (mask_valid, mask_addr, mask_data).
// frame_done pulses with the last mask pixel; pix_ready is high only in
// the SD pass. The first frame after reset seeds M with the image and V
// with V_INIT and produces an empty mask.
// Timing: when the input does not stall, frame_done comes
// W*H + 4*H*(W+1) + 4 cycles after the first pixel of the frame is taken
// (W*H for the SD pass, 2*H*(W+1) for each morphological pass, and one
// cycle each for the write-back, the two pass starts and the last write).
// The datapath (Sigma-Delta steps, Red operator, ii values, dual-port
// RAMs) follows the source; the frame sequencing, the pixel order, the
// reuse of one morphological unit for both passes and the seeding rule
// are this design's choices.
module md_asic
  import sd_pkg::*;
#(
  parameter int unsigned W      = 352,
  parameter int unsigned H      = 288,
  parameter int unsigned N      = 2,
  parameter int unsigned V_INIT = 2,
  localparam int unsigned NPIX  = W * H,
  localparam int unsigned AW    = (NPIX > 1) ? $clog2(NPIX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  pixel_t        pix_data,
  output logic          pix_ready,
  output logic          mask_valid,
  output logic [AW-1:0] mask_addr,
  output logic          mask_data,
  output logic          frame_done
);
  typedef enum logic [1:0] {
    S_SD     = 2'd0,
    S_ERODE  = 2'd1,
    S_DILATE = 2'd2
  } phase_e;

  phase_e state;
  logic   seeded;         // a first frame has been seen since reset
  logic   morph_start;
  morph_op_e morph_op;

  // Sigma-Delta stage
  logic          sd_rd_en, sd_wr_en, sd_e, sd_done;
  logic [AW-1:0] sd_rd_addr, sd_wr_addr;
  pixel_t        m_rdata, v_rdata, m_wdata, v_wdata;
  pixel_t        m_unused_b, v_unused_b;

  sigma_delta_stage #(.W(W), .H(H), .N(N), .V_INIT(V_INIT)) u_sd (
    .clk, .rst_n,
    .enable     (state == S_SD),
    .init       (!seeded),
    .in_valid   (pix_valid),
    .in_pix     (pix_data),
    .in_ready   (pix_ready),
    .rd_en      (sd_rd_en),
    .rd_addr    (sd_rd_addr),
    .m_rdata, .v_rdata,
    .wr_en      (sd_wr_en),
    .wr_addr    (sd_wr_addr),
    .m_wdata, .v_wdata,
    .e_wdata    (sd_e),
    .frame_done (sd_done)
  );

  dp_ram #(.WIDTH(PIX_W), .DEPTH(NPIX)) u_m_ram (
    .clk,
    .a_en (sd_rd_en), .a_we (1'b0),     .a_addr (sd_rd_addr), .a_wdata ('0),      .a_rdata (m_rdata),
    .b_en (sd_wr_en), .b_we (1'b1),     .b_addr (sd_wr_addr), .b_wdata (m_wdata), .b_rdata (m_unused_b)
  );

  dp_ram #(.WIDTH(PIX_W), .DEPTH(NPIX)) u_v_ram (
    .clk,
    .a_en (sd_rd_en), .a_we (1'b0),     .a_addr (sd_rd_addr), .a_wdata ('0),      .a_rdata (v_rdata),
    .b_en (sd_wr_en), .b_we (1'b1),     .b_addr (sd_wr_addr), .b_wdata (v_wdata), .b_rdata (v_unused_b)
  );

  // morphological unit, shared by both passes
  logic          mo_done;
  logic          mo_en_a, mo_en_b, mo_wr_en;
  logic [AW-1:0] mo_addr_a, mo_addr_b, mo_wr_addr;
  logic          mo_data_a, mo_data_b, mo_wr_data;

  morph3x3_red #(.W(W), .H(H), .PW(1)) u_morph (
    .clk, .rst_n,
    .start     (morph_start),
    .op        (morph_op),
    .busy      (),
    .done      (mo_done),
    .rd_en_a   (mo_en_a),
    .rd_addr_a (mo_addr_a),
    .rd_data_a (mo_data_a),
    .rd_en_b   (mo_en_b),
    .rd_addr_b (mo_addr_b),
    .rd_data_b (mo_data_b),
    .wr_en     (mo_wr_en),
    .wr_addr   (mo_wr_addr),
    .wr_data   (mo_wr_data)
  );

  // E RAM: written by SD (port A) and by the dilation (port A), read by
  // the erosion (ports A and B). T RAM: written by the erosion (port A),
  // read by the dilation (ports A and B).
  logic          e_en_a, e_we_a, e_en_b, e_da, e_db, e_wd;
  logic [AW-1:0] e_addr_a;
  logic          t_en_a, t_we_a, t_en_b, t_da, t_db, t_wd;
  logic [AW-1:0] t_addr_a;

  always_comb begin
    e_en_a = 1'b0; e_we_a = 1'b0; e_addr_a = '0; e_wd = 1'b0; e_en_b = 1'b0;
    t_en_a = 1'b0; t_we_a = 1'b0; t_addr_a = '0; t_wd = 1'b0; t_en_b = 1'b0;
    unique case (state)
      S_SD: begin
        e_en_a = sd_wr_en; e_we_a = 1'b1; e_addr_a = sd_wr_addr; e_wd = sd_e;
      end
      S_ERODE: begin
        e_en_a = mo_en_a;  e_we_a = 1'b0; e_addr_a = mo_addr_a;
        e_en_b = mo_en_b;
        t_en_a = mo_wr_en; t_we_a = 1'b1; t_addr_a = mo_wr_addr; t_wd = mo_wr_data;
      end
      S_DILATE: begin
        t_en_a = mo_en_a;  t_we_a = 1'b0; t_addr_a = mo_addr_a;
        t_en_b = mo_en_b;
        e_en_a = mo_wr_en; e_we_a = 1'b1; e_addr_a = mo_wr_addr; e_wd = mo_wr_data;
      end
      default: ;
    endcase
  end

  dp_ram #(.WIDTH(1), .DEPTH(NPIX)) u_e_ram (
    .clk,
    .a_en (e_en_a), .a_we (e_we_a), .a_addr (e_addr_a),  .a_wdata (e_wd), .a_rdata (e_da),
    .b_en (e_en_b), .b_we (1'b0),   .b_addr (mo_addr_b), .b_wdata (1'b0), .b_rdata (e_db)
  );

  dp_ram #(.WIDTH(1), .DEPTH(NPIX)) u_t_ram (
    .clk,
    .a_en (t_en_a), .a_we (t_we_a), .a_addr (t_addr_a),  .a_wdata (t_wd), .a_rdata (t_da),
    .b_en (t_en_b), .b_we (1'b0),   .b_addr (mo_addr_b), .b_wdata (1'b0), .b_rdata (t_db)
  );

  assign mo_data_a = (state == S_ERODE) ? e_da : t_da;
  assign mo_data_b = (state == S_ERODE) ? e_db : t_db;

  // pass sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_SD;
      seeded      <= 1'b0;
      morph_start <= 1'b0;
      morph_op    <= MORPH_ERODE;
    end else begin
      morph_start <= 1'b0;
      unique case (state)
        S_SD: if (sd_done) begin
          state       <= S_ERODE;
          seeded      <= 1'b1;
          morph_start <= 1'b1;
          morph_op    <= MORPH_ERODE;
        end
        S_ERODE: if (mo_done) begin
          state       <= S_DILATE;
          morph_start <= 1'b1;
          morph_op    <= MORPH_DILATE;
        end
        S_DILATE: if (mo_done) state <= S_SD;
        default: state <= S_SD;
      endcase
    end
  end

  assign mask_valid = (state == S_DILATE) && mo_wr_en;
  assign mask_addr  = mo_wr_addr;
  assign mask_data  = mo_wr_data;
  assign frame_done = (state == S_DILATE) && mo_done;
endmodule
