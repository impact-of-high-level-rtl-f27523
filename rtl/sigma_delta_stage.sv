// Sigma-Delta frame stage at an initiation interval of one pixel per
// cycle. Pixels of I_t arrive in raster order on a valid/ready stream.
// In the cycle a pixel is accepted, its M_{t-1} and V_{t-1} are read from
// the background and variance RAMs (address = pixel index). One cycle
// later the RAM data are back, sigma_delta_pe computes M_t, V_t and the
// label E_t, and all three are written to the same address through the
// RAMs' second ports. Each address is read and written once per frame,
// so there is no read-after-write hazard inside a frame.
// Interface: enable lets the stage accept pixels; init seeds the
// estimators (first frame); frame_done pulses with the write of the last
// pixel of the frame. After accepting the last pixel the stage drops
// in_ready until that write has been done.
// Latency: 1 cycle from acceptance to write. The pixel order, the
// one-cycle RAM latency and the seeding rule are this design's choices.
module sigma_delta_stage
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
  input  logic          enable,
  input  logic          init,
  // pixel stream of I_t
  input  logic          in_valid,
  input  pixel_t        in_pix,
  output logic          in_ready,
  // read side of the M and V RAMs
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  pixel_t        m_rdata,
  input  pixel_t        v_rdata,
  // write side of the M, V and E RAMs
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pixel_t        m_wdata,
  output pixel_t        v_wdata,
  output logic          e_wdata,
  output logic          frame_done
);
  logic [AW-1:0] pix_cnt;
  logic          draining;
  logic          acc;
  logic          last_acc;

  // pipeline register between the RAM read and the write-back
  logic          q_valid, q_last, q_init;
  logic [AW-1:0] q_addr;
  pixel_t        q_pix;

  pixel_t        o_unused;
  logic          vsat_unused;

  assign in_ready = enable && !draining;
  assign acc      = in_valid && in_ready;
  assign last_acc = acc && (pix_cnt == AW'(NPIX - 1));
  assign rd_en    = acc;
  assign rd_addr  = pix_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_cnt  <= '0;
      draining <= 1'b0;
      q_valid  <= 1'b0;
      q_last   <= 1'b0;
      q_init   <= 1'b0;
      q_addr   <= '0;
      q_pix    <= '0;
    end else begin
      q_valid <= acc;
      if (acc) begin
        q_last  <= last_acc;
        q_init  <= init;
        q_addr  <= pix_cnt;
        q_pix   <= in_pix;
        pix_cnt <= last_acc ? '0 : pix_cnt + AW'(1);
      end
      if (last_acc)                 draining <= 1'b1;
      else if (q_valid && q_last)   draining <= 1'b0;
    end
  end

  sigma_delta_pe #(.N(N), .V_INIT(V_INIT)) u_pe (
    .init    (q_init),
    .i_pix   (q_pix),
    .m_prev  (m_rdata),
    .v_prev  (v_rdata),
    .m_new   (m_wdata),
    .v_new   (v_wdata),
    .o_diff  (o_unused),
    .e_label (e_wdata),
    .v_sat   (vsat_unused)
  );

  assign wr_en      = q_valid;
  assign wr_addr    = q_addr;
  assign frame_done = q_valid && q_last;
endmodule
