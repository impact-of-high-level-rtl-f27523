// Top level. Three pieces of hardware stand side by side, each with its
// own ports:
//   * u_asic : the full-custom motion detector (Sigma-Delta background
//              subtraction at one pixel per cycle, then a 3x3 opening with
//              the reduced morphological operator at two cycles per pixel).
//   * u_ci   : the custom-instruction logic of the softcore version. The
//              processor itself is not part of this RTL, so the operand,
//              opcode and result buses it would drive and read are ports.
//   * u_sum_ii3 / u_sum_ii2 / u_sum_ii1 : the initiation-interval example
//              t = a+b+c+d built with one, two and three adders; they share
//              the operand inputs and each has its own handshake and result.
// All sequential parts use clk and the active-low asynchronous rst_n.
module md_top
  import sd_pkg::*;
#(
  parameter int unsigned W      = 352,
  parameter int unsigned H      = 288,
  parameter int unsigned N      = 2,
  parameter int unsigned V_INIT = 2,
  parameter int unsigned LANES  = 4,
  parameter int unsigned DW     = 16,
  localparam int unsigned AW    = (W * H > 1) ? $clog2(W * H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // motion detector
  input  logic          pix_valid,
  input  pixel_t        pix_data,
  output logic          pix_ready,
  output logic          mask_valid,
  output logic [AW-1:0] mask_addr,
  output logic          mask_data,
  output logic          frame_done,
  // custom instruction buses of the softcore
  input  logic [31:0]   ci_a,
  input  logic [31:0]   ci_b,
  input  logic [2:0]    ci_n,
  output logic [31:0]   ci_result,
  // initiation-interval example
  input  logic [DW-1:0] sum_a,
  input  logic [DW-1:0] sum_b,
  input  logic [DW-1:0] sum_c,
  input  logic [DW-1:0] sum_d,
  input  logic [2:0]    sum_in_valid,   // bit k-1 drives the ii=k unit
  output logic [2:0]    sum_in_ready,
  output logic [2:0]    sum_out_valid,
  output logic [DW-1:0] sum_dout [3]
);
  md_asic #(.W(W), .H(H), .N(N), .V_INIT(V_INIT)) u_asic (
    .clk, .rst_n,
    .pix_valid, .pix_data, .pix_ready,
    .mask_valid, .mask_addr, .mask_data, .frame_done
  );

  nios_custom_logic #(.LANES(LANES)) u_ci (
    .a(ci_a), .b(ci_b), .n(ci_n), .result(ci_result)
  );

  sum4_ii #(.II(1), .DW(DW)) u_sum_ii1 (
    .clk, .rst_n,
    .in_valid(sum_in_valid[0]), .in_ready(sum_in_ready[0]),
    .a(sum_a), .b(sum_b), .c(sum_c), .d(sum_d),
    .out_valid(sum_out_valid[0]), .dout(sum_dout[0])
  );

  sum4_ii #(.II(2), .DW(DW)) u_sum_ii2 (
    .clk, .rst_n,
    .in_valid(sum_in_valid[1]), .in_ready(sum_in_ready[1]),
    .a(sum_a), .b(sum_b), .c(sum_c), .d(sum_d),
    .out_valid(sum_out_valid[1]), .dout(sum_dout[1])
  );

  sum4_ii #(.II(3), .DW(DW)) u_sum_ii3 (
    .clk, .rst_n,
    .in_valid(sum_in_valid[2]), .in_ready(sum_in_ready[2]),
    .a(sum_a), .b(sum_b), .c(sum_c), .d(sum_d),
    .out_valid(sum_out_valid[2]), .dout(sum_dout[2])
  );
endmodule
