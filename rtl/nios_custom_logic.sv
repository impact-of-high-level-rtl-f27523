// Custom-instruction logic for a softcore processor, placed beside its
// ALU: the two register operands A and B are routed to this unit as well
// as to the ALU, and its result joins the ALU result multiplexer. It is
// purely combinational (a one-cycle custom instruction). The operation is
// chosen by the instruction's extension field n (ci_op_e):
//   lt_inc  : r + 1 if r < x          (r = A, x = B, per 8-bit lane)
//   gt_dec  : r - 1 if r > x
//   inc_dec : both, the two comparisons in parallel (one Sigma-Delta step)
//   min/max : per 8-bit lane (grey-level erosion / dilation)
//   vec_left  (A = previous word, B = current word): the four pixels one
//             position to the left of the current word's pixels
//   vec_right (A = current word, B = next word): the pixels one position
//             to the right
// LANES = 4 gives the 32-bit sub-word-parallel version (four pixels per
// word, pixel 0 in bits 7:0); LANES = 1 gives the 8-bit version, working
// on bits 7:0 with the upper result bits 0. The lane packing, the n
// encoding and the exact vec_left / vec_right definitions are this
// design's choices; the operations themselves follow the source.
module nios_custom_logic
  import sd_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  n,
  output logic [31:0] result
);
  logic [31:0] r_lt, r_gt, r_id, r_min, r_max;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    if (l < LANES) begin : g_on
      logic [7:0] ra, xb, y;
      logic       inc, dec;
      assign ra = a[8*l +: 8];
      assign xb = b[8*l +: 8];
      inc_dec #(.W(8)) u_id (.r(ra), .x(xb), .y(y), .inc(inc), .dec(dec));
      assign r_lt [8*l +: 8] = ra + {7'd0, inc};
      assign r_gt [8*l +: 8] = ra - {7'd0, dec};
      assign r_id [8*l +: 8] = y;
      assign r_min[8*l +: 8] = dec ? xb : ra;
      assign r_max[8*l +: 8] = inc ? xb : ra;
    end else begin : g_off
      assign r_lt [8*l +: 8] = '0;
      assign r_gt [8*l +: 8] = '0;
      assign r_id [8*l +: 8] = '0;
      assign r_min[8*l +: 8] = '0;
      assign r_max[8*l +: 8] = '0;
    end
  end

  always_comb begin
    unique case (ci_op_e'(n))
      CI_LT_INC:    result = r_lt;
      CI_GT_DEC:    result = r_gt;
      CI_INC_DEC:   result = r_id;
      CI_MIN:       result = r_min;
      CI_MAX:       result = r_max;
      CI_VEC_LEFT:  result = {b[23:0], a[31:24]};
      CI_VEC_RIGHT: result = {b[7:0], a[31:8]};
      default:      result = '0;
    endcase
  end
endmodule
