// 3x3 morphological erosion or dilation in the "Red" (reduction) form.
// The square 3x3 structuring element is separated into a vertical and a
// horizontal 1x3 element. For every column c of the current row i the
// unit loads the three pixels (i-1,c), (i,c), (i+1,c) and reduces them to
// one value rc. The output Y(i,c-1) is the reduction of the reduced values
// of columns c-2, c-1 and c (ra, rb, rc), after which the reduced values
// rotate (ra <- rb, rb <- rc). That is 3 loads and 4 operations per
// output pixel. The operator is min for erosion and max for dilation; on
// 1-bit pixels these are AND and OR.
// Schedule: with two RAM read ports the three loads of a column take two
// cycles, so one output is produced every 2 cycles (ii = 2, the default).
//   phase 0: port A loads (i-1,c), port B loads (i,c)
//   phase 1: port A loads (i+1,c)
//   phases 2 .. II-1 (only when II > 2): idle
// The parameter II (2 or more) stretches each column step to II cycles, as
// when a synthesis run is given a larger initiation interval.
// Data return one cycle after the load. Pixels outside the image are not
// loaded; the neutral element of the operator (all ones for erosion, 0
// for dilation) takes their place, which equals a one-pixel border filled
// with that element. Each row runs W+1 column steps, the last one
// (c = W, outside the image) producing Y(i,W-1); a frame therefore takes
// II*H*(W+1) cycles from the cycle after start, and done pulses one cycle
// after the last of them (at II = 2 together with the last write).
// The border handling, pixel order and handshake are this design's own.
module morph3x3_red
  import sd_pkg::*;
#(
  parameter int unsigned W     = 352,
  parameter int unsigned H     = 288,
  parameter int unsigned PW    = 1,
  parameter int unsigned II    = 2,
  localparam int unsigned NPIX = W * H,
  localparam int unsigned AW   = (NPIX > 1) ? $clog2(NPIX) : 1,
  localparam int unsigned CW   = $clog2(W + 1),
  localparam int unsigned RW   = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned PHW  = $clog2(II)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  morph_op_e     op,
  output logic          busy,
  output logic          done,
  // source image, two read ports, one-cycle latency
  output logic          rd_en_a,
  output logic [AW-1:0] rd_addr_a,
  input  logic [PW-1:0] rd_data_a,
  output logic          rd_en_b,
  output logic [AW-1:0] rd_addr_b,
  input  logic [PW-1:0] rd_data_b,
  // destination image
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [PW-1:0] wr_data
);
  function automatic logic [PW-1:0] f_op(morph_op_e o, logic [PW-1:0] x, logic [PW-1:0] y);
    if (o == MORPH_ERODE) return (x < y) ? x : y;
    else                  return (x > y) ? x : y;
  endfunction

  morph_op_e     op_q;
  logic [PW-1:0] neutral;
  assign neutral = (op_q == MORPH_ERODE) ? '1 : '0;

  // issue side
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [PHW-1:0] ph;
  logic          ph_end;
  logic [AW-1:0] row_base;     // row * W
  logic          in_col, has_up, has_dn, last_issue;
  logic [AW-1:0] cur_addr;

  assign in_col     = (col < CW'(W));
  assign has_up     = (row != '0);
  assign has_dn     = (row != RW'(H - 1));
  assign cur_addr   = row_base + AW'(col);
  assign ph_end     = (ph == PHW'(II - 1));
  assign last_issue = busy && ph_end && (row == RW'(H - 1)) && (col == CW'(W));

  always_comb begin
    rd_en_a   = 1'b0;
    rd_addr_a = '0;
    rd_en_b   = 1'b0;
    rd_addr_b = '0;
    if (busy && in_col) begin
      if (ph == '0) begin
        rd_en_a   = has_up;
        rd_addr_a = cur_addr - AW'(W);
        rd_en_b   = 1'b1;
        rd_addr_b = cur_addr;
      end else if (ph == PHW'(1)) begin
        rd_en_a   = has_dn;
        rd_addr_a = cur_addr + AW'(W);
      end
    end
  end

  // what was loaded last cycle
  logic          c_valid, c_p0, c_p1, c_first, c_last, c_va, c_vb;
  logic [AW-1:0] c_addr;

  // reduction registers
  logic [PW-1:0] part, ra, rb, rc, r_out;
  logic [PW-1:0] xa, xb;

  assign xa = c_va ? rd_data_a : neutral;
  assign xb = c_vb ? rd_data_b : neutral;
  assign rc    = f_op(op_q, part, xa);                 // vertical reduction
  assign r_out = f_op(op_q, f_op(op_q, ra, rb), rc);   // horizontal operator

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      op_q     <= MORPH_ERODE;
      row      <= '0;
      col      <= '0;
      ph       <= '0;
      row_base <= '0;
      c_valid  <= 1'b0;
      c_p0     <= 1'b0;
      c_p1     <= 1'b0;
      c_first  <= 1'b0;
      c_last   <= 1'b0;
      c_va     <= 1'b0;
      c_vb     <= 1'b0;
      c_addr   <= '0;
      part     <= '0;
      ra       <= '0;
      rb       <= '0;
    end else begin
      // issue counters
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          op_q     <= op;
          row      <= '0;
          col      <= '0;
          ph       <= '0;
          row_base <= '0;
        end
      end else begin
        ph <= ph_end ? '0 : ph + PHW'(1);
        if (ph_end) begin
          if (col == CW'(W)) begin
            col      <= '0;
            row      <= row + RW'(1);
            row_base <= row_base + AW'(W);
            if (last_issue) busy <= 1'b0;
          end else begin
            col <= col + CW'(1);
          end
        end
      end
      // record the loads in flight
      c_valid <= busy;
      c_p0    <= (ph == '0);
      c_p1    <= (ph == PHW'(1));
      c_first <= (col == '0);
      c_last  <= last_issue;
      c_va    <= rd_en_a;
      c_vb    <= rd_en_b;
      c_addr  <= cur_addr;
      // capture
      if (c_valid && c_p0) part <= f_op(op_q, xa, xb);
      if (c_valid && c_p1) begin
        ra <= c_first ? neutral : rb;
        rb <= rc;
      end
    end
  end

  assign wr_en   = c_valid && c_p1 && !c_first;
  assign wr_addr = c_addr - AW'(1);
  assign wr_data = r_out;
  assign done    = c_valid && c_last;

  if (II < 2) begin : g_bad_ii
    $error("morph3x3_red needs II >= 2: three loads over two ports");
  end

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
endmodule
