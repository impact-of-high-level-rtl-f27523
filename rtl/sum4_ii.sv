// Worked example of the initiation interval: t = a + b + c + d computed
// as a chain of three one-cycle 2-input additions
//   step 0: t1 = a + b,  step 1: t2 = t1 + c,  step 2: t3 = t2 + d
// with a new set of operands accepted every II cycles (II = 1, 2 or 3).
// Steps whose start times differ modulo II can share an adder, so the
// unit holds ceil(3/II) adders: adder k serves steps k*II .. k*II+II-1
// through operand multiplexers. II = 3 uses one adder, II = 2 two (steps
// 0 and 1 share one, step 2 has its own), II = 1 three (fully pipelined).
// An input is taken when in_valid && in_ready; in_ready is high at most
// once every II cycles. dout is valid (out_valid) 3 cycles after the
// operands are taken (at II = 1 in_ready is constantly high). The
// handshake is this design's choice.
module sum4_ii #(
  parameter int unsigned II = 1,
  parameter int unsigned DW = 16,
  localparam int unsigned NADD = (3 + II - 1) / II
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] c,
  input  logic [DW-1:0] d,
  output logic          out_valid,
  output logic [DW-1:0] dout
);
  // pipeline registers between the steps
  logic          v1, v2;
  logic [DW-1:0] t1, c1, d1, t2, d2;
  logic [$clog2(II + 1)-1:0] since;   // cycles since the last accept
  logic          take;

  assign in_ready = (since >= ($bits(since))'(II - 1));
  assign take     = in_valid && in_ready;

  // operands and activity of each step
  logic [2:0]    act;
  logic [DW-1:0] opx [3];
  logic [DW-1:0] opy [3];
  logic [DW-1:0] res [3];
  logic [DW-1:0] sum [NADD];

  always_comb begin
    act[0] = take; opx[0] = a;  opy[0] = b;
    act[1] = v1;   opx[1] = t1; opy[1] = c1;
    act[2] = v2;   opx[2] = t2; opy[2] = d2;
  end

  for (genvar k = 0; k < NADD; k++) begin : g_add
    logic [DW-1:0] x, y;
    always_comb begin
      x = '0;
      y = '0;
      for (int s = 0; s < 3; s++) begin
        if (s / II == k && act[s]) begin
          x = opx[s];
          y = opy[s];
        end
      end
    end
    assign sum[k] = x + y;       // the shared adder
  end

  always_comb
    for (int s = 0; s < 3; s++) res[s] = sum[s / II];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      t1 <= '0; c1 <= '0; d1 <= '0; t2 <= '0; d2 <= '0; dout <= '0;
      since <= ($bits(since))'(II - 1);
    end else begin
      v1 <= take;
      v2 <= v1;
      out_valid <= v2;
      if (take) begin
        t1 <= res[0]; c1 <= c; d1 <= d;
      end
      if (v1) begin
        t2 <= res[1]; d2 <= d1;
      end
      if (v2) dout <= res[2];
      if (take)                               since <= '0;
      else if (since < ($bits(since))'(II - 1)) since <= since + 1'b1;
    end
  end

  // two steps mapped to the same adder are never active together
  for (genvar k = 0; k < NADD; k++) begin : g_chk
    a_one_user: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(act & 3'(((1 << (k * II + II)) - 1) & ~((1 << (k * II)) - 1))));
  end
endmodule
