// nios_custom_logic, 32-bit sub-word-parallel (LANES = 4) and 8-bit
// (LANES = 1) versions, against a per-lane integer model for every
// operation code, on random operands and on lanes that are equal.
module tb_nios_custom_logic;
  import sd_pkg::*;
  logic [31:0] a, b, r4, r1;
  logic [2:0]  n;
  int checks = 0, failures = 0;

  nios_custom_logic #(.LANES(4)) dut4 (.a, .b, .n, .result(r4));
  nios_custom_logic #(.LANES(1)) dut1 (.a, .b, .n, .result(r1));

  function automatic logic [31:0] model(int lanes, logic [31:0] x, logic [31:0] y, int op);
    logic [31:0] res = '0;
    if (op == 5) return {y[23:0], x[31:24]};
    if (op == 6) return {y[7:0], x[31:8]};
    if (op == 7) return '0;
    for (int l = 0; l < lanes; l++) begin
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
    for (int k = 0; k < 5000; k++) begin
      a = $urandom; b = $urandom;
      if (k % 4 == 0) b[15:8] = a[15:8];      // equal lanes
      if (k % 7 == 0) begin a[7:0] = 8'hff; b[7:0] = 8'h00; end
      n = 3'(k % 8);
      #1;
      checks++;
      if (r4 !== model(4, a, b, n)) begin
        failures++;
        if (failures < 10) $display("FAIL L4 n=%0d a=%h b=%h got %h exp %h", n, a, b, r4, model(4, a, b, n));
      end
      checks++;
      if (r1 !== model(1, a, b, n)) begin
        failures++;
        if (failures < 10) $display("FAIL L1 n=%0d a=%h b=%h got %h exp %h", n, a, b, r1, model(1, a, b, n));
      end
    end
    // one Sigma-Delta step on four pixels at once
    a = 32'h10_80_FF_00; b = 32'h20_80_00_FF; n = CI_INC_DEC;
    #1;
    checks++;
    if (r4 !== 32'h11_80_FE_01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
