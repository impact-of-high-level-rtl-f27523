// Exhaustive check of inc_dec on 8-bit operands: every (r, x) pair.
module tb_inc_dec;
  logic [7:0] r, x, y;
  logic       inc, dec;
  int checks = 0, failures = 0;

  inc_dec #(.W(8)) dut (.r, .x, .y, .inc, .dec);

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int exp_y;
        r = 8'(i); x = 8'(j);
        #1;
        exp_y = (i < j) ? i + 1 : (i > j) ? i - 1 : i;
        checks++;
        if (y !== 8'(exp_y) || inc !== (i < j) || dec !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0d x=%0d y=%0d inc=%b dec=%b", i, j, y, inc, dec);
        end
      end
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
