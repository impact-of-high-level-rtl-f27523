// The three initiation-interval variants of t = a+b+c+d side by side.
// Each is fed a random operand stream with in_valid held high. Checks:
// every result in order, a latency of 3 cycles from acceptance to
// out_valid, one acceptance every II cycles, and the adder count
// ceil(3/II) = 3, 2, 1.
module tb_sum4_ii;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [15:0] a, b, c, d;
  logic [2:0]  iv, ir, ov;
  logic [15:0] dout [3];
  int checks = 0, failures = 0;

  sum4_ii #(.II(1)) u1 (.clk, .rst_n, .in_valid(iv[0]), .in_ready(ir[0]), .a, .b, .c, .d,
                        .out_valid(ov[0]), .dout(dout[0]));
  sum4_ii #(.II(2)) u2 (.clk, .rst_n, .in_valid(iv[1]), .in_ready(ir[1]), .a, .b, .c, .d,
                        .out_valid(ov[1]), .dout(dout[1]));
  sum4_ii #(.II(3)) u3 (.clk, .rst_n, .in_valid(iv[2]), .in_ready(ir[2]), .a, .b, .c, .d,
                        .out_valid(ov[2]), .dout(dout[2]));

  int exp_q [3][$];
  int tq [3][$];
  int accepts [3] = '{0, 0, 0};
  int outs [3] = '{0, 0, 0};
  int cyc = 0;

  initial begin
    rst_n = 0; iv = 0; a = 0; b = 0; c = 0; d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      cyc++;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom);
      iv = 3'b111;
      #1;
      for (int u = 0; u < 3; u++) begin
        if (ov[u]) begin
          int e, t;
          outs[u]++;
          checks++;
          e = exp_q[u].pop_front();
          t = tq[u].pop_front();
          if (dout[u] !== 16'(e) || cyc - t != 3) begin
            failures++;
            if (failures < 10) $display("FAIL ii=%0d got %0d exp %0d lat %0d", u + 1, dout[u], e, cyc - t);
          end
        end
        if (ir[u]) begin
          accepts[u]++;
          exp_q[u].push_back(int'(16'(a + b + c + d)));
          tq[u].push_back(cyc);
        end
      end
    end
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (accepts[u] != (300 + u) / (u + 1)) begin
        failures++; $display("FAIL ii=%0d accepts %0d", u + 1, accepts[u]);
      end
      checks++;
      if (outs[u] < accepts[u] - 3) failures++;
    end
    checks++;
    if (u1.NADD != 3 || u2.NADD != 2 || u3.NADD != 1) failures++;
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
