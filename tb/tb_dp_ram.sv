// Random traffic on both ports of dp_ram against a reference array:
// writes on either port, reads on either port with one cycle of latency,
// never both ports writing one address in the same cycle.
module tb_dp_ram;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  logic [7:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  int ref_mem [DEPTH];
  int exp_a, exp_b;
  bit chk_a, chk_b;

  dp_ram #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill every word through alternating ports
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      ref_mem[k] = $urandom % 256;
      a_en = (k % 2 == 0); a_we = 1; a_addr = 6'(k); a_wdata = 8'(ref_mem[k]);
      b_en = (k % 2 == 1); b_we = 1; b_addr = 6'(k); b_wdata = 8'(ref_mem[k]);
    end
    chk_a = 0; chk_b = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // compare what was read in the previous cycle
      if (chk_a) begin checks++; if (a_rdata !== 8'(exp_a)) failures++; end
      if (chk_b) begin checks++; if (b_rdata !== 8'(exp_b)) failures++; end
      a_en = $urandom % 2; a_we = $urandom % 2; a_addr = 6'($urandom); a_wdata = 8'($urandom);
      b_en = $urandom % 2; b_we = $urandom % 2; b_addr = 6'($urandom); b_wdata = 8'($urandom);
      if (a_en && a_we && b_en && b_we && a_addr == b_addr) b_we = 0;
      chk_a = a_en && !a_we;
      chk_b = b_en && !b_we;
      // reads see the contents before this cycle's writes
      if (chk_a) exp_a = ref_mem[a_addr];
      if (chk_b) exp_b = ref_mem[b_addr];
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
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
