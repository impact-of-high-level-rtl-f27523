// Dual-port synchronous RAM, one image plane. Two independent ports A
// and B, each with enable, write enable, address and data. Reads are
// registered: data appear on rdata one cycle after the enabled read.
// A write returns nothing on its port (rdata keeps its last value).
// Writing the same address from both ports in one cycle is not allowed
// (checked by an assertion). Contents are not reset, like a RAM macro.
module dp_ram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 352 * 288,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

  a_no_write_collision: assert property (@(posedge clk)
    !(a_en && a_we && b_en && b_we && a_addr == b_addr));
endmodule
