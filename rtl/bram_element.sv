// bram_element: one true dual-port block RAM element of the DOMMU pool.
//
// Two independent ports A and B each read or write one word per clock. A read
// returns its data on the next clock edge (one-cycle latency, the latency of
// an FPGA block RAM). A write on a port also returns the old word on that
// port (read-first). If both ports write the same address in one cycle, port
// B wins; this ordering is this design's choice. The memory is an array that
// synthesis maps to block RAM. Width and depth are parameters; the pool uses
// three configurations of a 16 Kbit array (see dommu_pkg).
module bram_element #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [WIDTH-1:0]  a_wdata,
  output logic [WIDTH-1:0]  a_rdata,
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [WIDTH-1:0]  b_wdata,
  output logic [WIDTH-1:0]  b_rdata
);
  logic [WIDTH-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
