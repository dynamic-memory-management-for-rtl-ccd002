// bram_space: the physical BRAM address space of the DOMMU.
//
// N_BRAM dual-port elements, indexed by physical ID (PID). Element b has the
// configuration pid_type(b) from dommu_pkg (512x32, 1024x16 or 2048x8). Every
// element's two ports are brought out as flat arrays indexed by PID and by side
// (0 = port A, 1 = port B) so the crossbar can reach each of them. Addresses
// are OFF_W bits wide and data DATA_W bits wide for every element; a narrower
// element uses the low address and data bits and returns zeros above its
// width. Read latency is one clock.
module bram_space
  import dommu_pkg::*;
#(
  parameter int unsigned N_BRAM = 16
) (
  input  logic              clk,
  input  logic              en    [N_BRAM][2],
  input  logic              we    [N_BRAM][2],
  input  logic [OFF_W-1:0]  addr  [N_BRAM][2],
  input  logic [DATA_W-1:0] wdata [N_BRAM][2],
  output logic [DATA_W-1:0] rdata [N_BRAM][2]
);
  for (genvar b = 0; b < N_BRAM; b++) begin : g_bram
    localparam int unsigned W  = type_width(pid_type(b));
    localparam int unsigned AW = type_depth_log2(pid_type(b));
    logic [W-1:0] ra, rb;

    bram_element #(.WIDTH(W), .ADDR_W(AW)) u_bram (
      .clk,
      .a_en   (en[b][0]), .a_we(we[b][0]), .a_addr(addr[b][0][AW-1:0]),
      .a_wdata(wdata[b][0][W-1:0]), .a_rdata(ra),
      .b_en   (en[b][1]), .b_we(we[b][1]), .b_addr(addr[b][1][AW-1:0]),
      .b_wdata(wdata[b][1][W-1:0]), .b_rdata(rb)
    );

    assign rdata[b][0] = DATA_W'(ra);
    assign rdata[b][1] = DATA_W'(rb);
  end
endmodule
