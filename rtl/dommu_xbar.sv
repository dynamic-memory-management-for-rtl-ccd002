// dommu_xbar: the PE <-> BRAM crossbar of the DOMMU, built from multiplexers.
//
// It is made of two crossbars, as in the description of the unit:
//  * the write crossbar (PE -> BRAM) drives every BRAM side with enable,
//    write enable, offset and write data of the channel that
//    xbar_controller selected for it;
//  * the read crossbar (BRAM -> PE) returns to every channel the read data
//    of the BRAM side it accessed in the previous cycle, or zero when it
//    accessed nothing.
// Channel c of every port reaches side c of every BRAM. The crossbar itself
// is purely combinational; the BRAM's output register gives the one-cycle
// access latency.
module dommu_xbar
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS = 4,
  parameter int unsigned N_BRAM  = 16,
  localparam int unsigned PW     = $clog2(N_PORTS),
  localparam int unsigned BW     = $clog2(N_BRAM)
) (
  // from the memory ports (after translation)
  input  logic              acc_we    [N_PORTS][2],
  input  logic [OFF_W-1:0]  acc_off   [N_PORTS][2],
  input  logic [DATA_W-1:0] acc_wdata [N_PORTS][2],
  output logic [DATA_W-1:0] acc_rdata [N_PORTS][2],
  // settings from xbar_controller
  input  logic              sel_en    [N_BRAM][2],
  input  logic [PW-1:0]     sel_port  [N_BRAM][2],
  input  logic              rd_valid_q[N_PORTS][2],
  input  logic [BW-1:0]     rd_pid_q  [N_PORTS][2],
  // to the BRAM space
  output logic              bram_en   [N_BRAM][2],
  output logic              bram_we   [N_BRAM][2],
  output logic [OFF_W-1:0]  bram_addr [N_BRAM][2],
  output logic [DATA_W-1:0] bram_wdata[N_BRAM][2],
  input  logic [DATA_W-1:0] bram_rdata[N_BRAM][2]
);
  // write crossbar
  always_comb begin
    for (int b = 0; b < N_BRAM; b++) begin
      for (int c = 0; c < 2; c++) begin
        bram_en[b][c]    = sel_en[b][c];
        bram_we[b][c]    = sel_en[b][c] && acc_we[sel_port[b][c]][c];
        bram_addr[b][c]  = acc_off[sel_port[b][c]][c];
        bram_wdata[b][c] = acc_wdata[sel_port[b][c]][c];
      end
    end
  end

  // read crossbar
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      for (int c = 0; c < 2; c++) begin
        acc_rdata[p][c] = rd_valid_q[p][c] ? bram_rdata[rd_pid_q[p][c]][c] : '0;
      end
    end
  end
endmodule
