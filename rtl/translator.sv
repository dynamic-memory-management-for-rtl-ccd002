// translator: BRAM address translator (BRAT) of the DOMMU.
//
// It holds the page table: for every memory port, the logical page the port
// is mapped to and the port's access credentials (RD, WR or RD|WR) for that
// page; for every page, its BRAM type, the number of BRAM elements it holds
// and their physical IDs in logical order (logical ID, LID, 0 .. MAX_BRAMS-1).
// A page may hold at most PAGE_MAX[p] elements (its allowed maximum depth);
// all default to MAX_BRAMS.
// Page p is owned by port p; a port that shares another port's page is mapped
// onto that page instead of its own.
//
// Access path (combinational, so a BRAM access keeps its one-cycle latency):
// for each memory port and each of its two access channels, a logical word
// address is split by the page's BRAM depth into LID and offset, the LID
// selects the PID, and the access is rejected as illegal when the LID is
// beyond the page's current size or the credentials forbid the access.
//
// Control path: the access controller issues one command at a time
// (ADD, REMOVE, ATTACH, DETACH; cmd_valid for one cycle). The translator updates
// its arrays and answers one cycle later with rsp_valid and ACK or a NACK
// reason. Encodings and the one-command-at-a-time handshake are this
// design's choices; the table contents, translation and the ACK/NACK
// reporting follow the description of the unit.
module translator
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS   = 4,
  parameter int unsigned N_BRAM    = 16,
  parameter int unsigned MAX_BRAMS = 8,
  // allowed maximum size of each port's page, in elements (<= MAX_BRAMS)
  parameter int unsigned PAGE_MAX [N_PORTS] = '{default: MAX_BRAMS},
  localparam int unsigned PW       = $clog2(N_PORTS),
  localparam int unsigned BW       = $clog2(N_BRAM),
  localparam int unsigned NW       = $clog2(MAX_BRAMS + 1),
  localparam int unsigned LADDR_W  = $clog2(MAX_BRAMS) + OFF_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // access path, per port and channel (0 = A, 1 = B)
  input  logic               acc_en    [N_PORTS][2],
  input  logic               acc_we    [N_PORTS][2],
  input  logic [LADDR_W-1:0] acc_addr  [N_PORTS][2],
  output logic               tr_valid  [N_PORTS][2],  // legal access, go to BRAM
  output logic [BW-1:0]      tr_pid    [N_PORTS][2],
  output logic [OFF_W-1:0]   tr_off    [N_PORTS][2],
  output logic               tr_illegal[N_PORTS][2],
  // control path from the access controller
  input  logic               cmd_valid,
  input  tr_cmd_e            cmd,
  input  logic [PW-1:0]      cmd_port,
  input  logic [BW-1:0]      cmd_pid,
  input  btype_t             cmd_type,
  input  cred_e              cmd_cred,
  input  logic [PW-1:0]      cmd_partner,
  output logic               rsp_valid,
  output rsp_status_e        rsp_status,
  output logic [BW-1:0]      rsp_pid,
  // page state of one port, for the access controller's responses
  input  logic [PW-1:0]      q_port,
  output logic [NW-1:0]      q_nbrams,
  output btype_t             q_type,
  output logic               q_shared
);
  // ---------------------------------------------------------------- tables
  logic [PW-1:0] port_page [N_PORTS];
  cred_e         port_cred [N_PORTS];
  btype_t        page_type [N_PORTS];
  logic [NW-1:0] page_n    [N_PORTS];
  logic [BW-1:0] page_pid  [N_PORTS][MAX_BRAMS];

  // ---------------------------------------------------------- access path
  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    for (genvar c = 0; c < 2; c++) begin : g_ch
      logic [PW-1:0]      pg;
      logic [LADDR_W-1:0] lid;
      logic               in_range, allowed;
      always_comb begin
        pg  = port_page[p];
        lid = acc_addr[p][c] >> type_depth_log2(32'(page_type[pg]));
        tr_off[p][c] = OFF_W'(acc_addr[p][c] &
                              LADDR_W'((1 << type_depth_log2(32'(page_type[pg]))) - 1));
        in_range = lid < LADDR_W'(page_n[pg]);
        allowed  = acc_we[p][c] ? port_cred[p][1] : port_cred[p][0];
        tr_pid[p][c] = in_range ? page_pid[pg][lid[$clog2(MAX_BRAMS)-1:0]] : '0;
        tr_valid[p][c]   = acc_en[p][c] && in_range && allowed;
        tr_illegal[p][c] = acc_en[p][c] && !(in_range && allowed);
      end
    end
  end

  assign q_nbrams = page_n[port_page[q_port]];
  assign q_type   = page_type[port_page[q_port]];
  assign q_shared = port_page[q_port] != q_port;

  // --------------------------------------------------------- control path
  logic [PW-1:0] own_pg, prt_pg;
  logic          attached, partner_ok;
  assign own_pg     = port_page[cmd_port];
  assign prt_pg     = port_page[cmd_partner];
  assign attached   = own_pg != cmd_port;
  assign partner_ok = (32'(cmd_partner) < N_PORTS) && (cmd_partner != cmd_port) &&
                      (prt_pg == cmd_partner) && (page_n[cmd_partner] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PORTS; p++) begin
        port_page[p] <= PW'(p);
        port_cred[p] <= CRED_NONE;
        page_type[p] <= '0;
        page_n[p]    <= '0;
        for (int l = 0; l < MAX_BRAMS; l++) page_pid[p][l] <= '0;
      end
      rsp_valid  <= 1'b0;
      rsp_status <= RSP_ACK;
      rsp_pid    <= '0;
    end else begin
      rsp_valid <= cmd_valid && cmd != TR_NOP;
      if (cmd_valid) begin
        rsp_status <= RSP_ACK;
        rsp_pid    <= '0;
        unique case (cmd)
          TR_ADD: begin
            if (attached) rsp_status <= RSP_BAD_REQ;
            else if (32'(page_n[cmd_port]) >= PAGE_MAX[cmd_port]) rsp_status <= RSP_PAGE_FULL;
            else if (page_n[cmd_port] != '0 && page_type[cmd_port] != cmd_type)
              rsp_status <= RSP_TYPE_MISM;
            else begin
              page_pid[cmd_port][page_n[cmd_port][$clog2(MAX_BRAMS)-1:0]] <= cmd_pid;
              page_n[cmd_port] <= page_n[cmd_port] + 1'b1;
              if (page_n[cmd_port] == '0) begin
                page_type[cmd_port] <= cmd_type;
                port_cred[cmd_port] <= cmd_cred;
              end
            end
          end
          TR_REMOVE: begin
            if (attached) rsp_status <= RSP_BAD_REQ;
            else if (page_n[cmd_port] == '0) rsp_status <= RSP_PAGE_EMPTY;
            else begin
              page_n[cmd_port] <= page_n[cmd_port] - 1'b1;
              rsp_pid <= page_pid[cmd_port][$clog2(MAX_BRAMS)'(page_n[cmd_port] - 1'b1)];
              if (page_n[cmd_port] == NW'(1)) port_cred[cmd_port] <= CRED_NONE;
            end
          end
          TR_ATTACH: begin
            if (attached || page_n[cmd_port] != '0 || !partner_ok)
              rsp_status <= RSP_BAD_REQ;
            else begin
              port_page[cmd_port] <= cmd_partner;
              port_cred[cmd_port] <= cmd_cred;
            end
          end
          TR_DETACH: begin
            if (!attached) rsp_status <= RSP_BAD_REQ;
            else begin
              port_page[cmd_port] <= cmd_port;
              port_cred[cmd_port] <= CRED_NONE;
            end
          end
          default: ;
        endcase
      end
    end
  end
endmodule
