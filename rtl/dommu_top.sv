// dommu_top: dynamic on-chip memory management unit (DOMMU).
//
// N_PORTS memory ports of processing elements (PEs) share a pool of N_BRAM
// dual-port BRAM elements. Each port sees a logical page of up to MAX_BRAMS
// elements and addresses it with a linear word address; the page grows and
// shrinks at run time through control requests or automatically.
//
// Blocks and their connections follow the unit's block diagram:
//   port_manager (one per port) -> arbiter -> access_controller -> translator
// carry the control requests; the access path goes
//   PE port -> translator (logical -> physical) -> xbar_controller / dommu_xbar
//   -> bram_space -> read crossbar -> PE port.
//
// Access port (per port p, channel c = 0 (A) or 1 (B)): acc_en, acc_we,
// acc_addr, acc_wdata in cycle t; acc_rdata and acc_err (illegal access or a
// collision on a shared BRAM) in cycle t+1, the timing of a plain block RAM.
// Writes happen at the edge ending cycle t. The two channels reach side A and
// side B of the dual-port elements and may be used at the same time.
//
// Control port (per port): valid/ready request ctl_*, one rsp_valid pulse per
// request with rsp (status, elements granted or released, page size, type,
// shared flag); rsp_auto marks responses to automatic requests.
//
// Run-time settings: cfg_up_thresh / cfg_down_thresh (arbiter priority
// aging), cfg_wr_headroom / cfg_idle_thresh (automatic allocation), auto_en.
// Status: free_map (stock of free elements), cur_prio (arbitration priority),
// use_cnt (accesses served by each allocated element).
// Design-time settings per port: PAGE_MAX (allowed maximum page size in
// elements), DEF_PRIO and DEF_DYN (arbitration priority after reset).
// All sizes are this design's defaults; the description gives no numbers.
module dommu_top
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS   = 4,
  parameter int unsigned N_BRAM    = 16,
  parameter int unsigned MAX_BRAMS = 8,
  // per port: allowed maximum page size, design-time priority level and mode
  parameter int unsigned PAGE_MAX [N_PORTS] = '{default: MAX_BRAMS},
  parameter prio_e       DEF_PRIO [N_PORTS] = '{default: PRIO_MED},
  parameter bit          DEF_DYN  [N_PORTS] = '{default: 1'b1},
  localparam int unsigned PW       = $clog2(N_PORTS),
  localparam int unsigned BW       = $clog2(N_BRAM),
  localparam int unsigned NW       = $clog2(MAX_BRAMS + 1),
  localparam int unsigned LADDR_W  = $clog2(MAX_BRAMS) + OFF_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        cfg_up_thresh,
  input  logic [15:0]        cfg_down_thresh,
  input  logic [15:0]        cfg_wr_headroom,
  input  logic [15:0]        cfg_idle_thresh,
  input  logic               auto_en     [N_PORTS],
  // memory access ports
  input  logic               acc_en      [N_PORTS][2],
  input  logic               acc_we      [N_PORTS][2],
  input  logic [LADDR_W-1:0] acc_addr    [N_PORTS][2],
  input  logic [DATA_W-1:0]  acc_wdata   [N_PORTS][2],
  output logic [DATA_W-1:0]  acc_rdata   [N_PORTS][2],
  output logic               acc_err     [N_PORTS][2],
  // control ports
  input  logic               ctl_valid   [N_PORTS],
  output logic               ctl_ready   [N_PORTS],
  input  req_code_e          ctl_code    [N_PORTS],
  input  logic [5:0]         ctl_width   [N_PORTS],
  input  logic               ctl_type_fix[N_PORTS],
  input  btype_t             ctl_btype   [N_PORTS],
  input  logic [WORDS_W-1:0] ctl_words   [N_PORTS],
  input  logic [7:0]         ctl_partner [N_PORTS],
  input  cred_e              ctl_cred    [N_PORTS],
  input  prio_e              ctl_prio    [N_PORTS],
  input  logic               ctl_prio_dyn[N_PORTS],
  output logic               rsp_valid   [N_PORTS],
  output ctl_rsp_t           rsp         [N_PORTS],
  output logic               rsp_auto    [N_PORTS],
  // status
  output logic [N_BRAM-1:0]  free_map,
  output logic [15:0]        use_cnt     [N_BRAM],
  output prio_e              cur_prio    [N_PORTS]
);
  // port managers <-> arbiter
  logic     pm_req_valid [N_PORTS];
  ctl_req_t pm_req       [N_PORTS];
  logic     pm_req_grant [N_PORTS];
  logic     pm_prio_wr   [N_PORTS];
  prio_e    pm_prio_level[N_PORTS];
  logic     pm_prio_dyn  [N_PORTS];
  logic     pm_rsp_valid [N_PORTS];
  ctl_rsp_t pm_rsp;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_pm
    port_manager #(.N_PORTS(N_PORTS), .MAX_BRAMS(PAGE_MAX[p])) u_pm (
      .clk, .rst_n,
      .ctl_valid   (ctl_valid[p]),   .ctl_ready (ctl_ready[p]),
      .ctl_code    (ctl_code[p]),    .ctl_width (ctl_width[p]),
      .ctl_type_fix(ctl_type_fix[p]), .ctl_btype (ctl_btype[p]),
      .ctl_words   (ctl_words[p]),   .ctl_partner(ctl_partner[p]),
      .ctl_cred    (ctl_cred[p]),    .ctl_prio  (ctl_prio[p]),
      .ctl_prio_dyn(ctl_prio_dyn[p]),
      .pe_rsp_valid(rsp_valid[p]),   .pe_rsp    (rsp[p]),
      .pe_rsp_auto (rsp_auto[p]),
      .auto_en     (auto_en[p]),
      .cfg_wr_headroom, .cfg_idle_thresh,
      .acc_en      (acc_en[p]),      .acc_we    (acc_we[p]),
      .req_valid   (pm_req_valid[p]), .req      (pm_req[p]),
      .req_grant   (pm_req_grant[p]),
      .prio_wr     (pm_prio_wr[p]),  .prio_level(pm_prio_level[p]),
      .prio_dyn    (pm_prio_dyn[p]),
      .rsp_valid   (pm_rsp_valid[p]), .rsp      (pm_rsp)
    );
  end

  // arbiter <-> access controller
  logic          ac_ready, ac_valid, ac_rsp_valid;
  logic [PW-1:0] ac_port, ac_rsp_port;
  ctl_req_t      ac_req;
  ctl_rsp_t      ac_rsp;

  arbiter #(.N_PORTS(N_PORTS), .DEF_PRIO(DEF_PRIO), .DEF_DYN(DEF_DYN)) u_arb (
    .clk, .rst_n, .cfg_up_thresh, .cfg_down_thresh,
    .req_valid (pm_req_valid), .req(pm_req), .req_grant(pm_req_grant),
    .prio_wr   (pm_prio_wr), .prio_level(pm_prio_level), .prio_dyn(pm_prio_dyn),
    .cur_prio,
    .rsp_valid (pm_rsp_valid), .rsp(pm_rsp),
    .ac_ready, .ac_valid, .ac_port, .ac_req,
    .ac_rsp_valid, .ac_rsp_port, .ac_rsp
  );

  // access controller <-> translator
  logic          cmd_valid, tr_rsp_valid, q_shared;
  tr_cmd_e       cmd;
  logic [PW-1:0] cmd_port, cmd_partner, q_port;
  logic [BW-1:0] cmd_pid, tr_rsp_pid;
  btype_t        cmd_type, q_type;
  cred_e         cmd_cred;
  rsp_status_e   tr_rsp_status;
  logic [NW-1:0] q_nbrams;

  access_controller #(.N_PORTS(N_PORTS), .N_BRAM(N_BRAM), .MAX_BRAMS(MAX_BRAMS)) u_ac (
    .clk, .rst_n,
    .ready(ac_ready), .req_valid(ac_valid), .req_port(ac_port), .req(ac_req),
    .rsp_valid(ac_rsp_valid), .rsp_port(ac_rsp_port), .rsp(ac_rsp),
    .cmd_valid, .cmd, .cmd_port, .cmd_pid, .cmd_type, .cmd_cred, .cmd_partner,
    .tr_rsp_valid, .tr_rsp_status, .tr_rsp_pid,
    .q_port, .q_nbrams, .q_type, .q_shared,
    .free_map
  );

  // access path
  logic              tr_valid  [N_PORTS][2];
  logic [BW-1:0]     tr_pid    [N_PORTS][2];
  logic [OFF_W-1:0]  tr_off    [N_PORTS][2];
  logic              tr_illegal[N_PORTS][2];

  translator #(.N_PORTS(N_PORTS), .N_BRAM(N_BRAM), .MAX_BRAMS(MAX_BRAMS),
               .PAGE_MAX(PAGE_MAX)) u_brat (
    .clk, .rst_n,
    .acc_en, .acc_we, .acc_addr,
    .tr_valid, .tr_pid, .tr_off, .tr_illegal,
    .cmd_valid, .cmd, .cmd_port, .cmd_pid, .cmd_type, .cmd_cred, .cmd_partner,
    .rsp_valid(tr_rsp_valid), .rsp_status(tr_rsp_status), .rsp_pid(tr_rsp_pid),
    .q_port, .q_nbrams, .q_type, .q_shared
  );

  logic          sel_en    [N_BRAM][2];
  logic [PW-1:0] sel_port  [N_BRAM][2];
  logic          rd_valid_q[N_PORTS][2];
  logic [BW-1:0] rd_pid_q  [N_PORTS][2];

  xbar_controller #(.N_PORTS(N_PORTS), .N_BRAM(N_BRAM)) u_xctl (
    .clk, .rst_n,
    .tr_valid, .tr_pid, .tr_illegal,
    .sel_en, .sel_port, .grant(), .collision(),
    .rd_valid_q, .rd_pid_q, .err_q(acc_err),
    .free_map, .use_cnt
  );

  logic              bram_en   [N_BRAM][2];
  logic              bram_we   [N_BRAM][2];
  logic [OFF_W-1:0]  bram_addr [N_BRAM][2];
  logic [DATA_W-1:0] bram_wdata[N_BRAM][2];
  logic [DATA_W-1:0] bram_rdata[N_BRAM][2];

  dommu_xbar #(.N_PORTS(N_PORTS), .N_BRAM(N_BRAM)) u_xbar (
    .acc_we, .acc_off(tr_off), .acc_wdata, .acc_rdata,
    .sel_en, .sel_port, .rd_valid_q, .rd_pid_q,
    .bram_en, .bram_we, .bram_addr, .bram_wdata, .bram_rdata
  );

  bram_space #(.N_BRAM(N_BRAM)) u_bram (
    .clk,
    .en(bram_en), .we(bram_we), .addr(bram_addr), .wdata(bram_wdata), .rdata(bram_rdata)
  );
endmodule
