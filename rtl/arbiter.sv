// arbiter: schedules the control requests of all port managers onto the single
// access controller of the DOMMU.
//
// Arbitration is hierarchical, as the unit's description asks: every
// allocation request (ALLOC, ALLOC_SHARED) is served before any
// deallocation request. Within a level the port with the highest priority
// (low, medium, high) wins; among equal priorities the lower port number wins
// (this tie rule is this design's choice). A port's priority is static or
// dynamic. A dynamic priority moves up one level each time the port's pending
// request has waited more than cfg_up_thresh cycles since its last upgrade,
// and moves down one level when a request is served after waiting fewer than
// cfg_down_thresh cycles. A port manager may overwrite level and mode at run
// time (prio_wr). Design-time defaults, per port, are DEF_PRIO and DEF_DYN
// (medium and dynamic unless set).
//
// Handshake: a port manager holds req_valid and req until req_grant pulses.
// A grant is made only while the access controller is idle (ac_ready) and is
// passed on as a one-cycle ac_valid pulse. The access controller's response
// is routed back to the requesting port as a one-cycle rsp_valid pulse.
module arbiter
  import dommu_pkg::*;
#(
  parameter int unsigned N_PORTS  = 4,
  parameter prio_e       DEF_PRIO [N_PORTS] = '{default: PRIO_MED},
  parameter bit          DEF_DYN  [N_PORTS] = '{default: 1'b1},
  localparam int unsigned PW      = $clog2(N_PORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [15:0]   cfg_up_thresh,
  input  logic [15:0]   cfg_down_thresh,
  // port managers
  input  logic          req_valid [N_PORTS],
  input  ctl_req_t      req       [N_PORTS],
  output logic          req_grant [N_PORTS],
  input  logic          prio_wr   [N_PORTS],
  input  prio_e         prio_level[N_PORTS],
  input  logic          prio_dyn  [N_PORTS],
  output prio_e         cur_prio  [N_PORTS],
  output logic          rsp_valid [N_PORTS],
  output ctl_rsp_t      rsp,
  // access controller
  input  logic          ac_ready,
  output logic          ac_valid,
  output logic [PW-1:0] ac_port,
  output ctl_req_t      ac_req,
  input  logic          ac_rsp_valid,
  input  logic [PW-1:0] ac_rsp_port,
  input  ctl_rsp_t      ac_rsp
);
  prio_e        prio     [N_PORTS];
  logic         dyn      [N_PORTS];
  logic [15:0]  wait_cnt [N_PORTS];  // cycles waited by the pending request
  logic [15:0]  age_cnt  [N_PORTS];  // cycles since the last upgrade

  // --------------------------------------------------------- selection
  logic          any;
  logic [PW-1:0] win;
  logic [2:0]    best_key;
  always_comb begin
    any      = 1'b0;
    win      = '0;
    best_key = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      logic [2:0] key;
      key = {req[p].code == REQ_ALLOC || req[p].code == REQ_ALLOC_SHARED, prio[p]};
      if (req_valid[p] && (!any || key > best_key)) begin
        any      = 1'b1;
        win      = PW'(p);
        best_key = key;
      end
    end
  end

  logic do_grant;
  assign do_grant = any && ac_ready && !ac_valid;

  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      req_grant[p] = do_grant && win == PW'(p);
      rsp_valid[p] = ac_rsp_valid && ac_rsp_port == PW'(p);
      cur_prio[p]  = prio[p];
    end
  end
  assign rsp = ac_rsp;

  // ------------------------------------------ grant and priority update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac_valid <= 1'b0;
      ac_port  <= '0;
      ac_req   <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        prio[p]     <= DEF_PRIO[p];
        dyn[p]      <= DEF_DYN[p];
        wait_cnt[p] <= '0;
        age_cnt[p]  <= '0;
      end
    end else begin
      ac_valid <= do_grant;
      if (do_grant) begin
        ac_port <= win;
        ac_req  <= req[win];
      end
      for (int p = 0; p < N_PORTS; p++) begin
        if (prio_wr[p]) begin
          prio[p] <= prio_level[p];
          dyn[p]  <= prio_dyn[p];
        end else if (req_grant[p]) begin
          if (dyn[p] && wait_cnt[p] < cfg_down_thresh && prio[p] != PRIO_LOW)
            prio[p] <= prio_e'(prio[p] - 2'd1);
        end else if (req_valid[p] && dyn[p] && age_cnt[p] > cfg_up_thresh &&
                     prio[p] != PRIO_HIGH) begin
          prio[p] <= prio_e'(prio[p] + 2'd1);
        end
        if (req_grant[p] || !req_valid[p]) begin
          wait_cnt[p] <= '0;
          age_cnt[p]  <= '0;
        end else begin
          if (wait_cnt[p] != '1) wait_cnt[p] <= wait_cnt[p] + 1'b1;
          if (dyn[p] && age_cnt[p] > cfg_up_thresh && prio[p] != PRIO_HIGH)
            age_cnt[p] <= '0;
          else if (age_cnt[p] != '1)
            age_cnt[p] <= age_cnt[p] + 1'b1;
        end
      end
    end
  end

  // A port manager keeps its request stable until it is granted.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      req_valid[p] && !req_grant[p] |=> req_valid[p] && $stable(req[p]))
      else $error("arbiter: request of port %0d changed before grant", p);
  end
endmodule
