// tb_arbiter: self-checking test of the control-request arbiter.
// Per-port design-time priorities are set and checked after reset.
// The access controller is modelled as busy for a few cycles after each
// grant. The test checks: a lone request is granted at once and forwarded
// the next cycle; allocations go before deallocations whatever the
// priorities; the higher priority wins inside a level and the lower port
// number on a tie; no grant while the controller is busy; a waiting dynamic
// port moves up one level each time it has waited more than the threshold;
// a dynamic port served quickly moves down; a static port never moves;
// responses reach only the requesting port.
module tb_arbiter;
  import dommu_pkg::*;
  localparam int P = 4;
  localparam int PW = $clog2(P);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [15:0]   cfg_up_thresh, cfg_down_thresh;
  logic          req_valid [P];
  ctl_req_t      req       [P];
  logic          req_grant [P];
  logic          prio_wr   [P];
  prio_e         prio_level[P];
  logic          prio_dyn  [P];
  prio_e         cur_prio  [P];
  logic          rsp_valid [P];
  ctl_rsp_t      rsp;
  logic          ac_ready, ac_valid, ac_rsp_valid;
  logic [PW-1:0] ac_port, ac_rsp_port;
  ctl_req_t      ac_req;
  ctl_rsp_t      ac_rsp;

  arbiter #(.N_PORTS(P), .DEF_PRIO('{PRIO_LOW, PRIO_MED, PRIO_HIGH, PRIO_MED}),
            .DEF_DYN('{1'b0, 1'b1, 1'b0, 1'b1})) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // port managers: hold a request until granted
  task automatic post(input int p, input req_code_e code);
    req_valid[p] = 1'b1;
    req[p] = '0; req[p].code = code; req[p].count = CNT_W'(p + 1); req[p].partner = 8'(p);
  endtask

  // grant order seen by the access controller
  int order[$];
  int busy_cycles = 3;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < P; p++)
        if (req_grant[p]) req_valid[p] <= 1'b0;
      if (ac_valid) begin
        order.push_back(int'(ac_port));
        ac_ready <= 1'b0;
        fork begin
          repeat (busy_cycles) @(posedge clk);
          ac_ready <= 1'b1;
        end join_none
      end
    end
  end

  task automatic set_prio(input int p, input prio_e l, input bit d);
    @(negedge clk);
    prio_wr[p] = 1'b1; prio_level[p] = l; prio_dyn[p] = d;
    @(negedge clk);
    prio_wr[p] = 1'b0;
    check(cur_prio[p] == l, "priority written");
  endtask

  task automatic wait_idle();
    int k = 0;
    while ((req_valid[0] || req_valid[1] || req_valid[2] || req_valid[3] || !ac_ready) && k < 200) begin
      @(negedge clk); k++;
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; cfg_up_thresh = 16'd3; cfg_down_thresh = 16'd2;
    ac_ready = 1'b1; ac_rsp_valid = 1'b0; ac_rsp_port = '0; ac_rsp = '0;
    for (int p = 0; p < P; p++) begin
      req_valid[p] = 1'b0; req[p] = '0; prio_wr[p] = 1'b0; prio_level[p] = PRIO_LOW; prio_dyn[p] = 1'b0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(cur_prio[0] == PRIO_LOW && cur_prio[1] == PRIO_MED && cur_prio[2] == PRIO_HIGH &&
          cur_prio[3] == PRIO_MED, "design-time priorities");

    for (int p = 0; p < P; p++) set_prio(p, PRIO_MED, 1'b0);

    // lone request: granted in the same cycle, forwarded on the next
    @(negedge clk);
    post(2, REQ_ALLOC);
    #1 check(req_grant[2], "lone request granted at once");
    @(negedge clk);
    check(ac_valid && ac_port == 2 && ac_req.code == REQ_ALLOC && ac_req.count == 3,
          "forwarded request");
    wait_idle();

    // allocation before deallocation, regardless of priority
    set_prio(0, PRIO_HIGH, 1'b0);
    set_prio(3, PRIO_LOW, 1'b0);
    order.delete();
    @(negedge clk);
    ac_ready = 1'b0;                     // controller busy
    post(0, REQ_DEALLOC_PAGE); post(3, REQ_ALLOC_SHARED); post(1, REQ_DEALLOC_WORDS);
    repeat (3) @(negedge clk);
    check(!ac_valid && req_valid[0] && req_valid[3], "no grant while busy");
    ac_ready = 1'b1;
    wait_idle();
    check(order.size() == 3 && order[0] == 3 && order[1] == 0 && order[2] == 1,
          $sformatf("hierarchy/priority order %p", order));

    // priority inside a level, then ties by port number
    set_prio(0, PRIO_LOW, 1'b0); set_prio(1, PRIO_MED, 1'b0);
    set_prio(2, PRIO_HIGH, 1'b0); set_prio(3, PRIO_MED, 1'b0);
    order.delete();
    @(negedge clk);
    ac_ready = 1'b0;
    post(0, REQ_ALLOC); post(1, REQ_ALLOC); post(2, REQ_ALLOC); post(3, REQ_ALLOC);
    @(negedge clk);
    ac_ready = 1'b1;
    wait_idle();
    check(order.size() == 4 && order[0] == 2 && order[1] == 1 && order[2] == 3 && order[3] == 0,
          $sformatf("priority order %p", order));

    // aging of a dynamic low port (threshold 3: up after 5 waiting edges)
    set_prio(1, PRIO_LOW, 1'b1);
    set_prio(0, PRIO_LOW, 1'b0);
    @(negedge clk);
    ac_ready = 1'b0;
    post(1, REQ_DEALLOC_PAGE); post(0, REQ_DEALLOC_PAGE);
    repeat (4) @(negedge clk);
    check(cur_prio[1] == PRIO_LOW, "not yet upgraded");
    @(negedge clk);
    check(cur_prio[1] == PRIO_MED, "upgraded to medium");
    repeat (5) @(negedge clk);
    check(cur_prio[1] == PRIO_HIGH, "upgraded to high");
    repeat (10) @(negedge clk);
    check(cur_prio[1] == PRIO_HIGH, "high is the top level");
    check(cur_prio[0] == PRIO_LOW, "static port not upgraded");
    order.delete();
    ac_ready = 1'b1;
    wait_idle();
    check(order.size() == 2 && order[0] == 1, "upgraded port served first");
    check(cur_prio[1] == PRIO_HIGH, "long wait: no downgrade");

    // quick service of a dynamic port: one level down
    set_prio(2, PRIO_HIGH, 1'b1);
    @(negedge clk);
    post(2, REQ_ALLOC);
    @(negedge clk);
    check(cur_prio[2] == PRIO_MED, "downgraded after quick service");
    wait_idle();
    @(negedge clk);
    post(2, REQ_ALLOC);
    wait_idle();
    check(cur_prio[2] == PRIO_LOW, "downgraded again");
    @(negedge clk);
    post(2, REQ_ALLOC);
    wait_idle();
    check(cur_prio[2] == PRIO_LOW, "low is the bottom level");

    // response routing
    @(negedge clk);
    ac_rsp_valid = 1'b1; ac_rsp_port = 2'd3; ac_rsp = '0; ac_rsp.count = 5'd7;
    #1;
    check(rsp_valid[3] && !rsp_valid[0] && !rsp_valid[1] && !rsp_valid[2] && rsp.count == 7,
          "response routed to port 3");
    @(negedge clk);
    ac_rsp_valid = 1'b0;
    #1 check(!rsp_valid[3], "response is one pulse");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
