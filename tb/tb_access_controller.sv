// tb_access_controller: self-checking test of the access controller, run
// against the translator it commands. Requests are given directly (as the
// arbiter would); the test checks each response (status, elements granted or
// released, page size), the stock of free elements against a model that
// takes the lowest free PID of the requested type, and the cycle count of an
// allocation (3n+2 cycles for n elements). 32 elements are used so that a page
// can be filled to its limit of 8.
module tb_access_controller;
  import dommu_pkg::*;
  localparam int P = 4, N = 32, X = 8;
  localparam int PW = $clog2(P), BW = $clog2(N), NW = $clog2(X + 1);
  localparam int LADDR_W = $clog2(X) + OFF_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic          ready, req_valid, rsp_valid;
  logic [PW-1:0] req_port, rsp_port;
  ctl_req_t      req;
  ctl_rsp_t      rsp;
  logic          cmd_valid, tr_rsp_valid, q_shared;
  tr_cmd_e       cmd;
  logic [PW-1:0] cmd_port, cmd_partner, q_port;
  logic [BW-1:0] cmd_pid, tr_rsp_pid;
  btype_t        cmd_type, q_type;
  cred_e         cmd_cred;
  rsp_status_e   tr_rsp_status;
  logic [NW-1:0] q_nbrams;
  logic [N-1:0]  free_map;

  logic               acc_en    [P][2];
  logic               acc_we    [P][2];
  logic [LADDR_W-1:0] acc_addr  [P][2];
  logic               tr_valid  [P][2];
  logic [BW-1:0]      tr_pid    [P][2];
  logic [OFF_W-1:0]   tr_off    [P][2];
  logic               tr_illegal[P][2];

  access_controller #(.N_PORTS(P), .N_BRAM(N), .MAX_BRAMS(X)) dut (.*);
  translator #(.N_PORTS(P), .N_BRAM(N), .MAX_BRAMS(X)) u_brat (
    .clk, .rst_n, .acc_en, .acc_we, .acc_addr, .tr_valid, .tr_pid, .tr_off, .tr_illegal,
    .cmd_valid, .cmd, .cmd_port, .cmd_pid, .cmd_type, .cmd_cred, .cmd_partner,
    .rsp_valid(tr_rsp_valid), .rsp_status(tr_rsp_status), .rsp_pid(tr_rsp_pid),
    .q_port, .q_nbrams, .q_type, .q_shared);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] m_free;
  int           m_owned [P][$];   // PIDs of each page in order

  task automatic run(input int port, input req_code_e code, input int t, input int count,
                     input int partner, output ctl_rsp_t r, output int lat);
    @(negedge clk);
    check(ready, "ready when idle");
    req_valid = 1'b1; req_port = PW'(port);
    req = '0; req.code = code; req.btype = btype_t'(t); req.count = CNT_W'(count);
    req.partner = 8'(partner); req.cred = CRED_RDWR;
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    check(rsp_port == PW'(port), "response routed to the requester");
    r = rsp;
  endtask

  // model: allocate k of type t to port, lowest free PID first
  function automatic int model_alloc(input int port, input int t, input int k);
    int got = 0;
    for (int b = 0; b < N && got < k && m_owned[port].size() < X; b++)
      if (m_free[b] && int'(pid_type(b)) == t) begin
        m_free[b] = 1'b0; m_owned[port].push_back(b); got++;
      end
    return got;
  endfunction

  function automatic int model_release(input int port, input int k);
    int got = 0;
    while (got < k && m_owned[port].size() > 0) begin
      m_free[m_owned[port].pop_back()] = 1'b1; got++;
    end
    return got;
  endfunction

  initial begin
    ctl_rsp_t r;
    int lat, g;
    rst_n = 1'b0; req_valid = 1'b0; req_port = '0; req = '0;
    for (int p = 0; p < P; p++)
      for (int c = 0; c < 2; c++) begin acc_en[p][c] = 0; acc_we[p][c] = 0; acc_addr[p][c] = '0; end
    m_free = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // allocation and its cycle count
    for (int n = 1; n <= 3; n++) begin
      run(0, REQ_ALLOC, 0, n, 0, r, lat);
      g = model_alloc(0, 0, n);
      check(r.status == RSP_ACK && 32'(r.count) == n && 32'(r.nbrams) == m_owned[0].size(),
            $sformatf("alloc %0d", n));
      // taken at the first edge, answered 3n+2 edges later
      check(lat == 3 * n + 3, $sformatf("alloc of %0d took %0d cycles, want %0d", n, lat, 3 * n + 3));
      check(free_map == m_free, "stock after alloc");
    end
    // page full at 8 elements (6 held, 2 more granted)
    run(0, REQ_ALLOC, 0, 5, 0, r, lat);
    g = model_alloc(0, 0, 5);
    check(r.status == RSP_PAGE_FULL && 32'(r.count) == g && g == 2 && r.nbrams == 8, "page full");
    check(free_map == m_free, "stock after page full");
    // out of stock: 11 of type 0 exist, 8 taken
    run(1, REQ_ALLOC, 0, 5, 0, r, lat);
    g = model_alloc(1, 0, 5);
    check(r.status == RSP_NO_STOCK && 32'(r.count) == g && g == 3, "no stock");
    check(free_map == m_free, "stock exhausted");
    // zero-element request
    run(2, REQ_ALLOC, 1, 0, 0, r, lat);
    check(r.status == RSP_BAD_REQ, "zero elements");
    // release some words, then the page
    run(0, REQ_DEALLOC_WORDS, 0, 3, 0, r, lat);
    g = model_release(0, 3);
    check(r.status == RSP_ACK && r.count == 3 && r.nbrams == 5, "release 3 elements");
    check(free_map == m_free, "stock after release");
    // type mismatch
    run(0, REQ_ALLOC, 1, 1, 0, r, lat);
    check(r.status == RSP_TYPE_MISM && r.count == 0, "type mismatch");
    run(1, REQ_DEALLOC_WORDS, 0, 9, 0, r, lat);
    g = model_release(1, 9);
    check(r.status == RSP_PAGE_EMPTY && r.count == 3 && r.nbrams == 0, "release beyond page");
    // sharing
    run(2, REQ_ALLOC_SHARED, 0, 0, 0, r, lat);
    check(r.status == RSP_ACK && r.shared && r.nbrams == 5, "share page 0");
    run(3, REQ_ALLOC_SHARED, 0, 0, 1, r, lat);
    check(r.status == RSP_BAD_REQ, "share an empty page");
    run(2, REQ_DEALLOC_PAGE, 0, 0, 0, r, lat);
    check(r.status == RSP_ACK && !r.shared && r.count == 0, "detach");
    check(free_map == m_free, "detach frees nothing");
    run(0, REQ_DEALLOC_PAGE, 0, 0, 0, r, lat);
    g = model_release(0, 99);
    check(r.status == RSP_ACK && r.count == 5 && r.nbrams == 0, "release page 0");
    run(0, REQ_DEALLOC_PAGE, 0, 0, 0, r, lat);
    check(r.status == RSP_PAGE_EMPTY, "release an empty page");
    check(free_map == '1 && m_free == '1, "all free");
    // other types
    run(3, REQ_ALLOC, 2, 4, 0, r, lat);
    g = model_alloc(3, 2, 4);
    check(r.status == RSP_ACK && r.btype == 2 && r.count == 4, "type 2 alloc");
    check(free_map == m_free, "stock after type 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
