// tb_port_manager: self-checking test of one memory port manager.
// The arbiter and access controller are modelled by the test: it grants the
// manager's request, checks its fields and sends back a response. Checked:
// the BRAM type and element count chosen for a table of width/word
// requests (expected values worked out by hand: fewest elements, ties to the
// narrower type), a BRAM type named by the PE, locally answered requests (SET_PRIO, malformed requests),
// word-to-element conversion of DEALLOC_WORDS, automatic allocation when the
// written words come within the headroom of the capacity, automatic release
// after the idle threshold, and that nothing automatic happens when disabled.
module tb_port_manager;
  import dommu_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic               ctl_valid, ctl_ready, ctl_prio_dyn;
  req_code_e          ctl_code;
  logic [5:0]         ctl_width;
  logic               ctl_type_fix;
  btype_t             ctl_btype;
  logic [WORDS_W-1:0] ctl_words;
  logic [7:0]         ctl_partner;
  cred_e              ctl_cred;
  prio_e              ctl_prio;
  logic               pe_rsp_valid, pe_rsp_auto;
  ctl_rsp_t           pe_rsp;
  logic               auto_en;
  logic [15:0]        cfg_wr_headroom, cfg_idle_thresh;
  logic               acc_en [2];
  logic               acc_we [2];
  logic               req_valid, req_grant, prio_wr, prio_dyn, rsp_valid;
  ctl_req_t           req;
  prio_e              prio_level;
  ctl_rsp_t           rsp;

  port_manager #(.N_PORTS(4), .MAX_BRAMS(8)) dut (.*);

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

  // PE side: issue a request
  task automatic pe_req(input req_code_e code, input int width, input int words,
                        input int partner);
    @(negedge clk);
    ctl_valid = 1'b1; ctl_code = code; ctl_width = 6'(width); ctl_words = WORDS_W'(words);
    ctl_partner = 8'(partner); ctl_cred = CRED_RDWR;
    while (!ctl_ready) @(negedge clk);
    @(negedge clk);
    ctl_valid = 1'b0;
  endtask

  // arbiter side: wait for the request, grant it, answer it
  task automatic serve(output ctl_req_t got, input rsp_status_e st, input int nbrams,
                       input int t, input int timeout, output bit seen);
    int k = 0;
    seen = 1'b0;
    while (!req_valid && k < timeout) begin @(negedge clk); k++; end
    if (!req_valid) return;
    seen = 1'b1;
    got = req;
    repeat (2) @(negedge clk);
    check(req_valid && req == got, "request held until granted");
    req_grant = 1'b1;
    @(negedge clk);
    req_grant = 1'b0;
    check(!req_valid, "request dropped after grant");
    repeat (3) @(negedge clk);
    rsp_valid = 1'b1; rsp = '0; rsp.status = st; rsp.nbrams = CNT_W'(nbrams);
    rsp.btype = btype_t'(t); rsp.count = CNT_W'(1);
    @(negedge clk);
    rsp_valid = 1'b0;
  endtask

  task automatic wait_pe_rsp(output ctl_rsp_t r, output bit was_auto);
    int k = 0;
    while (!pe_rsp_valid && k < 50) begin @(posedge clk); #1; k++; end
    check(pe_rsp_valid, "response to the PE");
    r = pe_rsp; was_auto = pe_rsp_auto;
    @(negedge clk);
  endtask

  // one matching case on an empty page
  task automatic match(input int width, input int words, input int want_t, input int want_n);
    ctl_req_t got; ctl_rsp_t r; bit seen, au;
    fork
      pe_req(REQ_ALLOC, width, words, 0);
      serve(got, RSP_NO_STOCK, 0, 0, 20, seen);
    join
    check(seen && got.code == REQ_ALLOC && 32'(got.btype) == want_t && 32'(got.count) == want_n,
          $sformatf("match %0d x %0d: type %0d count %0d, want %0d / %0d",
                    words, width, got.btype, got.count, want_t, want_n));
    wait_pe_rsp(r, au);
    check(r.status == RSP_NO_STOCK && !au, "response forwarded");
  endtask

  task automatic write_burst(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      acc_en[0] = 1'b1; acc_we[0] = 1'b1;
    end
    @(negedge clk);
    acc_en[0] = 1'b0; acc_we[0] = 1'b0;
  endtask

  initial begin
    ctl_req_t got; ctl_rsp_t r; bit seen, au;
    int k;
    rst_n = 1'b0; ctl_valid = 1'b0; ctl_code = REQ_NOP; ctl_width = '0; ctl_words = '0;
    ctl_type_fix = 1'b0; ctl_btype = '0;
    ctl_partner = '0; ctl_cred = CRED_NONE; ctl_prio = PRIO_LOW; ctl_prio_dyn = 1'b0;
    auto_en = 1'b0; cfg_wr_headroom = 16'd16; cfg_idle_thresh = 16'd20;
    acc_en[0] = 0; acc_en[1] = 0; acc_we[0] = 0; acc_we[1] = 0;
    req_grant = 1'b0; rsp_valid = 1'b0; rsp = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // type matching: 512x32 (0), 1024x16 (1), 2048x8 (2)
    match(32, 1000, 0, 2);
    match(8, 3000, 2, 2);
    match(16, 100, 1, 1);
    match(8, 100, 2, 1);
    match(17, 2000, 0, 4);
    match(16, 2000, 1, 2);
    match(1, 5000, 2, 3);
    match(9, 4096, 1, 4);
    match(32, 512, 0, 1);
    match(32, 513, 0, 2);

    // malformed requests are answered locally
    pe_req(REQ_ALLOC, 33, 10, 0);
    wait_pe_rsp(r, au);
    check(r.status == RSP_BAD_REQ && !req_valid, "too wide");
    pe_req(REQ_ALLOC, 8, 0, 0);
    wait_pe_rsp(r, au);
    check(r.status == RSP_BAD_REQ && !req_valid, "zero words");
    pe_req(REQ_ALLOC_SHARED, 0, 0, 7);
    wait_pe_rsp(r, au);
    check(r.status == RSP_BAD_REQ && !req_valid, "no such partner");
    fork
      pe_req(REQ_ALLOC_SHARED, 0, 0, 1);
      serve(got, RSP_ACK, 3, 0, 20, seen);
    join
    check(seen && got.code == REQ_ALLOC_SHARED && got.partner == 1 && got.cred == CRED_RDWR,
          "share forwarded");
    wait_pe_rsp(r, au);
    fork
      pe_req(REQ_DEALLOC_PAGE, 0, 0, 0);
      serve(got, RSP_ACK, 0, 0, 20, seen);
    join
    wait_pe_rsp(r, au);

    // SET_PRIO
    ctl_prio = PRIO_HIGH; ctl_prio_dyn = 1'b1;
    @(negedge clk);
    ctl_valid = 1'b1; ctl_code = REQ_SET_PRIO;
    @(negedge clk);
    ctl_valid = 1'b0;
    check(prio_wr && prio_level == PRIO_HIGH && prio_dyn, "priority write pulse");
    wait_pe_rsp(r, au);
    check(r.status == RSP_ACK, "SET_PRIO acknowledged");

    // own page of 1 x 512x32, then words released in whole elements
    fork
      pe_req(REQ_ALLOC, 32, 512, 0);
      serve(got, RSP_ACK, 3, 0, 20, seen);
    join
    wait_pe_rsp(r, au);
    check(r.nbrams == 3, "page of 3");
    fork
      pe_req(REQ_DEALLOC_WORDS, 0, 1100, 0);
      serve(got, RSP_ACK, 1, 0, 20, seen);
    join
    check(got.code == REQ_DEALLOC_WORDS && got.count == 2, "1100 words = 2 elements of 512");
    wait_pe_rsp(r, au);
    // an existing page keeps its type when wide enough
    fork
      pe_req(REQ_ALLOC, 8, 1000, 0);
      serve(got, RSP_NO_STOCK, 1, 0, 20, seen);
    join
    check(got.btype == 0 && got.count == 2, "page type kept");
    wait_pe_rsp(r, au);
    // a named type is used as it is, even against the page's type
    ctl_type_fix = 1'b1; ctl_btype = btype_t'(2);
    fork
      pe_req(REQ_ALLOC, 8, 3000, 0);
      serve(got, RSP_TYPE_MISM, 1, 0, 20, seen);
    join
    check(seen && got.btype == 2 && got.count == 2, "named type 2, 2 elements");
    wait_pe_rsp(r, au);
    check(r.status == RSP_TYPE_MISM, "type mismatch forwarded");
    ctl_btype = btype_t'(1);
    fork
      pe_req(REQ_ALLOC, 16, 1025, 0);
      serve(got, RSP_NO_STOCK, 1, 0, 20, seen);
    join
    check(seen && got.btype == 1 && got.count == 2, "named type 1, 2 elements");
    wait_pe_rsp(r, au);
    pe_req(REQ_ALLOC, 17, 10, 0);
    wait_pe_rsp(r, au);
    check(r.status == RSP_BAD_REQ && !req_valid, "named type too narrow");
    ctl_btype = btype_t'(3);
    pe_req(REQ_ALLOC, 8, 10, 0);
    wait_pe_rsp(r, au);
    check(r.status == RSP_BAD_REQ && !req_valid, "no such type");
    ctl_type_fix = 1'b0;

    // automatic allocation disabled: nothing happens
    write_burst(500);
    repeat (40) @(negedge clk);
    check(!req_valid, "nothing automatic while disabled");

    fork
      pe_req(REQ_DEALLOC_PAGE, 0, 0, 0);
      serve(got, RSP_ACK, 0, 0, 20, seen);
    join
    wait_pe_rsp(r, au);
    // enabled: 512 - 16 = 496 writes bring the headroom to the threshold
    auto_en = 1'b1;
    repeat (5) @(negedge clk);
    check(!req_valid, "nothing automatic without a page");
    fork
      pe_req(REQ_ALLOC, 32, 512, 0);
      serve(got, RSP_ACK, 1, 0, 20, seen);
    join
    wait_pe_rsp(r, au);
    write_burst(495);
    check(!req_valid, "no request with 17 words of headroom");
    @(negedge clk);
    acc_en[1] = 1'b1; acc_we[1] = 1'b1;
    @(negedge clk);
    acc_en[1] = 1'b0; acc_we[1] = 1'b0;
    check(!req_valid, "counter updated at the write's edge");
    @(negedge clk);
    check(req_valid && req.code == REQ_ALLOC && req.count == 1 && req.btype == 0,
          "automatic allocation requested");
    serve(got, RSP_ACK, 2, 0, 5, seen);
    wait_pe_rsp(r, au);
    check(au && r.nbrams == 2, "automatic response flagged");
    // idle: release after more than 20 idle cycles
    k = 0;
    while (!req_valid && k < 100) begin @(negedge clk); k++; end
    check(req_valid && req.code == REQ_DEALLOC_WORDS && req.count == 1, "automatic release");
    check(k >= 19 && k <= 23, $sformatf("release after %0d idle cycles", k));
    serve(got, RSP_ACK, 1, 0, 5, seen);
    wait_pe_rsp(r, au);
    check(au, "release flagged automatic");
    // an access restarts the idle count
    repeat (15) @(negedge clk);
    acc_en[1] = 1'b1; acc_we[1] = 1'b0;
    @(negedge clk);
    acc_en[1] = 1'b0;
    repeat (15) @(negedge clk);
    check(!req_valid, "idle count restarted by a read");
    auto_en = 1'b0;
    repeat (30) @(negedge clk);
    check(!req_valid, "disabled again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
