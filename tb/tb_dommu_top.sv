// tb_dommu_top: end-to-end test of the DOMMU at its default sizes
// (4 memory ports, 16 BRAM elements, pages of up to 8 elements).
//
// It drives the PEs' control and access ports and checks every response,
// every read word (against a reference copy of each page, one cycle after
// the request) and the stock of free elements. It walks through: allocation
// with type matching, access through address translation on both channels,
// illegal accesses, a shared page used from two ports at once, a crossbar
// collision, every NACK reachable at these sizes, partial and full
// deallocation, automatic allocation and deallocation, hierarchical and
// priority arbitration, priority aging, a BRAM type named by the PE, the
// per-element access counts, the response latency of an allocation on an
// idle unit and of allocations queued behind each other. Each mechanism is counted and must occur at least once.
module tb_dommu_top;
  import dommu_pkg::*;
  localparam int P = 4, N = 16, X = 8;
  localparam int LADDR_W = $clog2(X) + OFF_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [15:0]        cfg_up_thresh, cfg_down_thresh, cfg_wr_headroom, cfg_idle_thresh;
  logic               auto_en     [P];
  logic               acc_en      [P][2];
  logic               acc_we      [P][2];
  logic [LADDR_W-1:0] acc_addr    [P][2];
  logic [DATA_W-1:0]  acc_wdata   [P][2];
  logic [DATA_W-1:0]  acc_rdata   [P][2];
  logic               acc_err     [P][2];
  logic               ctl_valid   [P];
  logic               ctl_ready   [P];
  req_code_e          ctl_code    [P];
  logic [5:0]         ctl_width   [P];
  logic               ctl_type_fix[P];
  btype_t             ctl_btype   [P];
  logic [WORDS_W-1:0] ctl_words   [P];
  logic [7:0]         ctl_partner [P];
  cred_e              ctl_cred    [P];
  prio_e              ctl_prio    [P];
  logic               ctl_prio_dyn[P];
  logic               rsp_valid   [P];
  ctl_rsp_t           rsp         [P];
  logic               rsp_auto    [P];
  logic [N-1:0]       free_map;
  logic [15:0]        use_cnt     [N];
  prio_e              cur_prio    [P];

  dommu_top dut (.*);

  int checks = 0, failures = 0;

  // mechanism counters
  int n_alloc, n_type_match, n_type_mism, n_no_stock, n_page_empty, n_bad_req;
  int n_illegal_range, n_illegal_cred, n_shared_rd, n_dual_chan, n_collision;
  int n_dealloc_words, n_dealloc_page, n_detach, n_auto_alloc, n_auto_dealloc;
  int n_hier, n_prio_order, n_upgrade, n_downgrade, n_set_prio, n_latency;
  int n_type_named, n_use_cnt, n_queue_lat;

  // accesses counted on the allocated elements of one type
  function automatic int use_of_type(input int t);
    int sum = 0;
    for (int b = 0; b < N; b++)
      if (!free_map[b] && b % NUM_TYPES == t) sum += int'(use_cnt[b]);
    return sum;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ----------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --------------------------------------------------------- control port
  // Issue one request on port p and wait for its (non-automatic) response.
  // lat = clock edges from acceptance to the response.
  task automatic ctl(input int p, input req_code_e code, input int width, input int words,
                     input int partner, input cred_e cred, output ctl_rsp_t r, output int lat);
    @(negedge clk);
    ctl_valid[p] = 1'b1; ctl_code[p] = code; ctl_width[p] = 6'(width);
    ctl_words[p] = WORDS_W'(words); ctl_partner[p] = 8'(partner); ctl_cred[p] = cred;
    while (!ctl_ready[p]) @(negedge clk);
    @(posedge clk); #1;
    ctl_valid[p] = 1'b0;
    lat = 0;
    while (!(rsp_valid[p] && !rsp_auto[p])) begin @(posedge clk); #1; lat++; end
    r = rsp[p];
  endtask

  task automatic set_prio(input int p, input prio_e lvl, input bit dyn);
    ctl_rsp_t r; int lat;
    ctl_prio[p] = lvl; ctl_prio_dyn[p] = dyn;
    ctl(p, REQ_SET_PRIO, 0, 0, 0, CRED_NONE, r, lat);
    check(r.status == RSP_ACK && cur_prio[p] == lvl, "SET_PRIO");
    n_set_prio++;
  endtask

  function automatic int popcount(input logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(v[i]);
    return n;
  endfunction

  // ----------------------------------------------------- reference pages
  logic [31:0] ref_mem [P][1 << LADDR_W];
  logic        ref_ok  [P][1 << LADDR_W];
  int          page_w  [P];   // word width of each owner page

  task automatic clear_ref(input int pg);
    for (int a = 0; a < (1 << LADDR_W); a++) ref_ok[pg][a] = 1'b0;
  endtask

  function automatic logic [31:0] wmask(input int w);
    return (w >= 32) ? 32'hffff_ffff : (32'd1 << w) - 1;
  endfunction

  // Stream accesses on port p, channel c: one per cycle, addresses
  // first .. first+n-1; writes random data into page pg, reads check it.
  task automatic stream(input int p, input int c, input bit we, input int pg,
                        input int first, input int n);
    logic [31:0] exp_d; bit chk;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      acc_en[p][c] = 1'b1; acc_we[p][c] = we;
      acc_addr[p][c] = LADDR_W'(first + i); acc_wdata[p][c] = $urandom;
      chk = !we && ref_ok[pg][first + i];
      exp_d = ref_mem[pg][first + i];
      if (we) begin
        ref_mem[pg][first + i] = acc_wdata[p][c] & wmask(page_w[pg]);
        ref_ok[pg][first + i]  = 1'b1;
      end
      @(posedge clk); #1;
      // data of the access made in the cycle that just ended
      check(!acc_err[p][c], $sformatf("access port %0d ch %0d addr %0d flagged",
                                      p, c, first + i));
      if (chk)
        check(acc_rdata[p][c] == exp_d,
              $sformatf("read port %0d ch %0d addr %0d got %h want %h",
                        p, c, first + i, acc_rdata[p][c], exp_d));
    end
    @(negedge clk);
    acc_en[p][c] = 1'b0;
  endtask

  // One access; returns data and error flag seen one cycle later.
  task automatic acc1(input int p, input int c, input bit we, input int addr,
                      input logic [31:0] wd, output logic [31:0] rd, output bit err);
    @(negedge clk);
    acc_en[p][c] = 1'b1; acc_we[p][c] = we; acc_addr[p][c] = LADDR_W'(addr);
    acc_wdata[p][c] = wd;
    @(negedge clk);
    acc_en[p][c] = 1'b0;
    rd = acc_rdata[p][c]; err = acc_err[p][c];
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    ctl_rsp_t r, r0, r1, r2, r3;
    int lat, lat1, lat2;
    logic [31:0] rd, rd2;
    bit err, err2;
    int order;
    int first_done, second_done;
    int lat_all [P];
    int exp_lat;
    prio_e max_prio1;

    rst_n = 1'b0;
    cfg_up_thresh = 16'd4; cfg_down_thresh = 16'd2;
    cfg_wr_headroom = 16'd16; cfg_idle_thresh = 16'd60;
    for (int p = 0; p < P; p++) begin
      auto_en[p] = 1'b0; ctl_valid[p] = 1'b0; ctl_code[p] = REQ_NOP;
      ctl_width[p] = '0; ctl_words[p] = '0; ctl_type_fix[p] = 1'b0; ctl_btype[p] = '0; ctl_partner[p] = '0; ctl_cred[p] = CRED_NONE;
      ctl_prio[p] = PRIO_MED; ctl_prio_dyn[p] = 1'b0;
      page_w[p] = 32;
      clear_ref(p);
      for (int c = 0; c < 2; c++) begin
        acc_en[p][c] = 1'b0; acc_we[p][c] = 1'b0; acc_addr[p][c] = '0; acc_wdata[p][c] = '0;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(free_map == '1, "all elements free after reset");

    // all ports static, medium priority, for the deterministic part
    for (int p = 0; p < P; p++) set_prio(p, PRIO_MED, 1'b0);

    // ---- allocation with type matching and latency
    ctl(0, REQ_ALLOC, 32, 1000, 0, CRED_RDWR, r, lat);   // 512x32: 2 elements
    check(r.status == RSP_ACK && r.count == 2 && r.nbrams == 2 && r.btype == 0,
          "port 0 alloc 1000 x 32");
    lat2 = lat;
    n_alloc++; n_type_match++;
    ctl(1, REQ_ALLOC, 8, 3000, 0, CRED_RDWR, r, lat);    // 2048x8: 2 elements
    check(r.status == RSP_ACK && r.count == 2 && r.btype == 2, "port 1 alloc 3000 x 8");
    page_w[1] = 8;
    n_alloc++; n_type_match++;
    ctl(0, REQ_ALLOC, 32, 512, 0, CRED_RDWR, r, lat1);   // grow by one element
    check(r.status == RSP_ACK && r.count == 1 && r.nbrams == 3, "port 0 grow");
    n_alloc++;
    check(lat1 == 5 + 3 * 1 && lat2 == 5 + 3 * 2,
          $sformatf("allocation latency %0d / %0d cycles, want 8 / 11", lat1, lat2));
    n_latency++;
    check(popcount(free_map) == N - 5, "stock after allocations");

    ctl(1, REQ_ALLOC, 16, 100, 0, CRED_RDWR, r, lat);    // wider than the page
    check(r.status == RSP_TYPE_MISM && r.count == 0 && r.nbrams == 2, "type mismatch");
    n_type_mism++;
    // a named type that differs from the page's type
    ctl_type_fix[1] = 1'b1; ctl_btype[1] = btype_t'(0);
    ctl(1, REQ_ALLOC, 8, 100, 0, CRED_RDWR, r, lat);
    ctl_type_fix[1] = 1'b0;
    check(r.status == RSP_TYPE_MISM && r.nbrams == 2 && r.btype == 2, "named type mismatch");
    n_type_mism++; n_type_named++;

    // ---- translated accesses, both channels, element boundaries
    stream(0, 0, 1'b1, 0, 0, 1536);
    stream(0, 1, 1'b0, 0, 0, 1536);
    stream(1, 1, 1'b1, 1, 0, 4096);
    fork
      stream(1, 0, 1'b0, 1, 0, 4096);
      stream(0, 0, 1'b0, 0, 500, 600);
    join

    // every access above was counted on the element that served it
    @(posedge clk); #1;
    check(use_of_type(0) == 1536 + 1536 + 600 && use_of_type(2) == 4096 + 4096,
          $sformatf("access counts %0d / %0d", use_of_type(0), use_of_type(2)));
    n_use_cnt++;

    // ---- illegal accesses
    acc1(0, 0, 1'b0, 1536, 0, rd, err);
    check(err && rd == 0, "port 0 beyond its page");
    n_illegal_range++;
    acc1(1, 1, 1'b1, 4096, 32'h55, rd, err);
    check(err, "port 1 beyond its page");
    n_illegal_range++;
    acc1(3, 0, 1'b0, 0, 0, rd, err);
    check(err, "port 3 without a page");
    n_illegal_range++;

    // ---- shared page: port 2 reads port 0's page
    ctl(2, REQ_ALLOC_SHARED, 0, 0, 0, CRED_RD, r, lat);
    check(r.status == RSP_ACK && r.shared && r.nbrams == 3 && r.btype == 0, "attach");
    stream(2, 1, 1'b0, 0, 0, 1536);
    n_shared_rd++;
    acc1(2, 1, 1'b1, 7, 32'h1234, rd, err);
    check(err, "write without WR credential");
    n_illegal_cred++;
    // port 0 writes on channel A while port 2 reads on channel B
    fork
      stream(0, 0, 1'b1, 0, 100, 50);
      stream(2, 1, 1'b0, 0, 200, 50);
    join
    n_dual_chan++;
    stream(2, 1, 1'b0, 0, 100, 50);
    // same BRAM side from both ports in one cycle: lower port wins
    @(negedge clk);
    acc_en[0][0] = 1; acc_we[0][0] = 0; acc_addr[0][0] = LADDR_W'(5);
    acc_en[2][0] = 1; acc_we[2][0] = 0; acc_addr[2][0] = LADDR_W'(6);
    @(negedge clk);
    acc_en[0][0] = 0; acc_en[2][0] = 0;
    check(!acc_err[0][0] && acc_rdata[0][0] == ref_mem[0][5], "collision winner");
    check(acc_err[2][0] && acc_rdata[2][0] == 0, "collision loser flagged");
    n_collision++;

    ctl(2, REQ_ALLOC, 32, 10, 0, CRED_RDWR, r, lat);
    check(r.status == RSP_BAD_REQ && r.count == 0 && r.shared, "alloc on a shared port");
    n_bad_req++;
    ctl(2, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r, lat);
    check(r.status == RSP_ACK && !r.shared && r.nbrams == 0, "detach");
    n_detach++;
    ctl(2, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r, lat);
    check(r.status == RSP_PAGE_EMPTY && r.count == 0, "release of an empty page");
    n_page_empty++;
    ctl(2, REQ_ALLOC_SHARED, 0, 0, 9, CRED_RD, r, lat);
    check(r.status == RSP_BAD_REQ, "share with a missing port");
    n_bad_req++;
    ctl(2, REQ_ALLOC, 40, 10, 0, CRED_RDWR, r, lat);
    check(r.status == RSP_BAD_REQ, "no type that wide");
    n_bad_req++;
    ctl(2, REQ_ALLOC_SHARED, 0, 0, 3, CRED_RD, r, lat);
    check(r.status == RSP_BAD_REQ, "share an empty page");
    n_bad_req++;

    // ---- exhaust the 512x32 stock (6 elements)
    ctl(0, REQ_ALLOC, 32, 1536, 0, CRED_RDWR, r, lat);
    check(r.status == RSP_ACK && r.count == 3 && r.nbrams == 6, "port 0 grows to 6");
    ctl(3, REQ_ALLOC, 32, 10, 0, CRED_RDWR, r, lat);
    check(r.status == RSP_NO_STOCK && r.count == 0 && r.nbrams == 0, "no stock");
    n_no_stock++;
    stream(0, 0, 1'b1, 0, 1536, 1536);
    stream(0, 1, 1'b0, 0, 0, 3072);

    // ---- partial and full release
    ctl(0, REQ_DEALLOC_WORDS, 0, 1100, 0, CRED_NONE, r, lat);
    check(r.status == RSP_ACK && r.count == 2 && r.nbrams == 4, "release 1100 words");
    n_dealloc_words++;
    stream(0, 1, 1'b0, 0, 0, 2048);
    acc1(0, 0, 1'b0, 2048, 0, rd, err);
    check(err, "released words no longer reachable");
    n_illegal_range++;
    ctl(0, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r, lat);
    check(r.status == RSP_ACK && r.count == 4 && r.nbrams == 0, "release page 0");
    ctl(1, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r, lat);
    check(r.status == RSP_ACK && r.count == 2 && r.nbrams == 0, "release page 1");
    n_dealloc_page++;
    check(free_map == '1, "all elements back in stock");
    clear_ref(0); clear_ref(1);

    // ---- automatic allocation and deallocation on port 3
    ctl(3, REQ_ALLOC, 32, 512, 0, CRED_RDWR, r, lat);
    check(r.status == RSP_ACK && r.nbrams == 1, "port 3 alloc");
    clear_ref(3);
    auto_en[3] = 1'b1;
    stream(3, 0, 1'b1, 3, 0, 496);           // 512 - 496 = 16 = headroom
    lat = 0;
    while (!(rsp_valid[3] && rsp_auto[3]) && lat < 100) begin @(posedge clk); #1; lat++; end
    check(rsp_valid[3] && rsp[3].status == RSP_ACK && rsp[3].nbrams == 2 &&
          rsp[3].count == 1, "automatic allocation");
    n_auto_alloc++;
    stream(3, 0, 1'b1, 3, 496, 504);          // into the new element
    stream(3, 1, 1'b0, 3, 0, 1000);
    // now idle: two automatic releases
    for (int k = 0; k < 2; k++) begin
      lat = 0;
      while (!(rsp_valid[3] && rsp_auto[3]) && lat < 200) begin @(posedge clk); #1; lat++; end
      check(rsp_valid[3] && rsp[3].status == RSP_ACK && 32'(rsp[3].nbrams) == 1 - k,
            "automatic release");
      check(lat >= 60, "released only after the idle threshold");
      n_auto_dealloc++;
      @(posedge clk); #1;
    end
    auto_en[3] = 1'b0;
    check(free_map == '1, "stock after automatic release");

    // ---- arbitration: allocation before deallocation, then priority
    set_prio(0, PRIO_HIGH, 1'b0);
    set_prio(1, PRIO_LOW, 1'b0);
    set_prio(3, PRIO_HIGH, 1'b0);
    ctl(0, REQ_ALLOC, 8, 2048, 0, CRED_RDWR, r, lat);  // something to release
    order = 0; first_done = 0; second_done = 0;
    fork
      ctl(2, REQ_ALLOC, 16, 4096, 0, CRED_RDWR, r2, lat);   // keeps the controller busy
      begin
        repeat (3) @(posedge clk);
        fork
          begin ctl(0, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r0, lat); order++; second_done = order; end
          begin ctl(1, REQ_ALLOC, 8, 100, 0, CRED_RDWR, r1, lat); order++; first_done = order; end
        join
      end
    join
    check(r2.status == RSP_ACK && r2.count == 4, "long allocation");
    check(r0.status == RSP_ACK && r1.status == RSP_ACK, "both served");
    check(first_done == 1 && second_done == 2,
          "allocation of a low-priority port served before a high-priority release");
    n_hier++;
    // two allocations: the high-priority port 3 before the low-priority port 1
    order = 0; first_done = 0; second_done = 0;
    fork
      ctl(2, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r2, lat);
      begin
        repeat (3) @(posedge clk);
        fork
          begin ctl(1, REQ_ALLOC, 8, 2048, 0, CRED_RDWR, r1, lat); order++; second_done = order; end
          begin ctl(3, REQ_ALLOC, 16, 1024, 0, CRED_RDWR, r3, lat); order++; first_done = order; end
        join
      end
    join
    check(first_done == 1 && second_done == 2, "higher priority served first");
    n_prio_order++;

    // ---- priority aging: port 1 dynamic low waits behind a long request
    set_prio(1, PRIO_LOW, 1'b1);
    set_prio(2, PRIO_HIGH, 1'b0);
    max_prio1 = PRIO_LOW;
    fork
      ctl(2, REQ_ALLOC, 16, 4096, 0, CRED_RDWR, r2, lat);    // 4 elements, 17 cycles
      begin
        repeat (2) @(posedge clk);
        ctl(1, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r1, lat);
      end
      begin
        repeat (40) begin
          @(posedge clk); #1;
          if (cur_prio[1] > max_prio1) max_prio1 = cur_prio[1];
        end
      end
    join
    check(max_prio1 == PRIO_HIGH, "waiting dynamic port upgraded to high");
    if (max_prio1 != PRIO_LOW) n_upgrade++;
    // served at once: downgraded one level
    set_prio(1, PRIO_MED, 1'b1);
    ctl(1, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r1, lat);
    @(posedge clk); #1;
    check(cur_prio[1] == PRIO_LOW, "quickly served dynamic port downgraded");
    if (cur_prio[1] == PRIO_LOW) n_downgrade++;
    // a static port keeps its level
    ctl(3, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r3, lat);
    check(cur_prio[3] == PRIO_HIGH, "static priority kept");
    ctl(2, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r2, lat);
    check(free_map == '1, "stock restored at the end");

    // ---- all ports request at once: served one after another in port order
    for (int p = 0; p < P; p++) set_prio(p, PRIO_MED, 1'b0);
    fork
      ctl(0, REQ_ALLOC, 32, 1024, 0, CRED_RDWR, r0, lat_all[0]);
      ctl(1, REQ_ALLOC, 16, 3072, 0, CRED_RDWR, r1, lat_all[1]);
      ctl(2, REQ_ALLOC, 8, 8192, 0, CRED_RDWR, r2, lat_all[2]);
      ctl(3, REQ_ALLOC, 32, 512, 0, CRED_RDWR, r3, lat_all[3]);
    join
    // the k-th request served is answered 1 + sum over j <= k of (3 n_j + 4)
    // cycles after acceptance, n_j the elements of the j-th request
    check(r0.count == 2 && r1.count == 3 && r2.count == 4 && r3.count == 1,
          "simultaneous allocations granted");
    exp_lat = 1;
    for (int p = 0; p < P; p++) begin
      exp_lat += 3 * int'(p == 0 ? 2 : p == 1 ? 3 : p == 2 ? 4 : 1) + 4;
      check(lat_all[p] == exp_lat,
            $sformatf("queued allocation latency port %0d: %0d, want %0d", p, lat_all[p], exp_lat));
    end
    n_queue_lat++;
    for (int p = 0; p < P; p++) ctl(p, REQ_DEALLOC_PAGE, 0, 0, 0, CRED_NONE, r, lat);
    check(free_map == '1, "stock restored after the queued allocations");

    // ---- every mechanism happened
    check(n_alloc > 0, "mechanism: allocation");
    check(n_type_match > 0, "mechanism: type matching");
    check(n_type_mism > 0, "mechanism: type mismatch NACK");
    check(n_no_stock > 0, "mechanism: no-stock NACK");
    check(n_page_empty > 0, "mechanism: empty-page NACK");
    check(n_bad_req > 0, "mechanism: bad-request NACK");
    check(n_illegal_range > 0, "mechanism: out-of-bounds access");
    check(n_illegal_cred > 0, "mechanism: credential violation");
    check(n_shared_rd > 0, "mechanism: shared page");
    check(n_dual_chan > 0, "mechanism: both channels at once");
    check(n_collision > 0, "mechanism: crossbar collision");
    check(n_dealloc_words > 0, "mechanism: word release");
    check(n_dealloc_page > 0, "mechanism: page release");
    check(n_detach > 0, "mechanism: detach");
    check(n_auto_alloc > 0, "mechanism: automatic allocation");
    check(n_auto_dealloc > 0, "mechanism: automatic release");
    check(n_hier > 0, "mechanism: hierarchical arbitration");
    check(n_prio_order > 0, "mechanism: priority arbitration");
    check(n_upgrade > 0, "mechanism: priority upgrade");
    check(n_downgrade > 0, "mechanism: priority downgrade");
    check(n_set_prio > 0, "mechanism: SET_PRIO");
    check(n_latency > 0, "mechanism: latency");
    check(n_type_named > 0, "mechanism: named BRAM type");
    check(n_use_cnt > 0, "mechanism: access counts");
    check(n_queue_lat > 0, "mechanism: queued allocation latency");
    $display("mechanisms: alloc=%0d match=%0d mism=%0d nostock=%0d empty=%0d bad=%0d range=%0d cred=%0d shared=%0d dual=%0d coll=%0d relw=%0d relp=%0d detach=%0d autoA=%0d autoD=%0d hier=%0d prio=%0d up=%0d down=%0d setprio=%0d named=%0d use=%0d queue=%0d",
             n_alloc, n_type_match, n_type_mism, n_no_stock, n_page_empty, n_bad_req,
             n_illegal_range, n_illegal_cred, n_shared_rd, n_dual_chan, n_collision,
             n_dealloc_words, n_dealloc_page, n_detach, n_auto_alloc, n_auto_dealloc,
             n_hier, n_prio_order, n_upgrade, n_downgrade, n_set_prio, n_type_named, n_use_cnt, n_queue_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
