// tb_translator: self-checking test of the BRAM address translator (BRAT).
// It builds pages with ADD, checks the logical-to-physical mapping of every
// port channel against a model of the page table (random addresses), and
// checks every ACK/NACK case: page full (at the page limit and at a smaller
// per-port limit), type mismatch, empty page,
// attaching to a shared page with read-only credentials, detaching.
module tb_translator;
  import dommu_pkg::*;
  localparam int P = 4, N = 16, X = 8;
  localparam int PW = $clog2(P), BW = $clog2(N), NW = $clog2(X + 1);
  localparam int LADDR_W = $clog2(X) + OFF_W;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic               acc_en    [P][2];
  logic               acc_we    [P][2];
  logic [LADDR_W-1:0] acc_addr  [P][2];
  logic               tr_valid  [P][2];
  logic [BW-1:0]      tr_pid    [P][2];
  logic [OFF_W-1:0]   tr_off    [P][2];
  logic               tr_illegal[P][2];
  logic               cmd_valid;
  tr_cmd_e            cmd;
  logic [PW-1:0]      cmd_port, cmd_partner, q_port;
  logic [BW-1:0]      cmd_pid, rsp_pid;
  btype_t             cmd_type, q_type;
  cred_e              cmd_cred;
  logic               rsp_valid, q_shared;
  rsp_status_e        rsp_status;
  logic [NW-1:0]      q_nbrams;

  // port 3 may hold at most 2 elements
  translator #(.N_PORTS(P), .N_BRAM(N), .MAX_BRAMS(X), .PAGE_MAX('{8, 8, 8, 2})) dut (.*);

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

  // model of the page table
  int m_page [P];
  int m_cred [P];
  int m_type [P];
  int m_n    [P];
  int m_pid  [P][X];

  task automatic do_cmd(input tr_cmd_e c, input int port, input int pid, input int t,
                        input cred_e cr, input int partner, input rsp_status_e want,
                        input string what);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = c; cmd_port = PW'(port); cmd_pid = BW'(pid);
    cmd_type = btype_t'(t); cmd_cred = cr; cmd_partner = PW'(partner);
    @(negedge clk);
    cmd_valid = 1'b0; cmd = TR_NOP;
    check(rsp_valid && rsp_status == want,
          $sformatf("%s: status %0d want %0d", what, rsp_status, want));
    if (rsp_status == RSP_ACK) begin
      unique case (c)
        TR_ADD: begin
          if (m_n[port] == 0) begin m_type[port] = t; m_cred[port] = int'(cr); end
          m_pid[port][m_n[port]] = pid; m_n[port]++;
        end
        TR_REMOVE: begin
          m_n[port]--;
          check(32'(rsp_pid) == m_pid[port][m_n[port]], "removed PID");
          if (m_n[port] == 0) m_cred[port] = 0;
        end
        TR_ATTACH: begin m_page[port] = partner; m_cred[port] = int'(cr); end
        TR_DETACH: begin m_page[port] = port; m_cred[port] = 0; end
        default: ;
      endcase
    end
  endtask

  // random accesses on all ports and channels, compared with the model
  task automatic random_access(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++) begin
          acc_en[p][c] = $urandom_range(0, 3) != 0;
          acc_we[p][c] = $urandom_range(0, 1) == 1;
          acc_addr[p][c] = LADDR_W'($urandom_range(0, 5000));
        end
      #1;
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++) begin
          int pg, dl, lid, off;
          bit legal;
          pg  = m_page[p];
          dl  = int'(type_depth_log2(m_type[pg]));
          lid = int'(acc_addr[p][c]) >> dl;
          off = int'(acc_addr[p][c]) & ((1 << dl) - 1);
          legal = lid < m_n[pg] && (acc_we[p][c] ? m_cred[p][1] : m_cred[p][0]);
          check(tr_valid[p][c] == (acc_en[p][c] && legal) &&
                tr_illegal[p][c] == (acc_en[p][c] && !legal),
                $sformatf("legality port %0d ch %0d addr %0d", p, c, acc_addr[p][c]));
          if (acc_en[p][c] && legal)
            check(32'(tr_pid[p][c]) == m_pid[pg][lid] && 32'(tr_off[p][c]) == off,
                  $sformatf("mapping port %0d addr %0d -> pid %0d off %0d",
                            p, acc_addr[p][c], tr_pid[p][c], tr_off[p][c]));
        end
    end
  endtask

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd = TR_NOP; cmd_port = '0; cmd_pid = '0;
    cmd_type = '0; cmd_cred = CRED_NONE; cmd_partner = '0; q_port = '0;
    for (int p = 0; p < P; p++) begin
      m_page[p] = p; m_cred[p] = 0; m_type[p] = 0; m_n[p] = 0;
      for (int c = 0; c < 2; c++) begin acc_en[p][c] = 0; acc_we[p][c] = 0; acc_addr[p][c] = '0; end
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    random_access(50);                                    // no pages: all illegal
    do_cmd(TR_ADD, 0, 3, 0, CRED_RDWR, 0, RSP_ACK, "add pid 3 to page 0");
    do_cmd(TR_ADD, 0, 6, 0, CRED_RD,   0, RSP_ACK, "add pid 6 to page 0");
    do_cmd(TR_ADD, 0, 1, 1, CRED_RDWR, 0, RSP_TYPE_MISM, "type mismatch");
    for (int i = 0; i < X; i++)
      do_cmd(TR_ADD, 1, 2 + 3 * (i % 5), 2, CRED_RDWR, 0, RSP_ACK, "fill page 1");
    do_cmd(TR_ADD, 1, 14, 2, CRED_RDWR, 0, RSP_PAGE_FULL, "page full");
    do_cmd(TR_ADD, 3, 1, 1, CRED_WR, 0, RSP_ACK, "write-only page 3");
    do_cmd(TR_ADD, 3, 4, 1, CRED_WR, 0, RSP_ACK, "page 3 at its maximum");
    do_cmd(TR_ADD, 3, 7, 1, CRED_WR, 0, RSP_PAGE_FULL, "page 3 beyond its maximum");
    q_port = 1; #1;
    check(32'(q_nbrams) == X && q_type == 2 && !q_shared, "query page 1");
    random_access(400);
    do_cmd(TR_REMOVE, 1, 0, 0, CRED_NONE, 0, RSP_ACK, "remove from page 1");
    do_cmd(TR_REMOVE, 2, 0, 0, CRED_NONE, 0, RSP_PAGE_EMPTY, "remove from empty page");
    do_cmd(TR_ATTACH, 2, 0, 0, CRED_RD, 2, RSP_BAD_REQ, "attach to itself");
    do_cmd(TR_ATTACH, 0, 0, 0, CRED_RD, 1, RSP_BAD_REQ, "attach a port that owns BRAM");
    do_cmd(TR_DETACH, 2, 0, 0, CRED_NONE, 0, RSP_BAD_REQ, "detach an owner");
    do_cmd(TR_ATTACH, 2, 0, 0, CRED_RD, 0, RSP_ACK, "attach port 2 to page 0");
    q_port = 2; #1;
    check(q_shared && 32'(q_nbrams) == 2 && q_type == 0, "query shared port");
    do_cmd(TR_ADD, 2, 9, 0, CRED_RDWR, 0, RSP_BAD_REQ, "add on a shared port");
    do_cmd(TR_REMOVE, 2, 0, 0, CRED_NONE, 0, RSP_BAD_REQ, "remove on a shared port");
    random_access(400);
    do_cmd(TR_DETACH, 2, 0, 0, CRED_NONE, 0, RSP_ACK, "detach port 2");
    do_cmd(TR_REMOVE, 0, 0, 0, CRED_NONE, 0, RSP_ACK, "shrink page 0");
    do_cmd(TR_REMOVE, 0, 0, 0, CRED_NONE, 0, RSP_ACK, "empty page 0");
    random_access(200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
