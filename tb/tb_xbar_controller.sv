// tb_xbar_controller: self-checking test of the crossbar controller.
// Random translated accesses from all port channels, with PIDs drawn from a
// small range so that collisions happen often. A model picks, per BRAM side,
// the lowest requesting port; the test checks selects, grants and collision
// flags in the same cycle and the registered read selects and error flags one
// cycle later. A reference count of the accesses per element, cleared while
// the element is marked free, is compared with use_cnt every cycle; a final
// phase hammers one element until its counter saturates.
module tb_xbar_controller;
  localparam int P = 4, N = 16;
  localparam int PW = $clog2(P), BW = $clog2(N);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic          tr_valid  [P][2];
  logic [BW-1:0] tr_pid    [P][2];
  logic          tr_illegal[P][2];
  logic          sel_en    [N][2];
  logic [PW-1:0] sel_port  [N][2];
  logic          grant     [P][2];
  logic          collision [P][2];
  logic          rd_valid_q[P][2];
  logic [BW-1:0] rd_pid_q  [P][2];
  logic          err_q     [P][2];
  logic [N-1:0]  free_map;
  logic [15:0]   use_cnt   [N];
  int            m_cnt     [N];

  xbar_controller #(.N_PORTS(P), .N_BRAM(N)) dut (.*);

  int checks = 0, failures = 0, n_coll = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit          m_grant [P][2];
    bit          m_err   [P][2];
    int          m_pid   [P][2];
    rst_n = 1'b0;
    for (int p = 0; p < P; p++)
      for (int c = 0; c < 2; c++) begin tr_valid[p][c] = 0; tr_pid[p][c] = '0; tr_illegal[p][c] = 0; end
    free_map = '0;
    for (int b = 0; b < N; b++) m_cnt[b] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++) begin
          tr_valid[p][c]   = $urandom_range(0, 1) == 1;
          tr_illegal[p][c] = !tr_valid[p][c] && $urandom_range(0, 3) == 0;
          tr_pid[p][c]     = BW'($urandom_range(0, 5));
        end
      if ($urandom_range(0, 15) == 0) free_map = N'($urandom);
      #1;
      for (int b = 0; b < N; b++)
        for (int c = 0; c < 2; c++) begin
          int w;
          w = -1;
          for (int p = 0; p < P; p++)
            if (w < 0 && tr_valid[p][c] && int'(tr_pid[p][c]) == b) w = p;
          check(sel_en[b][c] == (w >= 0) && (w < 0 || int'(sel_port[b][c]) == w),
                $sformatf("select of bram %0d side %0d", b, c));
        end
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++) begin
          bit first;
          first = 1'b1;
          for (int q = 0; q < p; q++)
            if (tr_valid[q][c] && tr_pid[q][c] == tr_pid[p][c]) first = 1'b0;
          m_grant[p][c] = tr_valid[p][c] && first;
          m_err[p][c]   = tr_illegal[p][c] || (tr_valid[p][c] && !first);
          m_pid[p][c]   = int'(tr_pid[p][c]);
          if (tr_valid[p][c] && !first) n_coll++;
          check(grant[p][c] == m_grant[p][c] && collision[p][c] == (tr_valid[p][c] && !first),
                $sformatf("grant port %0d ch %0d", p, c));
        end
      for (int b = 0; b < N; b++)
        m_cnt[b] = free_map[b] ? 0 : m_cnt[b] + int'(sel_en[b][0]) + int'(sel_en[b][1]);
      @(posedge clk); #1;
      for (int b = 0; b < N; b++)
        check(int'(use_cnt[b]) == m_cnt[b], $sformatf("use count of bram %0d", b));
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++)
          check(rd_valid_q[p][c] == m_grant[p][c] && err_q[p][c] == m_err[p][c] &&
                (!m_grant[p][c] || int'(rd_pid_q[p][c]) == m_pid[p][c]),
                $sformatf("registered outputs port %0d ch %0d", p, c));
    end
    check(n_coll > 0, "collisions happened");
    // saturation: both sides of element 1 every cycle
    @(negedge clk);
    free_map = '0;
    for (int p = 0; p < P; p++)
      for (int c = 0; c < 2; c++) begin
        tr_valid[p][c] = p == 0; tr_illegal[p][c] = 0; tr_pid[p][c] = BW'(1);
      end
    repeat (33000) @(posedge clk);
    #1 check(use_cnt[1] == 16'hFFFF, "use count saturates");
    @(negedge clk) free_map[1] = 1'b1;
    @(posedge clk); #1 check(use_cnt[1] == 16'h0, "use count cleared when freed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
