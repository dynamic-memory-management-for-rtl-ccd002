// tb_dommu_xbar: self-checking test of the write and read crossbars.
// Random selects for every BRAM side and random port-channel signals; the
// test checks that each BRAM side gets exactly the selected channel's write
// enable, offset and data (and nothing when unselected), and that each
// channel reads back the data of the BRAM it names, or zero.
module tb_dommu_xbar;
  import dommu_pkg::*;
  localparam int P = 4, N = 16;
  localparam int PW = $clog2(P), BW = $clog2(N);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic              acc_we    [P][2];
  logic [OFF_W-1:0]  acc_off   [P][2];
  logic [DATA_W-1:0] acc_wdata [P][2];
  logic [DATA_W-1:0] acc_rdata [P][2];
  logic              sel_en    [N][2];
  logic [PW-1:0]     sel_port  [N][2];
  logic              rd_valid_q[P][2];
  logic [BW-1:0]     rd_pid_q  [P][2];
  logic              bram_en   [N][2];
  logic              bram_we   [N][2];
  logic [OFF_W-1:0]  bram_addr [N][2];
  logic [DATA_W-1:0] bram_wdata[N][2];
  logic [DATA_W-1:0] bram_rdata[N][2];

  dommu_xbar #(.N_PORTS(P), .N_BRAM(N)) dut (.*);

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

  initial begin
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++) begin
          acc_we[p][c] = $urandom_range(0, 1) == 1;
          acc_off[p][c] = OFF_W'($urandom);
          acc_wdata[p][c] = $urandom;
          rd_valid_q[p][c] = $urandom_range(0, 1) == 1;
          rd_pid_q[p][c] = BW'($urandom);
        end
      for (int b = 0; b < N; b++)
        for (int c = 0; c < 2; c++) begin
          sel_en[b][c] = $urandom_range(0, 1) == 1;
          sel_port[b][c] = PW'($urandom);
          bram_rdata[b][c] = $urandom;
        end
      #1;
      for (int b = 0; b < N; b++)
        for (int c = 0; c < 2; c++) begin
          int s;
          s = int'(sel_port[b][c]);
          check(bram_en[b][c] == sel_en[b][c] &&
                bram_we[b][c] == (sel_en[b][c] && acc_we[s][c]), "write crossbar enables");
          if (sel_en[b][c])
            check(bram_addr[b][c] == acc_off[s][c] && bram_wdata[b][c] == acc_wdata[s][c],
                  $sformatf("write crossbar bram %0d side %0d", b, c));
        end
      for (int p = 0; p < P; p++)
        for (int c = 0; c < 2; c++)
          check(acc_rdata[p][c] == (rd_valid_q[p][c] ? bram_rdata[rd_pid_q[p][c]][c] : '0),
                $sformatf("read crossbar port %0d ch %0d", p, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
