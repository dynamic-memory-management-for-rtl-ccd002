// tb_bram_space: self-checking test of the BRAM element pool.
// Every element is written through one side and read back through the
// other with random data. The test checks each element's configuration: the
// word width (bits above it read as zero) and the depth (the address wraps
// at the element's depth, so address depth+i reaches word i).
module tb_bram_space;
  import dommu_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic              en    [N][2];
  logic              we    [N][2];
  logic [OFF_W-1:0]  addr  [N][2];
  logic [DATA_W-1:0] wdata [N][2];
  logic [DATA_W-1:0] rdata [N][2];

  bram_space #(.N_BRAM(N)) dut (.*);

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

  logic [31:0] ref_d [N][16];

  initial begin
    for (int b = 0; b < N; b++)
      for (int c = 0; c < 2; c++) begin en[b][c] = 0; we[b][c] = 0; addr[b][c] = '0; wdata[b][c] = '0; end
    // write 16 words of every element on side A (all elements in parallel)
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      for (int b = 0; b < N; b++) begin
        int w;
        w = int'(type_width(pid_type(b)));
        en[b][0] = 1; we[b][0] = 1; addr[b][0] = OFF_W'(i); wdata[b][0] = $urandom;
        ref_d[b][i] = wdata[b][0] & ((w == 32) ? 32'hffff_ffff : ((32'd1 << w) - 1));
      end
    end
    @(negedge clk);
    for (int b = 0; b < N; b++) en[b][0] = 0;
    // read back on side B, through the aliased address depth+i
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      for (int b = 0; b < N; b++) begin
        int d;
        d = 1 << type_depth_log2(pid_type(b));
        en[b][1] = 1; we[b][1] = 0;
        addr[b][1] = (d < (1 << OFF_W)) ? OFF_W'(d + i) : OFF_W'(i);
      end
      @(posedge clk); #1;
      for (int b = 0; b < N; b++)
        check(rdata[b][1] == ref_d[b][i],
              $sformatf("bram %0d word %0d got %h want %h", b, i, rdata[b][1], ref_d[b][i]));
    end
    // both sides of one element at once: A writes, B reads another word
    @(negedge clk);
    en[0][0] = 1; we[0][0] = 1; addr[0][0] = 11'd20; wdata[0][0] = 32'hcafe_f00d;
    en[0][1] = 1; we[0][1] = 0; addr[0][1] = 11'd3;
    @(posedge clk); #1;
    check(rdata[0][1] == ref_d[0][3], "side B read during side A write");
    @(negedge clk);
    en[0][0] = 0; addr[0][1] = 11'd20;
    @(posedge clk); #1;
    check(rdata[0][1] == 32'hcafe_f00d, "side A write seen on side B");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
