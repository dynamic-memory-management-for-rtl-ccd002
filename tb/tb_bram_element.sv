// tb_bram_element: self-checking test of the dual-port BRAM element.
// Random reads and writes on both ports against a reference array: each read
// must return, one clock later, the word stored before that edge
// (read-first); a same-address double write leaves port B's data.
module tb_bram_element;
  localparam int unsigned W = 32, AW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  bram_element #(.WIDTH(W), .ADDR_W(AW)) dut (.*);

  logic [W-1:0] ref_mem [2**AW];
  logic [W-1:0] exp_a, exp_b;
  logic         chk_a, chk_b;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a_en, a_we, b_en, b_we} = '0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // fill the memory through port A
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; ref_mem[i] = a_wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 1) == 1;
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 1) == 1;
      a_addr = AW'($urandom_range(0, 31)); b_addr = AW'($urandom_range(0, 31));
      a_wdata = $urandom; b_wdata = $urandom;
      chk_a = a_en; chk_b = b_en;
      exp_a = ref_mem[a_addr]; exp_b = ref_mem[b_addr];
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      if (b_en && b_we) ref_mem[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin
          failures++; $display("port A addr %0d got %h want %h", a_addr, a_rdata, exp_a);
        end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin
          failures++; $display("port B addr %0d got %h want %h", b_addr, b_rdata, exp_b);
        end
      end
    end
    // final sweep through port B
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      a_en = 0; b_en = 1; b_we = 0; b_addr = AW'(i);
      @(posedge clk); #1;
      checks++;
      if (b_rdata !== ref_mem[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
