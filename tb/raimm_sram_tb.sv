// Testbench for raimm_sram: random writes and reads against a reference
// array; read data must appear exactly one clock after rd_en, and a read of
// the word written in the same cycle returns the new data.
module raimm_sram_tb;
  localparam int W = 4096;
  int checks = 0, failures = 0;
  logic clk = 0, rd_en = 0, wr_en = 0;
  logic [11:0] rd_addr = 0, wr_addr = 0;
  logic [31:0] rdata, wdata = 0;
  logic [31:0] ref_mem [W];
  logic [31:0] exp_q;
  logic exp_v = 0;

  always #5 clk = ~clk;

  raimm_sram #(.WORDS(W)) dut (.clk, .rd_en, .rd_addr, .rdata, .wr_en, .wr_addr, .wdata);

  initial begin
    // fill a small range first
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 12'(i); wdata = $urandom; ref_mem[i] = wdata; rd_en = 0;
    end
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin failures++; $display("FAIL read got %h expected %h", rdata, exp_q); end
      end
      wr_en = $urandom_range(0, 1);
      wr_addr = 12'($urandom_range(0, 63));
      wdata = $urandom;
      rd_en = $urandom_range(0, 1);
      rd_addr = ($urandom_range(0, 3) == 0) ? wr_addr : 12'($urandom_range(0, 63));
      exp_v = rd_en;
      exp_q = (wr_en && wr_addr == rd_addr) ? wdata : ref_mem[rd_addr];
      if (wr_en) ref_mem[wr_addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
