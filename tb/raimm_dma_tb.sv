// Testbench for raimm_dma: programs the configuration slave with AHB-Lite
// writes, lets the master port copy between regions of a testbench memory
// model, and checks that the destination matches the source, that nothing
// outside the destination is written, that the control registers read back,
// that transfer complete pulses once, and that SEQ beats step the address by
// one word. With a zero-wait memory a copy of W words at burst 4 must take
// 10 clocks per full burst plus 2*(t+1) for a tail of t words, plus one
// start clock, counted from the configuration write's data phase to tc.
// Copies are repeated with random wait states.
module raimm_dma_tb;
  import raimm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_haddr = 0, s_hwdata = 0, s_hrdata;
  logic [1:0]  s_htrans = 0;
  logic        s_hwrite = 0, s_hready, s_hresp;
  logic [31:0] m_haddr, m_hwdata, m_hrdata;
  logic [1:0]  m_htrans;
  logic        m_hwrite, m_hready = 1, m_hresp = 0;
  logic [2:0]  m_hsize, m_hburst;
  logic        tc, busy;
  bit          waits = 0;
  int          tc_count = 0;

  always #5 clk = ~clk;

  raimm_dma dut (.*);

  // memory model: 4096 words, zero or random wait states
  logic [31:0] mem [4096];
  logic [31:0] ref_mem [4096];
  logic        dv = 0, dw;
  logic [11:0] da;
  always_comb m_hrdata = (dv && !dw) ? mem[da] : 32'hx;
  always @(posedge clk) begin
    if (m_hready) begin
      if (dv && dw) mem[da] <= m_hwdata;
      dv <= m_htrans[1];
      dw <= m_hwrite;
      da <= m_haddr[13:2];
      if (m_htrans == HTRANS_SEQ) begin
        checks++;
        if (m_haddr != {da, 2'b00} + 32'd4) begin failures++; $display("FAIL SEQ address not incrementing"); end
      end
    end
    if (tc) tc_count++;
  end
  always @(negedge clk) m_hready <= waits ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic cfg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk) begin s_haddr = {24'd0, a}; s_htrans = HTRANS_NONSEQ; s_hwrite = 1; end
    @(negedge clk) begin s_htrans = HTRANS_IDLE; s_hwdata = d; end
  endtask

  task automatic cfg_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) begin s_haddr = {24'd0, a}; s_htrans = HTRANS_NONSEQ; s_hwrite = 0; end
    @(negedge clk) begin s_htrans = HTRANS_IDLE; #1 d = s_hrdata; end
  endtask

  task automatic copy(input int src_w, input int dst_w, input int words, input int bcode);
    int n, exp;
    logic [31:0] r;
    for (int i = 0; i < 4096; i++) begin mem[i] = $urandom; ref_mem[i] = mem[i]; end
    for (int i = 0; i < words; i++) ref_mem[dst_w + i] = ref_mem[src_w + i];
    tc_count = 0;
    cfg_write(DMA_SRC, 32'(src_w * 4));
    cfg_write(DMA_DST, 32'(dst_w * 4));
    cfg_write(DMA_CTRL, 32'(bcode << 12 | words));
    cfg_read(DMA_CTRL, r);
    checks++;
    if (r != 32'(bcode << 12 | words)) begin failures++; $display("FAIL ctrl readback %h", r); end
    cfg_write(DMA_CFG, 32'd1);   // data phase is now on the bus
    n = 0;
    while (!tc && n < 100000) begin @(posedge clk); #1; n++; end
    repeat (3) @(posedge clk);
    exp = 1 + (words / 4) * 10 + ((words % 4) ? 2 * (words % 4 + 1) : 0);
    if (!waits && bcode == 1) begin
      checks++;
      if (n != exp) begin failures++; $display("FAIL %0d words took %0d clocks, expected %0d", words, n, exp); end
    end
    checks++;
    if (tc_count != 1) begin failures++; $display("FAIL tc pulsed %0d times", tc_count); end
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: %h expected %h", i, mem[i], ref_mem[i]);
      end
    end
  endtask


  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    copy(1024, 3072, 16, 1);     // 64-byte test case data
    copy(0, 2048, 50, 1);        // 200 bytes: 12 bursts and a 2-word tail
    copy(100, 3000, 1, 1);
    copy(4000, 10, 10, 1);
    copy(0, 2048, 33, 2);        // 8-beat bursts
    copy(0, 2048, 0, 1);         // empty transfer completes at once
    waits = 1;
    copy(1024, 4000, 16, 1);
    copy(5, 2000, 37, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
