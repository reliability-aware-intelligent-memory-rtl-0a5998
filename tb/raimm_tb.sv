// Testbench for raimm, the memory manager without DMA, bus matrix or
// memories. The testbench plays the DMA: an AHB-Lite slave that records the
// configuration writes and pulses transfer complete some clocks after the
// enable write. The APB clock runs at half the AHB clock, as in the
// document. The processor side is an APB master task.
// Sequence (the document's test case 1 and 3 conditions, six blocks, M0-M3
// in use, M4-M5 redundant):
//  1. program sizes, addresses, use bits, interrupt enable and enable;
//  2. M1 voltage goes red: check the DMA is programmed with M1 -> M5, LOCK,
//     the REMAP pulse, the swapped address/size/use registers read over APB,
//     the interrupt bit and irq, and the latencies (sensor change to first
//     DMA write: 7 clocks, as in the document; configuration: 5 clocks;
//     transfer complete to IDLE with the registers updated: at most 16);
//  3. M0 red while both redundant blocks are not reliable: interrupt bit 31
//     and no DMA activity; when M4 recovers the waiting remap M0 -> M4 runs.
module raimm_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic hclk = 0, pclk = 0, hresetn = 0, presetn = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  pvt_t [N-1:0] pvt;
  logic [N-1:0] mem_rd = '0;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite, hready = 1, hresp = 0, dma_tc = 0;
  logic [2:0] hsize, hburst;
  logic lock, remap, irq;
  logic [2:0] src_mem, dst_mem, trig_state;
  logic [N-1:0][2:0] mem_status;

  always #3 hclk = ~hclk;
  always @(posedge hclk) pclk <= ~pclk;   // half rate, edges aligned to hclk

  raimm #(.N_MEM(N)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t %s", $time, what); end
  endtask

  task automatic apb_wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge pclk) begin psel = 1; pwrite = 1; paddr = a; pwdata = d; end
    @(negedge pclk) penable = 1;
    @(negedge pclk) begin psel = 0; penable = 0; end
  endtask
  task automatic apb_rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge pclk) begin psel = 1; pwrite = 0; paddr = a; end
    @(negedge pclk) penable = 1;
    #1 d = prdata;
    @(negedge pclk) begin psel = 0; penable = 0; end
  endtask

  // DMA stand-in
  logic [31:0] cfg_a [$];
  logic [31:0] cfg_d [$];
  logic dv = 0;
  logic [31:0] da;
  int tc_delay = 40, tc_timer = 0;
  longint hcyc = 0;
  longint t_first_write = 0, t_last_write = 0, t_tc = 0, t_remap = 0, t_idle = 0;
  always @(posedge hclk) begin
    hcyc++;
    dma_tc <= 1'b0;
    if (dv) begin
      cfg_a.push_back(da); cfg_d.push_back(hwdata);
      t_last_write = hcyc;
      if (da[7:0] == DMA_CFG && hwdata[0]) tc_timer = tc_delay;
    end
    if (htrans == HTRANS_NONSEQ && cfg_a.size() == 0 && !dv) t_first_write = hcyc;
    dv <= hresetn && htrans[1] && hwrite;   // ignore the bus while in reset
    da <= haddr;
    if (tc_timer > 0) begin
      tc_timer--;
      if (tc_timer == 0) begin dma_tc <= 1'b1; t_tc = hcyc + 1; end
    end
    if (remap) t_remap = hcyc;
  end

  function automatic pvt_t green();
    return '{volt_mv: 16'sd1200, temp_dc: 16'sd250, nmos_ds: -16'sd10, pmos_ds: 16'sd10};
  endfunction

  logic [31:0] r;
  longint t0;
  int n;

  initial begin
    for (int i = 0; i < N; i++) pvt[i] = green();
    repeat (4) @(posedge hclk);
    hresetn = 1; presetn = 1;
    for (int i = 0; i < N; i++) begin
      apb_wr(REG_SAR + 12'(4 * i), 32'h4000 * i);
      apb_wr(REG_DSR + 12'(4 * i), 32'd64);
    end
    apb_wr(REG_UR, 32'h0F);
    apb_wr(REG_IER, 32'h8000_003F);
    apb_wr(REG_PR, 32'd1);
    apb_wr(REG_CONFG, 32'd1);
    apb_rd(REG_UR, r); chk(r == 32'h0F, "use register");
    apb_rd(REG_SAR + 12'h14, r); chk(r == 32'h14000, "SAR5");
    repeat (20) @(posedge hclk);
    chk(trig_state == 0 && !lock && !irq && cfg_a.size() == 0, $sformatf("quiet while all reliable %0d %0d %0d %0d", trig_state, lock, irq, cfg_a.size()));

    // ---- M1 unreliable ----
    @(negedge hclk) pvt[1].volt_mv = 16'sd900;
    t0 = hcyc;
    n = 0;
    while (cfg_d.size() < 4 && n < 500) begin @(posedge hclk); n++; end
    chk(t_first_write - t0 == 7, $sformatf("sensor change to first DMA write: %0d clocks", t_first_write - t0));
    chk(t_last_write - t_first_write + 1 == 5, $sformatf("DMA programming: %0d clocks", t_last_write - t_first_write + 1));
    chk(cfg_d.size() == 4 && cfg_d[0] == 32'h4000 && cfg_d[1] == 32'h14000 &&
        cfg_d[2] == 32'h1010 && cfg_d[3] == 32'h1, "DMA programmed for M1 -> M5, 16 words, 4-beat bursts");
    chk(cfg_a[0] == 0 && cfg_a[1] == 4 && cfg_a[2] == 8 && cfg_a[3] == 12, "DMA register offsets");
    chk(lock && src_mem == 1 && dst_mem == 5 && trig_state == 2, "LOCK during the transfer");
    n = 0;
    while (trig_state != 0 && n < 500) begin @(posedge hclk); n++; end
    t_idle = hcyc;
    chk(t_remap == t_tc + 1, "REMAP in the clock after transfer complete");
    $display("transfer complete to IDLE: %0d clocks", t_idle - t_tc + 1);
    chk(t_idle - t_tc + 1 <= 16, "update and return to IDLE");
    chk(!lock, "LOCK released");
    apb_rd(REG_UR, r);  chk(r == 32'h2D, $sformatf("use bits swapped (%h)", r));
    apb_rd(REG_SAR + 12'h4, r);  chk(r == 32'h14000, "SAR1 swapped");
    apb_rd(REG_SAR + 12'h14, r); chk(r == 32'h4000, "SAR5 swapped");
    apb_rd(REG_IR, r); chk(r == 32'h2 && irq, $sformatf("interrupt for M1 (%h)", r));
    apb_rd(REG_MSR0, r); chk(r[5:3] == REL_UR && r[2:0] == REL_R, "status register");
    apb_wr(REG_IR, 32'h2);
    apb_rd(REG_IR, r); chk(r == 0 && !irq, "interrupt cleared");
    repeat (30) @(posedge hclk);
    chk(trig_state == 0 && cfg_d.size() == 4, "no second remap of the same pair");

    // ---- M0 unreliable, redundant M1 (red) and M4 (blue voltage) ----
    @(negedge hclk) pvt[4].volt_mv = 16'sd1000;
    repeat (10) @(posedge hclk);
    @(negedge hclk) pvt[0].temp_dc = 16'sd1300;
    repeat (30) @(posedge hclk);
    apb_rd(REG_IR, r);
    chk(r[31] && r[0] && irq, $sformatf("no reliable redundant block interrupt (%h)", r));
    chk(trig_state == 0 && cfg_d.size() == 4, "no remap without a target");
    @(negedge hclk) pvt[4].volt_mv = 16'sd1200;
    n = 0;
    while (cfg_d.size() < 8 && n < 500) begin @(posedge hclk); n++; end
    chk(cfg_d.size() == 8 && cfg_d[4] == 32'h0 && cfg_d[5] == 32'h10000, "waiting remap M0 -> M4 runs");
    n = 0;
    while (trig_state != 0 && n < 500) begin @(posedge hclk); n++; end
    repeat (10) @(posedge hclk);
    apb_rd(REG_UR, r);  chk(r == 32'h3C, $sformatf("use bits after second remap (%h)", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
