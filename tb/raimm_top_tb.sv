// End-to-end testbench for raimm_top at its default size: six 16 KB blocks,
// M0-M3 usable and M4-M5 redundant, AHB clock 166 MHz (6 ns) and APB clock
// at half rate, as in the document's verification system.
// The testbench is the processor (pipelined AHB-Lite reads and writes, APB
// register accesses) and the sensors. It replays the four PVT scenarios of
// the document's test cases:
//   1. single remaps M1->M5, M0->M4 (M0 ranked above the less reliable M3),
//      then M3->M1 once the redundant blocks recover;
//   2. a second alarm (M0) raised while the M1->M5 copy runs is queued and
//      served when the first remap ends;
//   3. an unreliable M2 with no reliable redundant block gives the
//      interrupt and no transfer; when M4 recovers, M2->M4 runs;
//   4. with 200 bytes of valid data the processor keeps reading region A0:
//      it is stalled (HREADY low) while A0's block is copied and continues at
//      the same address on the new block; a remap of another region does not
//      stall it.
// After every condition the region-to-block map is compared with the
// document's tables and the valid data of the usable regions is read back and
// compared with what was written. Latencies are measured on the first remap
// of cases 1 and 4 from the controller state: sensor change to DMA
// programming (document: 7 clocks), DMA programming (document: 9 clocks) with
// the transfer, and transfer complete to IDLE (document: 12 clocks after the
// one-clock transfer-complete signal, 13 in all). Counted mechanisms: remap, stall, interrupt,
// queued remap, "no reliable redundant" alarm.
module raimm_top_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  localparam int WORDS = 4096;
  int checks = 0, failures = 0;
  logic hclk = 0, pclk = 0, hresetn = 0, presetn = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0]  htrans = 0;
  logic hwrite = 0, hready, hresp;
  logic [2:0] hsize = HSIZE_WORD, hburst = HBURST_SINGLE;
  pvt_t [N-1:0] pvt;
  logic irq, lock;
  logic [N-1:0][2:0] mem_status, region_map;
  logic [2:0] trig_state;

  always #3 hclk = ~hclk;
  always @(posedge hclk) pclk <= ~pclk;

  raimm_top dut (.*);

  int n_remap = 0, n_stall = 0, n_irq = 0, n_queued = 0, n_nored = 0;
  longint hcyc = 0;
  longint t_s1 = 0, t_s3 = 0, t_idle = 0, t_last_idle = 0;
  bit pending = 0, rst_q = 0;
  logic [2:0] st_q = 0;
  logic [N-1:0][2:0] map_q;
  int nonr;
  always @(posedge hclk) begin
    hcyc++;
    rst_q <= hresetn;
    st_q  <= trig_state;
    map_q <= region_map;
    if (hresetn && rst_q && region_map != map_q) n_remap++;
    if (hresetn && !hready) n_stall++;
    if (hresetn && irq && !$past(irq)) n_irq++;
    // a second usable block (regions A0-A3) in alarm while a copy runs,
    // served by a remap that starts right after the current one: queued
    if (trig_state == 3'd2) begin
      nonr = 0;
      for (int j = 0; j < 4; j++) if (mem_status[region_map[j]] != REL_R) nonr++;
      if (nonr >= 2) pending = 1;
    end
    if (st_q == 3'd0 && trig_state == 3'd1) begin
      if (pending && hcyc - t_last_idle < 30) n_queued++;
      pending = 0;
      if (t_s1 == 0) t_s1 = hcyc;
    end
    if (st_q == 3'd2 && trig_state == 3'd3 && t_s3 == 0) t_s3 = hcyc;
    if (st_q == 3'd4 && trig_state == 3'd0) begin
      t_last_idle = hcyc;
      if (t_idle == 0) t_idle = hcyc;
    end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL %0t %s", $time, what); end
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

  // processor: pipelined transfer list
  semaphore bus = new(1);
  task automatic xfer(input logic [31:0] a[$], input bit wr, input logic [31:0] wd[$],
                      output logic [31:0] rd[$]);
    int ai, got, fi;
    bit inflight;
    bus.get();
    ai = 0; got = 0; inflight = 0; fi = 0;
    rd = {};
    while (got < a.size()) begin
      @(negedge hclk);
      haddr  = (ai < a.size()) ? a[ai] : 32'h0;
      hwrite = wr;
      htrans = (ai < a.size()) ? HTRANS_NONSEQ : HTRANS_IDLE;
      hwdata = (inflight && wr) ? wd[fi] : 32'h0;
      #1;
      if (hready) begin
        if (inflight) begin rd.push_back(hrdata); got++; end
        inflight = (ai < a.size());
        fi = ai;
        if (ai < a.size()) ai++;
      end
    end
    @(negedge hclk) htrans = HTRANS_IDLE;
    bus.put();
  endtask

  logic [31:0] refm [N][$];   // valid data per region
  int valid_words;

  task automatic fill_regions();
    logic [31:0] a[$], d[$], r[$];
    for (int j = 0; j < N; j++) begin
      a = {}; d = {};
      for (int w = 0; w < valid_words; w++) begin a.push_back(32'(j * 16384 + 4 * w)); d.push_back($urandom); end
      refm[j] = d;
      xfer(a, 1, d, r);
    end
  endtask

  // the usable regions A0-A3 keep their data through every remap; the
  // redundant regions hold whatever their block last held
  task automatic check_regions(input string tag);
    logic [31:0] a[$], d[$], r[$];
    for (int j = 0; j < 4; j++) begin
      a = {};
      for (int w = 0; w < valid_words; w++) a.push_back(32'(j * 16384 + 4 * w));
      xfer(a, 0, d, r);
      for (int w = 0; w < valid_words; w++)
        if (r[w] !== refm[j][w]) begin
          chk(0, $sformatf("%s: region %0d word %0d = %h, expected %h", tag, j, w, r[w], refm[j][w]));
          break;
        end
      checks++;
    end
  endtask

  task automatic check_map(input int m0, m1, m2, m3, m4, m5, input string tag);
    int e[N];
    e = '{m0, m1, m2, m3, m4, m5};
    for (int j = 0; j < N; j++)
      chk(region_map[j] == 3'(e[j]), $sformatf("%s: A%0d served by M%0d, expected M%0d", tag, j, region_map[j], e[j]));
  endtask

  function automatic pvt_t green();
    return '{volt_mv: 16'sd1200, temp_dc: 16'sd250, nmos_ds: -16'sd10, pmos_ds: 16'sd10};
  endfunction
  localparam logic signed [15:0] V_LR = 16'sd1000, V_UR = 16'sd900, V_OK = 16'sd1200;

  // wait until the controller has stayed idle for 100 clocks (a queued
  // remap starts a few clocks after the previous one ends)
  task automatic wait_idle(input int max_clocks);
    int n, quiet;
    n = 0; quiet = 0;
    while (quiet < 100 && n < max_clocks) begin
      @(posedge hclk); n++;
      quiet = (trig_state == 0 && !lock) ? quiet + 1 : 0;
    end
    chk(quiet >= 100, "controller back in IDLE");
  endtask

  // latency of one remap, measured from the sensor change (made between
  // two clock edges; the next edge is clock 1) with the controller's states:
  // S1 is seen 6 clocks after the change and the first DMA register write
  // one clock later (7 in all, as in the document); S2 covers the DMA
  // programming (5 clocks), the copy and the transfer-complete pulse (2
  // clocks); S3, S4 and the return to S0 follow.
  task automatic measure(input longint t_inj, input int words, input bit ranked_first);
    int n, copy;
    t_s1 = 0; t_s3 = 0; t_idle = 0;
    n = 0;
    while (t_idle == 0 && n < 20000) begin @(posedge hclk); n++; end
    copy = 10 * (words / 4) + ((words % 4 != 0) ? 2 * (words % 4 + 1) : 0);
    $display("latency: trigger %0d (+1 to the first DMA write), data transfer state %0d (copy %0d), remap and update %0d clocks (%0d words)",
             t_s1 - t_inj, t_s3 - t_s1, copy, t_idle - t_s3, words);
    // one clock less when the block was already ranked first (the ranking
    // table then needs no update)
    chk(t_s1 - t_inj + 1 == (ranked_first ? 6 : 7), "trigger and register update in 7 clocks");
    chk(t_s3 - t_s1 - 7 == longint'(copy), "DMA programming (5 clocks) and the 4-beat burst copy");
    chk(t_idle - t_s3 <= 13, "remap and register update within 13 clocks");
  endtask

  task automatic start_case(input int words);
    hresetn = 0; presetn = 0;
    for (int i = 0; i < N; i++) pvt[i] = green();
    repeat (4) @(posedge hclk);
    hresetn = 1; presetn = 1;
    valid_words = words;
    fill_regions();
    for (int i = 0; i < N; i++) begin
      apb_wr(REG_SAR + 12'(4 * i), 32'h4000 * i);
      apb_wr(REG_DSR + 12'(4 * i), 32'(4 * words));
    end
    apb_wr(REG_UR, 32'h0F);
    apb_wr(REG_IER, 32'h8000_003F);
    apb_wr(REG_PR, 32'd4);
    apb_wr(REG_CONFG, 32'd1);
    // first condition: blue temperature and process only -> still reliable
    @(negedge hclk) begin pvt[2].temp_dc = 16'sd1000; pvt[0].nmos_ds = -16'sd25; end
    repeat (60) @(posedge hclk);
    chk(trig_state == 0 && !lock && !irq, "blue temperature or process alone is reliable");
    check_map(0, 1, 2, 3, 4, 5, "first condition");
  endtask

  logic [31:0] r;
  longint t_inj;
  bit reading;
  int rd_ok;

  initial begin
    for (int i = 0; i < N; i++) pvt[i] = green();

    // ================= test case 1 =================
    start_case(16);
    @(negedge hclk) pvt[1].volt_mv = V_UR;
    t_inj = hcyc;
    measure(t_inj, 16, 0);
    wait_idle(2000);
    check_map(0, 5, 2, 3, 4, 1, "case 1 second");
    check_regions("case 1 second");
    apb_rd(REG_UR, r); chk(r == 32'h2D, "use bits after M1->M5");
    apb_rd(REG_SAR + 12'h4, r); chk(r == 32'h14000, "SAR of M1 now A5");
    apb_rd(REG_IR, r); chk(r[1] && irq, "status interrupt for M1");
    apb_wr(REG_IR, 32'hFFFF_FFFF);
    @(negedge hclk) begin pvt[0].volt_mv = V_UR; pvt[3].volt_mv = V_LR; pvt[1].volt_mv = V_LR; end
    wait_idle(2000);
    check_map(4, 5, 2, 3, 0, 1, "case 1 third");
    check_regions("case 1 third");
    apb_rd(REG_IR, r); chk(r[31], "M3 less reliable, no reliable redundant block");
    n_nored += r[31];
    @(negedge hclk) begin pvt[0].volt_mv = V_OK; pvt[1].volt_mv = V_OK; end
    wait_idle(2000);
    check_map(4, 5, 2, 1, 0, 3, "case 1 fourth");
    check_regions("case 1 fourth");

    // ================= test case 2 =================
    start_case(16);
    @(negedge hclk) pvt[1].volt_mv = V_LR;
    repeat (25) @(posedge hclk);
    chk(lock && trig_state == 2, "first copy running");
    @(negedge hclk) begin pvt[0].volt_mv = V_UR; pvt[3].volt_mv = V_LR; end
    wait_idle(4000);
    chk(n_queued >= 1, "second remap queued behind the first");
    check_map(4, 5, 2, 3, 0, 1, "case 2 third");
    check_regions("case 2 third");
    @(negedge hclk) begin pvt[0].volt_mv = V_OK; pvt[1].volt_mv = V_OK; end
    wait_idle(2000);
    check_map(4, 5, 2, 1, 0, 3, "case 2 fourth");
    check_regions("case 2 fourth");

    // ================= test case 3 =================
    start_case(16);
    @(negedge hclk) pvt[1].volt_mv = V_UR;
    wait_idle(2000);
    check_map(0, 5, 2, 3, 4, 1, "case 3 second");
    apb_wr(REG_IR, 32'hFFFF_FFFF);
    @(negedge hclk) begin pvt[2].volt_mv = V_UR; pvt[4].volt_mv = V_LR; pvt[1].volt_mv = V_LR; end
    repeat (100) @(posedge hclk);
    chk(trig_state == 0 && !lock, "no transfer without a reliable redundant block");
    apb_rd(REG_IR, r); chk(r[31] && r[2] && irq, $sformatf("interrupt raised (%h)", r));
    n_nored += r[31];
    check_map(0, 5, 2, 3, 4, 1, "case 3 third");
    apb_wr(REG_IR, 32'hFFFF_FFFF);
    @(negedge hclk) pvt[4].volt_mv = V_OK;
    wait_idle(2000);
    check_map(0, 5, 4, 3, 2, 1, "case 3 fourth");
    check_regions("case 3 fourth");

    // ================= test case 4 =================
    start_case(50);
    reading = 1;
    rd_ok = 0;
    fork
      begin : cpu_reader
        logic [31:0] a[$], d[$], rr[$];
        int w;
        w = 0;
        while (reading) begin
          a = {32'(4 * w)};
          xfer(a, 0, d, rr);
          if (rr[0] !== refm[0][w]) chk(0, $sformatf("A0 word %0d during remaps", w));
          else rd_ok++;
          w = (w + 1) % 50;
        end
      end
      begin : scenario
        int stall0;
        @(negedge hclk) pvt[0].volt_mv = V_UR;
        t_inj = hcyc;
        stall0 = n_stall;
        measure(t_inj, 50, 1);
        wait_idle(4000);
        chk(n_stall - stall0 > 100, $sformatf("processor stalled during A0's copy (%0d clocks)", n_stall - stall0));
        check_map(5, 1, 2, 3, 4, 0, "case 4 second");
        @(negedge hclk) begin pvt[5].volt_mv = V_UR; pvt[0].volt_mv = V_OK; end
        stall0 = n_stall;
        wait_idle(4000);
        chk(n_stall - stall0 > 100, "processor stalled again");
        check_map(4, 1, 2, 3, 5, 0, "case 4 third");
        @(negedge hclk) begin pvt[3].volt_mv = V_UR; pvt[5].volt_mv = V_LR; end
        stall0 = n_stall;
        wait_idle(4000);
        chk(n_stall == stall0, "no stall while another region is remapped");
        check_map(4, 1, 2, 0, 5, 3, "case 4 fourth");
        reading = 0;
      end
    join
    chk(rd_ok > 100, "processor reads continued");
    check_regions("case 4 fourth");

    $display("TB_COUNT remap=%0d stall_clocks=%0d interrupt=%0d queued_remap=%0d no_reliable_redundant=%0d",
             n_remap, n_stall, n_irq, n_queued, n_nored);
    chk(n_remap == 11, $sformatf("%0d remaps", n_remap));
    chk(n_stall > 0 && n_irq > 0 && n_queued > 0 && n_nored > 0, "every mechanism seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
