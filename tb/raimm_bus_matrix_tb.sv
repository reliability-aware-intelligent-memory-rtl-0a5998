// Testbench for raimm_bus_matrix with six memory blocks. Two AHB-Lite
// master models (processor and DMA) run pipelined transfer lists.
// Checks: random reads and writes over the whole window against a reference
// model; zero-wait pipelined reads and writes (n transfers in n+1 clocks);
// the error response outside the window; a locked block holds the processor
// (HREADY low) while other blocks still answer; a copy by the DMA port
// followed by the REMAP swap lets the held processor read finish with the
// same data from the new block, and the table shows the swap; the processor
// read strobes count the reads issued per block.
module raimm_bus_matrix_tb;
  import raimm_pkg::*;
  localparam int N = 6, W = 4096;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0][31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0][1:0]  htrans = '0;
  logic [1:0]       hwrite = '0, hready, hresp;
  logic lock = 0, remap = 0;
  logic [2:0] lock_a = 0, lock_b = 0, remap_a = 0, remap_b = 0;
  logic [N-1:0][2:0] map;
  logic [N-1:0] cpu_rd;
  logic [N-1:0] mem_rd_en, mem_wr_en;
  logic [N-1:0][11:0] mem_rd_addr, mem_wr_addr;
  logic [N-1:0][31:0] mem_rdata, mem_wdata;
  int rd_count [N];

  always #5 clk = ~clk;

  raimm_bus_matrix #(.N_MEM(N), .MEM_WORDS(W)) dut (.*);
  for (genvar i = 0; i < N; i++) begin : g_mem
    raimm_sram #(.WORDS(W)) u_mem (.clk, .rd_en(mem_rd_en[i]), .rd_addr(mem_rd_addr[i]),
      .rdata(mem_rdata[i]), .wr_en(mem_wr_en[i]), .wr_addr(mem_wr_addr[i]), .wdata(mem_wdata[i]));
  end

  always @(posedge clk) for (int i = 0; i < N; i++) if (cpu_rd[i]) rd_count[i]++;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %0t %s", $time, what); end
  endtask

  // Pipelined transfer list on master m; returns the clocks used.
  task automatic xfer(input int m, input logic [31:0] a[$], input bit wr[$],
                      input logic [31:0] wd[$], output logic [31:0] rd[$],
                      output bit err[$], output int cycles);
    int ai, got, fi;
    bit inflight;
    ai = 0; got = 0; inflight = 0; fi = 0; cycles = 0;
    rd = {}; err = {};
    while (got < a.size()) begin
      @(negedge clk);
      cycles++;
      haddr[m]  = (ai < a.size()) ? a[ai] : 32'h0;
      hwrite[m] = (ai < a.size()) ? wr[ai] : 1'b0;
      htrans[m] = (ai < a.size()) ? HTRANS_NONSEQ : HTRANS_IDLE;
      hwdata[m] = inflight ? wd[fi] : 32'h0;
      #1;
      if (hready[m]) begin
        if (inflight) begin rd.push_back(hrdata[m]); err.push_back(hresp[m]); got++; end
        inflight = (ai < a.size());
        fi = ai;
        if (ai < a.size()) ai++;
      end
    end
    @(negedge clk) htrans[m] = HTRANS_IDLE;
  endtask

  logic [31:0] refm [N*W];
  logic [31:0] a[$], wd[$], rd[$];
  bit wr[$], err[$];
  int cyc;

  initial begin
    for (int i = 0; i < N * W; i++) refm[i] = 'x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) chk(map[i] == 3'(i), "identity map after reset");

    // fill the whole window with pipelined writes, read it back
    a = {}; wr = {}; wd = {};
    for (int i = 0; i < N * W; i++) begin a.push_back(32'(4 * i)); wr.push_back(1); wd.push_back($urandom); refm[i] = wd[i]; end
    xfer(0, a, wr, wd, rd, err, cyc);
    chk(cyc == N * W + 1, $sformatf("zero-wait writes %0d clocks", cyc));
    wr = {}; foreach (a[i]) wr.push_back(0);
    for (int i = 0; i < N; i++) rd_count[i] = 0;
    xfer(0, a, wr, wd, rd, err, cyc);
    chk(cyc == N * W + 1, $sformatf("zero-wait reads %0d clocks", cyc));
    foreach (rd[i]) if (rd[i] !== refm[i]) chk(0, $sformatf("read back word %0d", i));
    checks++;
    for (int i = 0; i < N; i++) chk(rd_count[i] == W, "profiling strobes per block");

    // random mixed traffic
    a = {}; wr = {}; wd = {};
    for (int k = 0; k < 20000; k++) begin
      a.push_back(32'(4 * $urandom_range(0, N * W - 1)));
      wr.push_back($urandom_range(0, 1));
      wd.push_back($urandom);
    end
    xfer(0, a, wr, wd, rd, err, cyc);
    foreach (a[k]) begin
      if (wr[k]) refm[a[k] >> 2] = wd[k];
      else if (rd[k] !== refm[a[k] >> 2]) chk(0, $sformatf("random read %0d at %h", k, a[k]));
      else checks++;
    end

    // outside the window: two-cycle ERROR
    a = {32'(N * W * 4), 32'h0}; wr = {0, 0}; wd = {0, 0};
    xfer(0, a, wr, wd, rd, err, cyc);
    chk(err[0] == 1 && err[1] == 0 && rd[1] === refm[0], "error response then normal read");
    chk(cyc == 4, $sformatf("error adds one wait (%0d clocks)", cyc));

    // lock blocks 1 and 5: other blocks answer, block 1 holds the processor
    @(negedge clk) begin lock = 1; lock_a = 1; lock_b = 5; end
    a = {32'h8000, 32'h8004}; wr = {0, 0};
    xfer(0, a, wr, wd, rd, err, cyc);
    chk(cyc == 3 && rd[0] === refm[32'h8000 >> 2], "unlocked block is not held");
    fork
      begin : cpu
        logic [31:0] ca[$], crd[$], cwd[$];
        bit cwr[$], cerr[$];
        int ccyc;
        ca = {32'h4010, 32'h4014}; cwr = {0, 0}; cwd = {0, 0};
        xfer(0, ca, cwr, cwd, crd, cerr, ccyc);
        chk(ccyc > 200, $sformatf("processor held during the copy (%0d clocks)", ccyc));
        chk(crd[0] === refm[32'h4010 >> 2] && crd[1] === refm[32'h4014 >> 2], "held read gets the same data after remap");
      end
      begin : dma
        logic [31:0] da[$], drd[$], dwd[$];
        bit dwr[$], derr[$];
        int dcyc;
        // copy region 1 (block 1) to region 5 (block 5), 64 words
        da = {}; dwr = {}; dwd = {};
        for (int i = 0; i < 64; i++) begin da.push_back(32'h4000 + 4 * i); dwr.push_back(0); dwd.push_back(0); end
        xfer(1, da, dwr, dwd, drd, derr, dcyc);
        chk(dcyc == 65, "DMA not held by the lock");
        da = {}; dwr = {};
        for (int i = 0; i < 64; i++) begin da.push_back(32'h14000 + 4 * i); dwr.push_back(1); end
        xfer(1, da, dwr, drd, dwd, derr, dcyc);
        for (int i = 0; i < 64; i++) refm[(32'h14000 >> 2) + i] = refm[(32'h4000 >> 2) + i];
        repeat (100) @(posedge clk);
        @(negedge clk) begin remap = 1; remap_a = 1; remap_b = 5; end
        @(negedge clk) remap = 0;
        chk(map[1] == 3'd5 && map[5] == 3'd1, "table swapped");
        @(negedge clk) lock = 0;
      end
    join
    // region 5 is now block 1 with its old contents
    a = {32'h14000, 32'h4000}; wr = {0, 0};
    xfer(0, a, wr, wd, rd, err, cyc);
    chk(rd[0] === refm[32'h4000 >> 2] && rd[1] === refm[32'h4000 >> 2], "regions after the swap");
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
