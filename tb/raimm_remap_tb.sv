// Testbench for raimm_remap: an AHB-Lite slave model in the testbench
// records the writes. After `load`, exactly four word writes must arrive, in
// order, to the DMA source, destination, control and configuration
// registers, with the loaded addresses, the size rounded up to words, burst
// code 1 (4 beats) and the enable bit. With a zero-wait slave the sequence
// must end (done) five clocks after load; a slave inserting wait states must
// only stretch it.
module raimm_remap_tb;
  import raimm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] src_addr = 0, dst_addr = 0;
  logic [9:0] size_bytes = 0;
  logic [31:0] remap_src, remap_dst;
  logic [9:0] remap_size;
  logic busy, done;
  logic [31:0] haddr, hwdata;
  logic [1:0] htrans;
  logic hwrite, hready = 1, hresp = 0;
  logic [2:0] hsize, hburst;
  bit   waits = 0;

  always #5 clk = ~clk;

  raimm_remap #(.DMA_BASE(32'h0)) dut (.*);

  // slave model
  logic        dvalid = 0;
  logic [31:0] daddr;
  logic [31:0] got_addr [$];
  logic [31:0] got_data [$];
  always @(posedge clk) begin
    if (hready) begin
      if (dvalid) begin got_addr.push_back(daddr); got_data.push_back(hwdata); end
      dvalid <= htrans[1] && hwrite;
      daddr  <= haddr;
    end
  end
  always @(negedge clk) hready <= waits ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic run(input logic [31:0] s, input logic [31:0] d, input logic [9:0] sz, input int exp_cycles);
    int n;
    got_addr.delete(); got_data.delete();
    @(negedge clk) begin src_addr = s; dst_addr = d; size_bytes = sz; load = 1; end
    @(negedge clk) load = 0;
    n = 0;   // clocks counted from the edge that samples load
    while (!done && n < 100) begin @(posedge clk); #1; n++; end
    checks++;
    if (exp_cycles > 0 && n != exp_cycles) begin failures++; $display("FAIL took %0d clocks, expected %0d", n, exp_cycles); end
    checks++;
    if (remap_src != s || remap_dst != d || remap_size != sz) begin failures++; $display("FAIL remap registers"); end
    checks++;
    if (got_addr.size() != 4) begin failures++; $display("FAIL %0d writes", got_addr.size()); end
    else begin
      logic [31:0] ea[4], ed[4];
      ea = '{32'h0, 32'h4, 32'h8, 32'hC};
      ed = '{s, d, 32'h1000 | ((32'(sz) + 3) / 4), 32'h1};
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got_addr[i] != ea[i] || got_data[i] != ed[i]) begin
          failures++; $display("FAIL write %0d: %h <= %h, expected %h <= %h", i, got_addr[i], got_data[i], ea[i], ed[i]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(32'h4000, 32'h14000, 10'd64, 5);
    run(32'h0, 32'h10000, 10'd200, 5);
    run(32'hC000, 32'h4000, 10'd1, 5);
    waits = 1;
    run(32'h8000, 32'h14000, 10'd1023, 0);
    run(32'h8000, 32'h10000, 10'd12, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
