// Testbench for raimm_trigger: walks the state machine through the
// document's sequence (S0 -> S1 -> S2 -> S3 -> S4 -> S0) for the first
// remaps of the document's test case 1, checks the chosen source and
// destination blocks, addresses and size, the one-cycle S1 and S3 states,
// LOCK from S2 to S4, the REMAP pulse, the update request/acknowledge
// handshake, the "no reliable redundant block" alarm and the enable.
module raimm_trigger_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, dma_tc = 0, upd_ack = 0;
  logic [N-1:0][2:0] status = '0;
  logic [N-1:0] ur = 6'b001111;
  logic [N-1:0][31:0] sar;
  logic [N-1:0][9:0] dsr;
  logic [N-1:0][2:0] rank_list;
  logic [2:0] state;
  logic freeze, load, lock, remap, upd_req, no_red;
  logic [31:0] src_addr, dst_addr;
  logic [9:0] size_bytes;
  logic [2:0] src_mem, dst_mem;

  always #5 clk = ~clk;

  raimm_trigger #(.N_MEM(N)) dut (.*);

  // ranking stand-in: worse status first, lower index on ties
  always_comb begin
    int k;
    k = 0;
    for (int s = 7; s >= 0; s--)
      for (int i = 0; i < N; i++)
        if (int'(status[i]) == s) begin rank_list[k] = 3'(i); k++; end
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t %s (state %0d)", $time, what, state); end
  endtask

  // One remap, expecting blocks s -> d.
  task automatic remap_cycle(input int s, input int d, input int dma_cycles);
    int n;
    n = 0;
    while (state == 0 && n < 10) begin @(posedge clk); #1; n++; end
    chk(n == 1, "S0 -> S1 one clock after the alarm");
    chk(state == 1 && load && !lock, "S1_RU with load");
    chk(src_mem == 3'(s) && dst_mem == 3'(d), $sformatf("pair %0d->%0d got %0d->%0d", s, d, src_mem, dst_mem));
    chk(src_addr == sar[s] && dst_addr == sar[d] && size_bytes == dsr[s], "addresses and size");
    @(posedge clk); #1;
    chk(state == 2 && lock && !load && freeze, "S2_DT with lock");
    repeat (dma_cycles) begin @(posedge clk); #1; chk(state == 2 && lock, "S2 waits for tc"); end
    @(negedge clk) dma_tc = 1;
    @(posedge clk); #1; dma_tc = 0;
    chk(state == 3 && remap && lock, "S3_REMAP pulse");
    @(posedge clk); #1;
    chk(state == 4 && !remap && upd_req && lock, "S4_USRU request");
    repeat (5) begin @(posedge clk); #1; chk(state == 4 && upd_req, "S4 waits for ack"); end
    // register module swaps the use bits, then acknowledges
    @(negedge clk) begin ur[s] = 1'b0; ur[d] = 1'b1; upd_ack = 1; end
    @(posedge clk); #1;
    chk(state == 0 && !lock && !upd_req, "back to S0");
    repeat (3) begin @(posedge clk); #1; chk(state == 0, "waits while ack high"); end
    @(negedge clk) upd_ack = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin sar[i] = 32'h4000 * i; dsr[i] = 10'd64; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disabled: an alarm does nothing
    @(negedge clk) status[1] = REL_UR;
    repeat (5) begin @(posedge clk); #1; chk(state == 0 && !lock, "disabled stays idle"); end
    @(negedge clk) begin status[1] = REL_R; enable = 1; end
    repeat (5) begin @(posedge clk); #1; chk(state == 0 && !no_red, "all reliable stays idle"); end
    // test case 1, second condition: M1 unreliable, M4 and M5 reliable redundant -> M5
    @(negedge clk) status[1] = REL_UR;
    remap_cycle(1, 5, 7);
    // third condition: M0 UR, M3 LR, M1 (now redundant) UR -> M0 to M4
    @(negedge clk) begin status[0] = REL_UR; status[3] = REL_LR; status[1] = REL_LR; end
    remap_cycle(0, 4, 3);
    // M3 still less reliable, redundants M0 (UR) and M1 (LR): no target -> alarm
    repeat (4) @(posedge clk); #1;
    chk(state == 0 && no_red, "no reliable redundant block");
    // fourth condition: M0 and M1 reliable again -> M3 to M1 (highest index)
    @(negedge clk) begin status[0] = REL_R; status[1] = REL_R; end
    remap_cycle(3, 1, 20);
    @(negedge clk) status[3] = REL_LR;   // now redundant: no alarm
    repeat (5) begin @(posedge clk); #1; chk(state == 0 && !lock && !no_red, "redundant LR ignored"); end
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
