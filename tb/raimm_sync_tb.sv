// Testbench for raimm_sync: with the APB clock at half the AHB clock (as in
// the document's system) and then at an unrelated ratio, a status change
// must reach the APB side within a few cycles and never torn; the
// register-update request must produce exactly one update pulse with the
// right block pair, and the acknowledge must reach the AHB side together
// with the register values written on the APB side in that same cycle.
module raimm_sync_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic hclk = 0, pclk = 0, hresetn = 0, presetn = 0;
  int hhalf = 3, phalf = 6;
  logic [N-1:0][2:0] status_h = '0;
  logic no_red_h = 0, upd_req_h = 0;
  logic [2:0] upd_src_h = 0, upd_dst_h = 0;
  logic upd_ack_h, enable_h;
  logic [9:0] prescaler_h;
  logic [N-1:0] ur_h;
  logic [N-1:0][31:0] sar_h;
  logic [N-1:0][9:0] dsr_h;
  logic [N-1:0][2:0] status_p;
  logic no_red_p, upd_pulse_p;
  logic [2:0] upd_src_p, upd_dst_p;
  logic enable_p = 0;
  logic [9:0] prescaler_p = 0;
  logic [N-1:0] ur_p = '0;
  logic [N-1:0][31:0] sar_p = '0;
  logic [N-1:0][9:0] dsr_p = '0;
  int pulses = 0;

  always #(hhalf) hclk = ~hclk;
  always #(phalf) pclk = ~pclk;

  raimm_sync #(.N_MEM(N)) dut (.*);

  // APB-side responder: on the update pulse, swap use bits and SARs.
  always @(posedge pclk) if (upd_pulse_p) begin
    pulses++;
    ur_p[upd_src_p] <= ur_p[upd_dst_p];
    ur_p[upd_dst_p] <= ur_p[upd_src_p];
    sar_p[upd_src_p] <= sar_p[upd_dst_p];
    sar_p[upd_dst_p] <= sar_p[upd_src_p];
  end

  // status must only ever show values that were driven
  logic [N-1:0][2:0] prev_h;
  always @(posedge pclk) if (presetn && status_p != status_h && status_p != prev_h && status_p != '0) begin
    failures++; $display("FAIL torn status %h", status_p);
  end

  task automatic one_round(input int src, input int dst);
    int n;
    logic [31:0] old_src_sar;
    old_src_sar = sar_h[src];
    @(negedge hclk); prev_h = status_h; status_h[src] = REL_UR;
    n = 0;
    while (status_p[src] != REL_UR && n < 50) begin @(posedge pclk); n++; end
    checks++; if (n >= 10) begin failures++; $display("FAIL status slow %0d", n); end
    pulses = 0;
    @(negedge hclk); upd_src_h = 3'(src); upd_dst_h = 3'(dst); upd_req_h = 1;
    n = 0;
    while (!upd_ack_h && n < 100) begin @(posedge hclk); n++; end
    checks++; if (n >= 30) begin failures++; $display("FAIL ack slow %0d", n); end
    #1;
    checks++;
    if (ur_h[src] != 1'b0 || ur_h[dst] != 1'b1 || sar_h[dst] != old_src_sar) begin
      failures++; $display("FAIL registers not updated with ack: ur=%b", ur_h);
    end
    @(negedge hclk); upd_req_h = 0;
    n = 0;
    while (upd_ack_h && n < 100) begin @(posedge hclk); n++; end
    checks++; if (n >= 30) begin failures++; $display("FAIL ack not dropping"); end
    checks++; if (pulses != 1) begin failures++; $display("FAIL %0d update pulses", pulses); end
    // restore for the next round
    @(negedge hclk); prev_h = status_h; status_h[src] = REL_R;
    repeat (12) @(posedge pclk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) sar_p[i] = 32'h4000 * i;
    ur_p = 6'b001111;
    enable_p = 1; prescaler_p = 10'd7;
    repeat (3) @(posedge pclk);
    hresetn = 1; presetn = 1;
    repeat (10) @(posedge hclk);
    checks++;
    if (!enable_h || prescaler_h != 7 || ur_h != 6'b001111) begin failures++; $display("FAIL config not across"); end
    one_round(1, 5);    // src usable 1 -> redundant 5
    one_round(5, 4);    // 5 is now usable
    // unrelated clock ratio
    phalf = 7; hhalf = 3;
    one_round(0, 1);
    one_round(1, 0);
    @(negedge hclk); no_red_h = 1;
    repeat (8) @(posedge pclk);
    checks++; if (!no_red_p) begin failures++; $display("FAIL no_red not across"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
