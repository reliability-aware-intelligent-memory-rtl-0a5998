// Testbench for raimm_regs: APB writes and reads of every register of the
// map, the memory status packing, interrupt setting by hardware, clearing by
// the processor (write 1 to clear), the interrupt enable gating of irq, the
// hardware swap after a remap and the error response to unmapped offsets.
module raimm_regs_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic pclk = 0, presetn = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = 0;
  logic [31:0] pwdata = 0, prdata;
  logic pready, pslverr;
  logic [N-1:0][2:0] status = '0;
  logic no_red = 0, upd_pulse = 0;
  logic [2:0] upd_src = 0, upd_dst = 0;
  logic enable;
  logic [9:0] prescaler;
  logic [31:0] ctrl, ier, ir;
  logic [N-1:0][31:0] sar;
  logic [N-1:0][9:0] dsr;
  logic [N-1:0] ur;
  logic irq;

  always #6 pclk = ~pclk;

  raimm_regs #(.N_MEM(N)) dut (.*);

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge pclk); psel = 1; pwrite = 1; paddr = a; pwdata = d; penable = 0;
    @(negedge pclk); penable = 1;
    @(negedge pclk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d, output logic err);
    @(negedge pclk); psel = 1; pwrite = 0; paddr = a; penable = 0;
    @(negedge pclk); penable = 1;
    @(posedge pclk); d = prdata; err = pslverr;
    @(negedge pclk); psel = 0; penable = 0;
  endtask

  task automatic expect_rd(input logic [11:0] a, input logic [31:0] e, input string what);
    logic [31:0] d; logic err;
    rd(a, d, err);
    checks++;
    if (d !== e || err) begin failures++; $display("FAIL %s @%h: got %h expected %h err=%b", what, a, d, e, err); end
  endtask

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [31:0] d; logic err;
    repeat (2) @(posedge pclk);
    presetn = 1;
    expect_rd(REG_CONFG, 0, "reset confg");
    expect_rd(REG_IR, 0, "reset ir");
    expect_rd(12'h100, 0, "reset sar0");
    wr(REG_CONFG, 32'hFFFF_FFFF); expect_rd(REG_CONFG, 32'h1, "confg");
    wr(REG_PR, 32'hFFFF_FFFF);    expect_rd(REG_PR, 32'h3FF, "prescaler");
    wr(REG_PR, 32'd5);            expect_rd(REG_PR, 32'd5, "prescaler 5");
    wr(REG_CR, 32'h1234_5678);    expect_rd(REG_CR, 32'h1234_5678, "control");
    wr(REG_IER, 32'hFFFF_FFFF);   expect_rd(REG_IER, 32'h8000_003F, "ier mask");
    for (int i = 0; i < N; i++) begin
      wr(12'h100 + 12'(4*i), 32'h4000 * i);
      wr(12'h200 + 12'(4*i), 32'hFFFF_FC00 | 32'(16*i + 64));
    end
    for (int i = 0; i < N; i++) begin
      expect_rd(12'h100 + 12'(4*i), 32'h4000 * i, "sar");
      expect_rd(12'h200 + 12'(4*i), 32'(16*i + 64), "dsr");
    end
    wr(REG_UR, 32'hFFFF_FF0F); expect_rd(REG_UR, 32'h0F, "use reg");
    chk(enable && prescaler == 5 && ur == 6'h0F && sar[3] == 32'hC000, "register outputs");
    // unmapped offset
    rd(12'h040, d, err); chk(err && d == 0, "unmapped -> PSLVERR");
    rd(12'h118, d, err); chk(err, "SAR beyond N -> PSLVERR");
    // status packing and interrupt setting
    @(negedge pclk); status[2] = REL_UR; status[4] = REL_LR;
    repeat (2) @(posedge pclk);
    expect_rd(REG_MSR0, 32'(3'(REL_LR)) << 12 | 32'(3'(REL_UR)) << 6, "msr packing");
    expect_rd(REG_IR, 32'h14, "ir set for blocks 2 and 4");
    chk(irq, "irq with enabled bits");
    wr(REG_IR, 32'h4);  expect_rd(REG_IR, 32'h10, "w1c bit 2");
    wr(REG_IR, 32'h0);  expect_rd(REG_IR, 32'h10, "write 0 keeps");
    wr(REG_IER, 32'h0F); chk(!irq, "irq masked by ier");
    wr(REG_IER, 32'h3F);  chk(irq, "irq unmasked");
    wr(REG_IR, 32'hFFFF_FFFF); expect_rd(REG_IR, 0, "all cleared");
    chk(!irq, "irq low after clear");
    // improving status does not set, worsening LR->UR sets
    @(negedge pclk); status[4] = REL_R; repeat (2) @(posedge pclk);
    expect_rd(REG_IR, 0, "improve no set");
    @(negedge pclk); status[4] = REL_LR; repeat (2) @(posedge pclk);
    @(negedge pclk); status[4] = REL_UR; repeat (2) @(posedge pclk);
    expect_rd(REG_IR, 32'h10, "worsen sets");
    // no reliable redundant -> bit 31
    @(negedge pclk); no_red = 1; repeat (2) @(posedge pclk); no_red = 0;
    expect_rd(REG_IR, 32'h8000_0010, "bit 31");
    wr(REG_IR, 32'hFFFF_FFFF);
    // disabled: nothing is set
    wr(REG_CONFG, 0);
    @(negedge pclk); status[0] = REL_UR; repeat (2) @(posedge pclk);
    expect_rd(REG_IR, 0, "disabled no set");
    // hardware swap after remap: blocks 1 and 5
    @(negedge pclk); upd_src = 1; upd_dst = 5; upd_pulse = 1;
    @(negedge pclk); upd_pulse = 0;
    expect_rd(12'h104, 32'h14000, "sar1 swapped");
    expect_rd(12'h114, 32'h4000, "sar5 swapped");
    expect_rd(12'h204, 32'd144, "dsr1 swapped");
    expect_rd(12'h214, 32'd80, "dsr5 swapped");
    expect_rd(REG_UR, 32'h2D, "use bits swapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
