// raimm: the Reliability Aware Intelligent Memory Manager IP.
//
// Watches the process/voltage/temperature readings of N_MEM memory blocks,
// ranks the blocks and, when the highest-ranked usable block becomes Less
// Reliable or Unreliable, has its contents copied by the DMA into a Reliable
// redundant block and the two blocks swapped in the bus matrix's address map.
// Sub-blocks, as in the document's functional block diagram:
//   raimm_rel_template  reference ranges (one ROM, shared)
//   raimm_rel_compute   one per block: sensor readings -> status (2 clocks)
//   raimm_mem_reg       one per block: status register and read profiling
//   raimm_ranking       ranking table (status, then profiling count)
//   raimm_trigger       the controller: S0_IDLE .. S4_USRU
//   raimm_remap         AHB master that programs the DMA
//   raimm_regs          APB register module (APB clock)
//   raimm_sync          crossings between the APB and AHB clocks
// Everything except raimm_regs runs on the AHB clock `hclk`; the document
// runs the APB clock at half its rate, but the crossings do not rely on any
// ratio. Outputs to the bus matrix: LOCK with the two blocks concerned, and
// REMAP (one cycle) with the same pair. `irq` is the system interrupt.
// Lint notes: read counter 1, the warning counters, the rank positions, the
// stored control, interrupt-enable and interrupt registers (APB side), the
// remap module's Table-3.3 registers and status, and the per-block colour
// outputs are produced but not used: the document lists these registers but
// gives them no offset or consumer, so synthesis removes what nothing reads.
// The resets also appear in the `disable iff` of the sub-blocks' assertions,
// which lint reports as a reset used both asynchronously and synchronously;
// it is only the assertions' disable condition.
module raimm
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM         = 6,
  parameter int unsigned DSR_W         = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  parameter logic [31:0] DMA_BASE      = 32'h0000_0000,
  parameter string       TEMPLATE_FILE = "rtl/raimm_rel_template.hex",
  localparam int unsigned IW           = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                     hclk,
  input  logic                     hresetn,
  input  logic                     pclk,
  input  logic                     presetn,
  // APB slave
  input  logic                     psel,
  input  logic                     penable,
  input  logic                     pwrite,
  input  logic [11:0]              paddr,
  input  logic [31:0]              pwdata,
  output logic [31:0]              prdata,
  output logic                     pready,
  output logic                     pslverr,
  // sensors and profiling
  input  pvt_t [N_MEM-1:0]         pvt,
  input  logic [N_MEM-1:0]         mem_rd,
  // AHB master to the DMA
  output logic [31:0]              haddr,
  output logic [1:0]               htrans,
  output logic                     hwrite,
  output logic [2:0]               hsize,
  output logic [2:0]               hburst,
  output logic [31:0]              hwdata,
  input  logic                     hready,
  input  logic                     hresp,
  input  logic                     dma_tc,
  // to the bus matrix
  output logic                     lock,
  output logic                     remap,
  output logic [IW-1:0]            src_mem,
  output logic [IW-1:0]            dst_mem,
  // status
  output logic [N_MEM-1:0][2:0]    mem_status,
  output logic [2:0]               trig_state,
  output logic                     irq
);

  template_t                tmpl;
  logic [N_MEM-1:0][2:0]    rc_status;
  logic [N_MEM-1:0][31:0]   rd_cnt1, rd_cnt2, warn_cnt;
  logic [N_MEM-1:0][IW-1:0] rank_list, rank_pos;
  // AHB-clock copies of the registers
  logic                     enable_h, upd_ack_h;
  logic [9:0]               prescaler_h;
  logic [N_MEM-1:0]         ur_h;
  logic [N_MEM-1:0][31:0]   sar_h;
  logic [N_MEM-1:0][DSR_W-1:0] dsr_h;
  // APB-clock side
  logic                     enable_p;
  logic [9:0]               prescaler_p;
  logic [31:0]              ctrl_p, ier_p, ir_p;
  logic [N_MEM-1:0]         ur_p;
  logic [N_MEM-1:0][31:0]   sar_p;
  logic [N_MEM-1:0][DSR_W-1:0] dsr_p;
  logic [N_MEM-1:0][2:0]    status_p;
  logic                     no_red_p, upd_pulse_p;
  logic [IW-1:0]            upd_src_p, upd_dst_p;
  // trigger
  logic                     freeze, load, upd_req, no_red;
  logic [31:0]              src_addr, dst_addr;
  logic [DSR_W-1:0]         size_bytes;
  logic [31:0]              remap_src, remap_dst;
  logic [DSR_W-1:0]         remap_size;
  logic                     remap_busy, remap_done;

  raimm_rel_template #(.TEMPLATE_FILE(TEMPLATE_FILE)) u_template (.tmpl(tmpl));

  for (genvar i = 0; i < N_MEM; i++) begin : g_mem
    color_e cp, cv, ct;
    raimm_rel_compute u_rc (
      .clk(hclk), .rst_n(hresetn), .tmpl(tmpl), .pvt(pvt[i]),
      .col_p(cp), .col_v(cv), .col_t(ct), .status(rc_status[i])
    );
    raimm_mem_reg u_mr (
      .clk(hclk), .rst_n(hresetn), .enable(enable_h), .status_in(rc_status[i]),
      .rd_strobe(mem_rd[i]), .prescaler(prescaler_h), .status(mem_status[i]),
      .rd_cnt1(rd_cnt1[i]), .rd_cnt2(rd_cnt2[i]), .warn_cnt(warn_cnt[i])
    );
  end

  raimm_ranking #(.N_MEM(N_MEM)) u_rank (
    .clk(hclk), .rst_n(hresetn), .freeze(freeze), .status(mem_status),
    .profile(rd_cnt2), .rank_list(rank_list), .rank_pos(rank_pos)
  );

  raimm_trigger #(.N_MEM(N_MEM), .DSR_W(DSR_W)) u_trig (
    .clk(hclk), .rst_n(hresetn), .enable(enable_h), .status(mem_status),
    .ur(ur_h), .sar(sar_h), .dsr(dsr_h), .rank_list(rank_list),
    .dma_tc(dma_tc), .upd_ack(upd_ack_h), .state(trig_state), .freeze(freeze),
    .load(load), .src_addr(src_addr), .dst_addr(dst_addr), .size_bytes(size_bytes),
    .lock(lock), .src_mem(src_mem), .dst_mem(dst_mem), .remap(remap),
    .upd_req(upd_req), .no_red(no_red)
  );

  raimm_remap #(.DMA_BASE(DMA_BASE), .DSR_W(DSR_W)) u_remap (
    .clk(hclk), .rst_n(hresetn), .load(load), .src_addr(src_addr),
    .dst_addr(dst_addr), .size_bytes(size_bytes), .remap_src(remap_src),
    .remap_dst(remap_dst), .remap_size(remap_size), .busy(remap_busy),
    .done(remap_done), .haddr(haddr), .htrans(htrans), .hwrite(hwrite),
    .hsize(hsize), .hburst(hburst), .hwdata(hwdata), .hready(hready), .hresp(hresp)
  );

  raimm_sync #(.N_MEM(N_MEM), .DSR_W(DSR_W)) u_sync (
    .hclk(hclk), .hresetn(hresetn), .pclk(pclk), .presetn(presetn),
    .status_h(mem_status), .no_red_h(no_red), .upd_req_h(upd_req),
    .upd_src_h(src_mem), .upd_dst_h(dst_mem), .upd_ack_h(upd_ack_h),
    .enable_h(enable_h), .prescaler_h(prescaler_h), .ur_h(ur_h), .sar_h(sar_h),
    .dsr_h(dsr_h), .status_p(status_p), .no_red_p(no_red_p),
    .upd_pulse_p(upd_pulse_p), .upd_src_p(upd_src_p), .upd_dst_p(upd_dst_p),
    .enable_p(enable_p), .prescaler_p(prescaler_p), .ur_p(ur_p), .sar_p(sar_p),
    .dsr_p(dsr_p)
  );

  raimm_regs #(.N_MEM(N_MEM), .DSR_W(DSR_W)) u_regs (
    .pclk(pclk), .presetn(presetn), .psel(psel), .penable(penable),
    .pwrite(pwrite), .paddr(paddr), .pwdata(pwdata), .prdata(prdata),
    .pready(pready), .pslverr(pslverr), .status(status_p), .no_red(no_red_p),
    .upd_pulse(upd_pulse_p), .upd_src(upd_src_p), .upd_dst(upd_dst_p),
    .enable(enable_p), .prescaler(prescaler_p), .ctrl(ctrl_p), .ier(ier_p),
    .ir(ir_p), .sar(sar_p), .dsr(dsr_p), .ur(ur_p), .irq(irq)
  );

endmodule
