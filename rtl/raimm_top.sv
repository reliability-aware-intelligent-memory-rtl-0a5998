// raimm_top: memory subsystem protected by RAIMM.
//
// N_MEM split system memory blocks (16 KB each) sit behind a secondary bus
// matrix that the processor reaches through one AHB-Lite port. The RAIMM IP
// (configured over APB) watches each block's sensor readings; when a usable
// block degrades it programs the DMA, which copies the block's valid data
// into a Reliable redundant block over the bus matrix, after which the bus
// matrix swaps the two blocks in its address map. Processor accesses to the
// two blocks wait (HREADY low) while this happens; others proceed.
// The processor, interrupt controller, primary interconnect and the PVT
// sensors are outside: their signals are ports here. Address map of the
// processor port: region j at BASE_ADDR + j*16 KB, j = 0 .. N_MEM-1. The DMA
// configuration port is private to RAIMM. Two clocks: hclk (AHB) for all but
// the register module, pclk (APB; half of hclk in the document's system).
// Lint notes: HSIZE and HBURST of the processor port are accepted but not
// needed (word transfers only; bursts are handled as single transfers);
// the DMA configuration read data and `busy` are unused because RAIMM only
// writes the DMA. The resets also appear in the `disable iff` of the
// sub-blocks' assertions, which lint reports as a reset used both
// asynchronously and synchronously; it is only the assertions' disable
// condition.
// Timing (zero-wait memories): a sensor change leads to the first DMA
// register write 7 hclk cycles later (6 if the block was already ranked
// first); programming the DMA takes 5; the copy takes 10 cycles per 4 words;
// REMAP follows transfer complete by one cycle and the controller is idle
// again 11-13 cycles after that, with the registers updated.
module raimm_top
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM         = 6,
  parameter int unsigned DSR_W         = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  parameter int unsigned MEM_WORDS     = 4096,
  parameter logic [31:0] BASE_ADDR     = 32'h0000_0000,
  parameter string       TEMPLATE_FILE = "rtl/raimm_rel_template.hex",
  localparam int unsigned IW           = (N_MEM > 1) ? $clog2(N_MEM) : 1,
  localparam int unsigned AW           = $clog2(MEM_WORDS)
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic                  pclk,
  input  logic                  presetn,
  // APB slave (RAIMM registers)
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [11:0]           paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // AHB-Lite slave for the processor (memory window)
  input  logic [31:0]           haddr,
  input  logic [1:0]            htrans,
  input  logic                  hwrite,
  input  logic [2:0]            hsize,
  input  logic [2:0]            hburst,
  input  logic [31:0]           hwdata,
  output logic [31:0]           hrdata,
  output logic                  hready,
  output logic                  hresp,
  // PVT sensor readings, one set per memory block
  input  pvt_t [N_MEM-1:0]      pvt,
  // system interrupt and observation
  output logic                  irq,
  output logic [N_MEM-1:0][2:0] mem_status,
  output logic [N_MEM-1:0][IW-1:0] region_map,
  output logic [2:0]            trig_state,
  output logic                  lock
);

  // RAIMM -> DMA configuration link
  logic [31:0] c_haddr, c_hwdata, c_hrdata;
  logic [1:0]  c_htrans;
  logic        c_hwrite, c_hready, c_hresp;
  logic [2:0]  c_hsize, c_hburst;
  // DMA master
  logic [31:0] d_haddr, d_hwdata, d_hrdata;
  logic [1:0]  d_htrans;
  logic        d_hwrite, d_hready, d_hresp;
  logic [2:0]  d_hsize, d_hburst;
  logic        dma_tc, dma_busy;
  // RAIMM -> bus matrix
  logic          remap;
  logic [IW-1:0] src_mem, dst_mem;
  logic [N_MEM-1:0] cpu_rd;
  // memories
  logic [N_MEM-1:0]         mem_rd_en, mem_wr_en;
  logic [N_MEM-1:0][AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [N_MEM-1:0][31:0]   mem_rdata, mem_wdata;

  raimm #(.N_MEM(N_MEM), .DSR_W(DSR_W), .TEMPLATE_FILE(TEMPLATE_FILE)) u_raimm (
    .hclk(hclk), .hresetn(hresetn), .pclk(pclk), .presetn(presetn),
    .psel(psel), .penable(penable), .pwrite(pwrite), .paddr(paddr),
    .pwdata(pwdata), .prdata(prdata), .pready(pready), .pslverr(pslverr),
    .pvt(pvt), .mem_rd(cpu_rd),
    .haddr(c_haddr), .htrans(c_htrans), .hwrite(c_hwrite), .hsize(c_hsize),
    .hburst(c_hburst), .hwdata(c_hwdata), .hready(c_hready), .hresp(c_hresp),
    .dma_tc(dma_tc), .lock(lock), .remap(remap), .src_mem(src_mem),
    .dst_mem(dst_mem), .mem_status(mem_status), .trig_state(trig_state), .irq(irq)
  );

  raimm_dma u_dma (
    .clk(hclk), .rst_n(hresetn),
    .s_haddr(c_haddr), .s_htrans(c_htrans), .s_hwrite(c_hwrite),
    .s_hwdata(c_hwdata), .s_hrdata(c_hrdata), .s_hready(c_hready), .s_hresp(c_hresp),
    .m_haddr(d_haddr), .m_htrans(d_htrans), .m_hwrite(d_hwrite), .m_hsize(d_hsize),
    .m_hburst(d_hburst), .m_hwdata(d_hwdata), .m_hrdata(d_hrdata),
    .m_hready(d_hready), .m_hresp(d_hresp), .tc(dma_tc), .busy(dma_busy)
  );

  logic [1:0][31:0] bm_hrdata;
  logic [1:0]       bm_hready, bm_hresp;

  raimm_bus_matrix #(.N_MEM(N_MEM), .MEM_WORDS(MEM_WORDS), .BASE_ADDR(BASE_ADDR)) u_bm (
    .clk(hclk), .rst_n(hresetn),
    .haddr({d_haddr, haddr}), .htrans({d_htrans, htrans}), .hwrite({d_hwrite, hwrite}),
    .hwdata({d_hwdata, hwdata}), .hrdata(bm_hrdata), .hready(bm_hready), .hresp(bm_hresp),
    .lock(lock), .lock_a(src_mem), .lock_b(dst_mem),
    .remap(remap), .remap_a(src_mem), .remap_b(dst_mem),
    .map(region_map), .cpu_rd(cpu_rd),
    .mem_rd_en(mem_rd_en), .mem_rd_addr(mem_rd_addr), .mem_rdata(mem_rdata),
    .mem_wr_en(mem_wr_en), .mem_wr_addr(mem_wr_addr), .mem_wdata(mem_wdata)
  );

  assign hrdata   = bm_hrdata[0];
  assign hready   = bm_hready[0];
  assign hresp    = bm_hresp[0];
  assign d_hrdata = bm_hrdata[1];
  assign d_hready = bm_hready[1];
  assign d_hresp  = bm_hresp[1];

  for (genvar i = 0; i < N_MEM; i++) begin : g_sram
    raimm_sram #(.WORDS(MEM_WORDS)) u_sram (
      .clk(hclk), .rd_en(mem_rd_en[i]), .rd_addr(mem_rd_addr[i]), .rdata(mem_rdata[i]),
      .wr_en(mem_wr_en[i]), .wr_addr(mem_wr_addr[i]), .wdata(mem_wdata[i])
    );
  end

endmodule
