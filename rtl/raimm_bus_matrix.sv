// raimm_bus_matrix: secondary AHB bus matrix between the processor, the
// RAIMM DMA and the split memory blocks.
//
// Two AHB-Lite slave ports (master 0: processor side, master 1: DMA) reach
// N_MEM memory blocks. The address window BASE_ADDR .. BASE_ADDR +
// N_MEM*MEM_WORDS*4 is cut into N_MEM regions A0..A(N-1) of one block each;
// a remap table says which block Mk serves region Aj (reset: Aj -> Mj). A
// REMAP pulse swaps the two blocks `remap_a` and `remap_b` in the table, so
// the region formerly served by one is served by the other: this is the
// address-decoder remapping the document places in the bus matrix. While
// LOCK is high, processor transfers to blocks `lock_a` or `lock_b` are held
// in their data phase (HREADY low) and are decoded again with the new table
// once LOCK drops, so the processor continues at the same address on the new
// block. Reads are issued to the memory in the address phase when possible
// (zero wait states) and in the data phase otherwise (one wait state);
// writes are done in the data phase. Addresses outside the window get a
// two-cycle ERROR response. Only word transfers are supported. The DMA is
// never held; the two masters must not use one block in the same cycle,
// which RAIMM guarantees by the lock (checked by an assertion).
// `cpu_rd` flags each processor read issued to a block (access profiling).
// Lint notes: the reset also appears in the `disable iff` of the assertions,
// which lint reports as a reset used both asynchronously and synchronously;
// it is only the assertion's disable condition.
module raimm_bus_matrix
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM     = 6,
  parameter int unsigned MEM_WORDS = 4096,
  parameter logic [31:0] BASE_ADDR = 32'h0000_0000,
  localparam int unsigned IW       = (N_MEM > 1) ? $clog2(N_MEM) : 1,
  localparam int unsigned AW       = $clog2(MEM_WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // master ports (index 0 processor, 1 DMA)
  input  logic [1:0][31:0]         haddr,
  input  logic [1:0][1:0]          htrans,
  input  logic [1:0]               hwrite,
  input  logic [1:0][31:0]         hwdata,
  output logic [1:0][31:0]         hrdata,
  output logic [1:0]               hready,
  output logic [1:0]               hresp,
  // RAIMM control
  input  logic                     lock,
  input  logic [IW-1:0]            lock_a,
  input  logic [IW-1:0]            lock_b,
  input  logic                     remap,
  input  logic [IW-1:0]            remap_a,
  input  logic [IW-1:0]            remap_b,
  output logic [N_MEM-1:0][IW-1:0] map,       // block serving region j
  output logic [N_MEM-1:0]         cpu_rd,
  // memory block ports
  output logic [N_MEM-1:0]         mem_rd_en,
  output logic [N_MEM-1:0][AW-1:0] mem_rd_addr,
  input  logic [N_MEM-1:0][31:0]   mem_rdata,
  output logic [N_MEM-1:0]         mem_wr_en,
  output logic [N_MEM-1:0][AW-1:0] mem_wr_addr,
  output logic [N_MEM-1:0][31:0]   mem_wdata
);

  localparam logic [31:0] WINDOW = 32'(N_MEM) * 32'(MEM_WORDS) * 32'd4;

  // data-phase state per master
  logic [1:0]          dp_valid, dp_write, dp_err, err_2nd, rd_pend;
  logic [1:0][31:0]    dp_addr;
  logic [1:0][IW-1:0]  rd_mem_q;

  // per-master decode results
  logic [1:0]          a_acc, a_ok, a_blk, d_blk, a_rd_issue, d_rd_issue, d_wr_issue;
  logic [1:0][IW-1:0]  a_mem, d_mem;

  function automatic logic in_window(input logic [31:0] a);
    return (a - BASE_ADDR) < WINDOW;   // below BASE_ADDR wraps to a large value
  endfunction

  function automatic logic [IW-1:0] region_of(input logic [31:0] a);
    return IW'((a - BASE_ADDR) >> (AW + 2));
  endfunction

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      a_ok[m]  = in_window(haddr[m]);
      a_mem[m] = map[region_of(haddr[m])];
      a_blk[m] = (m == 0) && lock && (a_mem[m] == lock_a || a_mem[m] == lock_b);
      a_acc[m] = htrans[m][1] && hready[m];
      d_mem[m] = map[region_of(dp_addr[m])];
      d_blk[m] = (m == 0) && lock && (d_mem[m] == lock_a || d_mem[m] == lock_b);
    end
  end

  // HREADY / HRESP / HRDATA and issue decisions
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      hready[m]     = 1'b1;
      hresp[m]      = 1'b0;
      hrdata[m]     = mem_rdata[rd_mem_q[m]];
      d_rd_issue[m] = 1'b0;
      d_wr_issue[m] = 1'b0;
      if (dp_valid[m]) begin
        if (dp_err[m]) begin
          hresp[m]  = 1'b1;
          hready[m] = err_2nd[m];
        end else if (dp_write[m]) begin
          hready[m]     = !d_blk[m];
          d_wr_issue[m] = !d_blk[m];
        end else if (!rd_pend[m]) begin
          hready[m]     = 1'b0;
          d_rd_issue[m] = !d_blk[m];
        end
      end
      a_rd_issue[m] = a_acc[m] && !hwrite[m] && a_ok[m] && !a_blk[m];
    end
  end

  // memory port steering (the DMA, master 1, takes precedence)
  always_comb begin
    mem_rd_en   = '0;
    mem_rd_addr = '0;
    mem_wr_en   = '0;
    mem_wr_addr = '0;
    mem_wdata   = '0;
    cpu_rd      = '0;
    for (int m = 0; m < 2; m++) begin
      if (a_rd_issue[m]) begin
        mem_rd_en[a_mem[m]]   = 1'b1;
        mem_rd_addr[a_mem[m]] = haddr[m][AW+1:2];
        if (m == 0) cpu_rd[a_mem[m]] = 1'b1;
      end
      if (d_rd_issue[m]) begin
        mem_rd_en[d_mem[m]]   = 1'b1;
        mem_rd_addr[d_mem[m]] = dp_addr[m][AW+1:2];
        if (m == 0) cpu_rd[d_mem[m]] = 1'b1;
      end
      if (d_wr_issue[m]) begin
        mem_wr_en[d_mem[m]]   = 1'b1;
        mem_wr_addr[d_mem[m]] = dp_addr[m][AW+1:2];
        mem_wdata[d_mem[m]]   = hwdata[m];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid <= '0;
      dp_write <= '0;
      dp_err   <= '0;
      err_2nd  <= '0;
      rd_pend  <= '0;
      dp_addr  <= '0;
      rd_mem_q <= '0;
      for (int j = 0; j < N_MEM; j++) map[j] <= IW'(j);
    end else begin
      for (int m = 0; m < 2; m++) begin
        rd_pend[m] <= 1'b0;
        if (dp_valid[m] && dp_err[m] && !err_2nd[m]) err_2nd[m] <= 1'b1;
        if (d_rd_issue[m]) begin
          rd_pend[m]  <= 1'b1;
          rd_mem_q[m] <= d_mem[m];
        end
        if (hready[m]) begin
          dp_valid[m] <= a_acc[m];
          dp_write[m] <= hwrite[m];
          dp_addr[m]  <= haddr[m];
          dp_err[m]   <= a_acc[m] && !a_ok[m];
          err_2nd[m]  <= 1'b0;
          if (a_rd_issue[m]) begin
            rd_pend[m]  <= 1'b1;
            rd_mem_q[m] <= a_mem[m];
          end
        end
      end
      if (remap) begin
        for (int j = 0; j < N_MEM; j++) begin
          if (map[j] == remap_a)      map[j] <= remap_b;
          else if (map[j] == remap_b) map[j] <= remap_a;
        end
      end
    end
  end

  // The two masters never read or write one block in the same cycle.
  a_no_rd_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !((a_rd_issue[0] || d_rd_issue[0]) && (a_rd_issue[1] || d_rd_issue[1]) &&
      (a_rd_issue[0] ? a_mem[0] : d_mem[0]) == (a_rd_issue[1] ? a_mem[1] : d_mem[1])));
  a_no_wr_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(d_wr_issue[0] && d_wr_issue[1] && d_mem[0] == d_mem[1]));

endmodule
