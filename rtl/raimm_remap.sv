// raimm_remap: remap module, the AHB master through which RAIMM programs its
// DMA.
//
// On `load` it captures the remap source address, destination address and
// data size registers (the document's three local registers) and then writes
// the DMA's registers with four pipelined single AHB-Lite word writes:
// source, destination, control (transfer size in 32-bit words, rounded up,
// and burst code 1 = 4 beats) and configuration (channel enable, which starts
// the transfer). `busy` is high from the cycle after `load` until the last
// data phase completes; `done` pulses then. With a zero-wait slave the
// sequence takes five clock cycles. The register offsets of the DMA are this
// design's own; the document configures an external DMA IP.
// Lint notes: the reset also appears in the `disable iff` of the assertions,
// which lint reports as a reset used both asynchronously and synchronously;
// it is only the assertion's disable condition.
module raimm_remap
  import raimm_pkg::*;
#(
  parameter logic [31:0] DMA_BASE   = 32'h0000_0000,
  parameter int unsigned DSR_W      = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  parameter logic [2:0]  BURST_CODE = 3'd1          // 4-beat bursts
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] src_addr,
  input  logic [31:0] dst_addr,
  input  logic [DSR_W-1:0] size_bytes,
  // Table 3.3 registers
  output logic [31:0] remap_src,
  output logic [31:0] remap_dst,
  output logic [DSR_W-1:0] remap_size,
  output logic        busy,
  output logic        done,
  // AHB-Lite master
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [31:0] hwdata,
  input  logic        hready,
  input  logic        hresp
);

  localparam int unsigned NW = 4;

  logic [2:0] ac;     // next address-phase beat
  logic [2:0] dc;     // beat in data phase
  logic       dph;    // a data phase is in progress


  function automatic logic [7:0] reg_off(input logic [2:0] beat);
    case (beat)
      3'd0:    return DMA_SRC;
      3'd1:    return DMA_DST;
      3'd2:    return DMA_CTRL;
      default: return DMA_CFG;
    endcase
  endfunction

  function automatic logic [31:0] reg_val(input logic [2:0] beat);
    case (beat)
      3'd0:    return remap_src;
      3'd1:    return remap_dst;
      3'd2:    return {17'd0, BURST_CODE, 12'((32'(remap_size) + 32'd3) >> 2)};
      default: return 32'd1;
    endcase
  endfunction

  assign hwrite = 1'b1;
  assign hsize  = HSIZE_WORD;
  assign hburst = HBURST_SINGLE;
  assign htrans = (busy && ac < 3'(NW)) ? HTRANS_NONSEQ : HTRANS_IDLE;
  assign haddr  = DMA_BASE + {24'd0, reg_off(ac)};
  assign hwdata = reg_val(dc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remap_src  <= '0;
      remap_dst  <= '0;
      remap_size <= '0;
      busy       <= 1'b0;
      done       <= 1'b0;
      ac         <= '0;
      dc         <= '0;
      dph        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load && !busy) begin
        remap_src  <= src_addr;
        remap_dst  <= dst_addr;
        remap_size <= size_bytes;
        busy       <= 1'b1;
        ac         <= '0;
        dc         <= '0;
        dph        <= 1'b0;
      end else if (busy && hready) begin
        if (dph) dc <= dc + 3'd1;
        if (ac < 3'(NW)) begin
          ac  <= ac + 3'd1;
          dph <= 1'b1;
        end else begin
          dph <= 1'b0;
        end
        if (dph && dc == 3'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // An error response from the DMA slave is not expected.
  a_no_err: assert property (@(posedge clk) disable iff (!rst_n) !(busy && hresp));

endmodule
