// raimm_sram: one split system memory block, modelled as a synchronous RAM
// array with one read port and one write port.
//
// The document's blocks are 16 KB SRAM cuts with 32-bit words (4096 words).
// A read returns data one clock after rd_en; a write takes effect at the
// clock edge with wr_en. A read and a write of the same word in the same
// cycle return the new data (write-first). Contents are not reset; the
// memory holds whatever was last written. In a chip this is an SRAM macro.
module raimm_sram #(
  parameter int unsigned WORDS = 4096,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rdata,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wdata;
    if (rd_en) rdata <= (wr_en && wr_addr == rd_addr) ? wdata : mem[rd_addr];
  end

endmodule
