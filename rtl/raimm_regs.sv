// raimm_regs: RAIMM register module, the APB slave of the memory manager.
//
// Runs on the APB clock. Holds the global registers of the document's map:
//   0x000 configuration  [0] enable          0x004 prescaler [9:0]
//   0x008 control (stored, no function)      0x00C interrupt enable
//   0x010 memory status, 3 bits per block, blocks 0-9 (0x014: blocks 10-15)
//   0x020 interrupt register                 0x100+4i source address of block i
//   0x200+4i valid data size of block i, bytes [DSR_W-1:0] ([9:0] by default,
//            as the document gives; a wider field is an own option)
//   0x300 use register, bit i = 1 when block i is usable (0 = redundant)
// Interrupt register bit i is set by hardware when block i's status gets
// worse and is then Less Reliable or beyond; bit 31 is set when the trigger
// reports an alarm with no reliable redundant block. Setting only happens
// while enabled. A processor write of 1 clears a bit (write-1-to-clear);
// it cannot set one. `irq` is the OR of the enabled interrupt bits.
// `upd_pulse` (already in this clock domain) swaps the source addresses,
// data sizes and use bits of blocks `upd_src` and `upd_dst` after a remap;
// it wins over a processor write in the same cycle. APB has no wait states
// (PREADY = 1); an access to an unmapped offset reads 0 and sets PSLVERR.
// Lint notes: the reset also appears in the `disable iff` of the assertions,
// which lint reports as a reset used both asynchronously and synchronously;
// it is only the assertion's disable condition.
module raimm_regs
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM = 6,
  parameter int unsigned DSR_W = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  localparam int unsigned IW   = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                    pclk,
  input  logic                    presetn,
  // APB slave
  input  logic                    psel,
  input  logic                    penable,
  input  logic                    pwrite,
  input  logic [11:0]             paddr,
  input  logic [31:0]             pwdata,
  output logic [31:0]             prdata,
  output logic                    pready,
  output logic                    pslverr,
  // from the AHB-clock side, synchronised
  input  logic [N_MEM-1:0][2:0]   status,
  input  logic                    no_red,
  input  logic                    upd_pulse,
  input  logic [IW-1:0]           upd_src,
  input  logic [IW-1:0]           upd_dst,
  // register contents
  output logic                    enable,
  output logic [9:0]              prescaler,
  output logic [31:0]             ctrl,
  output logic [31:0]             ier,
  output logic [31:0]             ir,
  output logic [N_MEM-1:0][31:0]  sar,
  output logic [N_MEM-1:0][DSR_W-1:0] dsr,
  output logic [N_MEM-1:0]        ur,
  output logic                    irq
);

  localparam logic [31:0] INT_MASK = 32'h8000_0000 | ((32'd1 << N_MEM) - 32'd1);

  logic [N_MEM-1:0][2:0] status_q;
  logic                  no_red_q;
  logic                  wr, rd_ok;
  logic [31:0]           msr0, msr1;

  assign wr      = psel && penable && pwrite;
  assign pready  = 1'b1;

  always_comb begin
    msr0 = '0;
    msr1 = '0;
    for (int i = 0; i < N_MEM; i++) begin
      if (i < 10) msr0[3*i +: 3]      = status[i];
      else        msr1[3*(i-10) +: 3] = status[i];
    end
  end

  // Read mux
  always_comb begin
    prdata = '0;
    rd_ok  = 1'b1;
    unique casez (paddr)
      REG_CONFG: prdata = {31'd0, enable};
      REG_PR:    prdata = {22'd0, prescaler};
      REG_CR:    prdata = ctrl;
      REG_IER:   prdata = ier;
      REG_MSR0:  prdata = msr0;
      REG_MSR1:  prdata = msr1;
      REG_IR:    prdata = ir;
      REG_UR:    prdata = 32'(ur);
      12'h1??, 12'h2??: begin
        if (paddr[1:0] == 2'b00 && 32'(paddr[7:2]) < N_MEM)
          prdata = paddr[9] ? 32'(dsr[paddr[7:2]]) : sar[paddr[7:2]];
        else
          rd_ok = 1'b0;
      end
      default:   rd_ok = 1'b0;
    endcase
  end
  assign pslverr = psel && penable && !rd_ok;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      enable    <= 1'b0;
      prescaler <= '0;
      ctrl      <= '0;
      ier       <= '0;
      ir        <= '0;
      sar       <= '0;
      dsr       <= '0;
      ur        <= '0;
      status_q  <= '0;
      no_red_q  <= 1'b0;
    end else begin
      status_q <= status;
      no_red_q <= no_red;
      // processor writes
      if (wr) begin
        case (paddr)
          REG_CONFG: enable    <= pwdata[0];
          REG_PR:    prescaler <= pwdata[9:0];
          REG_CR:    ctrl      <= pwdata;
          REG_IER:   ier       <= pwdata & INT_MASK;
          REG_IR:    ir        <= ir & ~(pwdata & INT_MASK);
          REG_UR:    ur        <= pwdata[N_MEM-1:0];
          default: begin
            if (paddr[11:10] == 2'b00 && paddr[1:0] == 2'b00 && 32'(paddr[7:2]) < N_MEM) begin
              if (paddr[9:8] == 2'b01) sar[paddr[7:2]] <= pwdata;
              if (paddr[9:8] == 2'b10) dsr[paddr[7:2]] <= pwdata[DSR_W-1:0];
            end
          end
        endcase
      end
      // hardware interrupt setting (after any clear in this cycle)
      if (enable) begin
        for (int i = 0; i < N_MEM; i++)
          if (status[i] != REL_R && status[i] > status_q[i]) ir[i] <= 1'b1;
        if (no_red && !no_red_q) ir[31] <= 1'b1;
      end
      // hardware update after a remap
      if (upd_pulse) begin
        sar[upd_src] <= sar[upd_dst];
        sar[upd_dst] <= sar[upd_src];
        dsr[upd_src] <= dsr[upd_dst];
        dsr[upd_dst] <= dsr[upd_src];
        ur[upd_src]  <= ur[upd_dst];
        ur[upd_dst]  <= ur[upd_src];
      end
    end
  end

  assign irq = |(ir & ier);

  // APB: PENABLE only follows a setup cycle with PSEL.
  property p_apb_enable;
    @(posedge pclk) disable iff (!presetn) penable |-> psel;
  endproperty
  a_apb_enable: assert property (p_apb_enable);

endmodule
