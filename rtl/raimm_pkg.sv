// raimm_pkg: types and constants shared by the RAIMM memory manager blocks.
//
// Reliability status codes follow the document's three-state column of the
// memory status table (3'b000 Reliable, 3'b001 Less Reliable, 3'b010
// Unreliable); larger codes are always "worse", so plain magnitude compare
// orders them. Sensor readings use fixed-point units chosen for this RTL:
// millivolts for supply, tenths of a degree Celsius for temperature and tenths
// of a sigma for the nMOS/pMOS process monitors. The register offsets are the
// document's global register map; the DMA register offsets and the AHB coding
// constants are this design's own (AMBA AHB-Lite values for HTRANS/HBURST).
package raimm_pkg;

  // Reliability status (3-bit field of the memory status register).
  localparam logic [2:0] REL_R  = 3'b000;  // Reliable
  localparam logic [2:0] REL_LR = 3'b001;  // Less Reliable
  localparam logic [2:0] REL_UR = 3'b010;  // Unreliable

  // First-stage colour code of one sensor quantity.
  typedef enum logic [1:0] {
    COL_GREEN = 2'd0,   // reliable range
    COL_BLUE  = 2'd1,   // less reliable range
    COL_RED   = 2'd2    // unreliable (everything else)
  } color_e;

  // Two closed ranges of one sensed quantity: green and blue. Values outside
  // both are red.
  typedef struct packed {
    logic signed [15:0] green_lo;
    logic signed [15:0] green_hi;
    logic signed [15:0] blue_lo;
    logic signed [15:0] blue_hi;
  } band_t;

  // Reliability template: reference ranges of the four sensed quantities.
  typedef struct packed {
    band_t volt;   // mV
    band_t temp;   // 0.1 degC
    band_t nmos_band;   // 0.1 sigma
    band_t pmos_band;   // 0.1 sigma
  } template_t;

  // One memory block's sensor readings.
  typedef struct packed {
    logic signed [15:0] volt_mv;
    logic signed [15:0] temp_dc;
    logic signed [15:0] nmos_ds;
    logic signed [15:0] pmos_ds;
  } pvt_t;

  // Global register offsets (APB, byte addresses).
  localparam logic [11:0] REG_CONFG = 12'h000;
  localparam logic [11:0] REG_PR    = 12'h004;
  localparam logic [11:0] REG_CR    = 12'h008;
  localparam logic [11:0] REG_IER   = 12'h00C;
  localparam logic [11:0] REG_MSR0  = 12'h010;
  localparam logic [11:0] REG_MSR1  = 12'h014;
  localparam logic [11:0] REG_IR    = 12'h020;
  localparam logic [11:0] REG_SAR   = 12'h100;
  localparam logic [11:0] REG_DSR   = 12'h200;
  localparam logic [11:0] REG_UR    = 12'h300;

  // DMA configuration registers (AHB slave, byte offsets).
  localparam logic [7:0] DMA_SRC  = 8'h00;
  localparam logic [7:0] DMA_DST  = 8'h04;
  localparam logic [7:0] DMA_CTRL = 8'h08;  // [11:0] words, [14:12] burst code
  localparam logic [7:0] DMA_CFG  = 8'h0C;  // [0] channel enable (starts)
  localparam logic [7:0] DMA_STAT = 8'h10;  // [0] busy, [1] terminal count seen

  // AHB-Lite encodings.
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;
  localparam logic [2:0] HBURST_SINGLE = 3'b000;
  localparam logic [2:0] HBURST_INCR   = 3'b001;
  localparam logic [2:0] HBURST_INCR4  = 3'b011;
  localparam logic [2:0] HSIZE_WORD    = 3'b010;

  // Burst-size code of the DMA control register (1, 4, 8, 16 beats).
  function automatic int unsigned burst_beats(input logic [2:0] code);
    case (code)
      3'd0:    return 1;
      3'd1:    return 4;
      3'd2:    return 8;
      default: return 16;
    endcase
  endfunction

endpackage
