// raimm_trigger: trigger module, the controller of RAIMM.
//
// A five-state machine (the document's state diagram):
//   S0_IDLE   waits for trig_remap_indicator;
//   S1_RU     loads the remap module's source, destination and size
//             registers and starts the DMA programming (one cycle);
//   S2_DT     data transfer, waits for the DMA transfer-complete signal;
//   S3_REMAP  pulses REMAP to the bus matrix (one cycle);
//   S4_USRU   requests the use/address/size register update in the
//             APB-clock register module and waits for its acknowledge.
// trig_remap_indicator is raised when RAIMM is enabled, the highest-ranked
// usable block is Less Reliable or Unreliable, and a redundant block is
// Reliable. When several redundant blocks are Reliable, the one with the
// highest index is taken (the document's test tables always pick so). An
// alarm with no Reliable redundant block raises `no_red` (an interrupt
// source) instead. LOCK to the bus matrix is high from S2 to the end of S4;
// the ranking is frozen outside S0. A new remap waits until the acknowledge
// of the previous update has dropped.
module raimm_trigger
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM = 6,
  parameter int unsigned DSR_W = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  localparam int unsigned IW   = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic [N_MEM-1:0][2:0]   status,
  input  logic [N_MEM-1:0]        ur,
  input  logic [N_MEM-1:0][31:0]  sar,
  input  logic [N_MEM-1:0][DSR_W-1:0] dsr,
  input  logic [N_MEM-1:0][IW-1:0] rank_list,
  input  logic                    dma_tc,      // trig_DMA_sync_in
  input  logic                    upd_ack,     // trig_sync_ack_in
  output logic [2:0]              state,
  output logic                    freeze,
  output logic                    load,        // S1: remap module loads src/dst/size below
  output logic [31:0]             src_addr,
  output logic [31:0]             dst_addr,
  output logic [DSR_W-1:0]        size_bytes,
  output logic                    lock,
  output logic [IW-1:0]           src_mem,
  output logic [IW-1:0]           dst_mem,
  output logic                    remap,
  output logic                    upd_req,
  output logic                    no_red
);

  typedef enum logic [2:0] {
    S0_IDLE  = 3'd0,
    S1_RU    = 3'd1,
    S2_DT    = 3'd2,
    S3_REMAP = 3'd3,
    S4_USRU  = 3'd4
  } state_e;

  state_e  st;
  logic    alarm, src_found, dst_found, indicator;
  logic [IW-1:0] src_c, dst_c;

  // Candidate selection
  always_comb begin
    src_found = 1'b0;
    src_c     = '0;
    for (int k = 0; k < N_MEM; k++) begin
      if (!src_found && ur[rank_list[k]]) begin
        src_found = 1'b1;
        src_c     = rank_list[k];
      end
    end
    dst_found = 1'b0;
    dst_c     = '0;
    for (int i = 0; i < N_MEM; i++) begin
      if (!ur[i] && status[i] == REL_R) begin
        dst_found = 1'b1;
        dst_c     = IW'(i);
      end
    end
    alarm     = enable && src_found && status[src_c] != REL_R;
    indicator = alarm && dst_found && !upd_ack;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S0_IDLE;
      src_mem    <= '0;
      dst_mem    <= '0;
      no_red     <= 1'b0;
    end else begin
      no_red <= 1'b0;
      unique case (st)
        S0_IDLE: begin
          no_red <= alarm && !dst_found;
          if (indicator) begin
            src_mem <= src_c;
            dst_mem <= dst_c;
            st      <= S1_RU;
          end
        end
        S1_RU:    st <= S2_DT;
        S2_DT:    if (dma_tc) st <= S3_REMAP;
        S3_REMAP: st <= S4_USRU;
        S4_USRU:  if (upd_ack) st <= S0_IDLE;
        default:  st <= S0_IDLE;
      endcase
    end
  end

  assign src_addr   = sar[src_mem];
  assign dst_addr   = sar[dst_mem];
  assign size_bytes = dsr[src_mem];
  assign state   = st;
  assign freeze  = (st != S0_IDLE);
  assign load    = (st == S1_RU);
  assign lock    = (st == S2_DT) || (st == S3_REMAP) || (st == S4_USRU);
  assign remap   = (st == S3_REMAP);
  assign upd_req = (st == S4_USRU);

endmodule
