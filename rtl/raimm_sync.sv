// raimm_sync: synchronisation module between the APB-clock register module
// and the AHB-clock part of RAIMM (trigger, memory registers).
//
// The document runs the register module on the APB clock (half the AHB
// clock) and places a synchroniser between it and the trigger module; how it
// synchronises is this design's own choice. Every crossing here uses
// raimm_bus_sync (two flops plus an agreement stage), which treats the two
// clocks as unrelated:
//  * AHB -> APB: memory status vector, the "alarm without a reliable
//    redundant block" level, and the register-update request {req, src, dst}.
//    The APB side turns the rising edge of the synchronised request into a
//    one-cycle `upd_pulse_p`, and raises its acknowledge flag on the same
//    edge at which the register module applies the update.
//  * APB -> AHB: {acknowledge, enable, prescaler, use bits, source addresses,
//    data sizes} as one word, so the trigger sees the acknowledge in the same
//    cycle as the updated registers. The request is four-phase: the trigger
//    holds req (and src/dst) until it sees ack, then drops it; ack falls
//    after req does.
module raimm_sync
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM = 6,
  parameter int unsigned DSR_W = 10,   // data size register width, bytes (Sec. 3.4.1.8: Bit [9:0])
  localparam int unsigned IW   = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic                   pclk,
  input  logic                   presetn,
  // AHB-clock side
  input  logic [N_MEM-1:0][2:0]  status_h,
  input  logic                   no_red_h,
  input  logic                   upd_req_h,
  input  logic [IW-1:0]          upd_src_h,
  input  logic [IW-1:0]          upd_dst_h,
  output logic                   upd_ack_h,
  output logic                   enable_h,
  output logic [9:0]             prescaler_h,
  output logic [N_MEM-1:0]       ur_h,
  output logic [N_MEM-1:0][31:0] sar_h,
  output logic [N_MEM-1:0][DSR_W-1:0] dsr_h,
  // APB-clock side
  output logic [N_MEM-1:0][2:0]  status_p,
  output logic                   no_red_p,
  output logic                   upd_pulse_p,
  output logic [IW-1:0]          upd_src_p,
  output logic [IW-1:0]          upd_dst_p,
  input  logic                   enable_p,
  input  logic [9:0]             prescaler_p,
  input  logic [N_MEM-1:0]       ur_p,
  input  logic [N_MEM-1:0][31:0] sar_p,
  input  logic [N_MEM-1:0][DSR_W-1:0] dsr_p
);

  localparam int unsigned WH2P = N_MEM*3 + 1 + 1 + 2*IW;
  localparam int unsigned WP2H = 1 + 1 + 10 + N_MEM + N_MEM*32 + N_MEM*DSR_W;

  logic            req_p, req_p_q, ack_p;

  raimm_bus_sync #(.W(WH2P)) u_h2p (
    .clk(pclk), .rst_n(presetn),
    .d({status_h, no_red_h, upd_req_h, upd_src_h, upd_dst_h}),
    .q({status_p, no_red_p, req_p, upd_src_p, upd_dst_p})
  );

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      req_p_q <= 1'b0;
      ack_p   <= 1'b0;
    end else begin
      req_p_q <= req_p;
      ack_p   <= req_p;
    end
  end
  assign upd_pulse_p = req_p && !req_p_q;

  raimm_bus_sync #(.W(WP2H)) u_p2h (
    .clk(hclk), .rst_n(hresetn),
    .d({ack_p, enable_p, prescaler_p, ur_p, sar_p, dsr_p}),
    .q({upd_ack_h, enable_h, prescaler_h, ur_h, sar_h, dsr_h})
  );

endmodule
