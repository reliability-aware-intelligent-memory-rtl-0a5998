// raimm_mem_reg: memory register module of one memory block.
//
// Holds the block's memory status register (latched reliability status) and
// the access profile: read counter 1 counts read accesses to the block; when
// it reaches the prescaler value it clears and read counter 2 (the profiling
// count used for ranking) increments. A prescaler of 0 behaves like 1. The
// warning counter counts reads made while the latched status is not
// Reliable; the document lists this register but leaves it unused, and here
// it is only observable. Counters saturate at all-ones. All registers are 32
// bits and update on the clock edge after their inputs; counting only runs
// while `enable` is high.
module raimm_mem_reg
  import raimm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [2:0]  status_in,
  input  logic        rd_strobe,
  input  logic [9:0]  prescaler,
  output logic [2:0]  status,
  output logic [31:0] rd_cnt1,
  output logic [31:0] rd_cnt2,
  output logic [31:0] warn_cnt
);

  logic [31:0] limit;
  assign limit = (prescaler == '0) ? 32'd1 : {22'd0, prescaler};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      status   <= REL_R;
      rd_cnt1  <= '0;
      rd_cnt2  <= '0;
      warn_cnt <= '0;
    end else if (enable) begin
      status <= status_in;
      if (rd_strobe) begin
        if (rd_cnt1 + 32'd1 >= limit) begin
          rd_cnt1 <= '0;
          if (rd_cnt2 != '1) rd_cnt2 <= rd_cnt2 + 32'd1;
        end else begin
          rd_cnt1 <= rd_cnt1 + 32'd1;
        end
        if (status != REL_R && warn_cnt != '1) warn_cnt <= warn_cnt + 32'd1;
      end
    end
  end

endmodule
