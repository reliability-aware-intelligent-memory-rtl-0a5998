// raimm_dma: single-channel memory-to-memory DMA used by RAIMM.
//
// The document uses a third-party DMA controller and states only what it
// needs from it: memory-to-memory copies, 32-bit transfers, 4-beat bursts,
// configuration over AHB by RAIMM, and a transfer-complete signal. This is
// the simplest engine that does that. Configuration slave (AHB-Lite, zero
// wait): 0x00 source address, 0x04 destination address, 0x08 control
// ([11:0] transfer size in words, [14:12] burst code 0/1/2/3 = 1/4/8/16
// beats), 0x0C configuration ([0] enable: writing 1 starts the copy and the
// bit clears when it ends), 0x10 status ([0] busy, [1] done since start).
// The master port copies one burst at a time: it reads a burst (INCR4 when
// four beats, INCR or SINGLE for a shorter tail) into a local buffer, then
// writes it. With zero-wait memories a 4-beat burst takes 5 cycles to read
// and 5 to write. `tc` pulses for one cycle after the last write completes.
// Error responses are not acted upon.
// Lint notes: only the low address byte of the configuration slave is
// decoded (the port is private to RAIMM), HTRANS[0] (SEQ vs NONSEQ) does not
// matter to a zero-wait register slave, and error responses of the memory
// port are ignored (the bus matrix only errs outside the window).
module raimm_dma
  import raimm_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite configuration slave
  input  logic [31:0] s_haddr,
  input  logic [1:0]  s_htrans,
  input  logic        s_hwrite,
  input  logic [31:0] s_hwdata,
  output logic [31:0] s_hrdata,
  output logic        s_hready,
  output logic        s_hresp,
  // AHB-Lite master
  output logic [31:0] m_haddr,
  output logic [1:0]  m_htrans,
  output logic        m_hwrite,
  output logic [2:0]  m_hsize,
  output logic [2:0]  m_hburst,
  output logic [31:0] m_hwdata,
  input  logic [31:0] m_hrdata,
  input  logic        m_hready,
  input  logic        m_hresp,
  output logic        tc,
  output logic        busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_RD, ST_WR} st_e;

  logic [31:0] reg_src, reg_dst, reg_ctrl;
  logic        done_flag;
  // slave data phase
  logic        sd_valid, sd_write;
  logic [7:0]  sd_addr;
  // engine
  st_e         st;
  logic [31:0] cur_src, cur_dst;
  logic [11:0] remaining;
  logic [4:0]  n, ac, dc;
  logic        dph;
  logic [31:0] buffer [MAX_BURST];
  logic [4:0]  blen;

  assign blen = 5'(burst_beats(reg_ctrl[14:12]) > MAX_BURST ? MAX_BURST : burst_beats(reg_ctrl[14:12]));

  // ---------------- configuration slave ----------------
  assign s_hready = 1'b1;
  assign s_hresp  = 1'b0;

  always_comb begin
    case (sd_addr)
      DMA_SRC:  s_hrdata = reg_src;
      DMA_DST:  s_hrdata = reg_dst;
      DMA_CTRL: s_hrdata = reg_ctrl;
      DMA_CFG:  s_hrdata = {31'd0, busy};
      DMA_STAT: s_hrdata = {30'd0, done_flag, busy};
      default:  s_hrdata = '0;
    endcase
  end

  logic start;
  assign start = sd_valid && sd_write && sd_addr == DMA_CFG && s_hwdata[0] && st == ST_IDLE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sd_valid <= 1'b0;
      sd_write <= 1'b0;
      sd_addr  <= '0;
      reg_src  <= '0;
      reg_dst  <= '0;
      reg_ctrl <= '0;
    end else begin
      sd_valid <= s_htrans[1];
      sd_write <= s_hwrite;
      sd_addr  <= s_haddr[7:0];
      if (sd_valid && sd_write && st == ST_IDLE) begin
        case (sd_addr)
          DMA_SRC:  reg_src  <= s_hwdata;
          DMA_DST:  reg_dst  <= s_hwdata;
          DMA_CTRL: reg_ctrl <= s_hwdata;
          default: ;
        endcase
      end
    end
  end

  // ---------------- copy engine ----------------
  function automatic logic [4:0] min_len(input logic [11:0] rem, input logic [4:0] bl);
    return (rem < 12'(bl)) ? rem[4:0] : bl;
  endfunction

  assign busy     = (st != ST_IDLE);
  assign m_hsize  = HSIZE_WORD;
  assign m_hwrite = (st == ST_WR);
  assign m_htrans = (busy && ac < n) ? ((ac == 0) ? HTRANS_NONSEQ : HTRANS_SEQ) : HTRANS_IDLE;
  assign m_hburst = (n == 5'd4) ? HBURST_INCR4 : (n == 5'd1) ? HBURST_SINGLE : HBURST_INCR;
  assign m_haddr  = ((st == ST_WR) ? cur_dst : cur_src) + {25'd0, ac, 2'b00};
  assign m_hwdata = buffer[dc[$clog2(MAX_BURST)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= ST_IDLE;
      cur_src   <= '0;
      cur_dst   <= '0;
      remaining <= '0;
      n         <= '0;
      ac        <= '0;
      dc        <= '0;
      dph       <= 1'b0;
      tc        <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      tc <= 1'b0;
      unique case (st)
        ST_IDLE: begin
          if (start) begin
            done_flag <= 1'b0;
            cur_src   <= reg_src;
            cur_dst   <= reg_dst;
            remaining <= reg_ctrl[11:0];
            n         <= min_len(reg_ctrl[11:0], blen);
            ac        <= '0;
            dc        <= '0;
            dph       <= 1'b0;
            if (reg_ctrl[11:0] == '0) begin
              tc        <= 1'b1;
              done_flag <= 1'b1;
            end else begin
              st <= ST_RD;
            end
          end
        end
        ST_RD, ST_WR: begin
          if (m_hready) begin
            if (dph) begin
              if (st == ST_RD) buffer[dc[$clog2(MAX_BURST)-1:0]] <= m_hrdata;
              dc <= dc + 5'd1;
            end
            if (ac < n) begin
              ac  <= ac + 5'd1;
              dph <= 1'b1;
            end else begin
              dph <= 1'b0;
            end
            if (dph && dc + 5'd1 == n) begin
              ac  <= '0;
              dc  <= '0;
              dph <= 1'b0;
              if (st == ST_RD) begin
                st <= ST_WR;
              end else begin
                cur_src   <= cur_src + {25'd0, n, 2'b00};
                cur_dst   <= cur_dst + {25'd0, n, 2'b00};
                remaining <= remaining - 12'(n);
                n         <= min_len(remaining - 12'(n), blen);
                if (remaining == 12'(n)) begin
                  st        <= ST_IDLE;
                  tc        <= 1'b1;
                  done_flag <= 1'b1;
                end else begin
                  st <= ST_RD;
                end
              end
            end
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

endmodule
