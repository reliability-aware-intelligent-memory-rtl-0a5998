// Testbench for raimm_mem_reg: random read strobes and status changes; the
// two-level read counter, the warning counter and the status register are
// compared every clock with a reference model. Prescaler 0, 1, 3 and 10 are
// used, and counting must stop while disabled.
module raimm_mem_reg_tb;
  import raimm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 0, rd = 0;
  logic [2:0] st_in = REL_R;
  logic [9:0] pr = 10'd3;
  logic [2:0] status;
  logic [31:0] c1, c2, w;
  int m1 = 0, m2 = 0, mw = 0;
  logic [2:0] ms = REL_R;

  always #5 clk = ~clk;

  raimm_mem_reg dut (.clk, .rst_n, .enable, .status_in(st_in), .rd_strobe(rd),
                     .prescaler(pr), .status, .rd_cnt1(c1), .rd_cnt2(c2), .warn_cnt(w));

  task automatic run(input int cycles, input logic en, input logic [9:0] p);
    int lim;
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      enable = en; pr = p;
      rd = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 19) == 0) st_in = 3'($urandom_range(0, 2));
      lim = (p == 0) ? 1 : int'(p);
      // model the edge that is about to happen
      if (en) begin
        if (rd) begin
          if (ms != REL_R) mw++;
          if (m1 + 1 >= lim) begin m1 = 0; m2++; end else m1++;
        end
        ms = st_in;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(c1) != m1 || int'(c2) != m2 || int'(w) != mw || status != ms) begin
        failures++;
        $display("FAIL t=%0t c1=%0d/%0d c2=%0d/%0d w=%0d/%0d st=%0d/%0d", $time, c1, m1, c2, m2, w, mw, status, ms);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(200, 1'b1, 10'd3);
    run(50, 1'b0, 10'd3);
    run(300, 1'b1, 10'd10);
    run(100, 1'b1, 10'd1);
    run(100, 1'b1, 10'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
