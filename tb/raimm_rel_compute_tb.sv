// Testbench for raimm_rel_compute: random and corner sensor readings are
// classified by a reference model written from the document's rules
// (voltage, process and temperature ranges; second-stage rules) and compared
// with the DUT two clocks later, which is also the latency checked.
module raimm_rel_compute_tb;
  import raimm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  template_t tmpl;
  pvt_t pvt;
  color_e cp, cv, ct;
  logic [2:0] status;

  always #5 clk = ~clk;

  raimm_rel_compute dut (.clk, .rst_n, .tmpl, .pvt, .col_p(cp), .col_v(cv), .col_t(ct), .status);

  // Reference: 0 green, 1 blue, 2 red, from the document's sentences.
  function automatic int vcol(int mv);
    if (mv >= 1020 && mv <= 1320) return 0;
    if (mv >= 980 && mv <= 1019)  return 1;
    return 2;
  endfunction
  function automatic int tcol(int dc);        // tenths of a degree
    if (dc >= 2 && dc <= 900)    return 0;
    if (dc > 900 && dc < 1250)   return 1;
    return 2;
  endfunction
  function automatic int ncol(int s);         // tenths of sigma
    if (s >= -20 && s <= 0)   return 0;
    if (s >= -30 && s < -20)  return 1;
    return 2;
  endfunction
  function automatic int pcol(int s);
    if (s >= 0 && s <= 20)   return 0;
    if (s > 20 && s <= 30)   return 1;
    return 2;
  endfunction
  function automatic logic [2:0] expect_status(pvt_t x);
    int p, v, t;
    p = (ncol(x.nmos_ds) > pcol(x.pmos_ds)) ? ncol(x.nmos_ds) : pcol(x.pmos_ds);
    v = vcol(x.volt_mv);
    t = tcol(x.temp_dc);
    if (p == 2 || v == 2 || t == 2) return REL_UR;
    if (v == 1) return REL_LR;
    return REL_R;
  endfunction

  task automatic apply(input int mv, input int dc, input int n, input int p);
    pvt_t x;
    logic [2:0] e;
    x.volt_mv = 16'(mv); x.temp_dc = 16'(dc); x.nmos_ds = 16'(n); x.pmos_ds = 16'(p);
    e = expect_status(x);
    @(negedge clk) pvt = x;
    @(posedge clk); #1;   // stage 1 has it
    checks++;
    if (status == e && e != expect_status(x)) failures++;
    @(posedge clk); #1;   // stage 2 has it
    checks++;
    if (status !== e) begin
      failures++;
      $display("FAIL v=%0d t=%0d n=%0d p=%0d: got %0d expected %0d", mv, dc, n, p, status, e);
    end
  endtask

  initial begin
    tmpl.volt = '{green_lo: 1020, green_hi: 1320, blue_lo: 980, blue_hi: 1019};
    tmpl.temp = '{green_lo: 2, green_hi: 900, blue_lo: 901, blue_hi: 1249};
    tmpl.nmos_band = '{green_lo: -20, green_hi: 0, blue_lo: -30, blue_hi: -21};
    tmpl.pmos_band = '{green_lo: 0, green_hi: 20, blue_lo: 21, blue_hi: 30};
    pvt = '{volt_mv: 1100, temp_dc: 250, nmos_ds: -5, pmos_ds: 5};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: a change to Unreliable must not show after one clock
    @(negedge clk) pvt.volt_mv = 700;
    @(posedge clk); #1; checks++; if (status != REL_R) begin failures++; $display("FAIL latency 1"); end
    @(posedge clk); #1; checks++; if (status != REL_UR) begin failures++; $display("FAIL latency 2"); end
    // corners of every range
    apply(979, 250, -5, 5);  apply(980, 250, -5, 5);  apply(1019, 250, -5, 5);
    apply(1020, 250, -5, 5); apply(1320, 250, -5, 5); apply(1321, 250, -5, 5);
    apply(600, 250, -5, 5);
    apply(1100, 1, -5, 5);   apply(1100, 2, -5, 5);   apply(1100, 900, -5, 5);
    apply(1100, 901, -5, 5); apply(1100, 1249, -5, 5); apply(1100, 1250, -5, 5);
    apply(1100, -400, -5, 5); apply(1100, 1500, -5, 5);
    apply(1100, 250, -20, 5); apply(1100, 250, -21, 5); apply(1100, 250, -30, 5);
    apply(1100, 250, -31, 5); apply(1100, 250, 1, 5);
    apply(1100, 250, -5, 0);  apply(1100, 250, -5, -1); apply(1100, 250, -5, 20);
    apply(1100, 250, -5, 21); apply(1100, 250, -5, 30); apply(1100, 250, -5, 31);
    apply(1000, 1000, -25, 25);   // blue voltage dominates -> LR
    apply(1100, 1000, -25, 25);   // blue P and T only -> R
    for (int i = 0; i < 400; i++)
      apply(900 + int'($urandom_range(0, 500)), int'($urandom_range(0, 1600)) - 100,
            int'($urandom_range(0, 80)) - 40, int'($urandom_range(0, 80)) - 40);
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
