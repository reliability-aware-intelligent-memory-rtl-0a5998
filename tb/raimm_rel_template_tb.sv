// Testbench for raimm_rel_template: the ROM must present the document's
// reference ranges, converted to the fixed-point units of raimm_pkg
// (millivolts, 0.1 C, 0.1 sigma). Each of the 16 band limits is compared
// with a constant written here from the published values; the block has no
// clock, so the check runs once after the table is loaded.
module raimm_rel_template_tb;
  import raimm_pkg::*;
  int checks = 0, failures = 0;
  template_t t;

  raimm_rel_template dut (.tmpl(t));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1;
    chk("volt green_lo", int'(t.volt.green_lo), 1020);
    chk("volt green_hi", int'(t.volt.green_hi), 1320);
    chk("volt blue_lo",  int'(t.volt.blue_lo),  980);
    chk("volt blue_hi",  int'(t.volt.blue_hi),  1019);
    chk("temp green_lo", int'(t.temp.green_lo), 2);
    chk("temp green_hi", int'(t.temp.green_hi), 900);
    chk("temp blue_lo",  int'(t.temp.blue_lo),  901);
    chk("temp blue_hi",  int'(t.temp.blue_hi),  1249);
    chk("nmos green_lo", int'(t.nmos_band.green_lo), -20);
    chk("nmos green_hi", int'(t.nmos_band.green_hi), 0);
    chk("nmos blue_lo",  int'(t.nmos_band.blue_lo),  -30);
    chk("nmos blue_hi",  int'(t.nmos_band.blue_hi),  -21);
    chk("pmos green_lo", int'(t.pmos_band.green_lo), 0);
    chk("pmos green_hi", int'(t.pmos_band.green_hi), 20);
    chk("pmos blue_lo",  int'(t.pmos_band.blue_lo),  21);
    chk("pmos blue_hi",  int'(t.pmos_band.blue_hi),  30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
