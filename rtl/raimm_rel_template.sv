// raimm_rel_template: the reliability template, a small ROM of PVT reference
// ranges loaded from a text file.
//
// The document keeps the characterisation ranges of a technology in a text
// file so that moving to another technology means editing that file, not the
// RTL. Here the file is a 16-word hex image (see raimm_rel_template.hex) read
// with $readmemh at elaboration; the ROM is presented as a template_t struct.
// Word order: voltage, temperature, nMOS, pMOS; each as green_lo, green_hi,
// blue_lo, blue_hi. The default file holds the document's 40 nm values:
// voltage green 1.02-1.32 V, blue 0.98-1.019 V; temperature green 0.2-90 C,
// blue above 90 and below 125 C; nMOS green -2.0..0.0 sigma, blue
// -3.0..-2.1; pMOS green 0.0..2.0 sigma, blue 2.1..3.0 (fixed-point units
// of raimm_pkg). The output is static; there is no clock.
module raimm_rel_template
  import raimm_pkg::*;
#(
  parameter string TEMPLATE_FILE = "rtl/raimm_rel_template.hex"
) (
  output template_t tmpl
);

  logic [15:0] rom [16];

  initial $readmemh(TEMPLATE_FILE, rom);

  always_comb begin
    tmpl.volt.green_lo = rom[0];
    tmpl.volt.green_hi = rom[1];
    tmpl.volt.blue_lo  = rom[2];
    tmpl.volt.blue_hi  = rom[3];
    tmpl.temp.green_lo = rom[4];
    tmpl.temp.green_hi = rom[5];
    tmpl.temp.blue_lo  = rom[6];
    tmpl.temp.blue_hi  = rom[7];
    tmpl.nmos_band.green_lo = rom[8];
    tmpl.nmos_band.green_hi = rom[9];
    tmpl.nmos_band.blue_lo  = rom[10];
    tmpl.nmos_band.blue_hi  = rom[11];
    tmpl.pmos_band.green_lo = rom[12];
    tmpl.pmos_band.green_hi = rom[13];
    tmpl.pmos_band.blue_lo  = rom[14];
    tmpl.pmos_band.blue_hi  = rom[15];
  end

endmodule
