// raimm_rel_compute: reliability compute for one memory block.
//
// Two registered stages, as in the document's flow chart. Stage 1 colours
// each sensed quantity against the template (green = reliable, blue = less
// reliable, red = unreliable); the two process monitors are combined first
// (any red -> red, else any blue -> blue, else green). Stage 2 applies the
// reliability rules given for the three-state configuration: any red ->
// Unreliable; else a blue voltage -> Less Reliable; else Reliable (blue
// process or temperature alone does not degrade the status).
// Timing: a sensor change reaches `status` two clock edges later.
// Only the three-state rule set exists here; the document names five- and
// seven-state variants but gives no rules for them.
module raimm_rel_compute
  import raimm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  template_t  tmpl,
  input  pvt_t       pvt,
  output color_e     col_p,    // stage-1 process colour (nMOS/pMOS combined)
  output color_e     col_v,    // stage-1 voltage colour
  output color_e     col_t,    // stage-1 temperature colour
  output logic [2:0] status    // final reliability status
);

  function automatic color_e classify(input logic signed [15:0] x, input band_t b);
    if (x >= b.green_lo && x <= b.green_hi)     return COL_GREEN;
    else if (x >= b.blue_lo && x <= b.blue_hi)  return COL_BLUE;
    else                                        return COL_RED;
  endfunction

  function automatic color_e worst(input color_e a, input color_e b);
    return (a > b) ? a : b;
  endfunction

  // Stage 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_p <= COL_GREEN;
      col_v <= COL_GREEN;
      col_t <= COL_GREEN;
    end else begin
      col_p <= worst(classify(pvt.nmos_ds, tmpl.nmos_band), classify(pvt.pmos_ds, tmpl.pmos_band));
      col_v <= classify(pvt.volt_mv, tmpl.volt);
      col_t <= classify(pvt.temp_dc, tmpl.temp);
    end
  end

  // Stage 2
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      status <= REL_R;
    else if (col_p == COL_RED || col_v == COL_RED || col_t == COL_RED)
      status <= REL_UR;
    else if (col_v == COL_BLUE)
      status <= REL_LR;
    else
      status <= REL_R;
  end

endmodule
