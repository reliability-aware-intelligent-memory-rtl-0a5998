// raimm_bus_sync: carries a slowly changing bus into another clock domain.
//
// Two flip-flop stages resolve metastability; the output register then only
// takes a value that both synchroniser stages agree on, so a bus caught while
// changing (bits arriving in different cycles) is never passed on torn. The
// source must hold a value for at least three destination clocks. Latency:
// three destination clock edges. Reset value of every stage is RESET_VAL.
module raimm_bus_sync #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= RESET_VAL;
      s2 <= RESET_VAL;
      q  <= RESET_VAL;
    end else begin
      s1 <= d;
      s2 <= s1;
      if (s1 == s2) q <= s2;
    end
  end

endmodule
