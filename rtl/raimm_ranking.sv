// raimm_ranking: memory ranking module.
//
// Orders the N memory blocks by remapping priority. The key of a block is
// its reliability status first (Unreliable above Less Reliable above
// Reliable) and its profiling count (read counter 2) second, a more used
// block ranking higher. Equal keys rank the lower block index higher. The
// position of each block is the number of blocks that beat it, so the table
// is computed by N*N pairwise compares in one clock. `rank_list[0]` is the
// index of the top-ranked block, `rank_pos[i]` the position of block i.
// The table is registered (one clock after its inputs) and holds while
// `freeze` is high (the trigger module's ranking-disable while it works).
// The document also lets the application raise the rank of a block holding
// critical data; it gives no encoding for that input, so it is not built.
module raimm_ranking
  import raimm_pkg::*;
#(
  parameter int unsigned N_MEM = 6,
  localparam int unsigned IW   = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 freeze,
  input  logic [N_MEM-1:0][2:0]  status,
  input  logic [N_MEM-1:0][31:0] profile,
  output logic [N_MEM-1:0][IW-1:0] rank_list,
  output logic [N_MEM-1:0][IW-1:0] rank_pos
);

  logic [N_MEM-1:0][IW-1:0] pos_c;
  logic [N_MEM-1:0][IW-1:0] list_c;

  always_comb begin
    for (int i = 0; i < N_MEM; i++) begin
      pos_c[i] = '0;
      for (int j = 0; j < N_MEM; j++) begin
        if (j != i) begin
          if ({status[j], profile[j]} > {status[i], profile[i]} ||
              ({status[j], profile[j]} == {status[i], profile[i]} && j < i))
            pos_c[i] = pos_c[i] + 1'b1;
        end
      end
    end
    list_c = '0;
    for (int i = 0; i < N_MEM; i++)
      list_c[pos_c[i]] = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MEM; i++) begin
        rank_list[i] <= IW'(i);
        rank_pos[i]  <= IW'(i);
      end
    end else if (!freeze) begin
      rank_list <= list_c;
      rank_pos  <= pos_c;
    end
  end

endmodule
