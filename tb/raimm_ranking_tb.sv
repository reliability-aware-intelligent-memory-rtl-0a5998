// Testbench for raimm_ranking: random status/profile sets are ranked by a
// reference selection sort (status first, then profile, then lower index)
// and compared with the DUT one clock later; the table must hold while
// frozen.
module raimm_ranking_tb;
  import raimm_pkg::*;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, freeze = 0;
  logic [N-1:0][2:0] status;
  logic [N-1:0][31:0] profile;
  logic [N-1:0][2:0] rank_list, rank_pos;

  always #5 clk = ~clk;

  raimm_ranking #(.N_MEM(N)) dut (.clk, .rst_n, .freeze, .status, .profile, .rank_list, .rank_pos);

  function automatic logic better(int a, int b);  // a ranks above b
    if (status[a] != status[b]) return status[a] > status[b];
    if (profile[a] != profile[b]) return profile[a] > profile[b];
    return a < b;
  endfunction

  initial begin
    int order[N];
    int tmp;
    logic [N-1:0][2:0] held;
    status = '0; profile = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        status[i]  = 3'($urandom_range(0, 2));
        profile[i] = 32'($urandom_range(0, 3));
      end
      for (int i = 0; i < N; i++) order[i] = i;
      for (int i = 0; i < N; i++)
        for (int j = i + 1; j < N; j++)
          if (better(order[j], order[i])) begin tmp = order[i]; order[i] = order[j]; order[j] = tmp; end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(rank_list[k]) != order[k] || int'(rank_pos[order[k]]) != k) begin
          failures++;
          $display("FAIL it=%0d pos %0d: got %0d expected %0d", it, k, rank_list[k], order[k]);
        end
      end
    end
    // freeze holds the table
    held = rank_list;
    @(negedge clk) freeze = 1;
    for (int it = 0; it < 20; it++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) status[i] = 3'($urandom_range(0, 2));
      @(posedge clk); #1;
      checks++;
      if (rank_list != held) begin failures++; $display("FAIL table changed while frozen"); end
    end
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
