// Pipelined minimum / maximum finder with index.
//
// This is the MinimumFinder / MaximumFinder tree of the scheduler deciders.
// At 125 MHz the extreme of all queues is not found in one step; instead the
// values are compared in groups of four (Min4 / Max4) in one clock stage,
// repeated while more than two candidates remain, and the last two are
// compared by a Min2 / Max2 stage. For 8 queues that is one Min4 level and
// one Min2 level; for 32 queues two Min4 levels and one Min2 level; for 128
// queues three Min4 levels and one Min2 level.
//
// Interface: in_val holds N values; out_val/out_idx give the smallest
// (FIND_MAX=0) or largest (FIND_MAX=1) value and its position. Timing: the
// result for the values presented in cycle t appears after LATENCY clock
// edges (2 for N=8, 3 for N=32). When several inputs share the extreme value
// the lowest index wins, a choice of this implementation.
module extremum_finder #(
  parameter int N        = 8,
  parameter int W        = 32,
  parameter bit FIND_MAX = 1'b0,
  localparam int IW      = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic [W-1:0]  in_val [N],
  output logic [W-1:0]  out_val,
  output logic [IW-1:0] out_idx
);

  // Number of candidates left after l levels.
  function automatic int count_after(int n, int l);
    int c = n;
    for (int i = 0; i < l; i++) c = (c > 2) ? (c + 3) / 4 : (c + 1) / 2;
    return c;
  endfunction

  localparam int NL  = es_pkg::finder_levels(N);
  localparam int PAD = N + 4;   // room for the last, partly filled group

  logic [W-1:0]  val [NL+1][PAD];
  logic [IW-1:0] idx [NL+1][PAD];

  always_comb begin
    for (int i = 0; i < PAD; i++) begin
      val[0][i] = (i < N) ? in_val[(i < N) ? i : 0] : '0;
      idx[0][i] = IW'(i);
    end
  end

  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int CI = count_after(N, l);
    localparam int CO = count_after(N, l + 1);
    localparam int R  = (CI > 2) ? 4 : 2;
    for (genvar g = 0; g < CO; g++) begin : g_grp
      logic [W-1:0]  best_v;
      logic [IW-1:0] best_i;
      always_comb begin
        best_v = val[l][g*R];
        best_i = idx[l][g*R];
        for (int k = 1; k < R; k++) begin
          if (g*R + k < CI) begin
            if (FIND_MAX ? (val[l][g*R+k] > best_v) : (val[l][g*R+k] < best_v)) begin
              best_v = val[l][g*R+k];
              best_i = idx[l][g*R+k];
            end
          end
        end
      end
      always_ff @(posedge clk) begin
        val[l+1][g] <= best_v;
        idx[l+1][g] <= best_i;
      end
    end
  end

  assign out_val = val[NL][0];
  assign out_idx = idx[NL][0];

endmodule
