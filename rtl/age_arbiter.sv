// age_arbiter: picks one of N candidates by magnitude comparison of their keys.
//
// This is the arbitration logic the memory scheduler shares between its two
// modes: a tree of two-input magnitude comparators, each passing on the
// valid candidate with the larger key; a tie goes to the lower index. The
// caller builds the key, e.g. {row_hit, age} for the scheduling mode or
// {age} for the harvesting mode, so "priority first, then oldest" falls out
// of one comparison. The tree structure is this design's choice of how to
// arrange the comparators.
//
// Purely combinational: grant_idx is valid in the cycle valid/key are.
module age_arbiter #(
  parameter int unsigned N     = 60,
  parameter int unsigned KEY_W = 13,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]            valid,
  input  logic [N-1:0][KEY_W-1:0] key,
  output logic                    grant_valid,
  output logic [IW-1:0]           grant_idx
);

  // Pad to a power of two and reduce level by level.
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned P      = 1 << LEVELS;

  logic [LEVELS:0][P-1:0]            lv_v;
  logic [LEVELS:0][P-1:0][KEY_W-1:0] lv_k;
  logic [LEVELS:0][P-1:0][IW-1:0]    lv_i;

  always_comb begin
    lv_v = '0;
    lv_k = '0;
    lv_i = '0;
    for (int unsigned j = 0; j < P; j++) begin
      if (j < N) begin
        lv_v[0][j] = valid[j];
        lv_k[0][j] = key[j];
        lv_i[0][j] = IW'(j);
      end
    end
    for (int unsigned l = 0; l < LEVELS; l++) begin
      for (int unsigned j = 0; j < (P >> (l + 1)); j++) begin
        // right candidate wins only if strictly better (ties go to lower index)
        if (lv_v[l][2*j+1] && (!lv_v[l][2*j] || (lv_k[l][2*j+1] > lv_k[l][2*j]))) begin
          lv_v[l+1][j] = 1'b1;
          lv_k[l+1][j] = lv_k[l][2*j+1];
          lv_i[l+1][j] = lv_i[l][2*j+1];
        end else begin
          lv_v[l+1][j] = lv_v[l][2*j];
          lv_k[l+1][j] = lv_k[l][2*j];
          lv_i[l+1][j] = lv_i[l][2*j];
        end
      end
    end
    grant_valid = lv_v[LEVELS][0];
    grant_idx   = lv_i[LEVELS][0];
  end

endmodule
