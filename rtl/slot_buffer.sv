// slot_buffer: unordered request store with per-entry age.
//
// Storage under the cache request buffers and under each half of the
// transaction queue. Every slot holds one entry of type T and an age
// counter that starts at 0 when the entry is written and counts up by one
// per cycle, saturating at its maximum; the schedulers order "old over new"
// by comparing these ages. All entries are visible at once (ent_*), so
// schedulers can scan the whole buffer in one cycle.
//
// Interface: N_IN insert ports (valid/ready each; port k writes the k-th
// lowest free slot and is ready when more than k slots are free, whatever
// the other ports do) and two remove ports that name a slot by index. Removing a slot
// and inserting take effect at the next clock edge; a slot freed in a cycle
// is not reused in that same cycle. Removing an empty slot is an error
// (assertion). The slot organisation and the saturating age counter are
// this design's choices.
module slot_buffer #(
  parameter int unsigned DEPTH = 40,
  parameter int unsigned AGE_W = 12,
  parameter int unsigned N_IN  = 1,
  parameter type         T     = umc_pkg::mem_req_t,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // insert
  input  logic [N_IN-1:0]       in_valid,
  output logic [N_IN-1:0]       in_ready,
  input  T                      in_data [N_IN],
  // remove ports
  input  logic                  rm0_valid,
  input  logic [IW-1:0]         rm0_idx,
  input  logic                  rm1_valid,
  input  logic [IW-1:0]         rm1_idx,
  // contents
  output logic [DEPTH-1:0]      ent_valid,
  output T                      ent_data [DEPTH],
  output logic [AGE_W-1:0]      ent_age  [DEPTH],
  output logic [IW:0]           count
);

  // free_idx[k]: the k-th lowest free slot; has_free[k]: it exists.
  logic [IW-1:0]   free_idx [N_IN];
  logic [N_IN-1:0] has_free;

  always_comb begin
    int unsigned k;
    k = 0;
    has_free = '0;
    for (int p = 0; p < N_IN; p++) free_idx[p] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!ent_valid[i] && k < N_IN) begin
        has_free[k] = 1'b1;
        free_idx[k] = IW'(i);
        k = k + 1;
      end
    end
  end

  assign in_ready = has_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        ent_age[i]  <= '0;
        ent_data[i] <= '0;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (ent_valid[i] && ent_age[i] != '1) ent_age[i] <= ent_age[i] + 1'b1;
      end
      if (rm0_valid) ent_valid[rm0_idx] <= 1'b0;
      if (rm1_valid) ent_valid[rm1_idx] <= 1'b0;
      for (int p = 0; p < N_IN; p++) begin
        if (in_valid[p] && has_free[p]) begin
          ent_valid[free_idx[p]] <= 1'b1;
          ent_data[free_idx[p]]  <= in_data[p];
          ent_age[free_idx[p]]   <= '0;
        end
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + (IW+1)'(ent_valid[i]);
  end

  // A remove port must name an occupied slot, and the two ports never the same one.
  a_rm0_valid : assert property (@(posedge clk) disable iff (!rst_n) rm0_valid |-> ent_valid[rm0_idx]);
  a_rm1_valid : assert property (@(posedge clk) disable iff (!rst_n) rm1_valid |-> ent_valid[rm1_idx]);
  a_rm_distinct : assert property (@(posedge clk) disable iff (!rst_n)
                                   (rm0_valid && rm1_valid) |-> (rm0_idx != rm1_idx));

endmodule
