// txn_queue: transaction queue of the memory controller.
//
// Holds the requests waiting for DRAM: a read queue (30 entries) and a write
// queue (30 entries). Three producers feed it: read misses of the
// last-level cache (read queue), dirty writebacks of the cache (write
// queue) and cache-bypassing real-time requests (read or write queue by
// their direction). Each queue takes one request per cycle; the cache has
// priority, so a bypass request waits while the cache uses the same queue.
//
// For the memory scheduler the two queues are shown as one flat array of
// RQ_DEPTH + WQ_DEPTH entries: indices 0..RQ_DEPTH-1 are the read queue,
// the rest the write queue. The scheduler removes the entry it issues with
// rm_valid/rm_idx; the removal takes effect at the next edge.
// Queue sizes follow the evaluated configuration; the insert priority is
// this design's choice.
module txn_queue
  import umc_pkg::*;
#(
  parameter int unsigned RQ_DEPTH = 30,
  parameter int unsigned WQ_DEPTH = 30,
  parameter int unsigned AGE_W    = 12,
  localparam int unsigned N  = RQ_DEPTH + WQ_DEPTH,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned RW = (RQ_DEPTH > 1) ? $clog2(RQ_DEPTH) : 1,
  localparam int unsigned WW = (WQ_DEPTH > 1) ? $clog2(WQ_DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // cache read misses
  input  logic             miss_valid,
  output logic             miss_ready,
  input  txn_t             miss_txn,
  // cache writebacks
  input  logic             wb_valid,
  output logic             wb_ready,
  input  txn_t             wb_txn,
  // cache-bypassing requests
  input  logic             byp_valid,
  output logic             byp_ready,
  input  txn_t             byp_txn,
  // removal by the scheduler
  input  logic             rm_valid,
  input  logic [IW-1:0]    rm_idx,
  // flat view
  output logic [N-1:0]     ent_valid,
  output txn_t             ent_txn [N],
  output logic [AGE_W-1:0] ent_age [N],
  output logic [RW:0]      rq_count,
  output logic [WW:0]      wq_count
);

  logic rq_free, wq_free;
  logic rq_in_valid, wq_in_valid;
  txn_t rq_in, wq_in;

  assign miss_ready = rq_free;
  assign wb_ready   = wq_free;
  assign byp_ready  = byp_txn.we ? (wq_free && !wb_valid) : (rq_free && !miss_valid);

  always_comb begin
    rq_in_valid = miss_valid || (byp_valid && !byp_txn.we);
    rq_in       = miss_valid ? miss_txn : byp_txn;
    wq_in_valid = wb_valid || (byp_valid && byp_txn.we);
    wq_in       = wb_valid ? wb_txn : byp_txn;
  end

  logic [RQ_DEPTH-1:0] rq_v;
  logic [WQ_DEPTH-1:0] wq_v;
  txn_t                rq_t [RQ_DEPTH];
  txn_t                wq_t [WQ_DEPTH];
  logic [AGE_W-1:0]    rq_a [RQ_DEPTH];
  logic [AGE_W-1:0]    wq_a [WQ_DEPTH];

  logic rm_rq, rm_wq;
  assign rm_rq = rm_valid && (rm_idx < IW'(RQ_DEPTH));
  assign rm_wq = rm_valid && (rm_idx >= IW'(RQ_DEPTH));

  logic [RW-1:0] rq_rm_idx;
  logic [WW-1:0] wq_rm_idx;
  assign rq_rm_idx = RW'(rm_idx);
  assign wq_rm_idx = WW'(rm_idx - IW'(RQ_DEPTH));

  slot_buffer #(.DEPTH(RQ_DEPTH), .AGE_W(AGE_W), .T(txn_t)) u_rq (
    .clk, .rst_n,
    .in_valid(rq_in_valid), .in_ready(rq_free), .in_data('{rq_in}),
    .rm0_valid(rm_rq), .rm0_idx(rq_rm_idx), .rm1_valid(1'b0), .rm1_idx('0),
    .ent_valid(rq_v), .ent_data(rq_t), .ent_age(rq_a), .count(rq_count)
  );

  slot_buffer #(.DEPTH(WQ_DEPTH), .AGE_W(AGE_W), .T(txn_t)) u_wq (
    .clk, .rst_n,
    .in_valid(wq_in_valid), .in_ready(wq_free), .in_data('{wq_in}),
    .rm0_valid(rm_wq), .rm0_idx(wq_rm_idx), .rm1_valid(1'b0), .rm1_idx('0),
    .ent_valid(wq_v), .ent_data(wq_t), .ent_age(wq_a), .count(wq_count)
  );

  always_comb begin
    ent_valid = {wq_v, rq_v};
    for (int i = 0; i < RQ_DEPTH; i++) begin
      ent_txn[i] = rq_t[i];
      ent_age[i] = rq_a[i];
    end
    for (int i = 0; i < WQ_DEPTH; i++) begin
      ent_txn[RQ_DEPTH+i] = wq_t[i];
      ent_age[RQ_DEPTH+i] = wq_a[i];
    end
  end

endmodule
