// mem_scheduler: the memory scheduler with its two working modes.
//
// Scheduling mode (mode = 1): the conventional task. Among the requests in
// the transaction queue whose bank's command generator is idle, pick one,
// row-buffer hits (bank open at the request's row) first, then the oldest.
// The request leaves the queue (tq_rm_*) and goes to its bank's command
// generator (cg_acc_*).
//
// Harvesting mode (mode = 0): used in every cycle in which no queued request
// can be scheduled, i.e. while the scheduler would otherwise wait on DRAM
// timing. Among the read requests in the cache request buffers, pick the
// oldest whose row is open in its bank, or will be opened by the bank's
// command generator within T_MISS cycles (the cache's miss latency). It
// leaves the request buffer (hv_*) and enters the fast lane, so that, if it
// misses in the cache, it reaches the transaction queue before that row is
// closed. Nothing is harvested when no read qualifies or the fast lane is
// full, and the entry the cache's local scheduler takes in the same cycle
// is skipped. Rows are not held open for harvested requests.
//
// Both modes use one age_arbiter: the mode drives the multiplexers in
// front of it (inputs from the transaction queue or from the request
// buffers, key {row_hit, age} or {0, age}) and behind it (winner to a
// command generator or to the fast lane). The mode rule and T_MISS follow
// the design; choosing "no schedulable request" as the harvest condition is
// this design's reading of "idle cycles".
//
// Purely combinational; all decisions take effect at the next edge.
module mem_scheduler
  import umc_pkg::*;
#(
  parameter int unsigned N_TQ   = 60,
  parameter int unsigned N_CRB  = 40,
  parameter int unsigned AGE_W  = 12,
  parameter int unsigned ETA_W  = 8,
  parameter int unsigned T_MISS = 4,
  localparam int unsigned N     = (N_TQ > N_CRB) ? N_TQ : N_CRB,
  localparam int unsigned IW    = $clog2(N),
  localparam int unsigned TIW   = $clog2(N_TQ),
  localparam int unsigned CIW   = $clog2(N_CRB)
) (
  // transaction queue
  input  logic [N_TQ-1:0]  tq_valid,
  input  txn_t             tq_txn [N_TQ],
  input  logic [AGE_W-1:0] tq_age [N_TQ],
  output logic             tq_rm_valid,
  output logic [TIW-1:0]   tq_rm_idx,
  // cache request buffers
  input  logic [N_CRB-1:0] crb_valid,
  input  mem_req_t         crb_req [N_CRB],
  input  logic [AGE_W-1:0] crb_age [N_CRB],
  input  logic             loc_take,
  input  logic [CIW-1:0]   loc_idx,
  output logic             hv_valid,
  output logic [CIW-1:0]   hv_idx,
  output mem_req_t         hv_req,
  input  logic             fl_ready,
  // bank states table
  input  logic [NB-1:0]    bk_open_valid,
  input  row_t             bk_open_row [NB],
  input  logic [NB-1:0]    bk_busy,
  input  logic [NB-1:0]    bk_next_valid,
  input  row_t             bk_next_row [NB],
  input  logic [ETA_W-1:0] bk_next_eta [NB],
  // to the command generators
  output logic             cg_acc_valid,
  output fbank_t           cg_acc_bank,
  output txn_t             cg_acc_txn,
  output logic             cg_acc_hit,
  // working mode: 1 scheduling, 0 harvesting
  output logic             mode
);

  // ---- scheduling-mode candidates ----
  logic [N_TQ-1:0] tq_elig, tq_hit;
  always_comb begin
    for (int i = 0; i < N_TQ; i++) begin
      fbank_t b;
      b = addr_fbank(tq_txn[i].addr);
      tq_elig[i] = tq_valid[i] && !bk_busy[b];
      tq_hit[i]  = bk_open_valid[b] && (bk_open_row[b] == addr_row(tq_txn[i].addr));
    end
  end

  // ---- harvesting-mode candidates ----
  logic [N_CRB-1:0] hv_elig;
  always_comb begin
    for (int i = 0; i < N_CRB; i++) begin
      fbank_t b;
      row_t   r;
      logic   opened, opening;
      b = addr_fbank(crb_req[i].addr);
      r = addr_row(crb_req[i].addr);
      opened  = bk_open_valid[b] && (bk_open_row[b] == r);
      opening = bk_next_valid[b] && (bk_next_row[b] == r) && (bk_next_eta[b] <= ETA_W'(T_MISS));
      hv_elig[i] = crb_valid[i] && !crb_req[i].we && (opened || opening) &&
                   !(loc_take && loc_idx == CIW'(i));
    end
  end

  assign mode = |tq_elig;

  // ---- input multiplexers and the shared arbiter ----
  logic [N-1:0]            arb_valid;
  logic [N-1:0][AGE_W:0]   arb_key;
  logic                    arb_gv;
  logic [IW-1:0]           arb_idx;

  always_comb begin
    arb_valid = '0;
    arb_key   = '0;
    if (mode) begin
      for (int i = 0; i < N_TQ; i++) begin
        arb_valid[i] = tq_elig[i];
        arb_key[i]   = {tq_hit[i], tq_age[i]};
      end
    end else begin
      for (int i = 0; i < N_CRB; i++) begin
        arb_valid[i] = hv_elig[i] && fl_ready;
        arb_key[i]   = {1'b0, crb_age[i]};
      end
    end
  end

  age_arbiter #(.N(N), .KEY_W(AGE_W + 1)) u_arb (
    .valid(arb_valid), .key(arb_key), .grant_valid(arb_gv), .grant_idx(arb_idx)
  );

  // ---- output demultiplexers ----
  logic [TIW-1:0] t_idx;
  logic [CIW-1:0] c_idx;
  assign t_idx = TIW'(arb_idx);
  assign c_idx = CIW'(arb_idx);

  assign tq_rm_valid  = mode && arb_gv;
  assign tq_rm_idx    = t_idx;
  assign cg_acc_valid = mode && arb_gv;
  assign cg_acc_txn   = tq_txn[t_idx];
  assign cg_acc_bank  = addr_fbank(tq_txn[t_idx].addr);
  assign cg_acc_hit   = tq_hit[t_idx];

  assign hv_valid = !mode && arb_gv;
  assign hv_idx   = c_idx;
  assign hv_req   = crb_req[c_idx];

endmodule
