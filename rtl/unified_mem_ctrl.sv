// unified_mem_ctrl: unified controller for a shared last-level cache and a
// DRAM channel, with orchestrated cache and memory schedulers.
//
// Path of a request: the cores' requests wait in the cache request buffers
// (40), entering through N_REQ_PORTS ports per cycle. The cache's local scheduler feeds the pipelined last-level cache
// (2 MB, 8 ways, 4-cycle lookup) with reads before writes, oldest first.
// Misses and dirty writebacks go to the transaction queue (30 reads, 30
// writes), joined by cache-bypassing real-time traffic (byp_*). The memory
// scheduler moves queued requests to the per-bank command generators, which
// emit PRE/ACT/RD/WR onto the command bus through the command bus arbiter.
//
// Orchestration: the memory scheduler also sees the cache request buffers.
// In every cycle in which it has nothing to schedule it harvests: it takes
// the oldest buffered read whose row is open, or will be opened within the
// cache's miss latency, and sends it down the one-entry fast lane, which the
// cache serves before its request buffers. If that read misses, it reaches
// the transaction queue while its row is still open and is served as a
// row-buffer hit instead of costing a later precharge and activation.
//
// Interface: req_* from the cores (valid/ready), byp_* for bypassing
// traffic, llc_resp_* for cache hits and write acknowledgements, mem_done_*
// for completed DRAM reads and writes (writebacks included, src tells them
// apart), dram_cmd_* the command bus toward the DRAM device, mode the
// scheduler's mode, stats event counters. After reset the cache clears its
// tags for SETS cycles (init_busy); requests wait in the buffers meanwhile.
// One clock drives everything; DRAM timing is counted in its cycles.
module unified_mem_ctrl
  import umc_pkg::*;
#(
  parameter int unsigned LLC_SIZE   = 2097152,
  parameter int unsigned LLC_WAYS   = 8,
  parameter int unsigned LLC_LAT    = 4,
  parameter int unsigned CRB_DEPTH  = 40,
  parameter int unsigned N_REQ_PORTS = 2,
  parameter int unsigned RQ_DEPTH   = 30,
  parameter int unsigned WQ_DEPTH   = 30,
  parameter int unsigned T_CL       = 36,
  parameter int unsigned T_RCD      = 34,
  parameter int unsigned T_RP       = 34,
  parameter int unsigned T_WTR      = 19,
  parameter int unsigned T_RTP      = 14,
  parameter int unsigned T_WR       = 34,
  parameter int unsigned T_RRD      = 19,
  parameter int unsigned T_FAW      = 75,
  parameter int unsigned T_WL       = 18,
  parameter int unsigned T_BURST    = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      init_busy,
  // requests from the cores (through the cache)
  input  logic [N_REQ_PORTS-1:0] req_valid,
  output logic [N_REQ_PORTS-1:0] req_ready,
  input  mem_req_t  req [N_REQ_PORTS],
  // cache-bypassing requests
  input  logic      byp_valid,
  output logic      byp_ready,
  input  mem_req_t  byp_req,
  // cache hits and write acknowledgements
  output logic      llc_resp_valid,
  output mem_resp_t llc_resp,
  // DRAM completions
  output logic      mem_done_valid,
  output mem_resp_t mem_done,
  // DRAM command bus
  output logic      dram_cmd_valid,
  output dram_cmd_t dram_cmd,
  // status
  output logic      mode,
  output stats_t    stats
);

  localparam int unsigned AGE_W = 12;
  localparam int unsigned ETA_W = 8;
  localparam int unsigned N_TQ  = RQ_DEPTH + WQ_DEPTH;
  localparam int unsigned CIW   = $clog2(CRB_DEPTH);
  localparam int unsigned TIW   = $clog2(N_TQ);

  // ---------------- cache request buffers ----------------
  logic                 loc_valid, loc_take;
  logic [CIW-1:0]       loc_idx;
  mem_req_t             loc_req;
  logic                 hv_valid;
  logic [CIW-1:0]       hv_idx;
  mem_req_t             hv_req;
  logic [CRB_DEPTH-1:0] crb_valid;
  mem_req_t             crb_req [CRB_DEPTH];
  logic [AGE_W-1:0]     crb_age [CRB_DEPTH];

  cache_req_buffer #(.DEPTH(CRB_DEPTH), .AGE_W(AGE_W), .N_IN(N_REQ_PORTS)) u_crb (
    .clk, .rst_n,
    .in_valid(req_valid), .in_ready(req_ready), .in_req(req),
    .loc_valid, .loc_idx, .loc_req, .loc_take,
    .hv_valid, .hv_idx,
    .ent_valid(crb_valid), .ent_req(crb_req), .ent_age(crb_age), .count()
  );

  // ---------------- fast lane ----------------
  logic     fl_in_ready, fl_valid, fl_take;
  mem_req_t fl_req;

  fast_lane #(.T(mem_req_t)) u_fast_lane (
    .clk, .rst_n,
    .in_valid(hv_valid), .in_ready(fl_in_ready), .in_data(hv_req),
    .out_valid(fl_valid), .out_ready(fl_take), .out_data(fl_req)
  );

  // ---------------- last-level cache ----------------
  logic miss_valid, miss_ready, wb_valid, wb_ready, ev_hit, ev_miss;
  txn_t miss_txn, wb_txn;
  logic fl_ready_llc;

  llc #(.SIZE_BYTES(LLC_SIZE), .WAYS(LLC_WAYS), .LAT(LLC_LAT)) u_llc (
    .clk, .rst_n, .init_busy,
    .fl_valid, .fl_ready(fl_ready_llc), .fl_req,
    .loc_valid, .loc_take, .loc_req,
    .resp_valid(llc_resp_valid), .resp(llc_resp),
    .miss_valid, .miss_ready, .miss_txn,
    .wb_valid, .wb_ready, .wb_txn,
    .ev_hit, .ev_miss
  );
  assign fl_take = fl_valid && fl_ready_llc;

  // ---------------- transaction queue ----------------
  txn_t byp_txn;
  assign byp_txn = '{addr: byp_req.addr, we: byp_req.we, id: byp_req.id, src: SRC_BYPASS, fast: 1'b0};

  logic             tq_rm_valid;
  logic [TIW-1:0]   tq_rm_idx;
  logic [N_TQ-1:0]  tq_valid;
  txn_t             tq_txn [N_TQ];
  logic [AGE_W-1:0] tq_age [N_TQ];

  txn_queue #(.RQ_DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH), .AGE_W(AGE_W)) u_tq (
    .clk, .rst_n,
    .miss_valid, .miss_ready, .miss_txn,
    .wb_valid, .wb_ready, .wb_txn,
    .byp_valid, .byp_ready, .byp_txn,
    .rm_valid(tq_rm_valid), .rm_idx(tq_rm_idx),
    .ent_valid(tq_valid), .ent_txn(tq_txn), .ent_age(tq_age),
    .rq_count(), .wq_count()
  );

  // ---------------- bank states table ----------------
  logic [NB-1:0]    cg_busy, cg_next_valid;
  row_t             cg_next_row [NB];
  logic [ETA_W-1:0] cg_next_eta [NB];
  logic [NB-1:0]    bk_open_valid, bk_busy, bk_next_valid;
  row_t             bk_open_row [NB];
  row_t             bk_next_row [NB];
  logic [ETA_W-1:0] bk_next_eta [NB];

  bank_state_table #(.ETA_W(ETA_W)) u_bst (
    .clk, .rst_n,
    .cmd_valid(dram_cmd_valid), .cmd(dram_cmd),
    .cg_busy, .cg_next_valid, .cg_next_row, .cg_next_eta,
    .open_valid(bk_open_valid), .open_row(bk_open_row), .busy(bk_busy),
    .next_valid(bk_next_valid), .next_row(bk_next_row), .next_eta(bk_next_eta)
  );

  // ---------------- memory scheduler ----------------
  logic   cg_acc_valid;
  fbank_t cg_acc_bank;
  txn_t   cg_acc_txn;

  mem_scheduler #(.N_TQ(N_TQ), .N_CRB(CRB_DEPTH), .AGE_W(AGE_W), .ETA_W(ETA_W),
                  .T_MISS(LLC_LAT)) u_sched (
    .tq_valid, .tq_txn, .tq_age, .tq_rm_valid, .tq_rm_idx,
    .crb_valid, .crb_req, .crb_age, .loc_take, .loc_idx,
    .hv_valid, .hv_idx, .hv_req, .fl_ready(fl_in_ready),
    .bk_open_valid, .bk_open_row, .bk_busy, .bk_next_valid, .bk_next_row, .bk_next_eta,
    .cg_acc_valid, .cg_acc_bank, .cg_acc_txn, .cg_acc_hit(),
    .mode
  );

  // ---------------- per-bank command generators ----------------
  logic [NB-1:0] cand_valid, grant, ev_row_hit;
  dram_cmd_t     cand [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bank
    cmd_gen #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RTP(T_RTP), .T_WR(T_WR), .T_WL(T_WL),
              .T_BURST(T_BURST), .ETA_W(ETA_W)) u_cg (
      .clk, .rst_n,
      .bank_id(fbank_t'(b)),
      .acc_valid(cg_acc_valid && cg_acc_bank == fbank_t'(b)),
      .acc_txn(cg_acc_txn),
      .busy(cg_busy[b]),
      .open_valid(bk_open_valid[b]), .open_row(bk_open_row[b]),
      .cand_valid(cand_valid[b]), .cand(cand[b]), .grant(grant[b]),
      .next_valid(cg_next_valid[b]), .next_row(cg_next_row[b]), .next_eta(cg_next_eta[b]),
      .ev_row_hit(ev_row_hit[b])
    );
  end

  // ---------------- command bus ----------------
  cmd_bus_arbiter #(.T_CL(T_CL), .T_WTR(T_WTR), .T_RRD(T_RRD), .T_FAW(T_FAW),
                    .T_WL(T_WL), .T_BURST(T_BURST)) u_cba (
    .clk, .rst_n, .cand_valid, .cand, .grant,
    .cmd_valid(dram_cmd_valid), .cmd(dram_cmd)
  );

  read_return #(.T_CL(T_CL), .T_WL(T_WL), .T_BURST(T_BURST), .DEPTH(8)) u_ret (
    .clk, .rst_n, .cmd_valid(dram_cmd_valid), .cmd(dram_cmd),
    .done_valid(mem_done_valid), .done(mem_done)
  );

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
    end else begin
      if (dram_cmd_valid) begin
        unique case (dram_cmd.cmd)
          CMD_ACT: stats.act <= stats.act + 1;
          CMD_PRE: stats.pre <= stats.pre + 1;
          CMD_RD:  stats.rd  <= stats.rd + 1;
          CMD_WR:  stats.wr  <= stats.wr + 1;
          default: ;
        endcase
      end
      if (|ev_row_hit)            stats.row_hit     <= stats.row_hit + 1;
      if (hv_valid)               stats.harvest     <= stats.harvest + 1;
      if (ev_hit)                 stats.llc_hit     <= stats.llc_hit + 1;
      if (ev_miss)                stats.llc_miss    <= stats.llc_miss + 1;
      if (miss_valid && miss_ready && miss_txn.fast) stats.fast_miss <= stats.fast_miss + 1;
      if (!mode && !init_busy)    stats.harvest_cyc <= stats.harvest_cyc + 1;
    end
  end

endmodule
