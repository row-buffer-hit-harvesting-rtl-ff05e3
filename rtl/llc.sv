// llc: pipelined last-level cache (tag side) of the unified controller.
//
// One request enters per cycle. The fast lane is always served first; when
// it is empty the local scheduler's pick from the cache request buffers is
// taken (loc_take). The lookup, hit/miss decision, replacement and the tag
// update all happen in the cycle a request enters; the result then travels
// down a LAT-stage pipeline, so a hit is answered (resp_*) and a miss is
// handed to the transaction queue (miss_*) exactly LAT cycles after entry.
// This is what lets a harvested read reach the transaction queue t_miss
// cycles after it was harvested.
//
// Organisation: SIZE_BYTES / (LINE_BYTES * WAYS) sets (4096 at 2 MB, 8 ways,
// 64-byte lines), tree pseudo-LRU replacement, invalid ways filled first.
// A read miss installs the line at lookup (clean) and issues a DRAM read; a
// write miss installs it dirty without a fetch and is acknowledged like a
// hit. Replacing a dirty line issues a writeback (wb_*) together with the
// miss. Data payloads are not modelled, and there are no miss status
// registers: a later access to a line whose fill is still in DRAM counts as
// a hit. Size, ways and latency follow the evaluated configuration; line
// size, replacement, write policy and the tag-only organisation are this
// design's choices.
//
// Back-pressure: when the transaction queue cannot take the miss and/or
// writeback of the last stage, the whole pipeline holds and no request is
// taken. After reset the tag state is cleared one set per cycle (SETS
// cycles), during which no request is taken (init_busy).
module llc
  import umc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 2097152,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned LAT        = 4,
  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned OFF_W = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  output logic      init_busy,
  // fast lane (priority input)
  input  logic      fl_valid,
  output logic      fl_ready,
  input  mem_req_t  fl_req,
  // local scheduler pick from the cache request buffers
  input  logic      loc_valid,
  output logic      loc_take,
  input  mem_req_t  loc_req,
  // hit / write acknowledgement toward the cores
  output logic      resp_valid,
  output mem_resp_t resp,
  // read miss toward the read queue
  output logic      miss_valid,
  input  logic      miss_ready,
  output txn_t      miss_txn,
  // writeback toward the write queue
  output logic      wb_valid,
  input  logic      wb_ready,
  output txn_t      wb_txn,
  // event strobes for statistics
  output logic      ev_hit,
  output logic      ev_miss
);

  // ---------------- tag state ----------------
  logic [WAYS-1:0][TAG_W-1:0] tag_m   [SETS];
  logic [WAYS-1:0]            valid_m [SETS];
  logic [WAYS-1:0]            dirty_m [SETS];
  logic [WAYS-2:0]            plru_m  [SETS];

  // ---------------- pipeline ----------------
  typedef struct packed {
    logic     valid;
    logic     hit;
    logic     fast;
    mem_req_t req;
    logic     need_miss;
    logic     need_wb;
    addr_t    wb_addr;
  } stage_t;

  stage_t pipe [LAT];
  stage_t enter;

  logic need_miss_o, need_wb_o, emit_ok, stall, accept;
  logic [SET_W-1:0] init_cnt;

  assign need_miss_o = pipe[LAT-1].valid && pipe[LAT-1].need_miss;
  assign need_wb_o   = pipe[LAT-1].valid && pipe[LAT-1].need_wb;
  assign emit_ok     = (!need_miss_o || miss_ready) && (!need_wb_o || wb_ready);
  assign stall       = !emit_ok;

  // Input selection: the fast lane first, otherwise the local pick.
  mem_req_t in_req;
  logic     in_fast;
  assign in_fast  = fl_valid;
  assign in_req   = fl_valid ? fl_req : loc_req;
  assign accept   = !init_busy && !stall && (fl_valid || loc_valid);
  assign fl_ready = !init_busy && !stall;
  assign loc_take = !init_busy && !stall && !fl_valid && loc_valid;

  // ---------------- lookup ----------------
  logic [SET_W-1:0] set_idx;
  logic [TAG_W-1:0] tag_in;
  logic             hit;
  logic [WAY_W-1:0] hit_way, vic_way, use_way;
  logic             any_invalid;
  logic [WAY_W-1:0] inv_way;
  logic [WAYS-2:0]  plru_new;

  assign set_idx = in_req.addr[OFF_W +: SET_W];
  assign tag_in  = in_req.addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    any_invalid = 1'b0;
    inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_m[set_idx][w] && tag_m[set_idx][w] == tag_in) begin
        hit = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!valid_m[set_idx][w]) begin
        any_invalid = 1'b1;
        inv_way = WAY_W'(w);
      end
    end
  end

  // Tree pseudo-LRU: node n has children 2n+1 / 2n+2; bit 0 means the
  // victim lies on the left side.
  always_comb begin
    int unsigned node;
    logic [WAY_W-1:0] leaf;
    node = 0;
    leaf = '0;
    for (int l = 0; l < WAY_W; l++) begin
      leaf = {leaf[WAY_W-2:0], plru_m[set_idx][node]};
      node = 2 * node + 1 + int'(plru_m[set_idx][node]);
    end
    vic_way = any_invalid ? inv_way : leaf;
  end

  assign use_way = hit ? hit_way : vic_way;

  always_comb begin
    int unsigned node;
    plru_new = plru_m[set_idx];
    node = 0;
    for (int l = 0; l < WAY_W; l++) begin
      // point away from the used way
      plru_new[node] = !use_way[WAY_W-1-l];
      node = 2 * node + 1 + int'(use_way[WAY_W-1-l]);
    end
  end

  always_comb begin
    enter = '0;
    enter.valid     = accept;
    enter.hit       = hit;
    enter.fast      = in_fast;
    enter.req       = in_req;
    enter.need_miss = !hit && !in_req.we;
    enter.need_wb   = !hit && valid_m[set_idx][vic_way] && dirty_m[set_idx][vic_way];
    enter.wb_addr   = {tag_m[set_idx][vic_way], set_idx, {OFF_W{1'b0}}};
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk) begin
    if (init_busy) begin
      valid_m[init_cnt] <= '0;
      dirty_m[init_cnt] <= '0;
      plru_m[init_cnt]  <= '0;
    end else if (accept) begin
      plru_m[set_idx] <= plru_new;
      if (!hit) begin
        tag_m[set_idx][vic_way]   <= tag_in;
        valid_m[set_idx][vic_way] <= 1'b1;
        dirty_m[set_idx][vic_way] <= in_req.we;
      end else if (in_req.we) begin
        dirty_m[set_idx][hit_way] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_cnt  <= '0;
    end else if (init_busy) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == SET_W'(SETS - 1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) pipe[s] <= '0;
    end else if (!stall) begin
      pipe[0] <= enter;
      for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
    end
  end

  // ---------------- outputs ----------------
  stage_t o;
  assign o = pipe[LAT-1];

  assign resp_valid = o.valid && emit_ok && (o.hit || o.req.we);
  assign resp       = '{we: o.req.we, id: o.req.id, src: SRC_LLC_MISS};

  assign miss_valid = need_miss_o && emit_ok;
  assign miss_txn   = '{addr: o.req.addr, we: 1'b0, id: o.req.id, src: SRC_LLC_MISS, fast: o.fast};
  assign wb_valid   = need_wb_o && emit_ok;
  assign wb_txn     = '{addr: o.wb_addr, we: 1'b1, id: '0, src: SRC_LLC_WB, fast: 1'b0};

  assign ev_hit  = accept && hit;
  assign ev_miss = accept && !hit;

endmodule
