// tb_unified_mem_ctrl: end-to-end test of the unified controller at its
// default (full) size: 2 MB 8-way cache, 40 request buffers, 30+30
// transaction queue entries, 2 ranks x 8 banks, LPDDR4 timing.
//
// Phase 1 replays the motivating case of two reads A and B waiting at the
// cache for the same bank, A for a closed row R1 and B for the open row R2,
// with A ahead of B. A backlog of cache hits keeps A waiting; the memory
// scheduler, having nothing to schedule, must harvest B into the fast lane,
// B's miss must reach the transaction queue exactly 1 + LAT cycles after
// the harvest, and B must be read from the open row before the bank is
// precharged for A.
//
// Phase 2 runs mixed random traffic: CPU-like reads and writes on request
// port 0, streaming real-time bursts on port 1 and streaming bypass traffic
// straight into the transaction queue. Every request must complete exactly
// once (cache hit / write acknowledgement, or DRAM completion), the command
// bus must obey the DRAM protocol (dram_model), and the event counters must
// add up (every column command without a row hit had its own ACT). Each
// mechanism of the design must be seen at least once: harvesting (from an
// open row and from a row about to open), harvested misses, row hits and
// conflicts, writebacks, bypassing, mode switches, fast-lane priority, full
// request buffers, a full transaction queue and the resulting cache stall.
module tb_unified_mem_ctrl;
  import umc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init_busy;
  logic [1:0] req_valid, req_ready;
  mem_req_t req [2];
  logic byp_valid, byp_ready;
  mem_req_t byp_req;
  logic llc_resp_valid, mem_done_valid, dram_cmd_valid, mode;
  mem_resp_t llc_resp, mem_done;
  dram_cmd_t dram_cmd;
  stats_t stats;
  int violations, n_cmds;
  int checks = 0, failures = 0;

  unified_mem_ctrl dut (.*);

  dram_model u_dram (.clk, .rst_n, .cmd_valid(dram_cmd_valid), .cmd(dram_cmd), .violations, .n_cmds);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  function automatic addr_t mk(int bank, int row, int col);
    return {17'(row), 4'(bank), 5'(col), 6'(0)};
  endfunction

  // ---------------- outstanding-request bookkeeping ----------------
  bit core_out [256];
  bit core_we  [256];
  bit byp_out  [256];
  bit byp_we   [256];
  int n_core_done = 0, n_byp_done = 0, n_wb_done = 0, n_mem_done = 0;

  function automatic int free_core_id();
    for (int k = 0; k < 256; k++) begin
      int i;
      i = (cyc * 7 + k) % 256;
      if (!core_out[i]) return i;
    end
    return -1;
  endfunction

  function automatic int free_byp_id();
    for (int k = 0; k < 256; k++) begin
      int i;
      i = (cyc * 5 + k) % 256;
      if (!byp_out[i]) return i;
    end
    return -1;
  endfunction

  function automatic int outstanding();
    int n;
    n = 0;
    for (int i = 0; i < 256; i++) n += int'(core_out[i]) + int'(byp_out[i]);
    return n;
  endfunction

  // ---------------- mechanism coverage ----------------
  int cov_harvest_open = 0, cov_harvest_opening = 0, cov_mode_switch = 0, cov_fl_priority = 0;
  int cov_crb_full = 0, cov_tq_full = 0, cov_llc_stall = 0, cov_byp_blocked = 0;
  logic last_mode;

  // B of phase 1
  int b_id = -1, b_harvest_cyc = -1, b_miss_cyc = -1;
  bit phase1_watch = 0;
  int phase1_first_k_cmd = -1;   // 1: RD of B first, 2: PRE first
  localparam int K = 2, R1 = 60, R2 = 50;

  always @(negedge clk) if (rst_n && !init_busy) begin
    // completions
    if (llc_resp_valid) begin
      int i;
      i = int'(llc_resp.id);
      chk(core_out[i] && core_we[i] == llc_resp.we, $sformatf("cache response for id %0d", i));
      core_out[i] = 0;
      n_core_done++;
    end
    if (mem_done_valid) begin
      int i;
      i = int'(mem_done.id);
      n_mem_done++;
      case (mem_done.src)
        SRC_LLC_MISS: begin
          chk(core_out[i] && !core_we[i] && !mem_done.we, $sformatf("DRAM read for id %0d", i));
          core_out[i] = 0;
          n_core_done++;
        end
        SRC_BYPASS: begin
          chk(byp_out[i] && byp_we[i] == mem_done.we, $sformatf("bypass completion id %0d", i));
          byp_out[i] = 0;
          n_byp_done++;
        end
        SRC_LLC_WB: begin
          chk(mem_done.we, "writeback is a write");
          n_wb_done++;
        end
        default: chk(0, "completion source");
      endcase
    end
    // coverage
    if (dut.hv_valid) begin
      fbank_t b;
      b = addr_fbank(dut.hv_req.addr);
      if (dut.bk_open_valid[b] && dut.bk_open_row[b] == addr_row(dut.hv_req.addr)) cov_harvest_open++;
      else cov_harvest_opening++;
      if (int'(dut.hv_req.id) == b_id && phase1_watch) b_harvest_cyc = cyc;
    end
    if (dut.miss_valid && dut.miss_ready && int'(dut.miss_txn.id) == b_id && phase1_watch && b_miss_cyc < 0)
      b_miss_cyc = cyc;
    if (phase1_watch && dram_cmd_valid && int'({dram_cmd.rank, dram_cmd.bank}) == K && phase1_first_k_cmd < 0) begin
      if (dram_cmd.cmd == CMD_RD && int'(dram_cmd.id) == b_id) phase1_first_k_cmd = 1;
      else phase1_first_k_cmd = 2;
    end
    if (mode != last_mode) cov_mode_switch++;
    last_mode = mode;
    if (dut.fl_valid && dut.loc_valid) cov_fl_priority++;
    if (req_valid != 0 && (req_valid & ~req_ready) != 0) cov_crb_full++;
    if (!dut.miss_ready || !dut.wb_ready) cov_tq_full++;
    if (dut.u_llc.stall) cov_llc_stall++;
    if (byp_valid && !byp_ready) cov_byp_blocked++;
  end

  // ---------------- drivers ----------------
  // Request on port p (returns 1 when accepted). Called at a negedge.
  task automatic send2(bit v0, addr_t a0, bit w0, bit v1, addr_t a1, bit w1, output int id0, output int id1);
    id0 = -1; id1 = -1;
    req_valid = '0;
    if (v0) begin id0 = free_core_id(); if (id0 >= 0) core_out[id0] = 1; end
    if (v1) begin id1 = free_core_id(); if (id1 >= 0) core_out[id1] = 1; end
    if (id0 >= 0) begin req_valid[0] = 1; req[0] = '{addr: a0, we: w0, id: ID_W'(id0)}; core_we[id0] = w0; end
    if (id1 >= 0) begin req_valid[1] = 1; req[1] = '{addr: a1, we: w1, id: ID_W'(id1)}; core_we[id1] = w1; end
    #1;
    if (id0 >= 0 && !req_ready[0]) begin core_out[id0] = 0; id0 = -1; req_valid[0] = 0; end
    if (id1 >= 0 && !req_ready[1]) begin core_out[id1] = 0; id1 = -1; req_valid[1] = 0; end
    @(posedge clk);
    #1;
    req_valid = '0;
  endtask

  task automatic wait_idle(int limit);
    int n;
    n = 0;
    while (outstanding() != 0 && n < limit) begin @(negedge clk); n++; end
    chk(outstanding() == 0, $sformatf("all requests completed (%0d left)", outstanding()));
  endtask

  // streaming state for port 1 and the bypass port
  int rt_bank, rt_row, rt_col, rt_left;
  int by_bank, by_row, by_col, by_left;
  bit by_we;

  initial begin
    int i0, i1;
    req_valid = '0; req[0] = '0; req[1] = '0; byp_valid = 0; byp_req = '0;
    foreach (core_out[i]) begin core_out[i] = 0; byp_out[i] = 0; core_we[i] = 0; byp_we[i] = 0; end
    last_mode = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (init_busy) @(negedge clk);

    // ---------- phase 1: the A/B case ----------
    // warm up: cache lines H0..H11 (rank 1 banks), and open row R2 in bank K
    for (int j = 0; j < 12; j += 2) send2(1, mk(8 + j % 8, 100, j), 0, 1, mk(8 + (j + 1) % 8, 100, j + 1), 0, i0, i1);
    send2(1, mk(K, R2, 0), 0, 0, '0, 0, i0, i1);
    wait_idle(5000);
    repeat (50) @(negedge clk);
    chk(dut.bk_open_valid[K] && dut.bk_open_row[K] == row_t'(R2), "row R2 open in bank K");
    // backlog of hits, then A (port 0) and B (port 1) in the same cycle
    for (int j = 0; j < 12; j += 2) send2(1, mk(8 + j % 8, 100, j), 0, 1, mk(8 + (j + 1) % 8, 100, j + 1), 0, i0, i1);
    phase1_watch = 1;
    begin
      int ia, ib;
      b_id = free_core_id();
      // reserve b_id so that A gets another id
      core_out[b_id] = 1;
      ia = free_core_id();
      core_out[b_id] = 0;
      req_valid = 2'b11;
      req[0] = '{addr: mk(K, R1, 0), we: 1'b0, id: ID_W'(ia)};
      req[1] = '{addr: mk(K, R2, 1), we: 1'b0, id: ID_W'(b_id)};
      core_out[ia] = 1; core_we[ia] = 0; core_out[b_id] = 1; core_we[b_id] = 0;
      #1;
      chk(req_ready == 2'b11, "A and B accepted");
      @(posedge clk);
      #1;
      req_valid = '0;
    end
    wait_idle(5000);
    chk(b_harvest_cyc >= 0, "B harvested into the fast lane");
    chk(b_miss_cyc - b_harvest_cyc == 1 + 4,
        $sformatf("B reached the transaction queue %0d cycles after harvest", b_miss_cyc - b_harvest_cyc));
    chk(phase1_first_k_cmd == 1, "B read from the open row before bank K was precharged for A");
    phase1_watch = 0;

    // ---------- phase 2: mixed traffic ----------
    rt_left = 0; by_left = 0;
    for (int t = 0; t < 30000; t++) begin
      bit v0, v1, w0;
      addr_t a0, a1;
      int bi;
      @(negedge clk);
      // CPU: random reads/writes over a working set larger than the cache sets it touches
      v0 = ($urandom_range(99) < 35);
      w0 = ($urandom_range(99) < 30);
      a0 = mk($urandom_range(15), ($urandom_range(11) << 3) | $urandom_range(1), $urandom_range(3));
      // real-time: bursts of consecutive columns in one row
      if (rt_left == 0) begin
        rt_bank = $urandom_range(15); rt_row = ($urandom_range(11) << 3) | $urandom_range(1);
        rt_col = 0; rt_left = $urandom_range(4, 12);
      end
      v1 = ($urandom_range(99) < 50);
      a1 = mk(rt_bank, rt_row, rt_col % 32);
      // bypass: streaming bursts, some of them writes
      if (by_left == 0) begin
        by_bank = $urandom_range(15); by_row = 200 + $urandom_range(7);
        by_col = 0; by_left = $urandom_range(4, 8); by_we = ($urandom_range(99) < 30);
      end
      byp_valid = 0;
      bi = -1;
      if ($urandom_range(99) < 15) begin
        bi = free_byp_id();
        if (bi >= 0) begin
          byp_valid = 1;
          byp_req = '{addr: mk(by_bank, by_row, by_col), we: by_we, id: ID_W'(bi)};
        end
      end
      req_valid = '0;
      i0 = -1; i1 = -1;
      if (v0) begin i0 = free_core_id(); if (i0 >= 0) begin core_out[i0] = 1; core_we[i0] = w0; req_valid[0] = 1; req[0] = '{addr: a0, we: w0, id: ID_W'(i0)}; end end
      if (v1) begin i1 = free_core_id(); if (i1 >= 0) begin core_out[i1] = 1; core_we[i1] = 0; req_valid[1] = 1; req[1] = '{addr: a1, we: 1'b0, id: ID_W'(i1)}; end end
      #1;
      if (req_valid[0] && !req_ready[0]) core_out[i0] = 0;
      if (req_valid[1] && !req_ready[1]) core_out[i1] = 0;
      if (req_valid[1] && req_ready[1]) begin rt_col++; rt_left--; end
      if (byp_valid) begin
        if (byp_ready) begin byp_out[bi] = 1; byp_we[bi] = by_we; by_col++; by_left--; end
      end
      @(posedge clk);
      #1;
      req_valid = '0;
      byp_valid = 0;
    end
    wait_idle(50000);
    repeat (100) @(negedge clk);

    // ---------- final checks ----------
    chk(violations == 0, $sformatf("DRAM protocol violations: %0d", violations));
    chk(n_mem_done == int'(stats.rd + stats.wr), "every column command completed");
    chk(stats.act == stats.rd + stats.wr - stats.row_hit, "ACT count = column commands - row hits");
    chk(n_wb_done > 0, "writebacks");
    chk(n_byp_done > 0, "bypass traffic");
    chk(stats.harvest > 0 && stats.fast_miss > 0, "harvesting and harvested misses");
    chk(cov_harvest_open > 0, "harvest from an open row");
    chk(cov_harvest_opening > 0, "harvest from a row about to open");
    chk(stats.row_hit > 0 && stats.pre > 0, "row hits and row conflicts");
    chk(stats.llc_hit > 0 && stats.llc_miss > 0, "cache hits and misses");
    chk(cov_mode_switch > 0, "scheduler mode switches");
    chk(cov_fl_priority > 0, "fast lane served before the local pick");
    chk(cov_crb_full > 0, "request buffers full");
    chk(cov_tq_full > 0 && cov_llc_stall > 0, "transaction queue full and cache stall");
    $display("cycles %0d: ACT %0d PRE %0d RD %0d WR %0d row hits %0d harvests %0d (open %0d, opening %0d) harvested misses %0d",
             cyc, stats.act, stats.pre, stats.rd, stats.wr, stats.row_hit, stats.harvest,
             cov_harvest_open, cov_harvest_opening, stats.fast_miss);
    $display("cache hits %0d misses %0d writebacks %0d bypass %0d mode switches %0d buffer-full %0d queue-full %0d stall %0d",
             stats.llc_hit, stats.llc_miss, n_wb_done, n_byp_done, cov_mode_switch, cov_crb_full, cov_tq_full, cov_llc_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
