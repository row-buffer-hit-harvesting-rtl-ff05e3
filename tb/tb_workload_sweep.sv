// tb_workload_sweep: the controller at full size under a synthetic stand-in
// for the evaluated mixes: four CPU cores with random, partly local traffic
// (at most 16 requests outstanding in total) and real-time cores issuing
// sequential streams (at most 50 outstanding). A fixed share of the
// real-time streams bypasses the cache; the sweep covers bypass ratios of
// 0, 20, 40 and 60 % at 50 outstanding real-time requests, and 10 and 30
// outstanding at 0 and 60 %. Each point runs one million cycles after the
// cache's tag clear. The traffic is synthetic: the address patterns of the
// evaluated applications are not reproduced, only their shape (random CPU
// accesses with a hot set, long sequential real-time streams of which every
// third writes).
//
// Reported per point: DRAM commands, row-buffer hits per activation, column
// commands per cycle, harvests, and the share of precharges that were
// evitable. A precharge is evitable when, at the moment it is issued, a
// read waiting at the cache (request buffers, fast lane or cache pipeline)
// targets the row being closed and that read later misses in the cache. The testbench checks that
// every request completes exactly once, that the command bus obeys the DRAM
// protocol, that the outstanding limits hold, and that harvesting happens
// whenever cache traffic is present. It also checks that fewer than 14 % of
// the precharges are evitable, the bound the unified controller is expected
// to keep without bypassing.
module tb_workload_sweep;
  import umc_pkg::*;
  localparam int CYCLES = 1000000;
  localparam int CPU_MAX = 16;
  int rt_max;                             // outstanding real-time requests allowed
  localparam int N_STREAMS = 10;

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

  initial begin
    repeat (8 * (CYCLES + 120000)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  // ids 0..127: CPU, 128..255: real-time through the cache; bypass ids 0..255
  bit  core_out [256];
  bit  core_we  [256];
  int  core_gen [256];
  bit  byp_out  [256];
  bit  byp_we   [256];
  int  n_cpu_out, n_rt_out;
  int  rt_pend;                           // stream with a request waiting to be accepted

  // evitable-precharge bookkeeping: for each id, the precharges that closed
  // its row while it waited (by precharge number); resolved at completion
  int  pre_of_id [256][$];
  bit  pre_evitable [];
  int  n_pre_seen;
  real ev_pct [$];                        // evitable share per point, in run order

  // the address lies in the row that bank b is about to close
  function automatic bit closes(addr_t a, fbank_t b);
    return addr_fbank(a) == b && dut.bk_open_valid[b] && addr_row(a) == dut.bk_open_row[b];
  endfunction

  function automatic int alloc(int lo, int hi);
    for (int i = lo; i <= hi; i++) if (!core_out[i]) return i;
    return -1;
  endfunction

  always @(negedge clk) if (rst_n && !init_busy) begin
    if (llc_resp_valid) begin
      int i;
      i = int'(llc_resp.id);
      chk(core_out[i] && core_we[i] == llc_resp.we, "cache response");
      core_out[i] = 0;
      if (i < 128) n_cpu_out--; else n_rt_out--;
      pre_of_id[i].delete();              // a hit: its precharges were not evitable
    end
    if (mem_done_valid) begin
      int i;
      i = int'(mem_done.id);
      if (mem_done.src == SRC_LLC_MISS) begin
        chk(core_out[i] && !core_we[i], "DRAM read completion");
        core_out[i] = 0;
        if (i < 128) n_cpu_out--; else n_rt_out--;
        foreach (pre_of_id[i][k]) pre_evitable[pre_of_id[i][k]] = 1;
        pre_of_id[i].delete();
      end else if (mem_done.src == SRC_BYPASS) begin
        chk(byp_out[i] && byp_we[i] == mem_done.we, "bypass completion");
        byp_out[i] = 0;
        n_rt_out--;
      end
    end
    if (dram_cmd_valid && dram_cmd.cmd == CMD_PRE) begin
      fbank_t b;
      b = {dram_cmd.rank, dram_cmd.bank};
      for (int e = 0; e < 40; e++) begin
        if (dut.crb_valid[e] && !dut.crb_req[e].we && closes(dut.crb_req[e].addr, b))
          pre_of_id[int'(dut.crb_req[e].id)].push_back(n_pre_seen);
      end
      if (dut.fl_valid && !dut.fl_req.we && closes(dut.fl_req.addr, b))
        pre_of_id[int'(dut.fl_req.id)].push_back(n_pre_seen);
      for (int k = 0; k < 4; k++)
        if (dut.u_llc.pipe[k].valid && !dut.u_llc.pipe[k].req.we && closes(dut.u_llc.pipe[k].req.addr, b))
          pre_of_id[int'(dut.u_llc.pipe[k].req.id)].push_back(n_pre_seen);
      n_pre_seen++;
    end
  end

  // stream state
  addr_t s_addr [N_STREAMS];
  bit    s_byp  [N_STREAMS];
  bit    s_we   [N_STREAMS];
  addr_t cpu_base [4];

  task automatic run_point(int br_pct, int rt_limit);
    int n_byp_req, n_rt_req, n_cpu_req, cyc0, harvest0;
    longint col0;
    foreach (core_out[i]) begin core_out[i] = 0; byp_out[i] = 0; pre_of_id[i].delete(); end
    n_cpu_out = 0; n_rt_out = 0; n_pre_seen = 0;
    rt_max = rt_limit;
    pre_evitable = new [400000];
    foreach (pre_evitable[i]) pre_evitable[i] = 0;
    for (int s = 0; s < N_STREAMS; s++) begin
      s_addr[s] = addr_t'((s + 1)) << 26;            // 64 MB apart
      s_byp[s]  = (s * 100 < br_pct * N_STREAMS);     // the first BR% of the streams bypass
      s_we[s]   = (s % 3 == 2);                       // every third stream writes
    end
    for (int c = 0; c < 4; c++) cpu_base[c] = addr_t'(c + 12) << 27;
    rst_n = 0;
    req_valid = '0; byp_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    while (init_busy) @(negedge clk);
    n_byp_req = 0; n_rt_req = 0; n_cpu_req = 0;
    rt_pend = -1;
    for (int t = 0; t < CYCLES; t++) begin
      int ci, ri, bi, s;
      @(negedge clk);
      req_valid = '0; byp_valid = 0;
      ci = -1; ri = -1; bi = -1;
      // CPU: one of four cores, 8 MB working set each with 50% reuse of a hot 64 KB
      if (n_cpu_out < CPU_MAX && $urandom_range(99) < 30) begin
        ci = alloc(0, 127);
        if (ci >= 0) begin
          int c;
          addr_t a;
          c = $urandom_range(3);
          a = cpu_base[c] + (($urandom_range(99) < 50) ? addr_t'($urandom_range(1023) * 64)
                                                      : addr_t'($urandom_range(131071) * 64));
          req_valid[0] = 1;
          req[0] = '{addr: a, we: 1'($urandom_range(99) < 25), id: ID_W'(ci)};
        end
      end
      // real-time: the next line of a random stream; a refused request is
      // presented again until it is accepted
      if (rt_pend < 0 && $urandom_range(99) < 45) rt_pend = $urandom_range(N_STREAMS - 1);
      s = rt_pend;
      if (n_rt_out < rt_max && rt_pend >= 0) begin
        if (s_byp[s]) begin
          for (int i = 0; i < 256; i++) if (!byp_out[i] && bi < 0) bi = i;
          if (bi >= 0) begin
            byp_valid = 1;
            byp_req = '{addr: s_addr[s], we: s_we[s], id: ID_W'(bi)};
          end
        end else begin
          ri = alloc(128, 255);
          if (ri >= 0) begin
            req_valid[1] = 1;
            req[1] = '{addr: s_addr[s], we: s_we[s], id: ID_W'(ri)};
          end
        end
      end
      #1;
      if (req_valid[0] && req_ready[0]) begin
        core_out[ci] = 1; core_we[ci] = req[0].we; n_cpu_out++; n_cpu_req++;
      end
      if (req_valid[1] && req_ready[1]) begin
        core_out[ri] = 1; core_we[ri] = req[1].we; n_rt_out++; n_rt_req++;
        s_addr[s] += 64;
        rt_pend = -1;
      end
      if (byp_valid && byp_ready) begin
        byp_out[bi] = 1; byp_we[bi] = byp_req.we; n_rt_out++; n_byp_req++;
        s_addr[s] += 64;
        rt_pend = -1;
      end
      chk(n_cpu_out <= CPU_MAX && n_rt_out <= rt_max, "outstanding limits");
      @(posedge clk);
      #1;
      req_valid = '0; byp_valid = 0;
    end
    // drain, including the dirty writebacks the cores do not see
    for (int t = 0; t < 100000 && ((n_cpu_out + n_rt_out) > 0 || dut.tq_valid != '0 || dut.cg_busy != '0); t++)
      @(negedge clk);
    repeat (100) @(negedge clk);
    chk(n_cpu_out == 0 && n_rt_out == 0, $sformatf("all requests completed (%0d left)", n_cpu_out + n_rt_out));
    chk(violations == 0, $sformatf("DRAM protocol violations %0d", violations));
    chk(stats.act == stats.rd + stats.wr - stats.row_hit,
        $sformatf("ACT %0d = column commands %0d - row hits %0d", stats.act, stats.rd + stats.wr, stats.row_hit));
    if (br_pct < 100) chk(stats.harvest > 0, "harvesting happened");
    begin
      int n_ev;
      real bypass_share;
      n_ev = 0;
      for (int i = 0; i < n_pre_seen; i++) n_ev += int'(pre_evitable[i]);
      chk(n_ev * 100 < n_pre_seen * 14, "evitable precharges below 14%");
      ev_pct.push_back((n_pre_seen > 0) ? 100.0 * n_ev / n_pre_seen : 0.0);
      bypass_share = 100.0 * n_byp_req / (n_byp_req + n_rt_req);
      $display("BR %0d%%, %0d real-time outstanding: requests cpu %0d rt-cache %0d rt-bypass %0d (%.1f%% of real-time requests)",
               br_pct, rt_limit, n_cpu_req, n_rt_req, n_byp_req, bypass_share);
      $display("  ACT %0d PRE %0d RD %0d WR %0d | row hits per ACT %.2f | column cmds per cycle %.3f",
               stats.act, stats.pre, stats.rd, stats.wr,
               real'(stats.rd + stats.wr) / real'(stats.act), real'(stats.rd + stats.wr) / CYCLES);
      $display("  harvests %0d (harvested misses %0d) | cache hits %0d misses %0d | evitable precharges %0d of %0d (%.1f%%)",
               stats.harvest, stats.fast_miss, stats.llc_hit, stats.llc_miss, n_ev, n_pre_seen,
               (n_pre_seen > 0) ? 100.0 * n_ev / n_pre_seen : 0.0);
    end
  endtask

  initial begin
    req_valid = '0; req[0] = '0; req[1] = '0; byp_valid = 0; byp_req = '0;
    run_point(0, 50);
    run_point(20, 50);
    run_point(40, 50);
    run_point(60, 50);
    run_point(0, 10);
    run_point(0, 30);
    run_point(60, 10);
    run_point(60, 30);
    // expected trends: more evitable precharges with more outstanding
    // real-time requests, fewer with more bypassing
    chk(ev_pct[0] > ev_pct[5] && ev_pct[5] > ev_pct[4], "evitable share grows with outstanding requests (BR 0%)");
    chk(ev_pct[3] > ev_pct[7] && ev_pct[7] > ev_pct[6], "evitable share grows with outstanding requests (BR 60%)");
    chk(ev_pct[0] > ev_pct[1] && ev_pct[1] > ev_pct[2] && ev_pct[2] > ev_pct[3], "evitable share falls as bypassing grows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
