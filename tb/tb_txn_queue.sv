// tb_txn_queue: the 30+30-entry transaction queue. Cache misses, cache
// writebacks and bypass reads/writes arrive at random while the scheduler
// removes random entries. Checked every cycle against a reference: the flat
// view (reads at 0..29, writes at 30..59), lowest-free placement, ready of
// each producer (the cache before bypass traffic on the same queue) and the
// occupancy counts; full queues must back-pressure.
module tb_txn_queue;
  import umc_pkg::*;
  localparam int RQ = 30, WQ = 30, N = RQ + WQ, AW = 12;
  localparam int IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  logic miss_valid, miss_ready, wb_valid, wb_ready, byp_valid, byp_ready, rm_valid;
  txn_t miss_txn, wb_txn, byp_txn;
  logic [IW-1:0] rm_idx;
  logic [N-1:0] ent_valid;
  txn_t ent_txn [N];
  logic [AW-1:0] ent_age [N];
  logic [$clog2(RQ):0] rq_count;
  logic [$clog2(WQ):0] wq_count;
  int checks = 0, failures = 0;

  txn_queue #(.RQ_DEPTH(RQ), .WQ_DEPTH(WQ), .AGE_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  bit   mv [N];
  txn_t mt [N];
  int   ma [N];
  int   n_rq_full = 0, n_wq_full = 0, n_byp_blocked = 0;

  function automatic txn_t rnd(bit we, src_e s);
    txn_t x;
    x.addr = $urandom; x.we = we; x.id = ID_W'($urandom); x.src = s; x.fast = 1'($urandom);
    return x;
  endfunction

  initial begin
    miss_valid = 0; wb_valid = 0; byp_valid = 0; rm_valid = 0; rm_idx = 0;
    miss_txn = '0; wb_txn = '0; byp_txn = '0;
    foreach (mv[i]) begin mv[i] = 0; ma[i] = 0; mt[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int rf, wf, rc, wc, lo;
      int occ[$];
      occ.delete();
      @(negedge clk);
      rf = -1; wf = -1; rc = 0; wc = 0;
      for (int i = 0; i < N; i++) begin
        chk(ent_valid[i] == mv[i], $sformatf("valid[%0d]", i));
        if (mv[i]) begin
          chk(ent_txn[i] == mt[i], $sformatf("txn[%0d]", i));
          chk(int'(ent_age[i]) == ma[i], "age");
          occ.push_back(i);
          if (i < RQ) rc++; else wc++;
        end else begin
          if (i < RQ && rf < 0) rf = i;
          if (i >= RQ && wf < 0) wf = i;
        end
      end
      chk(int'(rq_count) == rc && int'(wq_count) == wc, "counts");
      if (rf < 0) n_rq_full++;
      if (wf < 0) n_wq_full++;
      lo = ((t / 500) % 2) ? 20 : 70;   // alternate fill and drain phases
      miss_valid = ($urandom_range(99) < lo);
      wb_valid   = ($urandom_range(99) < lo / 2);
      byp_valid  = ($urandom_range(99) < lo);
      miss_txn = rnd(0, SRC_LLC_MISS);
      wb_txn   = rnd(1, SRC_LLC_WB);
      byp_txn  = rnd(1'($urandom), SRC_BYPASS);
      occ.shuffle();
      rm_valid = (occ.size() > 0) && ($urandom_range(99) < 55);
      if (rm_valid) rm_idx = IW'(occ[0]);
      #1;
      chk(miss_ready == (rf >= 0), "miss_ready");
      chk(wb_ready == (wf >= 0), "wb_ready");
      chk(byp_ready == (byp_txn.we ? (wf >= 0 && !wb_valid) : (rf >= 0 && !miss_valid)), "byp_ready");
      if (byp_valid && !byp_ready) n_byp_blocked++;
      @(posedge clk);
      for (int i = 0; i < N; i++) if (mv[i]) ma[i]++;
      if (rm_valid) mv[rm_idx] = 0;
      if (rf >= 0) begin
        if (miss_valid) begin mv[rf] = 1; mt[rf] = miss_txn; ma[rf] = 0; end
        else if (byp_valid && !byp_txn.we) begin mv[rf] = 1; mt[rf] = byp_txn; ma[rf] = 0; end
      end
      if (wf >= 0) begin
        if (wb_valid) begin mv[wf] = 1; mt[wf] = wb_txn; ma[wf] = 0; end
        else if (byp_valid && byp_txn.we) begin mv[wf] = 1; mt[wf] = byp_txn; ma[wf] = 0; end
      end
    end
    chk(n_rq_full > 0 && n_wq_full > 0 && n_byp_blocked > 0, "full queues and blocked bypass seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
