// tb_llc: the pipelined last-level cache at a reduced size (8 sets x 4 ways)
// against a reference cache model with its own tree pseudo-LRU. Requests
// come from both the fast lane and the local scheduler; the fast lane must
// win. Every request must come out exactly LAT cycles after it was taken
// while the transaction queue accepts everything, as a hit/write response,
// a read miss and/or a dirty writeback with the right address. In a second
// phase the queue refuses at random and the pipeline must stall without
// losing or reordering anything.
module tb_llc;
  import umc_pkg::*;
  localparam int WAYS = 4;
  localparam int SETS = 8;
  localparam int LAT  = 4;
  localparam int SIZE = SETS * WAYS * 64;
  logic clk = 0, rst_n = 0;
  logic init_busy, fl_valid, fl_ready, loc_valid, loc_take;
  mem_req_t fl_req, loc_req;
  logic resp_valid, miss_valid, miss_ready, wb_valid, wb_ready, ev_hit, ev_miss;
  mem_resp_t resp;
  txn_t miss_txn, wb_txn;
  int checks = 0, failures = 0;

  llc #(.SIZE_BYTES(SIZE), .WAYS(WAYS), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  // ---- reference cache ----
  bit        rv [SETS][WAYS];
  bit        rd [SETS][WAYS];
  int        rt [SETS][WAYS];
  bit [2:0]  rp [SETS];     // tree bits: [0] root, [1] left pair, [2] right pair

  typedef struct {
    int  cyc;
    bit  resp; bit we; int id;
    bit  miss; int maddr;
    bit  wb;   int waddr;
    bit  fast;
  } exp_t;
  exp_t q[$];

  int cyc = 0;
  bit strict;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_fast = 0, n_stall = 0;

  function automatic int victim(int s);
    for (int w = 0; w < WAYS; w++) if (!rv[s][w]) return w;
    if (rp[s][0] == 0) return rp[s][1] ? 1 : 0;
    else               return rp[s][2] ? 3 : 2;
  endfunction

  function automatic void touch(int s, int w);
    if (w < 2) begin rp[s][0] = 1; rp[s][1] = (w == 0); end
    else       begin rp[s][0] = 0; rp[s][2] = (w == 2); end
  endfunction

  function automatic exp_t access(mem_req_t r, bit fast, int c);
    exp_t e;
    int s, tg, hw, v;
    s  = int'(r.addr[8:6]);
    tg = int'(r.addr[31:9]);
    hw = -1;
    for (int w = 0; w < WAYS; w++) if (rv[s][w] && rt[s][w] == tg) hw = w;
    e.cyc = c; e.we = r.we; e.id = int'(r.id); e.fast = fast;
    e.miss = 0; e.wb = 0; e.maddr = 0; e.waddr = 0;
    if (hw >= 0) begin
      e.resp = 1;
      if (r.we) rd[s][hw] = 1;
      touch(s, hw);
    end else begin
      v = victim(s);
      e.resp = r.we;
      e.miss = !r.we;
      e.maddr = int'(r.addr);
      if (rv[s][v] && rd[s][v]) begin
        e.wb = 1;
        e.waddr = (rt[s][v] << 9) | (s << 6);
      end
      rv[s][v] = 1; rd[s][v] = r.we; rt[s][v] = tg;
      touch(s, v);
    end
    return e;
  endfunction

  function automatic mem_req_t rnd_req(int id);
    mem_req_t r;
    r.addr = {20'($urandom_range(5)), 3'b0, 3'($urandom), 6'($urandom)};
    r.we   = ($urandom_range(99) < 30);
    r.id   = ID_W'(id);
    return r;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int init_cycles, nid;
    fl_valid = 0; loc_valid = 0; fl_req = '0; loc_req = '0; miss_ready = 1; wb_ready = 1;
    foreach (rv[s, w]) begin rv[s][w] = 0; rd[s][w] = 0; rt[s][w] = 0; end
    foreach (rp[s]) rp[s] = '0;
    nid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    init_cycles = 1;  // the cycle in which reset is released clears set 0
    while (1) begin
      @(negedge clk);
      if (!init_busy) break;
      init_cycles++;
    end
    chk(init_cycles == SETS, $sformatf("tag clear took %0d cycles", init_cycles));
    for (int t = 0; t < 4000; t++) begin
      strict = (t < 2000);
      @(negedge clk);
      miss_ready = strict ? 1'b1 : 1'($urandom_range(99) < 60);
      wb_ready   = strict ? 1'b1 : 1'($urandom_range(99) < 60);
      #1;
      // outputs of this cycle
      if (resp_valid || miss_valid || wb_valid) begin
        exp_t e;
        chk(q.size() > 0, "output without request");
        if (q.size() > 0) begin
          e = q.pop_front();
          chk(resp_valid == e.resp, "resp_valid");
          if (e.resp) chk(resp.id == ID_W'(e.id) && resp.we == e.we, "resp tag");
          chk(miss_valid == e.miss, "miss_valid");
          if (e.miss) chk(miss_txn.addr == addr_t'(e.maddr) && miss_txn.fast == e.fast && !miss_txn.we, "miss txn");
          chk(wb_valid == e.wb, "wb_valid");
          if (e.wb) chk(wb_txn.addr == addr_t'(e.waddr) && wb_txn.we && wb_txn.src == SRC_LLC_WB, "wb txn");
          if (strict) chk(cyc == e.cyc + LAT, $sformatf("latency %0d", cyc - e.cyc));
          if (e.resp && !e.we) n_hit++;
          if (e.miss) n_miss++;
          if (e.wb) n_wb++;
        end
      end
      // stall: a pending output that the queue refuses blocks the intake
      if ((!miss_ready || !wb_ready) && (fl_ready == 0)) n_stall++;
      if (fl_ready == 0) chk(!loc_take, "no intake while stalled");
      // new inputs
      fl_valid  = ($urandom_range(99) < 25);
      loc_valid = ($urandom_range(99) < 70);
      fl_req  = rnd_req(nid);
      loc_req = rnd_req(nid + 1);
      nid += 2;
      #1;
      if (fl_valid && fl_ready) chk(!loc_take, "fast lane has priority");
      if (fl_valid && fl_ready) begin q.push_back(access(fl_req, 1, cyc)); n_fast++; end
      else if (loc_take) q.push_back(access(loc_req, 0, cyc));
      chk(!(loc_take && !loc_valid), "take without pick");
    end
    chk(n_hit > 50 && n_miss > 50 && n_wb > 20 && n_fast > 50 && n_stall > 20,
        $sformatf("coverage hit %0d miss %0d wb %0d fast %0d stall %0d", n_hit, n_miss, n_wb, n_fast, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
