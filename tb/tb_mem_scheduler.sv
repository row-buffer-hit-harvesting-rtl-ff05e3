// tb_mem_scheduler: random snapshots of the transaction queue, the cache
// request buffers and the bank states table. A reference works out the mode
// (scheduling whenever some queued request has an idle bank, else
// harvesting) and the winner: in scheduling mode the row-buffer hit first,
// then the oldest; in harvesting mode the oldest read whose row is open or
// opens within T_MISS cycles, skipping the entry the cache takes this cycle
// and nothing when the fast lane is full. Ties go to the lower index.
module tb_mem_scheduler;
  import umc_pkg::*;
  localparam int NT = 60, NC = 40, AW = 12, EW = 8, TMISS = 4;
  logic [NT-1:0] tq_valid;
  txn_t tq_txn [NT];
  logic [AW-1:0] tq_age [NT];
  logic tq_rm_valid;
  logic [5:0] tq_rm_idx;
  logic [NC-1:0] crb_valid;
  mem_req_t crb_req [NC];
  logic [AW-1:0] crb_age [NC];
  logic loc_take, hv_valid, fl_ready;
  logic [5:0] loc_idx, hv_idx;
  mem_req_t hv_req;
  logic [NB-1:0] bk_open_valid, bk_busy, bk_next_valid;
  row_t bk_open_row [NB];
  row_t bk_next_row [NB];
  logic [EW-1:0] bk_next_eta [NB];
  logic cg_acc_valid, cg_acc_hit, mode;
  fbank_t cg_acc_bank;
  txn_t cg_acc_txn;
  int checks = 0, failures = 0;

  mem_scheduler #(.N_TQ(NT), .N_CRB(NC), .AGE_W(AW), .ETA_W(EW), .T_MISS(TMISS)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  function automatic addr_t mk(int b, int r);
    addr_t a;
    a = $urandom;
    a[31:15] = 17'(r);
    a[14:11] = 4'(b);
    return a;
  endfunction

  int n_sched = 0, n_hv = 0, n_hv_opening = 0, n_none = 0, n_hitpick = 0;

  initial begin
    for (int t = 0; t < 6000; t++) begin
      int exp_t, exp_c;
      bit exp_mode, exp_hit;
      // bank states
      for (int b = 0; b < NB; b++) begin
        bk_open_valid[b] = $urandom_range(1);
        bk_open_row[b]   = row_t'($urandom_range(3));
        bk_busy[b]       = ($urandom_range(99) < ((t % 3 == 0) ? 97 : 60));
        bk_next_valid[b] = $urandom_range(1);
        bk_next_row[b]   = row_t'($urandom_range(3));
        bk_next_eta[b]   = EW'($urandom_range(8));
      end
      for (int i = 0; i < NT; i++) begin
        tq_valid[i] = ($urandom_range(99) < 40);
        tq_txn[i]   = '{addr: mk($urandom_range(15), $urandom_range(3)), we: 1'($urandom),
                        id: ID_W'(i), src: SRC_LLC_MISS, fast: 1'b0};
        tq_age[i]   = AW'($urandom_range(20));
      end
      for (int i = 0; i < NC; i++) begin
        crb_valid[i] = ($urandom_range(99) < 50);
        crb_req[i]   = '{addr: mk($urandom_range(15), $urandom_range(3)), we: 1'($urandom_range(99) < 30),
                         id: ID_W'(i)};
        crb_age[i]   = AW'($urandom_range(20));
      end
      fl_ready = ($urandom_range(99) < 80);
      loc_take = $urandom_range(1);
      loc_idx  = 6'($urandom_range(NC - 1));
      #1;
      // reference
      exp_t = -1; exp_hit = 0;
      for (int i = 0; i < NT; i++) begin
        int b;
        bit h;
        b = int'(tq_txn[i].addr[14:11]);
        h = bk_open_valid[b] && bk_open_row[b] == tq_txn[i].addr[31:15];
        if (tq_valid[i] && !bk_busy[b]) begin
          if (exp_t < 0 || {h, tq_age[i]} > {exp_hit, tq_age[exp_t]}) begin exp_t = i; exp_hit = h; end
        end
      end
      exp_mode = (exp_t >= 0);
      exp_c = -1;
      if (!exp_mode && fl_ready) begin
        for (int i = 0; i < NC; i++) begin
          int b;
          row_t r;
          bit ok;
          b = int'(crb_req[i].addr[14:11]);
          r = crb_req[i].addr[31:15];
          ok = crb_valid[i] && !crb_req[i].we && !(loc_take && int'(loc_idx) == i) &&
               ((bk_open_valid[b] && bk_open_row[b] == r) ||
                (bk_next_valid[b] && bk_next_row[b] == r && int'(bk_next_eta[b]) <= TMISS));
          if (ok && (exp_c < 0 || crb_age[i] > crb_age[exp_c])) exp_c = i;
        end
      end
      chk(mode == exp_mode, "mode");
      chk(cg_acc_valid == exp_mode && tq_rm_valid == exp_mode, "schedule valid");
      if (exp_mode) begin
        chk(int'(tq_rm_idx) == exp_t, $sformatf("scheduled %0d exp %0d", tq_rm_idx, exp_t));
        chk(cg_acc_txn == tq_txn[exp_t] && cg_acc_bank == tq_txn[exp_t].addr[14:11] && cg_acc_hit == exp_hit, "schedule payload");
        n_sched++;
        if (exp_hit) n_hitpick++;
      end
      chk(hv_valid == (exp_c >= 0), "harvest valid");
      if (exp_c >= 0) begin
        int b;
        chk(int'(hv_idx) == exp_c && hv_req == crb_req[exp_c], $sformatf("harvested %0d exp %0d", hv_idx, exp_c));
        n_hv++;
        b = int'(crb_req[exp_c].addr[14:11]);
        if (!(bk_open_valid[b] && bk_open_row[b] == crb_req[exp_c].addr[31:15])) n_hv_opening++;
      end
      if (!exp_mode && exp_c < 0) n_none++;
    end
    chk(n_sched > 100 && n_hv > 100 && n_hv_opening > 10 && n_none > 10 && n_hitpick > 50,
        $sformatf("coverage sched %0d harvest %0d opening %0d none %0d hit %0d", n_sched, n_hv, n_hv_opening, n_none, n_hitpick));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
