// tb_cmd_gen: one bank's command generator with a reference bank model.
// Random requests (same row, another row, closed bank) are fed whenever the
// generator is idle. The testbench checks that the right command is offered
// (RD/WR on an open matching row, PRE on another row, ACT on a closed bank),
// that each is offered exactly at the first cycle the bank timing allows
// when the bus grants at once (tRP, tRCD, tRTP, WL+BURST+tWR), that it is
// never offered earlier when grants are delayed, that the predicted cycle of
// the next ACT (next_eta) is exact, and that row hits are flagged.
module tb_cmd_gen;
  import umc_pkg::*;
  localparam int RCD = 34, RP = 34, RTP = 14, WR = 34, WL = 18, BURST = 8;
  logic clk = 0, rst_n = 0;
  fbank_t bank_id;
  logic acc_valid, busy, open_valid, cand_valid, grant, next_valid, ev_row_hit;
  txn_t acc_txn;
  row_t open_row, next_row;
  dram_cmd_t cand;
  logic [7:0] next_eta;
  int checks = 0, failures = 0;

  cmd_gen #(.T_RCD(RCD), .T_RP(RP), .T_RTP(RTP), .T_WR(WR), .T_WL(WL), .T_BURST(BURST)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  // reference bank
  bit   m_open;
  row_t m_row;
  int   last_pre = -1000, last_act = -1000, last_rd = -1000, last_wr = -1000;
  bit   m_busy, m_did_act;
  txn_t m_req;
  int   cyc = 0, pred_act = -1;
  int   n_hit = 0, n_conf = 0, n_closed = 0, n_hit_flag = 0;

  initial begin
    bank_id = fbank_t'(5);
    acc_valid = 0; acc_txn = '0; grant = 0; open_valid = 0; open_row = '0;
    m_open = 0; m_row = '0; m_busy = 0; m_did_act = 0; m_req = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit immediate, allowed;
      dram_cmd_e exp_cmd;
      row_t rr;
      immediate = ((t / 2000) % 2) == 0;
      @(negedge clk);
      open_valid = m_open; open_row = m_row;
      acc_valid = 0;
      #1;
      chk(busy == m_busy, "busy");
      rr = addr_row(m_req.addr);
      if (m_busy) begin
        if (m_open && m_row == rr) begin
          exp_cmd = m_req.we ? CMD_WR : CMD_RD;
          allowed = (cyc - last_act >= RCD);
        end else if (m_open) begin
          exp_cmd = CMD_PRE;
          allowed = (cyc - last_rd >= RTP) && (cyc - last_wr >= WL + BURST + WR);
        end else begin
          exp_cmd = CMD_ACT;
          allowed = (cyc - last_pre >= RP);
        end
        chk(cand.cmd == exp_cmd, $sformatf("command %s exp %s", cand.cmd.name(), exp_cmd.name()));
        chk(cand.row == rr && {cand.rank, cand.bank} == bank_id && cand.id == m_req.id, "command fields");
        // offered exactly when allowed (the timers are exact)
        chk(cand_valid == allowed, $sformatf("cand_valid %0d allowed %0d (%s)", cand_valid, allowed, exp_cmd.name()));
        chk(next_valid == (exp_cmd != CMD_RD && exp_cmd != CMD_WR), "next_valid");
        if (next_valid) begin
          chk(next_row == rr, "next_row");
          if (immediate) begin
            if (pred_act < 0) pred_act = cyc + int'(next_eta);
            else chk(pred_act == cyc + int'(next_eta), "next_eta consistent");
          end
        end
        grant = cand_valid && (immediate || $urandom_range(99) < 30);
      end else begin
        chk(!cand_valid && !next_valid, "idle offers nothing");
        grant = 0;
        acc_valid = ($urandom_range(99) < 50);
        case ($urandom_range(2))
          0: rr = m_row;
          1: rr = m_row + 1;
          default: rr = row_t'($urandom_range(3));
        endcase
        acc_txn = '{addr: {rr, 15'($urandom)}, we: 1'($urandom_range(99) < 40),
                    id: ID_W'($urandom), src: SRC_LLC_MISS, fast: 1'b0};
      end
      #1;
      chk(ev_row_hit == (grant && (cand.cmd == CMD_RD || cand.cmd == CMD_WR) && !m_did_act), "row hit flag");
      if (ev_row_hit) n_hit_flag++;
      @(posedge clk);
      if (grant) begin
        case (cand.cmd)
          CMD_PRE: begin m_open = 0; last_pre = cyc; n_conf++; end
          CMD_ACT: begin
            m_open = 1; m_row = cand.row; last_act = cyc; m_did_act = 1;
            if (immediate && pred_act >= 0) chk(pred_act == cyc, $sformatf("ACT at %0d predicted %0d", cyc, pred_act));
          end
          CMD_RD:  begin last_rd = cyc; m_busy = 0; if (!m_did_act) n_hit++; else n_closed++; end
          CMD_WR:  begin last_wr = cyc; m_busy = 0; if (!m_did_act) n_hit++; else n_closed++; end
          default: ;
        endcase
      end
      if (acc_valid) begin m_busy = 1; m_req = acc_txn; m_did_act = 0; pred_act = -1; end
      cyc++;
    end
    chk(n_hit > 20 && n_conf > 20 && n_closed > 20 && n_hit_flag == n_hit,
        $sformatf("coverage hit %0d conflict %0d act %0d", n_hit, n_conf, n_closed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
