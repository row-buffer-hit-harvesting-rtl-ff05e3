// tb_cmd_bus_arbiter: random command offers from all 16 banks. From its own
// command history the testbench works out which offers are legal (tRRD and
// tFAW per rank, BURST spacing of column commands, write-to-read per rank,
// read-to-write turnaround) and checks that the granted offer is legal, that
// a legal column command always wins over ACT/PRE, that the grant follows
// the round-robin order, and that a cycle with a legal offer is never idle.
// tRRD is shortened to 10 here: at the default 19, four ACTs already span
// 57 cycles and the 75-cycle tFAW window could never be the binding limit.
module tb_cmd_bus_arbiter;
  import umc_pkg::*;
  localparam int CL = 36, WTR = 19, RRD = 10, FAW = 75, WL = 18, BURST = 8;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] cand_valid, grant;
  dram_cmd_t cand [NB];
  logic cmd_valid;
  dram_cmd_t cmd;
  int checks = 0, failures = 0;

  cmd_bus_arbiter #(.T_CL(CL), .T_WTR(WTR), .T_RRD(RRD), .T_FAW(FAW), .T_WL(WL), .T_BURST(BURST)) dut (.*);

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

  int acts [2][$];
  int last_col = -1000, last_rd = -1000;
  int last_wr [2];
  int cyc = 0, rr = 0;
  int n_faw_block = 0, n_rrd_block = 0, n_wtr_block = 0, n_rtw_block = 0;

  function automatic bit legal(int b);
    int r, recent;
    r = b / 8;
    if (!cand_valid[b]) return 0;
    case (cand[b].cmd)
      CMD_ACT: begin
        recent = 0;
        foreach (acts[r][k]) if (cyc - acts[r][k] < FAW) recent++;
        if (acts[r].size() > 0 && cyc - acts[r][$] < RRD) return 0;
        return recent < 4;
      end
      CMD_PRE: return 1;
      CMD_RD:  return (cyc - last_col >= BURST) && (cyc - last_wr[r] >= WL + BURST + WTR);
      CMD_WR:  return (cyc - last_col >= BURST) && (cyc - last_rd >= CL + BURST + 2 - WL);
      default: return 0;
    endcase
  endfunction

  initial begin
    last_wr[0] = -1000; last_wr[1] = -1000;
    cand_valid = '0;
    foreach (cand[b]) cand[b] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit any_col, any;
      int exp_b;
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        cand_valid[b] = ($urandom_range(99) < 30);
        cand[b] = '0;
        cand[b].rank = 1'(b / 8);
        cand[b].bank = 3'(b % 8);
        case ($urandom_range(9))
          0, 1, 2, 3: cand[b].cmd = CMD_ACT;
          4, 5:       cand[b].cmd = CMD_PRE;
          6, 7:       cand[b].cmd = CMD_RD;
          default:    cand[b].cmd = CMD_WR;
        endcase
        cand[b].row = row_t'($urandom);
        cand[b].id  = ID_W'(b);
      end
      #1;
      any_col = 0; any = 0; exp_b = -1;
      for (int k = 0; k < NB && exp_b < 0; k++) begin
        int b;
        b = (rr + k) % NB;
        if (legal(b) && (cand[b].cmd == CMD_RD || cand[b].cmd == CMD_WR)) exp_b = b;
      end
      if (exp_b >= 0) any_col = 1;
      for (int k = 0; k < NB && exp_b < 0; k++) begin
        int b;
        b = (rr + k) % NB;
        if (legal(b)) exp_b = b;
      end
      any = (exp_b >= 0);
      for (int b = 0; b < NB; b++)
        if (cand_valid[b] && !legal(b)) case (cand[b].cmd)
          CMD_ACT: if (acts[b/8].size() > 0 && cyc - acts[b/8][$] < RRD) n_rrd_block++; else n_faw_block++;
          CMD_RD:  if (cyc - last_wr[b/8] < WL + BURST + WTR) n_wtr_block++;
          CMD_WR:  if (cyc - last_rd < CL + BURST + 2 - WL) n_rtw_block++;
          default: ;
        endcase
      chk(cmd_valid == any, "work conserving");
      chk($countones(grant) == (any ? 1 : 0), "one grant");
      if (any) begin
        chk(grant[exp_b], $sformatf("granted %b expected bank %0d", grant, exp_b));
        chk(cmd == cand[exp_b], "command matches offer");
        if (any_col) chk(cmd.cmd == CMD_RD || cmd.cmd == CMD_WR, "column first");
      end
      @(posedge clk);
      if (any) begin
        int r;
        r = exp_b / 8;
        case (cand[exp_b].cmd)
          CMD_ACT: begin acts[r].push_back(cyc); if (acts[r].size() > 8) void'(acts[r].pop_front()); end
          CMD_RD:  begin last_col = cyc; last_rd = cyc; end
          CMD_WR:  begin last_col = cyc; last_wr[r] = cyc; end
          default: ;
        endcase
        rr = (exp_b + 1) % NB;
      end
      cyc++;
    end
    chk(n_faw_block > 0 && n_rrd_block > 0 && n_wtr_block > 0 && n_rtw_block > 0,
        $sformatf("blocks faw %0d rrd %0d wtr %0d rtw %0d", n_faw_block, n_rrd_block, n_wtr_block, n_rtw_block));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
