// dram_model: behavioural protocol checker standing in for the LPDDR4
// channel (1 channel, 2 ranks, 8 banks per rank). It watches the command
// bus and counts every command that breaks the DRAM protocol: ACT to a bank
// with an open row, PRE/RD/WR to a closed bank, RD/WR to a row other than
// the open one, and any timing rule (tRCD, tRP, tRTP, write recovery,
// tRRD, tFAW, column spacing, write-to-read, read-to-write). It holds no
// data; it is for simulation only.
module dram_model
  import umc_pkg::*;
#(
  parameter int T_CL = 36, T_RCD = 34, T_RP = 34, T_WTR = 19, T_RTP = 14, T_WR = 34,
  parameter int T_RRD = 19, T_FAW = 75, T_WL = 18, T_BURST = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  input  dram_cmd_t cmd,
  output int        violations,
  output int        n_cmds
);

  bit   open_q [NB];
  row_t row_q  [NB];
  int   t_act  [NB];
  int   t_pre  [NB];
  int   t_rd   [NB];
  int   t_wr   [NB];
  int   acts   [N_RANKS][$];
  int   last_col, last_rd;
  int   last_wr [N_RANKS];
  int   cyc;

  task automatic bad(string m);
    violations++;
    if (violations < 10) $display("%t DRAM protocol: %s", $time, m);
  endtask

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      violations <= 0; n_cmds <= 0; cyc <= 0;
      last_col <= -1000; last_rd <= -1000;
      for (int r = 0; r < N_RANKS; r++) begin last_wr[r] <= -1000; acts[r].delete(); end
      for (int b = 0; b < NB; b++) begin
        open_q[b] <= 0; row_q[b] <= '0;
        t_act[b] <= -1000; t_pre[b] <= -1000; t_rd[b] <= -1000; t_wr[b] <= -1000;
      end
    end else begin
      cyc <= cyc + 1;
      if (cmd_valid) begin
        int b, r, recent;
        b = int'({cmd.rank, cmd.bank});
        r = int'(cmd.rank);
        n_cmds <= n_cmds + 1;
        case (cmd.cmd)
          CMD_ACT: begin
            if (open_q[b]) bad("ACT to open bank");
            if (cyc - t_pre[b] < T_RP) bad("tRP");
            if (acts[r].size() > 0 && cyc - acts[r][$] < T_RRD) bad("tRRD");
            recent = 0;
            foreach (acts[r][k]) if (cyc - acts[r][k] < T_FAW) recent++;
            if (recent >= 4) bad("tFAW");
            acts[r].push_back(cyc);
            if (acts[r].size() > 4) void'(acts[r].pop_front());
            open_q[b] <= 1; row_q[b] <= cmd.row; t_act[b] <= cyc;
          end
          CMD_PRE: begin
            if (!open_q[b]) bad("PRE to closed bank");
            if (cyc - t_rd[b] < T_RTP) bad("tRTP");
            if (cyc - t_wr[b] < T_WL + T_BURST + T_WR) bad("write recovery");
            open_q[b] <= 0; t_pre[b] <= cyc;
          end
          CMD_RD, CMD_WR: begin
            if (!open_q[b] || row_q[b] != cmd.row) bad("column command to a row that is not open");
            if (cyc - t_act[b] < T_RCD) bad("tRCD");
            if (cyc - last_col < T_BURST) bad("column spacing");
            if (cmd.cmd == CMD_RD) begin
              if (cyc - last_wr[r] < T_WL + T_BURST + T_WTR) bad("tWTR");
              t_rd[b] <= cyc; last_rd <= cyc;
            end else begin
              if (cyc - last_rd < T_CL + T_BURST + 2 - T_WL) bad("read-to-write turnaround");
              t_wr[b] <= cyc; last_wr[r] <= cyc;
            end
            last_col <= cyc;
          end
          default: bad("unknown command");
        endcase
      end
    end
  end

endmodule
