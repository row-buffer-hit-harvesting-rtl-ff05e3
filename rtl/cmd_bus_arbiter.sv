// cmd_bus_arbiter: one DRAM command per cycle on the channel's command bus.
//
// The 16 per-bank command generators each offer at most one command that
// already satisfies their own bank timing. This block adds the constraints
// that span banks and picks one legal offer per cycle:
//   ACT:   tRRD since the last ACT to the same rank, and at most four ACTs
//          to a rank in any tFAW window (four per-rank window timers);
//   RD/WR: BURST cycles between column commands on the shared data bus;
//   RD:    WL+BURST+tWTR after a WR to the same rank;
//   WR:    CL+BURST+2-WL after any RD (bus turnaround).
// Column commands win over ACT and PRE, since they move data; within a class
// the offers are served round-robin, starting after the last granted bank.
// The timing values follow the evaluated LPDDR4 configuration; the priority
// order, the turnaround rules and BURST/WL are this design's choices.
//
// Combinational grant from the offers and the registered timers; the
// timers update at the edge after a grant. cmd_valid/cmd is the command on
// the bus in this cycle.
module cmd_bus_arbiter
  import umc_pkg::*;
#(
  parameter int unsigned T_CL    = 36,
  parameter int unsigned T_WTR   = 19,
  parameter int unsigned T_RRD   = 19,
  parameter int unsigned T_FAW   = 75,
  parameter int unsigned T_WL    = 18,
  parameter int unsigned T_BURST = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NB-1:0]   cand_valid,
  input  dram_cmd_t       cand [NB],
  output logic [NB-1:0]   grant,
  output logic            cmd_valid,
  output dram_cmd_t       cmd
);

  localparam int unsigned TW = 8;
  localparam int unsigned T_RD2WR = T_CL + T_BURST + 2 - T_WL;
  localparam int unsigned T_WR2RD = T_WL + T_BURST + T_WTR;

  logic [TW-1:0] t_rrd   [N_RANKS];
  logic [TW-1:0] t_faw   [N_RANKS][4];
  logic [TW-1:0] t_wtr   [N_RANKS];
  logic [TW-1:0] t_ccd;
  logic [TW-1:0] t_rtw;
  logic [FB_W-1:0] rr;

  logic [NB-1:0] legal, is_col;

  // First free tFAW window slot of the rank of the granted command.
  logic [1:0] faw_slot;

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic faw_ok;
      int unsigned r;
      r = int'(cand[b].rank);
      faw_ok = 1'b0;
      for (int k = 0; k < 4; k++) if (t_faw[r][k] == '0) faw_ok = 1'b1;
      is_col[b] = (cand[b].cmd == CMD_RD) || (cand[b].cmd == CMD_WR);
      unique case (cand[b].cmd)
        CMD_ACT: legal[b] = (t_rrd[r] == '0) && faw_ok;
        CMD_PRE: legal[b] = 1'b1;
        CMD_RD:  legal[b] = (t_ccd == '0) && (t_wtr[r] == '0);
        CMD_WR:  legal[b] = (t_ccd == '0) && (t_rtw == '0);
        default: legal[b] = 1'b0;
      endcase
      legal[b] = legal[b] && cand_valid[b];
    end
  end

  // Round-robin pick: column commands first, then ACT/PRE.
  logic            found;
  logic [FB_W-1:0] pick;
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < NB; k++) begin
        logic [FB_W-1:0] b;
        b = rr + FB_W'(k);
        if (!found && legal[b] && (is_col[b] == (pass == 0))) begin
          found = 1'b1;
          pick  = b;
        end
      end
    end
    grant = '0;
    if (found) grant[pick] = 1'b1;
    cmd_valid = found;
    cmd       = cand[pick];
    if (!found) cmd.cmd = CMD_NOP;
    faw_slot = '0;
    for (int k = 3; k >= 0; k--) if (t_faw[cmd.rank][k] == '0) faw_slot = 2'(k);
  end

  function automatic logic [TW-1:0] dec(logic [TW-1:0] t);
    return (t == '0) ? '0 : t - 1'b1;
  endfunction

  // A new constraint never shortens one still running.
  function automatic logic [TW-1:0] later(logic [TW-1:0] t, int unsigned n);
    return (dec(t) > TW'(n - 1)) ? dec(t) : TW'(n - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr    <= '0;
      t_ccd <= '0;
      t_rtw <= '0;
      for (int r = 0; r < N_RANKS; r++) begin
        t_rrd[r] <= '0;
        t_wtr[r] <= '0;
        for (int k = 0; k < 4; k++) t_faw[r][k] <= '0;
      end
    end else begin
      t_ccd <= dec(t_ccd);
      t_rtw <= dec(t_rtw);
      for (int r = 0; r < N_RANKS; r++) begin
        t_rrd[r] <= dec(t_rrd[r]);
        t_wtr[r] <= dec(t_wtr[r]);
        for (int k = 0; k < 4; k++) t_faw[r][k] <= dec(t_faw[r][k]);
      end
      if (found) begin
        rr <= pick + 1'b1;
        unique case (cmd.cmd)
          CMD_ACT: begin
            t_rrd[cmd.rank] <= later(t_rrd[cmd.rank], T_RRD);
            t_faw[cmd.rank][faw_slot] <= TW'(T_FAW - 1);
          end
          CMD_RD: begin
            t_ccd <= later(t_ccd, T_BURST);
            t_rtw <= later(t_rtw, T_RD2WR);
          end
          CMD_WR: begin
            t_ccd <= later(t_ccd, T_BURST);
            t_wtr[cmd.rank] <= later(t_wtr[cmd.rank], T_WR2RD);
          end
          default: ;
        endcase
      end
    end
  end

  a_onehot : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
