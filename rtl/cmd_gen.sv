// cmd_gen: per-bank DRAM command generator.
//
// Each of the 16 banks has one. It takes one scheduled request at a time
// (acc_valid; busy while it holds one) and turns it into the commands the
// bank needs under an open-page policy:
//   row open and equal to the request's row -> RD or WR (a row-buffer hit)
//   another row open                        -> PRE, then ACT, then RD/WR
//   no row open                             -> ACT, then RD/WR
// The open row comes from the bank states table. The command wanted now is
// offered as cand_* once the bank's own timing allows it; the command bus
// arbiter, which adds the rank/channel constraints, grants it (grant). The
// request is done, and busy drops, when its column command is granted.
//
// Bank timing (in controller clocks): PRE->ACT tRP, ACT->RD/WR tRCD,
// RD->PRE tRTP, WR->PRE WL+BURST+tWR. The values follow the evaluated
// LPDDR4 configuration; BURST and WL are assumed, and tRAS, refresh and
// power-down are not modelled.
//
// For the harvester it reports the row it is about to open (next_valid,
// next_row) and a lower bound on the cycles until that ACT (next_eta).
module cmd_gen
  import umc_pkg::*;
#(
  parameter int unsigned T_RCD   = 34,
  parameter int unsigned T_RP    = 34,
  parameter int unsigned T_RTP   = 14,
  parameter int unsigned T_WR    = 34,
  parameter int unsigned T_WL    = 18,
  parameter int unsigned T_BURST = 8,
  parameter int unsigned ETA_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fbank_t           bank_id,
  // scheduled request
  input  logic             acc_valid,
  input  txn_t             acc_txn,
  output logic             busy,
  // bank state
  input  logic             open_valid,
  input  row_t             open_row,
  // command offer
  output logic             cand_valid,
  output dram_cmd_t        cand,
  input  logic             grant,
  // row about to be opened
  output logic             next_valid,
  output row_t             next_row,
  output logic [ETA_W-1:0] next_eta,
  // the granted column command was a row-buffer hit (no ACT for this request)
  output logic             ev_row_hit
);

  localparam int unsigned TW = 8;

  txn_t          req;
  logic          did_act;
  logic [TW-1:0] t_act, t_col, t_pre;

  row_t req_row;
  assign req_row = addr_row(req.addr);

  logic row_hit, row_conf;
  assign row_hit  = open_valid && (open_row == req_row);
  assign row_conf = open_valid && (open_row != req_row);

  dram_cmd_e want;
  always_comb begin
    if (row_hit)       want = req.we ? CMD_WR : CMD_RD;
    else if (row_conf) want = CMD_PRE;
    else               want = CMD_ACT;
  end

  always_comb begin
    cand_valid = 1'b0;
    if (busy) begin
      unique case (want)
        CMD_PRE:        cand_valid = (t_pre == '0);
        CMD_ACT:        cand_valid = (t_act == '0);
        CMD_RD, CMD_WR: cand_valid = (t_col == '0);
        default:        cand_valid = 1'b0;
      endcase
    end
    cand = '{cmd: want, rank: bank_id[FB_W-1 -: RANK_W], bank: bank_id[BANK_W-1:0],
             row: req_row, col: addr_col(req.addr), id: req.id, src: req.src};
  end

  always_comb begin
    next_valid = busy && !row_hit;
    next_row   = req_row;
    if (row_conf) next_eta = ETA_W'(t_pre) + ETA_W'(T_RP);
    else          next_eta = ETA_W'(t_act);
  end

  assign ev_row_hit = grant && (want == CMD_RD || want == CMD_WR) && !did_act;

  function automatic logic [TW-1:0] dec(logic [TW-1:0] t);
    return (t == '0) ? '0 : t - 1'b1;
  endfunction

  // A new constraint never shortens one still running (a RD after a WR must
  // not cut the write recovery short).
  function automatic logic [TW-1:0] later(logic [TW-1:0] t, int unsigned n);
    return (dec(t) > TW'(n - 1)) ? dec(t) : TW'(n - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      req     <= '0;
      did_act <= 1'b0;
      t_act   <= '0;
      t_col   <= '0;
      t_pre   <= '0;
    end else begin
      t_act <= dec(t_act);
      t_col <= dec(t_col);
      t_pre <= dec(t_pre);
      if (grant) begin
        unique case (want)
          CMD_PRE: t_act <= later(t_act, T_RP);
          CMD_ACT: begin
            t_col   <= later(t_col, T_RCD);
            did_act <= 1'b1;
          end
          CMD_RD: begin
            t_pre <= later(t_pre, T_RTP);
            busy  <= 1'b0;
          end
          CMD_WR: begin
            t_pre <= later(t_pre, T_WL + T_BURST + T_WR);
            busy  <= 1'b0;
          end
          default: ;
        endcase
      end
      if (acc_valid && !busy) begin
        busy    <= 1'b1;
        req     <= acc_txn;
        did_act <= 1'b0;
      end
    end
  end

  a_acc_idle : assert property (@(posedge clk) disable iff (!rst_n) acc_valid |-> !busy);
  a_grant_offered : assert property (@(posedge clk) disable iff (!rst_n) grant |-> cand_valid);

endmodule
