// bank_state_table: the state of every DRAM bank, as the memory scheduler
// sees it.
//
// For each of the 16 banks it keeps whether a row is open and which one,
// updated from the commands that go out on the command bus (ACT opens the
// addressed row, PRE closes it). Alongside it passes on what each bank's
// command generator reports: whether it is busy with a request, and the row
// it is going to open next together with the earliest cycle count until
// that ACT. The scheduler uses the open rows to prefer row-buffer hits and,
// in harvesting mode, the open and soon-to-open rows to find cache requests
// worth expediting.
//
// Timing: the open-row state changes at the edge after the command; the
// rest is combinational. Reset closes every bank.
module bank_state_table
  import umc_pkg::*;
#(
  parameter int unsigned ETA_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // issued command
  input  logic             cmd_valid,
  input  dram_cmd_t        cmd,
  // command generator status
  input  logic [NB-1:0]    cg_busy,
  input  logic [NB-1:0]    cg_next_valid,
  input  row_t             cg_next_row [NB],
  input  logic [ETA_W-1:0] cg_next_eta [NB],
  // table
  output logic [NB-1:0]    open_valid,
  output row_t             open_row   [NB],
  output logic [NB-1:0]    busy,
  output logic [NB-1:0]    next_valid,
  output row_t             next_row   [NB],
  output logic [ETA_W-1:0] next_eta   [NB]
);

  fbank_t cb;
  assign cb = {cmd.rank, cmd.bank};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_valid <= '0;
      for (int b = 0; b < NB; b++) open_row[b] <= '0;
    end else if (cmd_valid) begin
      if (cmd.cmd == CMD_ACT) begin
        open_valid[cb] <= 1'b1;
        open_row[cb]   <= cmd.row;
      end else if (cmd.cmd == CMD_PRE) begin
        open_valid[cb] <= 1'b0;
      end
    end
  end

  assign busy       = cg_busy;
  assign next_valid = cg_next_valid;
  always_comb begin
    for (int b = 0; b < NB; b++) begin
      next_row[b] = cg_next_row[b];
      next_eta[b] = cg_next_eta[b];
    end
  end

  // DRAM protocol as seen by the table: ACT only to a closed bank,
  // RD/WR only to the open row.
  a_act_closed : assert property (@(posedge clk) disable iff (!rst_n)
                                  (cmd_valid && cmd.cmd == CMD_ACT) |-> !open_valid[cb]);
  a_col_open : assert property (@(posedge clk) disable iff (!rst_n)
                                (cmd_valid && (cmd.cmd == CMD_RD || cmd.cmd == CMD_WR))
                                |-> (open_valid[cb] && open_row[cb] == cmd.row));

endmodule
