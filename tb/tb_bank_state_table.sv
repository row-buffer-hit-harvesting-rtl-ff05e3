// tb_bank_state_table: random ACT/PRE/RD/WR commands obeying the DRAM
// protocol are applied; the open-row state of all 16 banks is compared with
// a reference every cycle, and the command generators' status lines must be
// passed through unchanged.
module tb_bank_state_table;
  import umc_pkg::*;
  localparam int EW = 8;
  logic clk = 0, rst_n = 0;
  logic cmd_valid;
  dram_cmd_t cmd;
  logic [NB-1:0] cg_busy, cg_next_valid, open_valid, busy, next_valid;
  row_t cg_next_row [NB];
  logic [EW-1:0] cg_next_eta [NB];
  row_t open_row [NB];
  row_t next_row [NB];
  logic [EW-1:0] next_eta [NB];
  int checks = 0, failures = 0;

  bank_state_table #(.ETA_W(EW)) dut (.*);

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

  bit   mo [NB];
  row_t mr [NB];
  int   n_pre = 0, n_act = 0;

  initial begin
    cmd_valid = 0; cmd = '0;
    foreach (mo[i]) begin mo[i] = 0; mr[i] = '0; cg_next_row[i] = '0; cg_next_eta[i] = '0; end
    cg_busy = '0; cg_next_valid = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int b;
      @(negedge clk);
      for (int i = 0; i < NB; i++) begin
        chk(open_valid[i] == mo[i], $sformatf("open_valid[%0d]", i));
        if (mo[i]) chk(open_row[i] == mr[i], $sformatf("open_row[%0d]", i));
      end
      // status pass-through
      cg_busy = 16'($urandom); cg_next_valid = 16'($urandom);
      for (int i = 0; i < NB; i++) begin cg_next_row[i] = row_t'($urandom); cg_next_eta[i] = EW'($urandom); end
      #1;
      chk(busy == cg_busy && next_valid == cg_next_valid, "status pass-through");
      for (int i = 0; i < NB; i++)
        chk(next_row[i] == cg_next_row[i] && next_eta[i] == cg_next_eta[i], "next pass-through");
      // legal random command
      b = $urandom_range(NB - 1);
      cmd = '0;
      cmd.rank = b[3]; cmd.bank = b[2:0];
      cmd_valid = $urandom_range(99) < 70;
      if (!mo[b]) begin
        cmd.cmd = CMD_ACT; cmd.row = row_t'($urandom_range(7));
      end else if ($urandom_range(1)) begin
        cmd.cmd = CMD_PRE;
      end else begin
        cmd.cmd = $urandom_range(1) ? CMD_RD : CMD_WR; cmd.row = mr[b];
      end
      @(posedge clk);
      if (cmd_valid) begin
        if (cmd.cmd == CMD_ACT) begin mo[b] = 1; mr[b] = cmd.row; n_act++; end
        if (cmd.cmd == CMD_PRE) begin mo[b] = 0; n_pre++; end
      end
    end
    chk(n_pre > 100 && n_act > 100, "enough ACT and PRE applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
