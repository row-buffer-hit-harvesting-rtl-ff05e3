// tb_read_return: column commands are issued with legal spacing (at least
// BURST apart, WR at least CL+BURST+2-WL after RD, RD at least WL+BURST+tWTR
// after WR); each completion must appear exactly CL+BURST cycles after its
// RD or WL+BURST cycles after its WR, with the command's tag.
module tb_read_return;
  import umc_pkg::*;
  localparam int CL = 36, WL = 18, BURST = 8, WTR = 19;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, done_valid;
  dram_cmd_t cmd;
  mem_resp_t done;
  int checks = 0, failures = 0;

  read_return #(.T_CL(CL), .T_WL(WL), .T_BURST(BURST), .DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t FAIL %s", $time, m); end
  endtask

  typedef struct { int due; bit we; int id; } e_t;
  e_t q[$];
  int n_rd = 0, n_wr = 0;
  int cyc = 0, last_col = -1000, last_rd = -1000, last_wr = -1000, n_done = 0;

  initial begin
    cmd_valid = 0; cmd = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit want_rd, legal;
      @(negedge clk);
      if (done_valid) begin
        chk(q.size() > 0, "completion without command");
        if (q.size() > 0) begin
          e_t e;
          e = q.pop_front();
          chk(cyc == e.due, $sformatf("completion at %0d exp %0d", cyc, e.due));
          chk(done.we == e.we && done.id == ID_W'(e.id), "completion tag");
          n_done++;
          if (e.we) n_wr++; else n_rd++;
        end
      end
      if (q.size() > 0) chk(!(q[0].due == cyc && !done_valid), "completion missing");
      want_rd = ((t / 150) % 2 == 0) ? ($urandom_range(99) < 85) : ($urandom_range(99) < 15);
      legal = (cyc - last_col >= BURST) &&
              (want_rd ? (cyc - last_wr >= WL + BURST + WTR) : (cyc - last_rd >= CL + BURST + 2 - WL));
      cmd = '0;
      cmd_valid = legal && ($urandom_range(99) < 50);
      cmd.cmd = cmd_valid ? (want_rd ? CMD_RD : CMD_WR) : ($urandom_range(1) ? CMD_ACT : CMD_PRE);
      if (!cmd_valid && $urandom_range(3) == 0) cmd_valid = 1;   // ACT/PRE must be ignored
      cmd.id = ID_W'($urandom);
      if (cmd_valid && (cmd.cmd == CMD_RD || cmd.cmd == CMD_WR)) begin
        q.push_back('{due: cyc + (want_rd ? CL + BURST : WL + BURST), we: !want_rd, id: int'(cmd.id)});
        last_col = cyc;
        if (want_rd) last_rd = cyc; else last_wr = cyc;
      end
      @(posedge clk);
      cyc++;
    end
    chk(n_rd > 150 && n_wr > 150, $sformatf("completions: %0d reads %0d writes", n_rd, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
