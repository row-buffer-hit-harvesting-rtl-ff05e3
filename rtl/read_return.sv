// read_return: completion timing of column commands.
//
// Every RD or WR on the command bus is pushed here with the cycle at which
// its data burst ends: CL+BURST cycles after a RD, WL+BURST after a WR.
// When the free-running cycle counter reaches that time the completion
// (id, source, direction) is presented on done_*. Because both latencies
// are fixed and column commands are at least BURST cycles apart, the order
// of completion equals the order of issue, so a FIFO suffices. DEPTH must
// cover the commands in flight: (CL+BURST)/BURST + 1 = 6 at the default
// timing, 8 is used. CL follows the evaluated configuration; BURST and WL
// are assumed.
module read_return
  import umc_pkg::*;
#(
  parameter int unsigned T_CL    = 36,
  parameter int unsigned T_WL    = 18,
  parameter int unsigned T_BURST = 8,
  parameter int unsigned DEPTH   = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cmd_valid,
  input  dram_cmd_t cmd,
  output logic      done_valid,
  output mem_resp_t done
);

  localparam int unsigned TW = 16;
  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    logic [TW-1:0] due;
    mem_resp_t     resp;
  } ent_t;

  ent_t          fifo [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  logic [TW-1:0] now;

  logic push;
  assign push = cmd_valid && (cmd.cmd == CMD_RD || cmd.cmd == CMD_WR);

  assign done_valid = (cnt != '0) && (fifo[rp].due == now);
  assign done       = fifo[rp].resp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      now <= '0;
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      now <= now + 1'b1;
      if (push) begin
        fifo[wp].due  <= now + TW'((cmd.cmd == CMD_RD) ? (T_CL + T_BURST) : (T_WL + T_BURST));
        fifo[wp].resp <= '{we: (cmd.cmd == CMD_WR), id: cmd.id, src: cmd.src};
        wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (done_valid) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(done_valid);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                   push |-> (cnt < (PW+1)'(DEPTH) || done_valid));

endmodule
