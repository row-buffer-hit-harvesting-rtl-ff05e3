// tb_slot_buffer: random insert/remove traffic against a reference model of
// the slot store: lowest free slot on insert, per-entry age that counts
// cycles since insertion and saturates, two insert ports (port k takes the
// k-th free slot and is ready only when more than k slots are free), two
// independent remove ports, and the occupancy count.
module tb_slot_buffer;
  import umc_pkg::*;
  localparam int D = 8;
  localparam int AW = 4;
  localparam int IW = $clog2(D);
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready;
  logic rm0_valid, rm1_valid;
  logic [IW-1:0] rm0_idx, rm1_idx;
  mem_req_t in_data [2];
  logic [D-1:0] ent_valid;
  mem_req_t ent_data [D];
  logic [AW-1:0] ent_age [D];
  logic [IW:0] count;
  int checks = 0, failures = 0;

  slot_buffer #(.DEPTH(D), .AGE_W(AW), .N_IN(2), .T(mem_req_t)) dut (.*);

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

  bit       mv [D];
  mem_req_t md [D];
  int       ma [D];

  initial begin
    in_valid = 0; rm0_valid = 0; rm1_valid = 0; rm0_idx = 0; rm1_idx = 0; in_data[0] = '0; in_data[1] = '0;
    foreach (mv[i]) begin mv[i] = 0; ma[i] = 0; md[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int nfree, first_free, second_free, cnt;
      int cand[$];
      @(negedge clk);
      // compare with the model
      nfree = 0; first_free = -1; second_free = -1; cnt = 0;
      cand.delete();
      for (int i = 0; i < D; i++) begin
        chk(ent_valid[i] == mv[i], $sformatf("valid[%0d]", i));
        if (mv[i]) begin
          cnt++;
          chk(ent_data[i] == md[i], $sformatf("data[%0d]", i));
          chk(int'(ent_age[i]) == ma[i], $sformatf("age[%0d] %0d exp %0d", i, ent_age[i], ma[i]));
        end else begin
          nfree++;
          if (first_free < 0) first_free = i;
          else if (second_free < 0) second_free = i;
        end
      end
      chk(int'(count) == cnt, "count");
      // drive: insert-heavy and remove-heavy phases
      for (int p = 0; p < 2; p++) begin
        in_valid[p] = ($urandom_range(99) < (((t / 300) % 2) ? 20 : 70));
        in_data[p]  = '{addr: $urandom, we: 1'(($urandom)), id: ID_W'($urandom)};
      end
      foreach (mv[i]) if (mv[i]) cand.push_back(i);
      cand.shuffle();
      rm0_valid = (cand.size() > 0) && ($urandom_range(99) < 40);
      rm1_valid = (cand.size() > 1) && ($urandom_range(99) < 30);
      if (rm0_valid) rm0_idx = IW'(cand[0]);
      if (rm1_valid) rm1_idx = IW'(cand[1]);
      #1;
      chk(in_ready[0] == (nfree > 0) && in_ready[1] == (nfree > 1), "in_ready");
      @(posedge clk);
      for (int i = 0; i < D; i++) if (mv[i] && ma[i] < (1 << AW) - 1) ma[i]++;
      if (rm0_valid) mv[rm0_idx] = 0;
      if (rm1_valid) mv[rm1_idx] = 0;
      if (in_valid[0] && first_free >= 0) begin
        mv[first_free] = 1; md[first_free] = in_data[0]; ma[first_free] = 0;
      end
      if (in_valid[1] && second_free >= 0) begin
        mv[second_free] = 1; md[second_free] = in_data[1]; ma[second_free] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
