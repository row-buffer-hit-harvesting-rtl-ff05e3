// tb_cache_req_buffer: the 40 request buffers and the cache's local
// scheduler. Random requests (reads and writes) arrive on both ports; the cache takes the
// local pick at random and a harvester removes random reads. Every cycle the
// pick is compared with a reference: reads before writes, then the oldest,
// equal ages to the lower slot. Buffer-full back-pressure is also checked.
module tb_cache_req_buffer;
  import umc_pkg::*;
  localparam int D = 40;
  localparam int AW = 12;
  localparam int IW = $clog2(D);
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready;
  logic loc_valid, loc_take, hv_valid;
  logic [IW-1:0] loc_idx, hv_idx;
  mem_req_t in_req [2];
  mem_req_t loc_req;
  logic [D-1:0] ent_valid;
  mem_req_t ent_req [D];
  logic [AW-1:0] ent_age [D];
  logic [IW:0] count;
  int checks = 0, failures = 0;
  int full_seen = 0;

  cache_req_buffer #(.DEPTH(D), .AGE_W(AW)) dut (.*);

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
    in_valid = 0; loc_take = 0; hv_valid = 0; hv_idx = 0; in_req[0] = '0; in_req[1] = '0;
    foreach (mv[i]) begin mv[i] = 0; ma[i] = 0; md[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int first_free, second_free, best;
      int reads[$];
      @(negedge clk);
      first_free = -1; second_free = -1; best = -1;
      reads.delete();
      for (int i = 0; i < D; i++) begin
        chk(ent_valid[i] == mv[i], "valid");
        if (!mv[i] && first_free >= 0 && second_free < 0) second_free = i;
        if (!mv[i] && first_free < 0) first_free = i;
        if (mv[i]) begin
          if (best < 0) best = i;
          else if ({!md[i].we, ma[i]} > {!md[best].we, ma[best]}) best = i;
        end
      end
      chk(loc_valid == (best >= 0), "loc_valid");
      if (best >= 0) begin
        chk(int'(loc_idx) == best, $sformatf("loc_idx %0d exp %0d", loc_idx, best));
        chk(loc_req == md[best], "loc_req");
      end
      chk(in_ready[0] == (first_free >= 0) && in_ready[1] == (second_free >= 0), "in_ready");
      if (first_free < 0) full_seen++;
      // drive: arrivals outpace service in the first half, then drain
      for (int p = 0; p < 2; p++) begin
        in_valid[p] = ($urandom_range(99) < ((t < 2500) ? 60 : 10));
        in_req[p]   = '{addr: $urandom, we: 1'($urandom_range(99) < 35), id: ID_W'(2 * t + p)};
      end
      loc_take = ($urandom_range(99) < 50);
      for (int i = 0; i < D; i++)
        if (mv[i] && !md[i].we && !(loc_take && best == i)) reads.push_back(i);
      reads.shuffle();
      hv_valid = (reads.size() > 0) && ($urandom_range(99) < 30);
      if (hv_valid) hv_idx = IW'(reads[0]);
      @(posedge clk);
      for (int i = 0; i < D; i++) if (mv[i]) ma[i]++;
      if (loc_take && best >= 0) mv[best] = 0;
      if (hv_valid) mv[hv_idx] = 0;
      if (in_valid[0] && first_free >= 0) begin
        mv[first_free] = 1; md[first_free] = in_req[0]; ma[first_free] = 0;
      end
      if (in_valid[1] && second_free >= 0) begin
        mv[second_free] = 1; md[second_free] = in_req[1]; ma[second_free] = 0;
      end
    end
    chk(full_seen > 0, "buffer filled up at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
