// tb_fast_lane: checks the one-entry fast lane: a written request appears
// the next cycle, stays while the cache does not take it, the lane refuses a
// second request while full, and can be refilled in the cycle it is emptied
// (one request per cycle sustained). Random traffic is compared with a
// one-slot reference.
module tb_fast_lane;
  import umc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  mem_req_t in_data, out_data;
  int checks = 0, failures = 0;

  fast_lane #(.T(mem_req_t)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("%t FAIL %s", $time, m); end
  endtask

  bit       m_v;
  mem_req_t m_d;
  int       back_to_back;

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    m_v = 0; back_to_back = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // sustained: one request per cycle with the cache always taking
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      chk(out_valid == m_v, "out_valid");
      if (m_v) chk(out_data == m_d, "out_data");
      chk(in_ready == (!m_v || out_ready), "in_ready");
      if (t < 200) begin
        in_valid  = 1;
        out_ready = 1;
      end else begin
        in_valid  = $urandom_range(1);
        out_ready = $urandom_range(1);
      end
      in_data = '{addr: $urandom, we: 1'b0, id: ID_W'($urandom)};
      #1;
      chk(in_ready == (!m_v || out_ready), "in_ready after drive");
      @(posedge clk);
      if (m_v && out_ready && in_valid) back_to_back++;
      if (!m_v || out_ready) begin
        m_v = in_valid;
        if (in_valid) m_d = in_data;
      end
    end
    chk(back_to_back >= 190, "sustained one request per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
