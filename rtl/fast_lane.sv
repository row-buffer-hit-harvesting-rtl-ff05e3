// fast_lane: the one-entry request buffer between the memory scheduler and
// the last-level cache.
//
// In harvesting mode the memory scheduler moves a read whose row is (or is
// about to be) open out of the cache request buffers into this buffer; the
// cache's local scheduler always serves it before anything from the request
// buffers, so the request reaches the cache lookup the cycle after it was
// harvested. The lane holds a single request, as the design prescribes, so
// the request is visible to the cache as soon as it is written.
//
// Interface: valid/ready on both sides. ready (toward the scheduler) is high
// when the lane is empty or is emptied in the same cycle, so a harvest can
// follow every cycle. The refill-in-the-same-cycle behaviour is this
// design's choice.
module fast_lane #(
  parameter type T = umc_pkg::mem_req_t
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end

  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n)
                                    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
