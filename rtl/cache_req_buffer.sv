// cache_req_buffer: the request buffers in front of the last-level cache,
// with the cache's local scheduler.
//
// Requests from the CPU and real-time cores wait here (40 entries). They
// arrive through N_IN ports (default 2: the CPU side and the real-time
// side, this design's choice), so more can arrive per cycle than the cache
// takes and a backlog forms for the schedulers to choose from. Two
// parties take requests out:
//  - the local scheduler of the cache picks, when the fast lane is empty,
//    the request to look up next: reads before writes, then the oldest
//    (key {is_read, age} into an age_arbiter). loc_* shows the pick; the
//    cache takes it with loc_take in the same cycle.
//  - the memory scheduler, in harvesting mode, scans the whole buffer (ent_*)
//    and removes one read with hv_valid/hv_idx to send it down the fast lane.
// The harvester must not name the entry the local scheduler takes in the
// same cycle (assertion in slot_buffer); the memory scheduler masks it out.
// Entry storage and age counting are in slot_buffer.
//
// Timing: the pick is combinational from the buffer's registered contents;
// removals and the insert take effect at the next edge.
module cache_req_buffer
  import umc_pkg::*;
#(
  parameter int unsigned DEPTH = 40,
  parameter int unsigned AGE_W = 12,
  parameter int unsigned N_IN  = 2,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the cores
  input  logic [N_IN-1:0]    in_valid,
  output logic [N_IN-1:0]    in_ready,
  input  mem_req_t           in_req [N_IN],
  // local scheduler pick toward the cache
  output logic               loc_valid,
  output logic [IW-1:0]      loc_idx,
  output mem_req_t           loc_req,
  input  logic               loc_take,
  // harvest removal by the memory scheduler
  input  logic               hv_valid,
  input  logic [IW-1:0]      hv_idx,
  // contents, for the memory scheduler
  output logic [DEPTH-1:0]   ent_valid,
  output mem_req_t           ent_req [DEPTH],
  output logic [AGE_W-1:0]   ent_age [DEPTH],
  output logic [IW:0]        count
);

  slot_buffer #(.DEPTH(DEPTH), .AGE_W(AGE_W), .N_IN(N_IN), .T(mem_req_t)) u_slots (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_req),
    .rm0_valid(loc_take && loc_valid), .rm0_idx(loc_idx),
    .rm1_valid(hv_valid), .rm1_idx(hv_idx),
    .ent_valid, .ent_data(ent_req), .ent_age, .count
  );

  // Local policy: reads over writes, then old over new.
  logic [DEPTH-1:0][AGE_W:0] key;
  always_comb begin
    for (int i = 0; i < DEPTH; i++) key[i] = {!ent_req[i].we, ent_age[i]};
  end

  age_arbiter #(.N(DEPTH), .KEY_W(AGE_W + 1)) u_local_sched (
    .valid(ent_valid), .key, .grant_valid(loc_valid), .grant_idx(loc_idx)
  );

  assign loc_req = ent_req[loc_idx];

endmodule
