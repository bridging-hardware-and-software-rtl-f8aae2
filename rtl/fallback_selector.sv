// fallback_selector: dispatch of custom-2 invocations.
//
// For each custom-2 instruction the core presents, the RM identifier is its
// funct3 field and the RM operation its funct7 field. The selector decides,
// in the same cycle, where the instruction goes:
//   1. replay   - the software fallback manager holds a computed result for a
//                 miss (the faulting instruction is being re-executed): the
//                 fallback manager answers, whatever the RPs hold;
//   2. stall    - the RM's accelerator-local state is being moved between an
//                 RP and memory (Cleanup or Prepare): the instruction is held
//                 until the handover ends, so no invocation sees a partially
//                 transferred state;
//   3. hit      - an RP in state Present hosts the RM and the RM is not forced
//                 to software: the request goes to that RP;
//   4. miss     - otherwise the software fallback manager takes it.
// The chosen unit's answer is returned to the core; stall = valid and not
// done, flush accompanies every PC write. One-cycle pulses report a completed
// hit (with its RP) and a completed first-time miss for the automatic
// reconfiguration module and the statistics counters.
//
// Hit/miss routing and the handover stall follow the source description. The
// replay priority and the forced-fallback mask (used for experiments) are
// this design's reading of how the replay and the override are served.
module fallback_selector
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_RP = 2
) (
  input  isax_req_t             isax_i,
  output isax_rsp_t             isax_o,
  // partition status
  input  rp_state_e             rp_state_i [NUM_RP],
  input  rm_id_t                rp_rm_i    [NUM_RP],
  input  logic [NUM_RM-1:0]     ho_busy_rm_i,    // RMs under handover
  input  logic [NUM_RM-1:0]     force_fb_i,      // RMs forced to software
  // RPs
  output rm_req_t               rp_req_o   [NUM_RP],
  input  rm_rsp_t               rp_rsp_i   [NUM_RP],
  // software fallback manager
  input  logic                  sfm_replay_i,
  output rm_req_t               sfm_req_o,
  output rm_id_t                sfm_rm_o,
  input  rm_rsp_t               sfm_rsp_i,
  // events
  output logic                  hit_o,
  output logic [NUM_RP-1:0]     hit_rp_o,
  output logic                  miss_o,
  output rm_id_t                miss_rm_o,
  output logic                  ho_stall_o
);

  rm_id_t  rm;
  rm_req_t req;
  logic    hit_found;
  logic [$clog2(NUM_RP+1)-1:0] hit_idx;
  rm_rsp_t sel_rsp;

  assign rm         = isax_i.instr[14:12];
  assign req.valid  = isax_i.valid;
  assign req.funct7 = isax_i.instr[31:25];
  assign req.rs1    = isax_i.rs1;
  assign req.rs2    = isax_i.rs2;
  assign req.pc     = isax_i.pc;

  always_comb begin
    hit_found = 1'b0;
    hit_idx   = '0;
    for (int k = 0; k < NUM_RP; k++) begin
      if (!hit_found && rp_state_i[k] == RP_PRESENT && rp_rm_i[k] == rm) begin
        hit_found = 1'b1;
        hit_idx   = k[$bits(hit_idx)-1:0];
      end
    end
  end

  typedef enum logic [1:0] {R_REPLAY, R_STALL, R_HIT, R_MISS} route_e;
  route_e route;

  always_comb begin
    if (sfm_replay_i)                         route = R_REPLAY;
    else if (ho_busy_rm_i[rm])                route = R_STALL;
    else if (hit_found && !force_fb_i[rm])    route = R_HIT;
    else                                      route = R_MISS;
  end

  always_comb begin
    for (int k = 0; k < NUM_RP; k++) rp_req_o[k] = '0;
    sfm_req_o = '0;
    sel_rsp   = '0;
    sfm_rm_o  = rm;
    unique case (route)
      R_HIT: begin
        for (int k = 0; k < NUM_RP; k++)
          if (hit_idx == k[$bits(hit_idx)-1:0]) begin
            rp_req_o[k] = req;
            sel_rsp     = rp_rsp_i[k];
          end
      end
      R_REPLAY, R_MISS: begin
        sfm_req_o = req;
        sel_rsp   = sfm_rsp_i;
      end
      default: ;   // R_STALL: no one answers, done stays low
    endcase
  end

  always_comb begin
    isax_o       = '0;
    isax_o.stall = isax_i.valid && !sel_rsp.done;
    isax_o.wr_rd = isax_i.valid && sel_rsp.done && sel_rsp.wr_rd;
    isax_o.rd    = sel_rsp.rd;
    isax_o.wr_pc = isax_i.valid && sel_rsp.done && sel_rsp.wr_pc;
    isax_o.pc    = sel_rsp.pc;
    isax_o.flush = isax_o.wr_pc;
  end

  always_comb begin
    hit_o     = isax_i.valid && sel_rsp.done && route == R_HIT;
    hit_rp_o  = '0;
    for (int k = 0; k < NUM_RP; k++)
      hit_rp_o[k] = hit_o && hit_idx == k[$bits(hit_idx)-1:0];
    miss_o     = isax_i.valid && sel_rsp.done && route == R_MISS;
    miss_rm_o  = rm;
    ho_stall_o = isax_i.valid && route == R_STALL;
  end

endmodule
