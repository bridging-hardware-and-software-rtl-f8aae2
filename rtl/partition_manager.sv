// partition_manager: occupancy tracking and DPR sequencing for every
// reconfigurable partition (RP).
//
// Each RP has a state (rrisax_pkg::rp_state_e):
//   Present   the RP hosts a usable RM
//   Cleanup   the memory handover manager saves the RM's state to memory
//   Empty     nothing usable in the RP; ready for reconfiguration
//   Waiting   a reconfiguration is pending but the DFX controller is busy with
//             another RP (it reconfigures one RP at a time)
//   Trigger   the reconfiguration request is raised to the DFX controller
//   Reconfig  DPR in progress (decouple high, then the RM reset pulse)
//   Prepare   the memory handover manager restores the new RM's state
// A request (from the command manager, or from the automatic reconfiguration
// module when the command manager is silent) names an RP and an RM. It is
// accepted in the same cycle when the RM has a partial bitstream
// (RM_AVAIL), the RM is neither hosted by nor on its way into any RP (each RM
// populates at most one RP) and the RP is Present or Empty with nothing
// pending. Flow of an accepted request:
//   Present --(RP idle; stateful RM: Cleanup, else)--> Empty
//   Cleanup --(handover done)--> Empty
//   Empty/Waiting --(DFX free, lowest RP first)--> Trigger, else Waiting
//   Trigger --(decouple rises)--> Reconfig
//   Reconfig --(decouple low, RM reset pulse ends)--> Prepare (stateful RM)
//                                                     or Present
//   Prepare --(handover done)--> Present
// Eviction waits while the RP serves a custom-2 instruction, and no handover
// starts for an RM whose memory image the software fallback is using. One
// handover runs at a time. An RM counts as stateful when its configured
// state word count is non-zero.
//
// The seven states, the single-RP-at-a-time DFX rule, the unique-RM rule and
// the use of decouple and reset to follow DPR come from the source
// description; the transition conditions between them are this design's.
module partition_manager
  import rrisax_pkg::*;
#(
  parameter int unsigned       NUM_RP     = 2,
  parameter logic [NUM_RM-1:0] RM_AVAIL   = 8'b0011_0000,   // ROL, ASCON
  parameter logic [NUM_RP-1:0] INIT_VALID = '0,
  parameter logic [NUM_RP*RM_ID_W-1:0] INIT_RM = '0         // RP k at [k*3 +: 3]
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // requests
  input  logic              cmd_req_i,
  input  logic [7:0]        cmd_rp_i,
  input  rm_id_t            cmd_rm_i,
  output logic              cmd_accept_o,
  input  logic              auto_req_i,
  input  logic [7:0]        auto_rp_i,
  input  rm_id_t            auto_rm_i,
  output logic              auto_accept_o,
  // DFX controller
  output logic [NUM_RP-1:0] dfx_trigger_o,
  output rm_id_t            dfx_trigger_rm_o [NUM_RP],
  input  logic [NUM_RP-1:0] dfx_decouple_i,
  input  logic [NUM_RP-1:0] dfx_rm_reset_i,
  // dispatch side
  input  logic [NUM_RP-1:0] rp_busy_i,
  input  logic [NUM_RM-1:0] lock_rm_i,
  input  logic [NUM_RM-1:0] rm_stateful_i,
  // memory handover manager
  output logic              ho_start_o,
  output logic              ho_prepare_o,     // 1: memory -> RM, 0: RM -> memory
  output logic [NUM_RP-1:0] ho_rp_o,          // one-hot RP of the handover
  output rm_id_t            ho_rm_o,
  input  logic              ho_busy_i,
  input  logic              ho_done_i,
  // status
  output rp_state_e         rp_state_o  [NUM_RP],
  output rm_id_t            rp_rm_o     [NUM_RP],   // hosted or incoming RM
  output logic [NUM_RP-1:0] hosted_valid_o,
  output rm_id_t            hosted_rm_o [NUM_RP],
  output logic [NUM_RP-1:0] rp_free_o,
  output logic [NUM_RM-1:0] ho_busy_rm_o,
  output logic [NUM_RP-1:0] accepted_rp_o            // pulse: RP got a new request
);

  rp_state_e         state_q [NUM_RP];
  rm_id_t            cur_q   [NUM_RP];
  rm_id_t            tgt_q   [NUM_RP];
  logic [NUM_RP-1:0] pend_q, ho_run_q, rst_seen_q;

  // ---- request acceptance -------------------------------------------------
  function automatic logic rm_in_use(input rm_id_t rm);
    logic used;
    used = 1'b0;
    for (int k = 0; k < NUM_RP; k++) begin
      if ((state_q[k] == RP_PRESENT || state_q[k] == RP_CLEANUP ||
           state_q[k] == RP_PREPARE) && cur_q[k] == rm) used = 1'b1;
      if (pend_q[k] && tgt_q[k] == rm) used = 1'b1;
    end
    return used;
  endfunction

  function automatic logic can_accept(input logic [7:0] rp, input rm_id_t rm);
    logic ok;
    ok = 1'b0;
    for (int k = 0; k < NUM_RP; k++)
      if (rp == 8'(k))
        ok = rp_free_o[k];
    return ok && RM_AVAIL[rm] && !rm_in_use(rm);
  endfunction

  always_comb begin
    for (int k = 0; k < NUM_RP; k++)
      rp_free_o[k] = !pend_q[k] && (state_q[k] == RP_PRESENT || state_q[k] == RP_EMPTY);
    cmd_accept_o  = cmd_req_i && can_accept(cmd_rp_i, cmd_rm_i);
    auto_accept_o = auto_req_i && !cmd_req_i && can_accept(auto_rp_i, auto_rm_i);
    accepted_rp_o = '0;
    for (int k = 0; k < NUM_RP; k++)
      accepted_rp_o[k] = (cmd_accept_o && cmd_rp_i == 8'(k)) ||
                         (auto_accept_o && auto_rp_i == 8'(k));
  end

  // ---- DFX and handover arbitration (lowest RP first) ---------------------
  logic              dfx_busy;
  logic [NUM_RP-1:0] dfx_grant, ho_grant;

  always_comb begin
    logic taken;
    dfx_busy = 1'b0;
    for (int k = 0; k < NUM_RP; k++)
      if (state_q[k] == RP_TRIGGER || state_q[k] == RP_RECONFIG) dfx_busy = 1'b1;
    dfx_grant = '0;
    taken     = dfx_busy;
    for (int k = 0; k < NUM_RP; k++)
      if (!taken && pend_q[k] && (state_q[k] == RP_EMPTY || state_q[k] == RP_WAITING)) begin
        dfx_grant[k] = 1'b1;
        taken        = 1'b1;
      end
    ho_grant = '0;
    taken    = ho_busy_i || (ho_run_q != '0);
    for (int k = 0; k < NUM_RP; k++)
      if (!taken && !ho_run_q[k] && (state_q[k] == RP_CLEANUP || state_q[k] == RP_PREPARE)
          && !lock_rm_i[cur_q[k]]) begin
        ho_grant[k] = 1'b1;
        taken       = 1'b1;
      end
  end

  always_comb begin
    ho_start_o   = (ho_grant != '0);
    ho_rp_o      = ho_grant;
    ho_prepare_o = 1'b0;
    ho_rm_o      = '0;
    for (int k = 0; k < NUM_RP; k++)
      if (ho_grant[k]) begin
        ho_prepare_o = (state_q[k] == RP_PREPARE);
        ho_rm_o      = cur_q[k];
      end
  end

  // ---- per-RP state machines ----------------------------------------------
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int k = 0; k < NUM_RP; k++) begin
        state_q[k] <= INIT_VALID[k] ? RP_PRESENT : RP_EMPTY;
        cur_q[k]   <= INIT_RM[k*RM_ID_W +: RM_ID_W];
        tgt_q[k]   <= '0;
      end
      pend_q     <= '0;
      ho_run_q   <= '0;
      rst_seen_q <= '0;
    end else begin
      for (int k = 0; k < NUM_RP; k++) begin
        if (accepted_rp_o[k]) begin
          pend_q[k] <= 1'b1;
          tgt_q[k]  <= cmd_accept_o ? cmd_rm_i : auto_rm_i;
        end
        if (ho_grant[k]) ho_run_q[k] <= 1'b1;
        unique case (state_q[k])
          RP_PRESENT:
            if (pend_q[k] && !rp_busy_i[k] && !lock_rm_i[cur_q[k]])
              state_q[k] <= rm_stateful_i[cur_q[k]] ? RP_CLEANUP : RP_EMPTY;
          RP_CLEANUP, RP_PREPARE:
            if (ho_run_q[k] && ho_done_i) begin
              ho_run_q[k] <= 1'b0;
              state_q[k]  <= (state_q[k] == RP_CLEANUP) ? RP_EMPTY : RP_PRESENT;
            end
          RP_EMPTY, RP_WAITING:
            if (pend_q[k]) state_q[k] <= dfx_grant[k] ? RP_TRIGGER : RP_WAITING;
          RP_TRIGGER:
            if (dfx_decouple_i[k]) begin
              state_q[k]    <= RP_RECONFIG;
              rst_seen_q[k] <= 1'b0;
            end
          RP_RECONFIG: begin
            if (!dfx_decouple_i[k] && dfx_rm_reset_i[k]) rst_seen_q[k] <= 1'b1;
            if (rst_seen_q[k] && !dfx_rm_reset_i[k]) begin
              cur_q[k]   <= tgt_q[k];
              pend_q[k]  <= 1'b0;
              state_q[k] <= rm_stateful_i[tgt_q[k]] ? RP_PREPARE : RP_PRESENT;
            end
          end
          default: state_q[k] <= RP_EMPTY;
        endcase
      end
    end
  end

  // ---- outputs -------------------------------------------------------------
  always_comb begin
    ho_busy_rm_o = '0;
    for (int k = 0; k < NUM_RP; k++) begin
      rp_state_o[k]       = state_q[k];
      hosted_valid_o[k]   = (state_q[k] == RP_PRESENT || state_q[k] == RP_CLEANUP ||
                             state_q[k] == RP_PREPARE);
      hosted_rm_o[k]      = cur_q[k];
      rp_rm_o[k]          = (pend_q[k] && !hosted_valid_o[k]) ? tgt_q[k] : cur_q[k];
      dfx_trigger_o[k]    = (state_q[k] == RP_TRIGGER);
      dfx_trigger_rm_o[k] = tgt_q[k];
      if (state_q[k] == RP_CLEANUP || state_q[k] == RP_PREPARE)
        ho_busy_rm_o[cur_q[k]] = 1'b1;
    end
  end

  // Only one RP is reconfigured at a time.
  a_one_dfx: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(dfx_trigger_o));

endmodule
