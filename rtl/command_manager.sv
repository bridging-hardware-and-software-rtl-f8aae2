// command_manager: register interface of the reconfiguration subsystem,
// reached by R-type instructions with the custom-3 opcode.
//
// funct7 selects the register or action (codes in rrisax_pkg::cmd_e), rs1 and
// rs2 carry arguments and rd receives the answer. Every command completes in
// the cycle it arrives (no stall). Command groups:
//   * fallback path (0x00-0x07): read the buffered RM id, rs1, rs2, PC and
//     funct7 of the last miss; set the result and an optional next-PC
//     override; RETURN writes the PC back to the faulting instruction (with a
//     flush) and puts the fallback manager into replay;
//   * partitions (0x10, 0x11): read state and RM of an RP, request that an RM
//     be loaded into an RP (rd = 1 when the partition manager accepts);
//   * policy (0x12, 0x13): enable the automatic reconfiguration and override
//     the next RP it uses; force RMs to the fallback path regardless of their
//     presence (experiments);
//   * state handover (0x14-0x17): set/read the state image base address and
//     word count of each RM;
//   * statistics (0x18, 0x19): number of hits and misses.
// Side effects (strobes) are single-cycle pulses issued in the cycle the
// command leaves the operand stage (valid and not stalled).
//
// The command set follows the roles the source description gives this unit;
// the numeric codes, argument positions and the statistics counters are this
// design's choices.
module command_manager
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_RP = 2
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  isax_req_t         isax_i,
  output isax_rsp_t         isax_o,
  // software fallback manager
  input  rm_id_t            fb_rm_i,
  input  logic [6:0]        fb_funct7_i,
  input  logic [31:0]       fb_rs1_i,
  input  logic [31:0]       fb_rs2_i,
  input  logic [31:0]       fb_pc_i,
  output logic              fb_set_result_o,
  output logic              fb_set_npc_o,
  output logic              fb_return_o,
  output logic [31:0]       wdata_o,
  // partition manager
  input  rp_state_e         rp_state_i [NUM_RP],
  input  rm_id_t            rp_rm_i    [NUM_RP],
  output logic              dpr_req_o,
  output logic [7:0]        dpr_rp_o,
  output rm_id_t            dpr_rm_o,
  input  logic              dpr_accept_i,
  // automatic reconfiguration
  output logic              auto_cfg_o,
  output logic              auto_enable_o,
  output logic              auto_ovr_valid_o,
  output logic [7:0]        auto_ovr_rp_o,
  // dispatch override
  output logic [NUM_RM-1:0] force_fb_o,
  // memory handover configuration
  output logic              ho_set_base_o,
  output logic              ho_set_words_o,
  output rm_id_t            ho_cfg_rm_o,
  input  logic [31:0]       ho_base_i  [NUM_RM],
  input  logic [7:0]        ho_words_i [NUM_RM],
  input  logic              auto_enabled_i,
  // statistics
  input  logic              hit_i,
  input  logic              miss_i
);

  logic              fire;
  cmd_e              cmd;
  logic [NUM_RM-1:0] force_fb_q;
  logic [31:0]       hit_cnt_q, miss_cnt_q;

  assign fire = isax_i.valid;          // no stall: every command completes
  assign cmd  = cmd_e'(isax_i.instr[31:25]);

  assign wdata_o          = (cmd == CMD_DPR_REQ || cmd == CMD_HO_SET_BASE ||
                             cmd == CMD_HO_SET_WORDS) ? isax_i.rs2 : isax_i.rs1;
  assign fb_set_result_o  = fire && cmd == CMD_FB_SET_RES;
  assign fb_set_npc_o     = fire && cmd == CMD_FB_SET_NPC;
  assign fb_return_o      = fire && cmd == CMD_FB_RETURN;
  assign dpr_req_o        = fire && cmd == CMD_DPR_REQ;
  assign dpr_rp_o         = isax_i.rs1[7:0];
  assign dpr_rm_o         = isax_i.rs2[RM_ID_W-1:0];
  assign auto_cfg_o       = fire && cmd == CMD_AUTO_CFG;
  assign auto_enable_o    = isax_i.rs1[0];
  assign auto_ovr_valid_o = isax_i.rs1[1];
  assign auto_ovr_rp_o    = isax_i.rs2[7:0];
  assign ho_set_base_o    = fire && cmd == CMD_HO_SET_BASE;
  assign ho_set_words_o   = fire && cmd == CMD_HO_SET_WORDS;
  assign ho_cfg_rm_o      = isax_i.rs1[RM_ID_W-1:0];
  assign force_fb_o       = force_fb_q;

  always_comb begin
    rp_state_e st;
    rm_id_t    rrm;
    st  = RP_EMPTY;
    rrm = '0;
    for (int k = 0; k < NUM_RP; k++)
      if (isax_i.rs1 == 32'(k)) begin
        st  = rp_state_i[k];
        rrm = rp_rm_i[k];
      end

    isax_o       = '0;
    isax_o.wr_rd = fire;
    unique case (cmd)
      CMD_FB_RMID:      isax_o.rd = 32'(fb_rm_i);
      CMD_FB_RS1:       isax_o.rd = fb_rs1_i;
      CMD_FB_RS2:       isax_o.rd = fb_rs2_i;
      CMD_FB_PC:        isax_o.rd = fb_pc_i;
      CMD_FB_FUNCT7:    isax_o.rd = 32'(fb_funct7_i);
      CMD_FB_RETURN: begin
        isax_o.wr_rd = 1'b0;
        isax_o.wr_pc = fire;
        isax_o.flush = fire;
        isax_o.pc    = fb_pc_i;
      end
      CMD_RP_STATUS:    isax_o.rd = {24'd0, 1'b0, st, 1'b0, rrm};
      CMD_DPR_REQ:      isax_o.rd = {31'd0, dpr_accept_i};
      CMD_AUTO_CFG:     isax_o.rd = {31'd0, auto_enabled_i};
      CMD_FORCE_FB:     isax_o.rd = 32'(force_fb_q);
      CMD_HO_GET_BASE:  isax_o.rd = ho_base_i[ho_cfg_rm_o];
      CMD_HO_GET_WORDS: isax_o.rd = 32'(ho_words_i[ho_cfg_rm_o]);
      CMD_CNT_HIT:      isax_o.rd = hit_cnt_q;
      CMD_CNT_MISS:     isax_o.rd = miss_cnt_q;
      default:          isax_o.rd = '0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      force_fb_q <= '0;
      hit_cnt_q  <= '0;
      miss_cnt_q <= '0;
    end else begin
      if (fire && cmd == CMD_FORCE_FB) force_fb_q <= isax_i.rs1[NUM_RM-1:0];
      if (hit_i)  hit_cnt_q  <= hit_cnt_q + 32'd1;
      if (miss_i) miss_cnt_q <= miss_cnt_q + 32'd1;
    end
  end

endmodule
