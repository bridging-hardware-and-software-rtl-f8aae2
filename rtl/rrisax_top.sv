// rrisax_top: runtime-reconfigurable ISA extension subsystem with its memory
// system, the static part of a RISC-V microcontroller whose custom
// instructions are served either by accelerators in dynamically reconfigured
// partitions or, transparently, by software.
//
// What it does: every custom-2 instruction names an accelerator (RM) in
// funct3. If an RP (reconfigurable partition) currently hosts that RM, the
// instruction executes there (hit), may stall the core, write rd and redirect
// the PC. If not (miss), the software fallback manager buffers the operands,
// sends the core to a software stub at 0x18 that runs a C fallback function,
// and afterwards replays the instruction with the software's result, so the
// architectural effect is the same either way. Misses may trigger the
// automatic reconfiguration of the least recently used RP through the DFX
// controller; meanwhile the fallback keeps the program running. Accelerators
// with internal state have it copied to and from a state image in memory by
// the memory handover manager when they leave or enter an RP, and the
// fallback functions work on the same image. custom-3 instructions reach the
// command manager, the software's window onto all of this.
//
// Structure:
//   fallback_selector    custom-2 dispatch: hit / miss / replay / stall
//   sw_fallback_manager  miss path: context buffer, stub jump, replay
//   command_manager      custom-3 registers
//   partition_manager    per-RP states, DFX triggering
//   auto_reconfig        miss-triggered LRU policy
//   mem_handover_manager state transfer over AXI4-Lite
//   reconfigurable_partition x NUM_RP, each able to host the ROL and the
//                        ASCON accelerator
//   axi_lite_interconnect + axi_bram x2: managers are the CPU port(s), the
//                        handover manager and the DFX controller's bitstream
//                        fetch port; subordinates are the 32 kB program RAM
//                        (0x0000_0000), the 8 kB state RAM (0x1000_0000) and
//                        an external port for the upper half of the address
//                        space (EXT_BASE/EXT_MASK)
// The core (with its SCAIE-V integration layer) and the vendor DFX
// controller are outside: the core connects through the two ISAX ports and
// its AXI4-Lite port(s), the DFX controller through trigger, decouple and RM
// reset, and through the manager port on which it reads the partial
// bitstreams from memory. The DDR and SPI flash controllers (where the
// bitstreams lie), UART and GPIO hang on the external subordinate port; the
// source description names them as vendor blocks on the same interconnect,
// and their place in the address map (DDR from 0x8000_0000, as the bitstream
// addresses imply) is this design's reading.
//
// Timing: single clock domain, active-low asynchronous reset. ISAX ports use
// the stage protocol of rrisax_pkg (stall while busy, results in the cycle
// the instruction leaves the operand stage).
module rrisax_top
  import rrisax_pkg::*;
#(
  parameter int unsigned                NUM_RP      = 2,
  parameter int unsigned                CPU_PORTS   = 1,       // 1: PicoRV32, 2: Orca
  parameter int unsigned                PROG_BYTES  = 32768,
  parameter int unsigned                STATE_BYTES = 8192,
  parameter logic [NUM_RM-1:0]          RM_AVAIL    = 8'b0011_0000,
  parameter logic [NUM_RP-1:0]          INIT_VALID  = '0,
  parameter logic [NUM_RP*RM_ID_W-1:0]  INIT_RM     = '0,
  parameter bit                         AUTO_ENABLE_AT_RESET = 1'b0,
  parameter logic [31:0]                EXT_BASE    = 32'h8000_0000, // DDR, flash, I/O
  parameter logic [31:0]                EXT_MASK    = 32'h8000_0000
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // core: custom-2 (accelerators) and custom-3 (commands)
  input  isax_req_t         isax2_i,
  output isax_rsp_t         isax2_o,
  input  isax_req_t         isax3_i,
  output isax_rsp_t         isax3_o,
  // core memory port(s)
  input  axil_req_t         cpu_axi_i [CPU_PORTS],
  output axil_rsp_t         cpu_axi_o [CPU_PORTS],
  // DFX controller
  output logic [NUM_RP-1:0] dfx_trigger_o,
  output rm_id_t            dfx_trigger_rm_o [NUM_RP],
  input  logic [NUM_RP-1:0] dfx_decouple_i,
  input  logic [NUM_RP-1:0] dfx_rm_reset_i,
  input  axil_req_t         dfx_axi_i,     // DFX controller bitstream fetch
  output axil_rsp_t         dfx_axi_o,
  // external subordinates (DDR and SPI flash controllers, UART, GPIO)
  output axil_req_t         ext_axi_o,
  input  axil_rsp_t         ext_axi_i,
  // status (e.g. for a debug display)
  output rp_state_e         rp_state_o [NUM_RP],
  output rm_id_t            rp_rm_o    [NUM_RP],
  output logic              ho_stall_o     // custom-2 held by a state handover
);

  // ---- dispatch ------------------------------------------------------------
  rp_state_e         rp_state    [NUM_RP];
  rm_id_t            rp_rm       [NUM_RP];
  rm_id_t            hosted_rm   [NUM_RP];
  logic [NUM_RP-1:0] hosted_valid, rp_free, rp_busy, accepted_rp;
  logic [NUM_RM-1:0] ho_busy_rm, force_fb, lock_rm, rm_stateful;
  rm_req_t           rp_req      [NUM_RP];
  rm_rsp_t           rp_rsp      [NUM_RP];
  rm_req_t           sfm_req;
  rm_id_t            sfm_rm;
  rm_rsp_t           sfm_rsp;
  logic              sfm_replay;
  logic              hit, miss, ho_stall;
  logic [NUM_RP-1:0] hit_rp;
  rm_id_t            miss_rm;

  fallback_selector #(.NUM_RP(NUM_RP)) u_sel (
    .isax_i(isax2_i), .isax_o(isax2_o),
    .rp_state_i(rp_state), .rp_rm_i(rp_rm),
    .ho_busy_rm_i(ho_busy_rm), .force_fb_i(force_fb),
    .rp_req_o(rp_req), .rp_rsp_i(rp_rsp),
    .sfm_replay_i(sfm_replay), .sfm_req_o(sfm_req), .sfm_rm_o(sfm_rm), .sfm_rsp_i(sfm_rsp),
    .hit_o(hit), .hit_rp_o(hit_rp), .miss_o(miss), .miss_rm_o(miss_rm), .ho_stall_o(ho_stall)
  );

  always_comb
    for (int k = 0; k < NUM_RP; k++) rp_busy[k] = rp_req[k].valid;

  // ---- software fallback manager -------------------------------------------
  logic        fb_set_result, fb_set_npc, fb_return;
  logic [31:0] cmd_wdata;
  rm_id_t      fb_rm;
  logic [6:0]  fb_funct7;
  logic [31:0] fb_rs1, fb_rs2, fb_pc;

  sw_fallback_manager u_sfm (
    .clk_i, .rst_ni,
    .req_i(sfm_req), .req_rm_i(sfm_rm), .rsp_o(sfm_rsp), .replay_o(sfm_replay),
    .set_result_i(fb_set_result), .set_npc_i(fb_set_npc), .wdata_i(cmd_wdata),
    .return_i(fb_return),
    .buf_rm_o(fb_rm), .buf_funct7_o(fb_funct7), .buf_rs1_o(fb_rs1), .buf_rs2_o(fb_rs2),
    .buf_pc_o(fb_pc), .lock_rm_o(lock_rm)
  );

  // ---- command manager -----------------------------------------------------
  logic        ar_req, ar_accept, ar_enabled;
  logic [7:0]  ar_rp;
  rm_id_t      ar_rm;
  logic        dpr_req, dpr_accept;
  logic [7:0]  dpr_rp;
  rm_id_t      dpr_rm;
  logic        auto_cfg, auto_enable, auto_ovr_valid;
  logic [7:0]  auto_ovr_rp;
  logic        ho_set_base, ho_set_words;
  rm_id_t      ho_cfg_rm;
  logic [31:0] ho_base  [NUM_RM];
  logic [7:0]  ho_words [NUM_RM];

  command_manager #(.NUM_RP(NUM_RP)) u_cmd (
    .clk_i, .rst_ni, .isax_i(isax3_i), .isax_o(isax3_o),
    .fb_rm_i(fb_rm), .fb_funct7_i(fb_funct7), .fb_rs1_i(fb_rs1), .fb_rs2_i(fb_rs2),
    .fb_pc_i(fb_pc), .fb_set_result_o(fb_set_result), .fb_set_npc_o(fb_set_npc),
    .fb_return_o(fb_return), .wdata_o(cmd_wdata),
    .rp_state_i(rp_state), .rp_rm_i(rp_rm),
    .dpr_req_o(dpr_req), .dpr_rp_o(dpr_rp), .dpr_rm_o(dpr_rm), .dpr_accept_i(dpr_accept),
    .auto_cfg_o(auto_cfg), .auto_enable_o(auto_enable), .auto_ovr_valid_o(auto_ovr_valid),
    .auto_ovr_rp_o(auto_ovr_rp), .force_fb_o(force_fb),
    .ho_set_base_o(ho_set_base), .ho_set_words_o(ho_set_words), .ho_cfg_rm_o(ho_cfg_rm),
    .ho_base_i(ho_base), .ho_words_i(ho_words),
    .auto_enabled_i(ar_enabled), .hit_i(hit), .miss_i(miss)
  );

  // ---- automatic reconfiguration ---------------------------------------------

  auto_reconfig #(.NUM_RP(NUM_RP), .ENABLE_AT_RESET(AUTO_ENABLE_AT_RESET)) u_auto (
    .clk_i, .rst_ni,
    .cfg_i(auto_cfg), .cfg_enable_i(auto_enable), .cfg_ovr_valid_i(auto_ovr_valid),
    .cfg_ovr_rp_i(auto_ovr_rp), .enabled_o(ar_enabled),
    .miss_i(miss), .miss_rm_i(miss_rm), .hit_rp_i(hit_rp), .accepted_rp_i(accepted_rp),
    .rp_free_i(rp_free),
    .req_o(ar_req), .req_rp_o(ar_rp), .req_rm_o(ar_rm), .accept_i(ar_accept)
  );

  // ---- partition manager -----------------------------------------------------
  logic              ho_start, ho_prepare, ho_busy, ho_done;
  logic [NUM_RP-1:0] ho_rp;
  rm_id_t            ho_rm;

  partition_manager #(
    .NUM_RP(NUM_RP), .RM_AVAIL(RM_AVAIL), .INIT_VALID(INIT_VALID), .INIT_RM(INIT_RM)
  ) u_pm (
    .clk_i, .rst_ni,
    .cmd_req_i(dpr_req), .cmd_rp_i(dpr_rp), .cmd_rm_i(dpr_rm), .cmd_accept_o(dpr_accept),
    .auto_req_i(ar_req), .auto_rp_i(ar_rp), .auto_rm_i(ar_rm), .auto_accept_o(ar_accept),
    .dfx_trigger_o, .dfx_trigger_rm_o, .dfx_decouple_i, .dfx_rm_reset_i,
    .rp_busy_i(rp_busy), .lock_rm_i(lock_rm), .rm_stateful_i(rm_stateful),
    .ho_start_o(ho_start), .ho_prepare_o(ho_prepare), .ho_rp_o(ho_rp), .ho_rm_o(ho_rm),
    .ho_busy_i(ho_busy), .ho_done_i(ho_done),
    .rp_state_o(rp_state), .rp_rm_o(rp_rm), .hosted_valid_o(hosted_valid),
    .hosted_rm_o(hosted_rm), .rp_free_o(rp_free), .ho_busy_rm_o(ho_busy_rm),
    .accepted_rp_o(accepted_rp)
  );

  assign rp_state_o = rp_state;
  assign rp_rm_o    = rp_rm;
  assign ho_stall_o = ho_stall;

  // ---- memory handover manager -----------------------------------------------
  ho_req_t     ho_req   [NUM_RP];
  logic [31:0] ho_rdata [NUM_RP];
  axil_req_t   mhm_axi_req;
  axil_rsp_t   mhm_axi_rsp;

  mem_handover_manager #(.NUM_RP(NUM_RP)) u_mhm (
    .clk_i, .rst_ni,
    .start_i(ho_start), .prepare_i(ho_prepare), .rp_i(ho_rp), .rm_i(ho_rm),
    .busy_o(ho_busy), .done_o(ho_done),
    .ho_o(ho_req), .ho_rdata_i(ho_rdata),
    .set_base_i(ho_set_base), .set_words_i(ho_set_words), .cfg_rm_i(ho_cfg_rm),
    .cfg_data_i(cmd_wdata), .base_o(ho_base), .words_o(ho_words), .stateful_o(rm_stateful),
    .axi_o(mhm_axi_req), .axi_i(mhm_axi_rsp)
  );

  // ---- reconfigurable partitions ---------------------------------------------
  for (genvar k = 0; k < NUM_RP; k++) begin : g_rp
    reconfigurable_partition u_rp (
      .clk_i, .rst_ni,
      .decouple_i(dfx_decouple_i[k]), .rm_reset_i(dfx_rm_reset_i[k]),
      .hosted_valid_i(hosted_valid[k]), .hosted_rm_i(hosted_rm[k]),
      .req_i(rp_req[k]), .rsp_o(rp_rsp[k]),
      .ho_i(ho_req[k]), .ho_rdata_o(ho_rdata[k])
    );
  end

  // ---- memory system ---------------------------------------------------------
  // managers: core port(s), handover manager, DFX controller
  // subordinates: program RAM, state RAM, external region
  axil_req_t m_req [CPU_PORTS+2];
  axil_rsp_t m_rsp [CPU_PORTS+2];
  axil_req_t s_req [3];
  axil_rsp_t s_rsp [3];

  always_comb begin
    for (int p = 0; p < CPU_PORTS; p++) begin
      m_req[p]     = cpu_axi_i[p];
      cpu_axi_o[p] = m_rsp[p];
    end
    m_req[CPU_PORTS] = mhm_axi_req;
    mhm_axi_rsp      = m_rsp[CPU_PORTS];
    m_req[CPU_PORTS+1] = dfx_axi_i;
    dfx_axi_o          = m_rsp[CPU_PORTS+1];
    ext_axi_o          = s_req[2];
    s_rsp[2]           = ext_axi_i;
  end

  axi_lite_interconnect #(
    .NUM_M(CPU_PORTS + 2), .NUM_S(3),
    .S_BASE({EXT_BASE, 32'h1000_0000, 32'h0000_0000}),
    .S_MASK({EXT_MASK, ~(STATE_BYTES - 32'd1), ~(PROG_BYTES - 32'd1)})
  ) u_xbar (
    .clk_i, .rst_ni, .m_req_i(m_req), .m_rsp_o(m_rsp), .s_req_o(s_req), .s_rsp_i(s_rsp)
  );

  axi_bram #(.SIZE_BYTES(PROG_BYTES))  u_prog_ram  (.clk_i, .rst_ni, .axi_i(s_req[0]), .axi_o(s_rsp[0]));
  axi_bram #(.SIZE_BYTES(STATE_BYTES)) u_state_ram (.clk_i, .rst_ni, .axi_i(s_req[1]), .axi_o(s_rsp[1]));

endmodule
