// tb_command_manager: self-checking test of the custom-3 command register
// file.
//
// Every command is issued many times with random arguments and random values
// on the status inputs, and the answer is compared with what the command set
// defines: single-cycle completion, rd of the read commands, no register write
// but a PC write to the buffered PC with flush for RETURN, the strobes
// (result, next PC, return, DPR request with RP and RM, automatic
// reconfiguration settings, handover base/word writes) only for their own
// command and only with valid, the shared write-data selection, the
// forced-fallback mask register, and the hit and miss counters against
// counts kept by the testbench.
module tb_command_manager;
  import rrisax_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  isax_req_t   isax;
  isax_rsp_t   r;
  rm_id_t      fb_rm;
  logic [6:0]  fb_f7;
  logic [31:0] fb_rs1, fb_rs2, fb_pc, wdata;
  logic        set_res, set_npc, ret;
  rp_state_e   st [2];
  rm_id_t      rrm [2];
  logic        dpr_req, dpr_acc;
  logic [7:0]  dpr_rp;
  rm_id_t      dpr_rm;
  logic        a_cfg, a_en, a_ovr;
  logic [7:0]  a_rp;
  logic [NUM_RM-1:0] force_fb;
  logic        set_base, set_words, a_enabled, hit, miss;
  rm_id_t      cfg_rm;
  logic [31:0] base [NUM_RM];
  logic [7:0]  words [NUM_RM];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  command_manager #(.NUM_RP(2)) dut (
    .clk_i(clk), .rst_ni(rst_n), .isax_i(isax), .isax_o(r),
    .fb_rm_i(fb_rm), .fb_funct7_i(fb_f7), .fb_rs1_i(fb_rs1), .fb_rs2_i(fb_rs2), .fb_pc_i(fb_pc),
    .fb_set_result_o(set_res), .fb_set_npc_o(set_npc), .fb_return_o(ret), .wdata_o(wdata),
    .rp_state_i(st), .rp_rm_i(rrm), .dpr_req_o(dpr_req), .dpr_rp_o(dpr_rp), .dpr_rm_o(dpr_rm),
    .dpr_accept_i(dpr_acc), .auto_cfg_o(a_cfg), .auto_enable_o(a_en), .auto_ovr_valid_o(a_ovr),
    .auto_ovr_rp_o(a_rp), .force_fb_o(force_fb), .ho_set_base_o(set_base),
    .ho_set_words_o(set_words), .ho_cfg_rm_o(cfg_rm), .ho_base_i(base), .ho_words_i(words),
    .auto_enabled_i(a_enabled), .hit_i(hit), .miss_i(miss)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [6:0] CODES [18] = '{7'h00, 7'h01, 7'h02, 7'h03, 7'h04, 7'h05, 7'h06, 7'h07,
                                        7'h10, 7'h11, 7'h12, 7'h13, 7'h14, 7'h15, 7'h16, 7'h17,
                                        7'h18, 7'h19};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n_hit, n_miss;
    logic [NUM_RM-1:0] mask;
    isax = '0; hit = 0; miss = 0;
    n_hit = 0; n_miss = 0; mask = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [6:0]  c;
      logic [31:0] a, b, exp;
      bit          v;
      c = CODES[$urandom_range(0, 17)];
      v = ($urandom_range(0, 7) != 0);
      a = ($urandom_range(0, 1) == 1) ? 32'($urandom_range(0, 7)) : $urandom;
      b = $urandom;
      isax = '{valid: v, instr: {c, 5'd2, 5'd1, 3'd0, 5'd3, OPC_CUSTOM3}, rs1: a, rs2: b, pc: $urandom};
      fb_rm = 3'($urandom); fb_f7 = 7'($urandom); fb_rs1 = $urandom; fb_rs2 = $urandom; fb_pc = $urandom;
      for (int k = 0; k < 2; k++) begin st[k] = rp_state_e'($urandom_range(0, 6)); rrm[k] = 3'($urandom); end
      for (int i = 0; i < NUM_RM; i++) begin base[i] = $urandom; words[i] = 8'($urandom); end
      dpr_acc = $urandom; a_enabled = $urandom;
      hit = $urandom; miss = $urandom;
      #1;
      // expected rd
      unique case (c)
        7'h00: exp = 32'(fb_rm);
        7'h01: exp = fb_rs1;
        7'h02: exp = fb_rs2;
        7'h03: exp = fb_pc;
        7'h04: exp = 32'(fb_f7);
        7'h10: exp = (a < 2) ? {25'd0, st[a[0]], 1'b0, rrm[a[0]]} : 32'd0;
        7'h11: exp = 32'(dpr_acc);
        7'h12: exp = 32'(a_enabled);
        7'h13: exp = 32'(mask);
        7'h16: exp = base[a[2:0]];
        7'h17: exp = 32'(words[a[2:0]]);
        7'h18: exp = n_hit;
        7'h19: exp = n_miss;
        default: exp = '0;
      endcase
      check(!r.stall, "no stall");
      if (c == 7'h07) begin
        check(r.wr_pc == v && r.flush == v && !r.wr_rd && (!v || r.pc == fb_pc), "RETURN");
      end else begin
        check(r.wr_rd == v && !r.wr_pc && !r.flush, $sformatf("command %h writes rd only", c));
        if (v && c != 7'h05 && c != 7'h06 && c != 7'h14 && c != 7'h15)
          check(r.rd == exp, $sformatf("command %h rd %h, expected %h", c, r.rd, exp));
      end
      check(set_npc == (v && c == 7'h05) && set_res == (v && c == 7'h06) && ret == (v && c == 7'h07),
            "fallback strobes");
      check(dpr_req == (v && c == 7'h11), "DPR strobe");
      if (dpr_req) check(dpr_rp == a[7:0] && dpr_rm == b[2:0], "DPR arguments");
      check(a_cfg == (v && c == 7'h12), "automatic reconfiguration strobe");
      if (a_cfg) check(a_en == a[0] && a_ovr == a[1] && a_rp == b[7:0], "automatic reconfiguration arguments");
      check(set_base == (v && c == 7'h14) && set_words == (v && c == 7'h15), "handover configuration strobes");
      if (set_base || set_words) check(cfg_rm == a[2:0] && wdata == b, "handover configuration arguments");
      if (set_res || set_npc) check(wdata == a, "fallback write data");
      check(force_fb == mask, "forced-fallback mask");
      @(posedge clk); #1;
      if (v && c == 7'h13) mask = a[NUM_RM-1:0];
      if (hit)  n_hit++;
      if (miss) n_miss++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
