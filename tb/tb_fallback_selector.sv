// tb_fallback_selector: self-checking test of the custom-2 dispatcher.
//
// 5000 random cycles of partition states, hosted RMs, handover-busy and
// forced-fallback masks, replay flag and RP/fallback answers are applied and
// every output is compared with a reference routing written out in the
// testbench: replay goes to the fallback manager; an RM under state handover
// stalls with nothing dispatched; an RM present in an RP and not forced goes
// to the first such RP (hit); everything else goes to the fallback manager
// (miss). The core answer (stall, rd, PC redirect, flush) and the hit/miss
// events must follow the selected answer. Each route must occur.
module tb_fallback_selector;
  import rrisax_pkg::*;

  logic      clk = 1'b0;
  isax_req_t isax;
  isax_rsp_t isax_r;
  rp_state_e st [2];
  rm_id_t    rrm [2];
  logic [NUM_RM-1:0] ho_busy, force_fb;
  rm_req_t   rp_req [2];
  rm_rsp_t   rp_rsp [2];
  logic      replay;
  rm_req_t   sfm_req;
  rm_id_t    sfm_rm;
  rm_rsp_t   sfm_rsp;
  logic      hit, miss, ho_stall;
  logic [1:0] hit_rp;
  rm_id_t    miss_rm;
  int        checks = 0, failures = 0;
  int        n_route [4];

  always #5 clk = ~clk;

  fallback_selector #(.NUM_RP(2)) dut (
    .isax_i(isax), .isax_o(isax_r), .rp_state_i(st), .rp_rm_i(rrm),
    .ho_busy_rm_i(ho_busy), .force_fb_i(force_fb), .rp_req_o(rp_req), .rp_rsp_i(rp_rsp),
    .sfm_replay_i(replay), .sfm_req_o(sfm_req), .sfm_rm_o(sfm_rm), .sfm_rsp_i(sfm_rsp),
    .hit_o(hit), .hit_rp_o(hit_rp), .miss_o(miss), .miss_rm_o(miss_rm), .ho_stall_o(ho_stall)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic rm_rsp_t rnd_rsp();
    rm_rsp_t r;
    r.done = ($urandom_range(0, 3) != 0);
    r.wr_rd = $urandom; r.rd = $urandom; r.wr_pc = $urandom; r.pc = $urandom;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) n_route[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      rm_id_t  rm;
      int      route, k_hit;     // 0 replay, 1 stall, 2 hit, 3 miss
      rm_req_t exp_req;
      rm_rsp_t sel;
      rm = ($urandom_range(0, 3) == 0) ? 3'($urandom) : ($urandom_range(0, 1) ? RM_ROL : RM_ASCON);
      isax.valid = ($urandom_range(0, 7) != 0);
      isax.instr = {7'($urandom), 5'($urandom), 5'($urandom), rm, 5'($urandom), OPC_CUSTOM2};
      isax.rs1 = $urandom; isax.rs2 = $urandom; isax.pc = $urandom;
      for (int k = 0; k < 2; k++) begin
        st[k]  = ($urandom_range(0, 1) == 1) ? RP_PRESENT : rp_state_e'($urandom_range(0, 6));
        rrm[k] = ($urandom_range(0, 1) == 1) ? RM_ROL : RM_ASCON;
        rp_rsp[k] = rnd_rsp();
      end
      ho_busy  = ($urandom_range(0, 5) == 0) ? NUM_RM'(1) << rm : '0;
      force_fb = ($urandom_range(0, 5) == 0) ? NUM_RM'(1) << rm : NUM_RM'($urandom) & ~(NUM_RM'(1) << rm);
      replay   = ($urandom_range(0, 7) == 0);
      sfm_rsp  = rnd_rsp();
      @(posedge clk); #1;

      // reference routing
      k_hit = -1;
      for (int k = 1; k >= 0; k--) if (st[k] == RP_PRESENT && rrm[k] == rm) k_hit = k;
      if (replay)                           route = 0;
      else if (ho_busy[rm])                 route = 1;
      else if (k_hit >= 0 && !force_fb[rm]) route = 2;
      else                                  route = 3;
      if (isax.valid) n_route[route]++;
      exp_req = '{valid: isax.valid, funct7: isax.instr[31:25], rs1: isax.rs1, rs2: isax.rs2, pc: isax.pc};
      sel = (route == 2) ? rp_rsp[k_hit] : (route == 1) ? rm_rsp_t'('0) : sfm_rsp;

      for (int k = 0; k < 2; k++)
        check(rp_req[k] == ((route == 2 && k == k_hit) ? exp_req : rm_req_t'('0)),
              $sformatf("RP %0d request, route %0d", k, route));
      check(sfm_req == ((route == 0 || route == 3) ? exp_req : rm_req_t'('0)), "fallback request");
      check(sfm_rm == rm, "fallback RM id");
      check(isax_r.stall == (isax.valid && !sel.done), "stall");
      check(isax_r.wr_rd == (isax.valid && sel.done && sel.wr_rd), "register write");
      check(isax_r.wr_pc == (isax.valid && sel.done && sel.wr_pc) && isax_r.flush == isax_r.wr_pc,
            "PC write and flush");
      if (isax_r.wr_rd) check(isax_r.rd == sel.rd, "rd");
      if (isax_r.wr_pc) check(isax_r.pc == sel.pc, "PC");
      check(hit == (isax.valid && sel.done && route == 2), "hit event");
      check(hit_rp == (hit ? 2'(1 << k_hit) : 2'b00), "hit RP");
      check(miss == (isax.valid && sel.done && route == 3) && miss_rm == rm, "miss event");
      check(ho_stall == (isax.valid && route == 1), "handover stall");
    end
    for (int i = 0; i < 4; i++) check(n_route[i] > 0, $sformatf("route %0d occurred", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
