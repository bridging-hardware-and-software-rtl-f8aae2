// tb_sw_fallback_manager: self-checking test of the software fallback
// manager.
//
// 60 random misses, each followed by the software side (result, optionally a
// next-PC override, return) and the replay of the faulting instruction.
// Checked for every miss: the immediate answer (PC write to the stub 0x18,
// no register write, single cycle); the buffered RM id, funct7, rs1, rs2
// and PC; the lock of that RM while software runs and until the replay;
// that a custom-2 instruction issued while software runs is stalled; the
// replay answer (rd = result, PC override only if requested in this miss);
// and the return to idle (the next request misses again).
module tb_sw_fallback_manager;
  import rrisax_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  rm_req_t     req;
  rm_id_t      req_rm;
  rm_rsp_t     rsp;
  logic        replay, set_res, set_npc, ret;
  logic [31:0] wdata;
  rm_id_t      b_rm;
  logic [6:0]  b_f7;
  logic [31:0] b_rs1, b_rs2, b_pc;
  logic [NUM_RM-1:0] lock;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sw_fallback_manager dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .req_rm_i(req_rm), .rsp_o(rsp),
    .replay_o(replay), .set_result_i(set_res), .set_npc_i(set_npc), .wdata_i(wdata),
    .return_i(ret), .buf_rm_o(b_rm), .buf_funct7_o(b_f7), .buf_rs1_o(b_rs1),
    .buf_rs2_o(b_rs2), .buf_pc_o(b_pc), .lock_rm_o(lock)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic strobe(input int which, input logic [31:0] d);
    set_res = (which == 0); set_npc = (which == 1); ret = (which == 2); wdata = d;
    @(posedge clk); #1;
    set_res = 0; set_npc = 0; ret = 0; wdata = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; req_rm = '0; set_res = 0; set_npc = 0; ret = 0; wdata = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    check(lock == '0 && !replay, "idle after reset");
    for (int n = 0; n < 60; n++) begin
      rm_req_t m;
      rm_id_t  rm;
      logic [31:0] res, npc;
      bit      jump;
      m  = '{valid: 1'b1, funct7: 7'($urandom), rs1: $urandom, rs2: $urandom,
             pc: {$urandom_range(16, 4000), 2'b00}};
      rm = 3'($urandom);
      res = $urandom; npc = {$urandom_range(16, 4000), 2'b00};
      jump = ($urandom_range(0, 1) == 1);
      // the miss
      req = m; req_rm = rm; #1;
      check(rsp.done && rsp.wr_pc && rsp.pc == FALLBACK_STUB_ADDR && !rsp.wr_rd,
            "miss answered with a jump to the stub");
      @(posedge clk); #1;
      req = '0;
      check(b_rm == rm && b_f7 == m.funct7 && b_rs1 == m.rs1 && b_rs2 == m.rs2 && b_pc == m.pc,
            "context buffered");
      check(lock == (NUM_RM'(1) << rm), "RM locked while software runs");
      // a nested custom-2 instruction waits
      req = '{valid: 1'b1, funct7: 7'd1, rs1: 1, rs2: 2, pc: 32'h18}; #1;
      check(!rsp.done, "custom-2 stalled during the fallback");
      @(posedge clk); #1;
      req = '0;
      // software hands over and returns
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1;
      strobe(0, res);
      if (jump) strobe(1, npc);
      check(!replay, "no replay before return");
      strobe(2, 0);
      check(replay && lock == (NUM_RM'(1) << rm), "replay after return, RM still locked");
      // replay
      req = m; req_rm = rm; #1;
      check(rsp.done && rsp.wr_rd && rsp.rd == res, "replay writes the result");
      check(rsp.wr_pc == jump && (!jump || rsp.pc == npc), "PC override only when requested");
      @(posedge clk); #1;
      req = '0;
      check(!replay && lock == '0, "idle after the replay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
