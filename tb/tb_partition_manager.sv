// tb_partition_manager: self-checking test of the per-RP state machines and
// the DPR sequencing.
//
// A DFX controller model (one RP at a time: decouple for 10 cycles, then a
// 2-cycle RM reset) and a handover model (busy 5 cycles, then done) surround
// the partition manager. RM 6 is made available as an extra stateless RM so
// that stateful and stateless evictions can both be exercised; ROL (4) and
// ASCON (5) are stateful. Directed steps:
//   * two DPR requests back to back: the second RP must wait for the DFX
//     controller (Empty, Waiting, Trigger, Reconfig, Prepare, Present);
//   * refusals: RM without bitstream, RM already on its way, RP with a pending
//     request; a command request wins over an automatic one in the same cycle;
//   * an automatic request that evicts a stateful RM waits while the RP is
//     busy and while the RM is locked by the software fallback, then goes
//     through Cleanup; a stateless newcomer skips Prepare;
//   * a Prepare waits while the incoming RM is locked;
//   * evicting a stateless RM skips Cleanup.
// The state sequence of each RP is recorded and compared with the expected
// one, the handover requests (direction, RP, RM) are logged and compared, and
// the trigger, hosted and handover-busy outputs are checked along the way.
module tb_partition_manager;
  import rrisax_pkg::*;

  localparam logic [NUM_RM-1:0] AVAIL = 8'b0111_0000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        c_req, c_acc, a_req, a_acc;
  logic [7:0]  c_rp, a_rp;
  rm_id_t      c_rm, a_rm;
  logic [1:0]  trig, decouple, rm_reset, busy_rp, hv, free, acc_rp, ho_rp;
  rm_id_t      trig_rm [2];
  logic [NUM_RM-1:0] lock, stateful, ho_busy_rm;
  logic        ho_start, ho_prep, ho_busy, ho_done;
  rm_id_t      ho_rm;
  rp_state_e   st [2];
  rm_id_t      rrm [2], hrm [2];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  partition_manager #(.NUM_RP(2), .RM_AVAIL(AVAIL)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmd_req_i(c_req), .cmd_rp_i(c_rp), .cmd_rm_i(c_rm), .cmd_accept_o(c_acc),
    .auto_req_i(a_req), .auto_rp_i(a_rp), .auto_rm_i(a_rm), .auto_accept_o(a_acc),
    .dfx_trigger_o(trig), .dfx_trigger_rm_o(trig_rm), .dfx_decouple_i(decouple),
    .dfx_rm_reset_i(rm_reset), .rp_busy_i(busy_rp), .lock_rm_i(lock), .rm_stateful_i(stateful),
    .ho_start_o(ho_start), .ho_prepare_o(ho_prep), .ho_rp_o(ho_rp), .ho_rm_o(ho_rm),
    .ho_busy_i(ho_busy), .ho_done_i(ho_done),
    .rp_state_o(st), .rp_rm_o(rrm), .hosted_valid_o(hv), .hosted_rm_o(hrm),
    .rp_free_o(free), .ho_busy_rm_o(ho_busy_rm), .accepted_rp_o(acc_rp)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- DFX controller model ----
  int dfx_cnt, dfx_rp;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      decouple <= 0; rm_reset <= 0; dfx_cnt <= 0; dfx_rp <= -1;
    end else if (dfx_rp < 0) begin
      for (int k = 0; k < 2; k++)
        if (trig[k] && dfx_rp < 0) begin dfx_rp <= k; dfx_cnt <= 14; end
    end else begin
      dfx_cnt <= dfx_cnt - 1;
      decouple[dfx_rp] <= (dfx_cnt > 4 && dfx_cnt <= 13);
      rm_reset[dfx_rp] <= (dfx_cnt > 1 && dfx_cnt <= 3);
      if (dfx_cnt == 0) dfx_rp <= -1;
    end
  end

  // ---- handover model ----
  int ho_cnt;
  string ho_log [$];
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ho_busy <= 0; ho_done <= 0; ho_cnt <= 0;
    end else begin
      ho_done <= 0;
      if (ho_start) begin
        check(!ho_busy, "handover starts only when idle");
        check($onehot(ho_rp), "one RP per handover");
        ho_log.push_back($sformatf("%s rp%0d rm%0d", ho_prep ? "prepare" : "cleanup",
                                   ho_rp[1] ? 1 : 0, ho_rm));
        ho_busy <= 1; ho_cnt <= 5;
      end else if (ho_busy) begin
        if (ho_cnt == 1) begin ho_busy <= 0; ho_done <= 1; end
        ho_cnt <= ho_cnt - 1;
      end
    end
  end

  // ---- state sequence recorder and invariants ----
  rp_state_e seq [2][$];
  rp_state_e prev [2];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        if (st[k] != prev[k]) seq[k].push_back(st[k]);
        prev[k] = st[k];
        if (trig[k]) check(st[k] == RP_TRIGGER, "trigger only in Trigger");
        if (st[k] == RP_CLEANUP || st[k] == RP_PREPARE)
          check(ho_busy_rm[hrm[k]], "handover-busy RM marked");
        check(hv[k] == (st[k] == RP_PRESENT || st[k] == RP_CLEANUP || st[k] == RP_PREPARE),
              "hosted flag");
      end
      check(!(decouple[0] && decouple[1]), "one reconfiguration at a time");
    end
  end

  function automatic string seq_str(input int k);
    string s;
    s = "";
    foreach (seq[k][i]) s = {s, " ", seq[k][i].name()};
    return s;
  endfunction

  task automatic expect_seq(input int k, input string exp);
    @(posedge clk); #1;          // let the recorder see the last change
    check(seq_str(k) == exp, $sformatf("RP %0d went%s, expected%s", k, seq_str(k), exp));
    seq[k].delete();
  endtask

  task automatic expect_ho(input string exp);
    string got;
    got = "";
    foreach (ho_log[i]) got = {got, (i ? ", " : ""), ho_log[i]};
    check(got == exp, $sformatf("handovers: %s, expected %s", got, exp));
    ho_log.delete();
  endtask

  task automatic creq(input int rp, input rm_id_t rm, input bit exp_acc);
    @(posedge clk); #1;
    c_req = 1; c_rp = 8'(rp); c_rm = rm;
    #1;
    check(c_acc == exp_acc, $sformatf("command request RP %0d RM %0d accepted %0d", rp, rm, c_acc));
    check(acc_rp == (exp_acc ? 2'(1 << rp) : 2'b00), "accepted-RP pulse");
    @(posedge clk); #1;
    c_req = 0;
  endtask

  task automatic wait_state(input int k, input rp_state_e s);
    int n;
    n = 0;
    while (st[k] != s && n < 500) begin @(posedge clk); #1; n++; end
    check(st[k] == s, $sformatf("RP %0d reaches %s", k, s.name()));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c_req = 0; c_rp = 0; c_rm = 0; a_req = 0; a_rp = 0; a_rm = 0;
    busy_rp = 0; lock = 0; stateful = 8'b0011_0000;
    prev[0] = RP_EMPTY; prev[1] = RP_EMPTY;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    check(st[0] == RP_EMPTY && st[1] == RP_EMPTY && hv == 0 && free == 2'b11, "empty after reset");

    // command beats automatic request in the same cycle
    @(posedge clk); #1;
    c_req = 1; c_rp = 0; c_rm = RM_ROL;
    a_req = 1; a_rp = 1; a_rm = RM_ASCON;
    #1;
    check(c_acc && !a_acc, "command request has priority");
    @(posedge clk); #1;
    c_req = 0; a_req = 0;
    check(rrm[0] == RM_ROL, "incoming RM reported");
    creq(1, RM_ASCON, 1);
    creq(1, 3'd6, 0);            // RP 1 has a pending request
    creq(0, RM_ASCON, 0);        // ASCON already on its way, RP 0 pending
    creq(1, 3'd1, 0);            // no bitstream
    wait_state(0, RP_PRESENT);
    wait_state(1, RP_PRESENT);
    expect_seq(0, " RP_TRIGGER RP_RECONFIG RP_PREPARE RP_PRESENT");
    expect_seq(1, " RP_WAITING RP_TRIGGER RP_RECONFIG RP_PREPARE RP_PRESENT");
    expect_ho("prepare rp0 rm4, prepare rp1 rm5");
    check(hrm[0] == RM_ROL && hrm[1] == RM_ASCON && hv == 2'b11, "both hosted");
    creq(0, RM_ASCON, 0);        // hosted elsewhere

    // automatic eviction of ASCON from RP 1 by stateless RM 6
    busy_rp[1] = 1; lock[RM_ASCON] = 1;
    @(posedge clk); #1;
    a_req = 1; a_rp = 1; a_rm = 3'd6;
    #1; check(a_acc, "automatic request accepted");
    @(posedge clk); #1;
    a_req = 0;
    repeat (10) @(posedge clk);
    #1; check(st[1] == RP_PRESENT, "eviction waits while the RP is busy");
    busy_rp[1] = 0;
    repeat (10) @(posedge clk);
    #1; check(st[1] == RP_PRESENT, "eviction waits while the RM is locked");
    lock[RM_ASCON] = 0;
    wait_state(1, RP_CLEANUP);
    wait_state(1, RP_PRESENT);
    expect_seq(1, " RP_CLEANUP RP_EMPTY RP_TRIGGER RP_RECONFIG RP_PRESENT");
    expect_ho("cleanup rp1 rm5");
    check(hrm[1] == 3'd6, "RM 6 hosted in RP 1");

    // ROL evicted from RP 0 by ASCON; the prepare waits for the lock
    creq(0, RM_ASCON, 1);
    wait_state(0, RP_RECONFIG);
    lock[RM_ASCON] = 1;
    wait_state(0, RP_PREPARE);
    repeat (12) @(posedge clk);
    #1; check(st[0] == RP_PREPARE && !ho_busy, "prepare waits while the RM is locked");
    lock[RM_ASCON] = 0;
    wait_state(0, RP_PRESENT);
    expect_seq(0, " RP_CLEANUP RP_EMPTY RP_TRIGGER RP_RECONFIG RP_PREPARE RP_PRESENT");
    expect_ho("cleanup rp0 rm4, prepare rp0 rm5");

    // stateless RM 6 evicted by ROL: no cleanup
    creq(1, RM_ROL, 1);
    wait_state(1, RP_PRESENT);
    repeat (2) @(posedge clk);
    wait_state(1, RP_PRESENT);
    expect_seq(1, " RP_EMPTY RP_TRIGGER RP_RECONFIG RP_PREPARE RP_PRESENT");
    expect_ho("prepare rp1 rm4");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
