// tb_auto_reconfig: self-checking test of the miss-triggered automatic
// reconfiguration policy, with four RPs so that the least-recently-used
// choice is exercised beyond a simple toggle.
//
// 6000 random cycles of misses, hits, free-RP masks, acceptances by the
// partition manager and configuration commands (enable, one-shot RP
// override). A reference keeps the RPs as a list ordered by last use (hit or
// accepted reconfiguration; at reset RP 0 is the oldest) and predicts, in the
// cycle after each miss while enabled, the request: the oldest free RP, or
// the override RP until one request with it has been accepted; the requested
// RM is the one that missed. No request without a preceding miss, none while
// disabled and none when no RP is free and no override is set.
module tb_auto_reconfig;
  import rrisax_pkg::*;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         cfg, cfg_en, cfg_ovr, enabled, miss, req, acc;
  logic [7:0]   cfg_rp, req_rp;
  rm_id_t       miss_rm, req_rm;
  logic [N-1:0] hit_rp, acc_rp, free;
  int           checks = 0, failures = 0;
  int           n_req, n_ovr;

  always #5 clk = ~clk;

  auto_reconfig #(.NUM_RP(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_i(cfg), .cfg_enable_i(cfg_en), .cfg_ovr_valid_i(cfg_ovr),
    .cfg_ovr_rp_i(cfg_rp), .enabled_o(enabled), .miss_i(miss), .miss_rm_i(miss_rm),
    .hit_rp_i(hit_rp), .accepted_rp_i(acc_rp), .rp_free_i(free),
    .req_o(req), .req_rp_o(req_rp), .req_rm_o(req_rm), .accept_i(acc)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int     order [$];         // front: most recently used
    bit     m_en, m_ovr, m_pend;
    int     m_ovr_rp;
    rm_id_t m_rm;
    cfg = 0; cfg_en = 0; cfg_ovr = 0; cfg_rp = 0; miss = 0; miss_rm = 0;
    hit_rp = 0; acc_rp = 0; free = 0; acc = 0;
    n_req = 0; n_ovr = 0;
    order = {3, 2, 1, 0};
    m_en = 0; m_ovr = 0; m_pend = 0; m_ovr_rp = 0; m_rm = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      bit exp_req;
      int exp_rp, used;
      free = N'($urandom);
      if ($urandom_range(0, 9) == 0) free = '0;
      #1;
      // prediction
      exp_rp = -1;
      foreach (order[i]) if (free[order[i]]) exp_rp = order[i];
      exp_req = m_pend && (m_ovr || exp_rp >= 0);
      if (m_ovr) exp_rp = m_ovr_rp;
      check(enabled == m_en, "enable state");
      check(req == exp_req, $sformatf("cycle %0d: request %0d, expected %0d", n, req, exp_req));
      if (req && exp_req) begin
        check(req_rp == 8'(exp_rp), $sformatf("requested RP %0d, expected %0d", req_rp, exp_rp));
        check(req_rm == m_rm, "requested RM is the missing one");
        n_req++;
        if (m_ovr) n_ovr++;
      end
      // partition manager and dispatcher activity
      acc    = req && ($urandom_range(0, 2) != 0);
      acc_rp = acc ? N'(1) << req_rp[1:0] : '0;
      hit_rp = (!acc && $urandom_range(0, 2) == 0) ? N'(1) << $urandom_range(0, N - 1) : '0;
      miss    = ($urandom_range(0, 3) == 0);
      miss_rm = 3'($urandom);
      cfg     = ($urandom_range(0, 40) == 0);
      cfg_en  = ($urandom_range(0, 4) != 0);
      cfg_ovr = ($urandom_range(0, 1) == 1);
      cfg_rp  = 8'($urandom_range(0, N - 1));
      @(posedge clk); #1;
      // reference update
      used = -1;
      for (int k = 0; k < N; k++) if (acc_rp[k] || hit_rp[k]) used = k;
      if (used >= 0) begin
        foreach (order[i]) if (order[i] == used) begin order.delete(i); break; end
        order.push_front(used);
      end
      m_pend = miss && m_en;
      if (miss) m_rm = miss_rm;
      if (acc) m_ovr = 0;
      if (cfg) begin m_en = cfg_en; m_ovr = cfg_ovr; m_ovr_rp = cfg_rp; end
      cfg = 0; miss = 0; hit_rp = 0; acc_rp = 0; acc = 0;
    end
    check(n_req > 100 && n_ovr > 10, $sformatf("requests %0d, with override %0d", n_req, n_ovr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
