// tb_mem_handover_manager: self-checking test of the memory handover manager.
//
// Two RP models hold 16 state registers each and answer the handover port
// (read: the word selected by cnt, combinationally; write: store wdata at
// cnt). An AXI4-Lite subordinate model with random ready and response delays
// holds the memory. 40 random Cleanup and Prepare handovers for random RMs
// with random configured bases and word counts are run; after each the
// memory image (Cleanup) or the RP's registers (Prepare) must equal the
// source word by word at base + 4*i, nothing outside the image or in the
// other RP may change, the read/write strobes may only go to the selected
// RP, done must pulse exactly once, and a stateless RM (word count 0) must
// finish without any bus traffic. The default configuration (ROL 2 words at
// 0x1000_0000, ASCON 16 words at 0x1000_0040) is checked after reset.
module tb_mem_handover_manager;
  import rrisax_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, prepare, busy, done, set_base, set_words;
  logic [1:0]  rp;
  rm_id_t      rm, cfg_rm;
  ho_req_t     ho [2];
  logic [31:0] ho_rdata [2];
  logic [31:0] cfg_data;
  logic [31:0] base [NUM_RM];
  logic [7:0]  words [NUM_RM];
  logic [NUM_RM-1:0] stateful;
  axil_req_t   q;
  axil_rsp_t   r;
  int          checks = 0, failures = 0;

  logic [31:0] regs [2][16];
  logic [31:0] mem [logic [31:0]];
  int          n_done, n_axi, n_foreign;

  always #5 clk = ~clk;

  mem_handover_manager dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .prepare_i(prepare), .rp_i(rp), .rm_i(rm),
    .busy_o(busy), .done_o(done), .ho_o(ho), .ho_rdata_i(ho_rdata),
    .set_base_i(set_base), .set_words_i(set_words), .cfg_rm_i(cfg_rm), .cfg_data_i(cfg_data),
    .base_o(base), .words_o(words), .stateful_o(stateful), .axi_o(q), .axi_i(r)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // RP models
  always_comb
    for (int k = 0; k < 2; k++) ho_rdata[k] = ho[k].read ? regs[k][ho[k].cnt[3:0]] : 32'd0;

  always @(posedge clk) begin
    for (int k = 0; k < 2; k++) begin
      if (ho[k].write) regs[k][ho[k].cnt[3:0]] <= ho[k].wdata;
      if ((ho[k].read || ho[k].write) && !rp[k]) n_foreign++;
    end
    if (done) n_done++;
  end

  // AXI4-Lite subordinate with random delays
  int aw_wait, w_wait, ar_wait;
  logic aw_got, w_got;
  logic [31:0] aw_addr, w_data, ar_addr;
  logic ar_got;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; aw_got <= 0; w_got <= 0; ar_got <= 0;
      aw_wait <= 0; w_wait <= 0; ar_wait <= 0;
    end else begin
      // write address / data
      r.awready <= 1'b0;
      r.wready  <= 1'b0;
      if (q.awvalid && !aw_got && !r.awready) begin
        if (aw_wait == 0) begin r.awready <= 1'b1; aw_got <= 1; aw_addr <= q.awaddr; aw_wait <= $urandom_range(0, 3); end
        else aw_wait <= aw_wait - 1;
      end
      if (q.wvalid && !w_got && !r.wready) begin
        if (w_wait == 0) begin r.wready <= 1'b1; w_got <= 1; w_data <= q.wdata; w_wait <= $urandom_range(0, 3); end
        else w_wait <= w_wait - 1;
      end
      if (aw_got && w_got && !r.bvalid && $urandom_range(0, 2) == 0) begin
        mem[aw_addr] = w_data;
        n_axi++;
        r.bvalid <= 1'b1;
        r.bresp  <= 2'b00;
      end
      if (r.bvalid && q.bready) begin r.bvalid <= 1'b0; aw_got <= 0; w_got <= 0; end
      // read
      r.arready <= 1'b0;
      if (q.arvalid && !ar_got && !r.arready) begin
        if (ar_wait == 0) begin r.arready <= 1'b1; ar_got <= 1; ar_addr <= q.araddr; ar_wait <= $urandom_range(0, 3); end
        else ar_wait <= ar_wait - 1;
      end
      if (ar_got && !r.rvalid && $urandom_range(0, 2) == 0) begin
        r.rvalid <= 1'b1;
        r.rdata  <= mem.exists(ar_addr) ? mem[ar_addr] : 32'hbad0_0000;
        r.rresp  <= 2'b00;
        n_axi++;
      end
      if (r.rvalid && q.rready) begin r.rvalid <= 1'b0; ar_got <= 0; end
    end
  end

  // these subordinate handshakes need the manager to hold valid until ready
  always @(posedge clk)
    if (rst_n && r.awready && !q.awvalid) begin
      failures++; $display("FAIL: awvalid dropped before awready");
    end

  task automatic configure(input rm_id_t m, input logic [31:0] b, input logic [7:0] w);
    @(posedge clk); #1;
    cfg_rm = m; cfg_data = b; set_base = 1;
    @(posedge clk); #1;
    set_base = 0; cfg_data = 32'(w); set_words = 1;
    @(posedge clk); #1;
    set_words = 0;
  endtask

  task automatic handover(input bit prep, input int k, input rm_id_t m);
    int cyc;
    @(posedge clk); #1;
    n_done = 0; n_axi = 0; n_foreign = 0;
    start = 1; prepare = prep; rp = 2'(1 << k); rm = m;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (busy && cyc < 2000) begin @(posedge clk); #1; cyc++; end
    check(!busy && n_done == 1, "handover ends with one done pulse");
    check(n_foreign == 0, "only the selected RP is accessed");
    check(n_axi == int'(words[m]), $sformatf("%0d bus transfers for %0d words", n_axi, words[m]));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; prepare = 0; rp = 0; rm = 0; set_base = 0; set_words = 0; cfg_rm = 0; cfg_data = 0;
    for (int k = 0; k < 2; k++) for (int i = 0; i < 16; i++) regs[k][i] = $urandom;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    check(base[RM_ROL] == 32'h1000_0000 && words[RM_ROL] == 2, "ROL default image");
    check(base[RM_ASCON] == 32'h1000_0040 && words[RM_ASCON] == 16, "ASCON default image");
    check(stateful == 8'b0011_0000, "stateful RMs");

    for (int n = 0; n < 40; n++) begin
      rm_id_t m;
      int k, w;
      logic [31:0] b;
      logic [31:0] snap_regs [2][16];
      logic [31:0] snap_mem [logic [31:0]];
      bit prep;
      m = 3'($urandom);
      k = $urandom_range(0, 1);
      w = (n % 7 == 3) ? 0 : $urandom_range(1, 16);
      b = 32'h1000_0000 + 32'($urandom_range(0, 63) * 4);
      prep = $urandom_range(0, 1);
      if (n < 2) begin m = (n == 0) ? RM_ASCON : RM_ROL; w = words[m]; b = base[m]; end
      else configure(m, b | 32'($urandom_range(0, 3)), 8'(w));   // low bits ignored
      check(base[m] == b && words[m] == 8'(w) && stateful[m] == (w != 0), "configuration written");
      if (prep) for (int i = 0; i < 16; i++) mem[b + 32'(4 * i)] = $urandom;
      else for (int k2 = 0; k2 < 2; k2++) for (int i = 0; i < 16; i++) regs[k2][i] = $urandom;
      snap_regs = regs;
      snap_mem  = mem;
      handover(prep, k, m);
      for (int i = 0; i < 16; i++) begin
        if (prep) begin
          check(regs[k][i] == ((i < w) ? snap_mem[b + 32'(4 * i)] : snap_regs[k][i]),
                $sformatf("prepare: RP %0d word %0d", k, i));
          check(regs[1 - k][i] == snap_regs[1 - k][i], "other RP untouched");
        end else if (i < w) begin
          check(mem.exists(b + 32'(4 * i)) && mem[b + 32'(4 * i)] == regs[k][i],
                $sformatf("cleanup: RP %0d word %0d of %0d", k, i, w));
        end
      end
      // nothing outside the image written
      foreach (mem[a])
        if (a < b || a >= b + 32'(4 * w) || prep)
          check(snap_mem.exists(a) && mem[a] == snap_mem[a], $sformatf("address %h untouched", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
