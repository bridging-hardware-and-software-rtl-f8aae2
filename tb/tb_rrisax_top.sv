// tb_rrisax_top: end-to-end test of the reconfigurable ISA extension
// subsystem at its default parameters (two RPs, 32 kB program RAM, 8 kB state
// RAM).
//
// The testbench plays the core and its software. A core model issues custom-2
// and custom-3 instructions through the stage protocol of the ISAX ports and
// performs loads and stores on the AXI4-Lite port. When a custom-2 answer
// redirects to the fallback stub (0x18) the "software" runs: it reads the
// buffered miss context through custom-3, loads the RM's state image from the
// state RAM (base and length are read from the handover configuration),
// computes the operation in software, stores the image back, hands result
// and optional next PC over, and returns; the core then replays the faulting
// instruction. The software ROL and ASCON routines work directly on the
// memory image, so they only give the right answers if the state handover
// between hardware and memory is correct. Every ciphertext block and tag is
// compared with an independent ASCON-128 model, every loop result with its
// closed form. A behavioural DFX controller (one RP at a time, decouple and
// RM reset) completes the platform; its configuration port is run faster
// than the real one (512 instead of 4 bytes per cycle) to keep the test short.
// The controller model reads the first word of each partial bitstream over
// the subsystem's interconnect from an external memory model, whose contents
// are a function of the address, and that word is checked for every DPR; the
// core also writes and reads a word in the external region.
//
// Flow: ROL and a 48-byte ASCON encryption entirely in software; explicit DPR
// of ASCON into RP 0 with a refused duplicate request; the same encryption in
// hardware (checking the 1/8/14-cycle step latencies); then a 124-byte
// encryption (31 words padded to 32) with automatic reconfiguration enabled,
// during which ASCON is evicted from RP 0 by loading ROL there: its state
// is cleaned up to memory, the encryption continues in software, the miss
// triggers the automatic reconfiguration of the least recently used RP (RP 1),
// which waits for the DFX controller, and once ASCON is prepared in RP 1 the
// encryption finishes in hardware. Finally the ROL loop 0..0x40 in hardware
// and the ROL example with the fallback forced. Each mechanism is counted and
// one that never occurred is a failure.
module tb_rrisax_top;
  import rrisax_pkg::*;
  import ascon_ref_pkg::*;

  localparam int unsigned SW_OVERHEAD = 40;   // cycles of stub entry and exit

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  isax_req_t isax2, isax3;
  isax_rsp_t isax2_r, isax3_r;
  axil_req_t axi_q [1];
  axil_rsp_t axi_r [1];
  logic [1:0] trig, decouple, rm_reset;
  rm_id_t     trig_rm [2];
  rp_state_e  rp_state [2];
  rm_id_t     rp_rm [2];
  logic       ho_stall;
  logic [31:0] dfx_addr, dfx_size, dfx_word;
  int unsigned dfx_count;
  axil_req_t   dfx_axi_q, ext_q;
  axil_rsp_t   dfx_axi_r, ext_r;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rrisax_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .isax2_i(isax2), .isax2_o(isax2_r), .isax3_i(isax3), .isax3_o(isax3_r),
    .cpu_axi_i(axi_q), .cpu_axi_o(axi_r),
    .dfx_trigger_o(trig), .dfx_trigger_rm_o(trig_rm),
    .dfx_decouple_i(decouple), .dfx_rm_reset_i(rm_reset),
    .dfx_axi_i(dfx_axi_q), .dfx_axi_o(dfx_axi_r), .ext_axi_o(ext_q), .ext_axi_i(ext_r),
    .rp_state_o(rp_state), .rp_rm_o(rp_rm), .ho_stall_o(ho_stall)
  );

  dfx_ctrl_model #(.NUM_RP(2), .BYTES_PER_CYCLE(512)) u_dfx (
    .clk_i(clk), .rst_ni(rst_n), .trigger_i(trig), .trigger_rm_i(trig_rm),
    .decouple_o(decouple), .rm_reset_o(rm_reset),
    .last_addr_o(dfx_addr), .last_size_o(dfx_size), .last_word_o(dfx_word),
    .axi_o(dfx_axi_q), .axi_i(dfx_axi_r), .count_o(dfx_count)
  );

  // External subordinate (bitstream memory and I/O). An address never
  // written reads as bs_word(address); written words are kept. Address
  // accepted in one cycle, response in the next.
  function automatic logic [31:0] bs_word(input logic [31:0] a);
    return a ^ 32'hAA99_5566;
  endfunction
  logic [31:0] ext_mem [logic [31:0]];
  int n_ext;
  always @(posedge clk) begin
    if (!rst_n) ext_r <= '0;
    else if (ext_r.arready) begin
      ext_r.arready <= 1'b0;
      ext_r.rvalid  <= 1'b1;
      ext_r.rresp   <= 2'b00;
      ext_r.rdata   <= ext_mem.exists(ext_q.araddr) ? ext_mem[ext_q.araddr] : bs_word(ext_q.araddr);
      n_ext++;
    end else if (ext_r.awready) begin
      ext_r.awready <= 1'b0;
      ext_r.wready  <= 1'b0;
      ext_r.bvalid  <= 1'b1;
      ext_r.bresp   <= 2'b00;
      ext_mem[ext_q.awaddr] = ext_q.wdata;
      n_ext++;
    end else if (ext_r.rvalid) begin
      if (ext_q.rready) ext_r.rvalid <= 1'b0;
    end else if (ext_r.bvalid) begin
      if (ext_q.bready) ext_r.bvalid <= 1'b0;
    end else if (ext_q.arvalid) ext_r.arready <= 1'b1;
    else if (ext_q.awvalid && ext_q.wvalid) begin
      ext_r.awready <= 1'b1;
      ext_r.wready  <= 1'b1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters -------------------------------------------------
  int n_hit, n_miss, n_replay, n_fb_npc, n_hw_npc, n_forced, n_multicycle;
  int n_cmd, n_reject, n_stall_cycles, n_cleanup, n_prepare, n_waiting;
  int n_reconfig, n_auto, n_migrate, n_fetch;

  rp_state_e prev_state [2];
  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 2; k++) begin
        if (rp_state[k] != prev_state[k]) begin
          if (rp_state[k] == RP_CLEANUP)  n_cleanup++;
          if (rp_state[k] == RP_PREPARE)  n_prepare++;
          if (rp_state[k] == RP_WAITING)  n_waiting++;
          if (rp_state[k] == RP_RECONFIG) n_reconfig++;
        end
        if (trig[k] && !decouple[k]) begin
          checks++;
          if (trig_rm[k] != rp_rm[k]) begin
            failures++;
            $display("FAIL: trigger of RP %0d names RM %0d, expected %0d", k, trig_rm[k], rp_rm[k]);
          end
        end
        // hits only go to a present RP
        if (dut.hit_rp[k] && rp_state[k] != RP_PRESENT) begin
          failures++;
          $display("FAIL: hit on RP %0d in state %0d", k, rp_state[k]);
        end
      end
      if (ho_stall) n_stall_cycles++;
      if (dut.ar_accept) n_auto++;
    end
    prev_state <= rp_state;
  end

  // bitstream address of the DFX controller for each RP / RM pair
  logic [1:0] decouple_q = '0;
  always @(posedge clk) begin
    decouple_q <= decouple;
    for (int k = 0; k < 2; k++) begin
      // bitstream word fetched over the interconnect while decoupled
      if (rst_n && !decouple[k] && decouple_q[k]) begin
        checks++;
        n_fetch++;
        if (dfx_word != bs_word(dfx_addr)) begin
          failures++;
          $display("FAIL: DFX fetched %h from %h, expected %h", dfx_word, dfx_addr, bs_word(dfx_addr));
        end
      end
      if (rst_n && decouple[k] && !decouple_q[k]) begin
        logic [31:0] exp;
        exp = (k == 0 ? 32'h8000_0000 : 32'h8030_0000) + 32'(trig_rm[k]) * 32'h0006_0000;
        checks++;
        if (dfx_addr != exp) begin
          failures++;
          $display("FAIL: bitstream address %h, expected %h", dfx_addr, exp);
        end
      end
    end
  end

  // ---- core model: custom-3 ------------------------------------------------
  task automatic c3(input cmd_e cmd, input logic [31:0] a, input logic [31:0] b,
                    output isax_rsp_t r);
    @(posedge clk); #1;
    isax3 = '{valid: 1'b1, instr: {cmd, 5'd2, 5'd1, 3'd0, 5'd3, OPC_CUSTOM3}, rs1: a, rs2: b,
              pc: 32'h0000_0400};
    @(negedge clk);
    check(!isax3_r.stall, "commands never stall");
    r = isax3_r;
    @(posedge clk); #1;
    isax3 = '0;
    n_cmd++;
  endtask

  task automatic cmd(input cmd_e c, input logic [31:0] a, input logic [31:0] b,
                     output logic [31:0] rd);
    isax_rsp_t r;
    c3(c, a, b, r);
    rd = r.rd;
  endtask

  // ---- core model: memory port ---------------------------------------------
  task automatic rd32(input logic [31:0] addr, output logic [31:0] data);
    @(posedge clk); #1;
    axi_q[0] = '0;
    axi_q[0].araddr = addr; axi_q[0].arvalid = 1'b1; axi_q[0].rready = 1'b1;
    do @(negedge clk); while (!axi_r[0].arready);
    @(posedge clk); #1;
    axi_q[0].arvalid = 1'b0;
    @(negedge clk);
    while (!axi_r[0].rvalid) @(negedge clk);
    data = axi_r[0].rdata;
    check(axi_r[0].rresp == 2'b00, $sformatf("read %h OKAY", addr));
    @(posedge clk); #1;
    axi_q[0] = '0;
  endtask

  task automatic wr32(input logic [31:0] addr, input logic [31:0] data);
    bit aw_ok, w_ok, a, w;
    @(posedge clk); #1;
    axi_q[0] = '0;
    axi_q[0].awaddr = addr; axi_q[0].awvalid = 1'b1;
    axi_q[0].wdata = data;  axi_q[0].wstrb = 4'hf; axi_q[0].wvalid = 1'b1;
    axi_q[0].bready = 1'b1;
    aw_ok = 0; w_ok = 0;
    while (!(aw_ok && w_ok)) begin
      @(negedge clk);
      a = axi_r[0].awready && axi_q[0].awvalid;
      w = axi_r[0].wready && axi_q[0].wvalid;
      @(posedge clk); #1;
      if (a) begin aw_ok = 1; axi_q[0].awvalid = 1'b0; end
      if (w) begin w_ok = 1; axi_q[0].wvalid = 1'b0; end
    end
    @(negedge clk);
    while (!axi_r[0].bvalid) @(negedge clk);
    check(axi_r[0].bresp == 2'b00, $sformatf("write %h OKAY", addr));
    @(posedge clk); #1;
    axi_q[0] = '0;
  endtask

  // ---- software fallback functions, working on the memory state image -----
  logic [31:0] img [16];

  function automatic logic [31:0] sw_rol(input logic [6:0] f7, input logic [31:0] a,
                                         input logic [31:0] b, input logic [31:0] pc,
                                         output bit jump, output logic [31:0] npc);
    logic [31:0] c;
    jump = 0; npc = '0;
    if (f7 == 7'd1) begin
      img[0] = a; img[1] = pc + 32'd4;
      return a;
    end
    c = img[0] + a;
    img[0] = c;
    if (c < b) begin jump = 1; npc = img[1]; end
    return c;
  endfunction

  function automatic logic [31:0] sw_ascon(input logic [6:0] f7, input logic [31:0] a,
                                           input logic [31:0] b);
    st_t s;
    logic [127:0] key;
    logic [63:0]  blk, t;
    logic [31:0]  rd;
    for (int i = 0; i < 5; i++) s[i] = {img[2*i], img[2*i+1]};
    key = {img[10], img[11], img[12], img[13]};
    blk = {a, b};
    rd  = '0;
    case (f7)
      7'd1: key[127:64] = blk;
      7'd2: key[63:0] = blk;
      7'd3: s[3] = blk;
      7'd4: begin
        s[0] = 64'h80400c0600000000; s[1] = key[127:64]; s[2] = key[63:0]; s[4] = blk;
        permute(s, 12);
        s[3] ^= key[127:64]; s[4] ^= key[63:0];
        img[15] = 0;
      end
      7'd5: begin s[0] ^= blk; permute(s, 6); end
      7'd6: begin
        s[0] ^= blk;
        rd = s[0][63:32];
        img[14] = s[0][31:0];
        if (!img[15][0]) begin s[4] ^= 64'd1; img[15] = 1; end
      end
      7'd7: begin rd = img[14]; if (!a[0]) permute(s, 6); end
      7'd8: begin
        if (a[1:0] == 2'd0) begin
          s[1] ^= key[127:64]; s[2] ^= key[63:0];
          permute(s, 12);
        end
        t = a[1] ? s[4] ^ key[63:0] : s[3] ^ key[127:64];
        rd = a[0] ? t[31:0] : t[63:32];
      end
      default: ;
    endcase
    for (int i = 0; i < 5; i++) {img[2*i], img[2*i+1]} = s[i];
    {img[10], img[11], img[12], img[13]} = key;
    return rd;
  endfunction

  // the stub: context from the fallback manager, image in memory, return
  task automatic fallback(input logic [2:0] f3, input logic [6:0] f7, input logic [31:0] a,
                          input logic [31:0] b, input logic [31:0] pc);
    logic [31:0] rm, ra, rb, rf, rpc, base, words, res, npc;
    bit jump;
    isax_rsp_t r;
    repeat (SW_OVERHEAD / 2) @(posedge clk);
    cmd(CMD_FB_RMID, 0, 0, rm);
    cmd(CMD_FB_RS1, 0, 0, ra);
    cmd(CMD_FB_RS2, 0, 0, rb);
    cmd(CMD_FB_FUNCT7, 0, 0, rf);
    cmd(CMD_FB_PC, 0, 0, rpc);
    check(rm == 32'(f3) && ra == a && rb == b && rf == 32'(f7) && rpc == pc,
          $sformatf("buffered context rm %0d f7 %0d pc %h", rm, rf, rpc));
    cmd(CMD_HO_GET_BASE, rm, 0, base);
    cmd(CMD_HO_GET_WORDS, rm, 0, words);
    for (int i = 0; i < int'(words); i++) rd32(base + 32'(4 * i), img[i]);
    jump = 0;
    npc  = '0;
    if (rm == 32'(RM_ROL)) res = sw_rol(rf[6:0], ra, rb, rpc, jump, npc);
    else                   res = sw_ascon(rf[6:0], ra, rb);
    for (int i = 0; i < int'(words); i++) wr32(base + 32'(4 * i), img[i]);
    cmd(CMD_FB_SET_RES, res, 0, rm);
    if (jump) cmd(CMD_FB_SET_NPC, npc, 0, rm);
    repeat (SW_OVERHEAD / 2) @(posedge clk);
    c3(CMD_FB_RETURN, 0, 0, r);
    check(r.wr_pc && r.flush && !r.wr_rd && r.pc == pc, "return jumps back to the faulting PC");
  endtask

  // ---- core model: custom-2 ------------------------------------------------
  task automatic issue2(input logic [2:0] f3, input logic [6:0] f7, input logic [31:0] a,
                        input logic [31:0] b, input logic [31:0] pc,
                        output isax_rsp_t r, output int cycles);
    @(posedge clk); #1;
    isax2 = '{valid: 1'b1, instr: {f7, 5'd2, 5'd1, f3, 5'd3, OPC_CUSTOM2}, rs1: a, rs2: b, pc: pc};
    cycles = 1;
    @(negedge clk);
    while (isax2_r.stall) begin
      @(negedge clk);
      cycles++;
      if (cycles > 20000) break;
    end
    r = isax2_r;
    @(posedge clk); #1;
    isax2 = '0;
  endtask

  // executes one custom-2 instruction with its architectural effects
  task automatic exec2(input logic [2:0] f3, input logic [6:0] f7, input logic [31:0] a,
                       input logic [31:0] b, input logic [31:0] pc,
                       output logic [31:0] rd, output logic [31:0] npc, output int cycles);
    isax_rsp_t r;
    bit present;
    present = 0;
    for (int k = 0; k < 2; k++)
      if (rp_state[k] == RP_PRESENT && rp_rm[k] == f3) present = 1;
    issue2(f3, f7, a, b, pc, r, cycles);
    if (r.wr_pc && r.pc == FALLBACK_STUB_ADDR) begin
      check(!r.wr_rd && r.flush, "miss: no register write, flush");
      n_miss++;
      if (present && dut.force_fb[f3]) n_forced++;
      fallback(f3, f7, a, b, pc);
      issue2(f3, f7, a, b, pc, r, cycles);
      n_replay++;
      check(r.wr_rd && !r.stall, "replay writes rd");
      if (r.wr_pc) n_fb_npc++;
    end else begin
      check(r.wr_rd, "hit writes rd");
      n_hit++;
      if (r.wr_pc) n_hw_npc++;
      if (cycles > 1) n_multicycle++;
    end
    rd  = r.rd;
    npc = r.wr_pc ? r.pc : pc + 32'd4;
  endtask

  // ---- workloads -------------------------------------------------------------
  // ROL loop "init; body: res += rd; step", program at 0x200
  task automatic rol_loop(input logic [31:0] start, input logic [31:0] inc,
                          input logic [31:0] bound, output logic [31:0] res, output int iters);
    logic [31:0] rd, pc, npc;
    int cyc;
    res = 5; iters = 0;
    exec2(RM_ROL, 7'd1, start, bound, 32'h200, rd, npc, cyc);
    check(npc == 32'h204, "init falls through");
    pc = 32'h204;
    while (pc == 32'h204 && iters < 200) begin
      res += rd; iters++;
      exec2(RM_ROL, 7'd2, inc, bound, 32'h208, rd, npc, cyc);
      pc = npc;
    end
  endtask

  // ASCON-128 encryption of n_words message words; compared with the model.
  // With hw_lat the step latencies of the hardware are checked; with evict_at
  // >= 0 ROL is requested for RP 0 after that many blocks.
  task automatic ascon_job(input int n_bytes, input bit hw_lat, input int evict_at);
    logic [127:0] key, nonce, t;
    st_t s;
    logic [31:0] hi, lo, rd, npc, acc;
    logic [63:0] blk, c;
    int cyc, nblk, nfull, rem;
    key   = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom, $urandom, $urandom};
    exec2(RM_ASCON, 7'd1, key[127:96], key[95:64], 32'h300, rd, npc, cyc);
    exec2(RM_ASCON, 7'd2, key[63:32], key[31:0], 32'h304, rd, npc, cyc);
    exec2(RM_ASCON, 7'd3, nonce[127:96], nonce[95:64], 32'h308, rd, npc, cyc);
    exec2(RM_ASCON, 7'd4, nonce[63:32], nonce[31:0], 32'h30c, rd, npc, cyc);
    if (hw_lat) check(cyc == 14, $sformatf("initialisation took %0d cycles, expected 14", cyc));
    init(s, key, nonce);
    sep(s);
    nfull = n_bytes / 8;
    rem   = n_bytes % 8;
    nblk  = nfull + 1;                       // a final padded block always follows
    for (int i = 0; i < nblk; i++) begin
      bit last;
      last = (i == nblk - 1);
      blk = {$urandom, $urandom};
      if (last) begin
        // keep rem message bytes, then the 0x80 padding byte
        blk = (rem == 0) ? 64'h0 : (blk & ~(64'hffff_ffff_ffff_ffff >> (8 * rem)));
        blk |= 64'h80 << (8 * (7 - rem));
      end
      if (i == evict_at) begin
        cmd(CMD_DPR_REQ, 0, 32'(RM_ROL), acc);
        check(acc == 1, "eviction request accepted");
        // the next instruction meets the cleanup
        while (rp_state[0] == RP_PRESENT) @(posedge clk);
      end
      // meet the prepare of a returning accelerator
      if (rp_state[1] == RP_RECONFIG && rp_rm[1] == RM_ASCON) begin
        while (rp_state[1] == RP_RECONFIG) @(posedge clk);
        n_migrate++;
      end
      exec2(RM_ASCON, 7'd6, blk[63:32], blk[31:0], 32'h310, hi, npc, cyc);
      if (hw_lat) check(cyc == 1, "encrypt step: 1 cycle");
      exec2(RM_ASCON, 7'd7, 32'(last), 0, 32'h314, lo, npc, cyc);
      if (hw_lat) check(cyc == (last ? 1 : 8), $sformatf("block finish took %0d cycles", cyc));
      c = enc(s, blk, last);
      check({hi, lo} == c, $sformatf("%0d-byte message, block %0d: %h%h vs %h", n_bytes, i, hi, lo, c));
    end
    t = tag(s, key);
    for (int i = 0; i < 4; i++) begin
      exec2(RM_ASCON, 7'd8, 32'(i), 0, 32'h318 + 32'(4 * i), rd, npc, cyc);
      if (hw_lat) check(cyc == (i == 0 ? 14 : 1), $sformatf("tag word %0d took %0d cycles", i, cyc));
      check(rd == t[127 - 32 * i -: 32], $sformatf("%0d-byte message, tag word %0d", n_bytes, i));
    end
  endtask

  task automatic wait_present(input int rp, input rm_id_t rm);
    logic [31:0] st;
    int n;
    n = 0;
    do begin
      cmd(CMD_RP_STATUS, 32'(rp), 0, st);
      repeat (20) @(posedge clk);
      n++;
    end while (st[6:4] != RP_PRESENT && n < 2000);
    check(st[6:4] == RP_PRESENT && st[2:0] == rm, $sformatf("RP %0d holds RM %0d", rp, rm));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, res;
    int it;
    isax2 = '0; isax3 = '0; axi_q[0] = '0;
    for (int k = 0; k < 2; k++) prev_state[k] = RP_EMPTY;
    repeat (4) @(posedge clk); #1;
    rst_n = 1'b1;

    // configuration after reset
    cmd(CMD_RP_STATUS, 0, 0, rd); check(rd[6:4] == RP_EMPTY, "RP 0 empty after reset");
    cmd(CMD_HO_GET_BASE, RM_ROL, 0, rd);    check(rd == 32'h1000_0000, "ROL image base");
    cmd(CMD_HO_GET_WORDS, RM_ROL, 0, rd);   check(rd == 2, "ROL image words");
    cmd(CMD_HO_GET_BASE, RM_ASCON, 0, rd);  check(rd == 32'h1000_0040, "ASCON image base");
    cmd(CMD_HO_GET_WORDS, RM_ASCON, 0, rd); check(rd == 16, "ASCON image words");

    // 1. everything in software
    rol_loop(2, 2, 10, res, it);
    check(res == 25 && it == 4, $sformatf("ROL example in software: %0d in %0d", res, it));
    ascon_job(48, 0, -1);

    // 2. explicit DPR of ASCON into RP 0; a second copy is refused
    cmd(CMD_DPR_REQ, 0, RM_ASCON, rd); check(rd == 1, "DPR request accepted");
    cmd(CMD_DPR_REQ, 1, RM_ASCON, rd); check(rd == 0, "RM already on its way: refused");
    if (rd == 0) n_reject++;
    wait_present(0, RM_ASCON);
    ascon_job(48, 1, -1);

    // 3. on-demand: eviction, software continuation, automatic reconfiguration
    cmd(CMD_AUTO_CFG, 1, 0, rd); check(rd == 0, "automatic reconfiguration was disabled");
    cmd(CMD_AUTO_CFG, 1, 0, rd); check(rd == 1, "automatic reconfiguration enabled");
    ascon_job(124, 0, 3);
    wait_present(1, RM_ASCON);
    wait_present(0, RM_ROL);

    // 4. ROL in hardware, then with the fallback forced
    rol_loop(0, 1, 32'h40, res, it);
    check(res == 5 + 2016 && it == 64, $sformatf("ROL 0..0x40 in hardware: %0d in %0d", res, it));
    cmd(CMD_FORCE_FB, 32'(1 << RM_ROL), 0, rd);
    rol_loop(2, 2, 10, res, it);
    check(res == 25 && it == 4, $sformatf("ROL example forced to software: %0d in %0d", res, it));
    cmd(CMD_FORCE_FB, 0, 0, rd);
    ascon_job(48, 1, -1);

    // the core reaches the external region (e.g. a peripheral register)
    begin
      int n_ext0;
      n_ext0 = n_ext;
      wr32(32'h9000_0010, 32'h1234_5678);
      rd32(32'h9000_0010, rd);
      check(rd == 32'h1234_5678 && n_ext == n_ext0 + 2, "core access to the external region");
    end

    // statistics registers agree with the core's view
    cmd(CMD_CNT_HIT, 0, 0, rd);  check(rd == 32'(n_hit), $sformatf("hit counter %0d vs %0d", rd, n_hit));
    cmd(CMD_CNT_MISS, 0, 0, rd); check(rd == 32'(n_miss), $sformatf("miss counter %0d vs %0d", rd, n_miss));

    $display("mechanisms: hit %0d miss %0d replay %0d fallback-PC-override %0d hw-PC-override %0d",
             n_hit, n_miss, n_replay, n_fb_npc, n_hw_npc);
    $display("  multi-cycle stall %0d handover-stall cycles %0d cleanup %0d prepare %0d",
             n_multicycle, n_stall_cycles, n_cleanup, n_prepare);
    $display("  reconfig %0d (dfx %0d) waiting %0d auto-requests %0d forced %0d refused %0d commands %0d migrate %0d",
             n_reconfig, dfx_count, n_waiting, n_auto, n_forced, n_reject, n_cmd, n_migrate);
    $display("  bitstream fetches %0d external accesses %0d", n_fetch, n_ext);
    check(n_hit > 0, "hit happened");
    check(n_miss > 0, "miss happened");
    check(n_replay > 0, "replay happened");
    check(n_fb_npc > 0, "PC override by the fallback happened");
    check(n_hw_npc > 0, "PC override by an RM happened");
    check(n_multicycle > 0, "multi-cycle RM stall happened");
    check(n_stall_cycles > 0, "handover stall happened");
    check(n_cleanup > 0, "cleanup happened");
    check(n_prepare > 0, "prepare happened");
    check(n_reconfig >= 3 && dfx_count == n_reconfig, "reconfigurations happened");
    check(n_waiting > 0, "waiting for the DFX controller happened");
    check(n_auto > 0, "automatic reconfiguration happened");
    check(n_forced > 0, "forced fallback happened");
    check(n_reject > 0, "refused DPR request happened");
    check(n_migrate > 0, "return of a stateful RM to hardware mid-job happened");
    check(n_cmd > 0, "commands happened");
    check(n_fetch > 0 && n_fetch == int'(dfx_count), "bitstream fetch over the interconnect per DPR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
