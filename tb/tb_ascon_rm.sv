// tb_ascon_rm: self-checking test of the ASCON-128 reconfigurable module.
//
// Checks: (1) the published known-answer vector for an empty message
// (key = nonce = 00..0f, tag e355159f292911f794cb1432a0103a8a); (2) random
// keys, nonces, associated data and 2..5-block messages against the
// table-driven reference model, ciphertext word by word and all four tag
// words; (3) the cycle count of every step (1 cycle without permutation,
// 8 with p^6, 14 with p^12); (4) a state handover in the middle of an
// encryption: the 16 state words are read out, the module is reset, the words
// are written back and the encryption finishes with the right result.
module tb_ascon_rm;
  import rrisax_pkg::*;
  import ascon_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  rm_req_t     req;
  rm_rsp_t     rsp;
  ho_req_t     ho;
  logic [31:0] ho_rdata;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  ascon_rm dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .ho_i(ho), .ho_rdata_o(ho_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one invocation; returns rd and the number of cycles until done
  task automatic call(input logic [6:0] f7, input logic [31:0] a, input logic [31:0] b,
                      output logic [31:0] rd, output int cycles);
    req = '{valid: 1'b1, funct7: f7, rs1: a, rs2: b, pc: 32'h100};
    cycles = 1;
    #1;
    while (!rsp.done) begin
      @(posedge clk); #1;
      cycles++;
    end
    rd = rsp.rd;
    @(posedge clk); #1;
    req = '0;
  endtask

  task automatic call_chk(input logic [6:0] f7, input logic [31:0] a, input logic [31:0] b,
                          input int exp_cycles, output logic [31:0] rd);
    int c;
    call(f7, a, b, rd, c);
    check(c == exp_cycles, $sformatf("funct7 %0d took %0d cycles, expected %0d", f7, c, exp_cycles));
  endtask

  logic [31:0] saved [16];

  task automatic handover_roundtrip();
    ho = '0;
    for (int i = 0; i < 16; i++) begin
      ho.read = 1'b1; ho.cnt = 8'(i); #1;
      saved[i] = ho_rdata;
      @(posedge clk); #1;
    end
    ho = '0;
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      ho.write = 1'b1; ho.cnt = 8'(i); ho.wdata = saved[i];
      @(posedge clk); #1;
    end
    ho = '0;
  endtask

  // full encryption through the module compared with the model
  task automatic run_case(input logic [127:0] key, input logic [127:0] nonce,
                          input int n_ad, input int n_pt, input bit mid_handover);
    st_t s;
    logic [31:0] rd, hi, lo;
    logic [63:0] blk, c;
    logic [127:0] t;
    call_chk(7'd1, key[127:96], key[95:64], 1, rd);
    call_chk(7'd2, key[63:32], key[31:0], 1, rd);
    call_chk(7'd3, nonce[127:96], nonce[95:64], 1, rd);
    call_chk(7'd4, nonce[63:32], nonce[31:0], 14, rd);
    init(s, key, nonce);
    for (int i = 0; i < n_ad; i++) begin
      blk = {$urandom, $urandom};
      call_chk(7'd5, blk[63:32], blk[31:0], 8, rd);
      absorb_ad(s, blk);
    end
    sep(s);
    for (int i = 0; i < n_pt; i++) begin
      bit last;
      last = (i == n_pt - 1);
      blk = {$urandom, $urandom};
      if (last) blk[23:0] = 24'h800000;   // padded final block
      call_chk(7'd6, blk[63:32], blk[31:0], 1, hi);
      call_chk(7'd7, 32'(last), 32'd0, last ? 1 : 8, lo);
      c = enc(s, blk, last);
      check({hi, lo} == c, $sformatf("ciphertext block %0d: %h%h vs %h", i, hi, lo, c));
      if (mid_handover && i == 0) handover_roundtrip();
    end
    t = tag(s, key);
    call_chk(7'd8, 32'd0, 32'd0, 14, rd); check(rd == t[127:96], "tag word 0");
    call_chk(7'd8, 32'd1, 32'd0, 1, rd);  check(rd == t[95:64],  "tag word 1");
    call_chk(7'd8, 32'd2, 32'd0, 1, rd);  check(rd == t[63:32],  "tag word 2");
    call_chk(7'd8, 32'd3, 32'd0, 1, rd);  check(rd == t[31:0],   "tag word 3");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, tw [4];
    req = '0; ho = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    // known answer: empty AD, empty message (one padding block)
    call_chk(7'd1, 32'h00010203, 32'h04050607, 1, rd);
    call_chk(7'd2, 32'h08090a0b, 32'h0c0d0e0f, 1, rd);
    call_chk(7'd3, 32'h00010203, 32'h04050607, 1, rd);
    call_chk(7'd4, 32'h08090a0b, 32'h0c0d0e0f, 14, rd);
    call_chk(7'd6, 32'h80000000, 32'h00000000, 1, rd);
    call_chk(7'd7, 32'd1, 32'd0, 1, rd);
    for (int i = 0; i < 4; i++) call_chk(7'd8, 32'(i), 32'd0, i == 0 ? 14 : 1, tw[i]);
    check({tw[0], tw[1], tw[2], tw[3]} == 128'he355159f292911f794cb1432a0103a8a,
          $sformatf("known-answer tag %h%h%h%h", tw[0], tw[1], tw[2], tw[3]));

    for (int n = 0; n < 12; n++)
      run_case({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom},
               n % 3, 2 + n % 4, n % 2 == 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
