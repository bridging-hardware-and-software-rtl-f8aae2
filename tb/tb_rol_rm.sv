// tb_rol_rm: self-checking test of the ROL (hardware loop) module.
//
// A small core model executes the loop "init; body; step" the way a program
// would: it follows the step instruction's PC redirect back to the loop body
// until the counter reaches the bound, and accumulates rd in the body. The
// example of the source description (start 2, step 2, bound 10, result
// initialised to 5) must give 5 + 2 + 4 + 6 + 8 = 25 and run the body four
// times; random start/step/bound triples are compared with a plain for-loop.
// Every operation must complete in its first cycle. The two handover words
// are read back and written into a freshly reset module in the middle of a
// loop, which must then finish with the same result.
module tb_rol_rm;
  import rrisax_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  rm_req_t     req;
  rm_rsp_t     rsp;
  ho_req_t     ho;
  logic [31:0] ho_rdata;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  rol_rm dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .rsp_o(rsp), .ho_i(ho), .ho_rdata_o(ho_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic call(input logic [6:0] f7, input logic [31:0] a, input logic [31:0] b,
                      input logic [31:0] pc, output rm_rsp_t r);
    req = '{valid: 1'b1, funct7: f7, rs1: a, rs2: b, pc: pc};
    #1;
    check(rsp.done, "operation completes in its first cycle");
    r = rsp;
    @(posedge clk); #1;
    req = '0;
  endtask

  // Program: 0x200 init, 0x204 body, 0x208 step, 0x20c after the loop
  task automatic run_loop(input logic [31:0] start, input logic [31:0] inc, input logic [31:0] bound,
                          input int handover_at, output logic [31:0] result, output int iters);
    rm_rsp_t r;
    logic [31:0] pc, rd;
    logic [31:0] saved [2];
    result = 5;
    iters  = 0;
    call(7'd1, start, bound, 32'h200, r);
    check(r.wr_rd && !r.wr_pc, "init writes rd and does not jump");
    rd = r.rd;
    pc = 32'h204;
    while (pc == 32'h204 && iters < 100) begin
      result += rd;                       // loop body
      iters++;
      if (iters == handover_at) begin
        for (int i = 0; i < 2; i++) begin
          ho = '0; ho.read = 1'b1; ho.cnt = 8'(i); #1; saved[i] = ho_rdata;
          @(posedge clk); #1;
        end
        ho = '0;
        rst_n = 1'b0; #1; rst_n = 1'b1;
        for (int i = 0; i < 2; i++) begin
          ho = '0; ho.write = 1'b1; ho.cnt = 8'(i); ho.wdata = saved[i];
          @(posedge clk); #1;
        end
        ho = '0;
      end
      call(7'd2, inc, bound, 32'h208, r);
      rd = r.rd;
      pc = r.wr_pc ? r.pc : 32'h20c;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] res, exp_res;
    int it, exp_it;
    req = '0; ho = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    run_loop(32'd2, 32'd2, 32'd10, 0, res, it);
    check(res == 32'd25, $sformatf("example loop result %0d, expected 25", res));
    check(it == 4, $sformatf("example loop ran %0d times, expected 4", it));

    run_loop(32'd0, 32'd1, 32'h40, 7, res, it);
    check(res == 32'd5 + 32'd2016 && it == 64, $sformatf("0..0x40 loop: %0d in %0d", res, it));

    for (int n = 0; n < 40; n++) begin
      logic [31:0] s, i, b;
      s = $urandom_range(0, 20);
      i = $urandom_range(1, 5);
      b = $urandom_range(1, 60);
      // reference: a do-while loop, the body runs at least once
      exp_res = 5; exp_it = 0;
      for (logic [31:0] c = s; ; c += i) begin
        exp_res += c; exp_it++;
        if (!(c + i < b)) break;
      end
      run_loop(s, i, b, (n % 3 == 0) ? 2 : 0, res, it);
      check(res == exp_res && it == exp_it,
            $sformatf("loop %0d,%0d,%0d: %0d/%0d vs %0d/%0d", s, i, b, res, it, exp_res, exp_it));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
