// tb_reconfigurable_partition: self-checking test of one reconfigurable
// partition.
//
// Checks that only the hosted RM answers requests and handover accesses
// (ROL: init and a looping step with its PC redirect; ASCON: a 14-cycle
// initialisation and state words), that state survives switching the hosted
// RM away and back (both RM designs keep their registers, as the logic of an
// RP would not, but nothing reaches a non-hosted one), that decoupling hides
// the RP completely (no done, zero response and handover data), that an
// unoccupied RP answers nothing, and that the RM reset pulse that ends a
// reconfiguration returns the RMs to their reset state.
module tb_reconfigurable_partition;
  import rrisax_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        decouple, rm_reset, hv;
  rm_id_t      hrm;
  rm_req_t     req;
  rm_rsp_t     rsp;
  ho_req_t     ho;
  logic [31:0] ho_rdata;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  reconfigurable_partition dut (
    .clk_i(clk), .rst_ni(rst_n), .decouple_i(decouple), .rm_reset_i(rm_reset),
    .hosted_valid_i(hv), .hosted_rm_i(hrm), .req_i(req), .rsp_o(rsp),
    .ho_i(ho), .ho_rdata_o(ho_rdata)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic call(input logic [6:0] f7, input logic [31:0] a, input logic [31:0] b,
                      input logic [31:0] pc, output rm_rsp_t r, output int cycles);
    req = '{valid: 1'b1, funct7: f7, rs1: a, rs2: b, pc: pc};
    cycles = 1;
    #1;
    while (!rsp.done && cycles < 50) begin
      @(posedge clk); #1;
      cycles++;
    end
    r = rsp;
    @(posedge clk); #1;
    req = '0;
  endtask


  task automatic hrd(input logic [7:0] cnt, output logic [31:0] d);
    ho = '0; ho.read = 1'b1; ho.cnt = cnt; #1;
    d = ho_rdata;
    @(posedge clk); #1;
    ho = '0;
  endtask

  task automatic hwr(input logic [7:0] cnt, input logic [31:0] d);
    ho = '0; ho.write = 1'b1; ho.cnt = cnt; ho.wdata = d;
    @(posedge clk); #1;
    ho = '0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rm_rsp_t r;
    int c;
    logic [31:0] d;
    req = '0; ho = '0; decouple = 0; rm_reset = 0; hv = 0; hrm = RM_ROL;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;

    // empty RP: nothing answers
    req = '{valid: 1'b1, funct7: 7'd1, rs1: 32'd3, rs2: 32'd9, pc: 32'h100}; #1;
    check(rsp == '0, "empty RP gives no response");
    @(posedge clk); #1; req = '0;

    // ROL hosted
    hv = 1;
    call(7'd1, 32'd7, 32'd100, 32'h100, r, c);
    check(r.done && r.wr_rd && r.rd == 7 && !r.wr_pc && c == 1, "ROL init");
    call(7'd2, 32'd1, 32'd100, 32'h108, r, c);
    check(r.done && r.rd == 8 && r.wr_pc && r.pc == 32'h104, "ROL step jumps back");
    hrd(0, d); check(d == 8, "ROL counter readable");
    hrd(1, d); check(d == 32'h104, "ROL loop PC readable");

    // ASCON hosted
    hrm = RM_ASCON;
    hwr(8'd10, 32'hdead_beef);
    hrd(8'd10, d); check(d == 32'hdead_beef, "ASCON key word written and read");
    call(7'd4, 32'd1, 32'd2, 32'h200, r, c);
    check(r.done && c == 14, $sformatf("ASCON initialisation through the RP: %0d cycles", c));
    hrd(8'd10, d); check(d == 32'hdead_beef, "key kept");

    // back to ROL: its state untouched by the ASCON traffic
    hrm = RM_ROL;
    hrd(0, d); check(d == 8, "ROL state not disturbed");

    // decoupled: silent
    decouple = 1;
    req = '{valid: 1'b1, funct7: 7'd2, rs1: 32'd1, rs2: 32'd100, pc: 32'h108}; #1;
    check(rsp == '0, "decoupled RP gives no response");
    @(posedge clk); #1; req = '0;
    hrd(0, d); check(d == 0, "decoupled RP gives no handover data");
    decouple = 0;
    hrd(0, d); check(d == 8, "decoupled request had no effect");

    // RM reset after reconfiguration
    rm_reset = 1; @(posedge clk); #1; rm_reset = 0;
    hrd(0, d); check(d == 0, "ROL counter reset");
    hrm = RM_ASCON;
    hrd(8'd10, d); check(d == 0, "ASCON key reset");
    call(7'd6, 32'h8000_0000, 0, 32'h300, r, c);
    check(r.done && c == 1, "ASCON answers after reset");

    // not hosted: the same request gets nothing
    hv = 0;
    req = '{valid: 1'b1, funct7: 7'd6, rs1: 32'h1, rs2: 32'h2, pc: 32'h300}; #1;
    check(!rsp.done, "unoccupied RP: no done");
    @(posedge clk); #1; req = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
