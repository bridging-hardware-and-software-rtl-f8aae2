// tb_axi_bram: self-checking test of the AXI4-Lite block RAM.
//
// A manager model performs 600 random single-word writes (random byte strobes)
// and reads over a 64-word window at the bottom and top of the 32 kB array,
// and compares every read with a word-array model that applies the strobes
// itself. Timing checked: a read address is accepted in the cycle it is
// presented when the RAM is idle, and the data are valid in the next cycle;
// a write is accepted with address and data together and its response is
// valid in the next cycle. Upper address bits are ignored (aliasing).
module tb_axi_bram;
  import rrisax_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axil_req_t q;
  axil_rsp_t r;
  int        checks = 0, failures = 0;
  logic [31:0] model [logic [12:0]];

  always #5 clk = ~clk;

  axi_bram dut (.clk_i(clk), .rst_ni(rst_n), .axi_i(q), .axi_o(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] strb);
    @(posedge clk); #1;
    q = '0;
    q.awaddr = addr; q.awvalid = 1'b1; q.wdata = data; q.wstrb = strb; q.wvalid = 1'b1;
    q.bready = 1'b1;
    @(negedge clk);
    check(r.awready && r.wready, "write accepted at once");
    @(posedge clk); #1;
    q.awvalid = 1'b0; q.wvalid = 1'b0;
    @(negedge clk);
    check(r.bvalid && r.bresp == 2'b00, "write response in the next cycle");
    @(posedge clk); #1;
    q = '0;
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data);
    @(posedge clk); #1;
    q = '0;
    q.araddr = addr; q.arvalid = 1'b1; q.rready = 1'b1;
    @(negedge clk);
    check(r.arready, "read accepted at once");
    @(posedge clk); #1;
    q.arvalid = 1'b0;
    @(negedge clk);
    check(r.rvalid && r.rresp == 2'b00, "read data in the next cycle");
    data = r.rdata;
    @(posedge clk); #1;
    q = '0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, a;
    logic [12:0] w;
    q = '0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    // initialise the windows with full words
    for (int i = 0; i < 64; i++) begin
      for (int h = 0; h < 2; h++) begin
        w = h ? 13'(8192 - 64 + i) : 13'(i);
        d = $urandom;
        wr({17'd0, w, 2'b00}, d, 4'hf);
        model[w] = d;
      end
    end
    for (int n = 0; n < 600; n++) begin
      w = ($urandom_range(0, 1) == 1) ? 13'(8192 - 64 + $urandom_range(0, 63)) : 13'($urandom_range(0, 63));
      a = {$urandom_range(0, 7) == 0 ? 17'h1_2345 : 17'd0, w, 2'b00};   // aliases too
      if ($urandom_range(0, 1) == 1) begin
        logic [3:0] s;
        s = 4'($urandom);
        d = $urandom;
        wr(a, d, s);
        for (int b = 0; b < 4; b++) if (s[b]) model[w][b*8 +: 8] = d[b*8 +: 8];
      end else begin
        rd(a, d);
        check(d == model[w], $sformatf("word %0d: %h vs %h", w, d, model[w]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
