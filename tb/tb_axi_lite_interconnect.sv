// tb_axi_lite_interconnect: self-checking test of the AXI4-Lite star
// interconnect with two managers and the two block RAMs of the system map
// (32 kB at 0x0000_0000, 8 kB at 0x1000_0000).
//
// Both managers issue 400 random reads and writes at the same time, each on
// its own words of both RAMs, and about one in twelve to an unmapped address.
// Every read is compared with a per-manager word model; unmapped accesses
// must end with DECERR and leave memory alone. A request must be granted
// within a bounded number of cycles while the other manager is active
// (round-robin, no starvation), and both managers must have been granted while
// the other was waiting.
module tb_axi_lite_interconnect;
  import rrisax_pkg::*;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  axil_req_t mq [2];
  axil_rsp_t mr [2];
  axil_req_t sq [2];
  axil_rsp_t sr [2];
  int        checks = 0, failures = 0;
  int        contended [2];

  always #5 clk = ~clk;

  axi_lite_interconnect dut (.clk_i(clk), .rst_ni(rst_n), .m_req_i(mq), .m_rsp_o(mr),
                             .s_req_o(sq), .s_rsp_i(sr));
  axi_bram #(.SIZE_BYTES(32768)) u_ram0 (.clk_i(clk), .rst_ni(rst_n), .axi_i(sq[0]), .axi_o(sr[0]));
  axi_bram #(.SIZE_BYTES(8192))  u_ram1 (.clk_i(clk), .rst_ni(rst_n), .axi_i(sq[1]), .axi_o(sr[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one transaction of manager m; returns data and response, waits counted
  task automatic xfer(input int m, input bit write, input logic [31:0] addr,
                      input logic [31:0] wdata, output logic [31:0] rdata,
                      output logic [1:0] resp, output int wait_cycles);
    bit addr_done, done, other_busy;
    @(posedge clk); #1;
    mq[m] = '0;
    if (write) begin
      mq[m].awaddr = addr; mq[m].awvalid = 1'b1; mq[m].wdata = wdata;
      mq[m].wstrb = 4'hf; mq[m].wvalid = 1'b1; mq[m].bready = 1'b1;
    end else begin
      mq[m].araddr = addr; mq[m].arvalid = 1'b1; mq[m].rready = 1'b1;
    end
    addr_done = 0; done = 0; wait_cycles = 0; other_busy = 0;
    while (!done) begin
      @(negedge clk);
      if (!addr_done) begin
        wait_cycles++;
        if (mq[1 - m].arvalid || mq[1 - m].awvalid) other_busy = 1;
      end
      if (write ? (mr[m].awready && mr[m].wready) : mr[m].arready) addr_done = 1;
      if (write ? mr[m].bvalid : mr[m].rvalid) begin
        done  = 1;
        rdata = mr[m].rdata;
        resp  = write ? mr[m].bresp : mr[m].rresp;
      end
      @(posedge clk); #1;
      if (addr_done) begin
        mq[m].awvalid = 1'b0; mq[m].wvalid = 1'b0; mq[m].arvalid = 1'b0;
      end
      if (wait_cycles > 100) begin
        check(0, $sformatf("manager %0d starved", m));
        done = 1;
      end
    end
    if (other_busy && wait_cycles > 1) contended[m]++;
    mq[m] = '0;
  endtask

  task automatic manager(input int m);
    logic [31:0] model [2][32];
    bit          known [2][32];
    logic [31:0] d, a;
    logic [1:0]  resp;
    int          w, s, wc;
    for (int n = 0; n < 400; n++) begin
      bit write, unmapped;
      write    = ($urandom_range(0, 1) == 1);
      unmapped = ($urandom_range(0, 11) == 0);
      s = $urandom_range(0, 1);
      w = $urandom_range(0, 31);
      a = (s == 1 ? 32'h1000_0000 : 32'h0000_0000) + 32'(4 * (m * 32 + w));
      if (unmapped) a = 32'h2000_0000 + 32'(4 * w);
      d = $urandom;
      if (write && !unmapped) begin
        model[s][w] = d;
        known[s][w] = 1;
      end
      xfer(m, write, a, d, d, resp, wc);
      check(wc <= 12, $sformatf("manager %0d waited %0d cycles", m, wc));
      if (unmapped) check(resp == 2'b11, $sformatf("unmapped %h answered %0d", a, resp));
      else begin
        check(resp == 2'b00, $sformatf("mapped %h answered %0d", a, resp));
        if (!write && known[s][w])
          check(d == model[s][w], $sformatf("manager %0d read %h: %h vs %h", m, a, d, model[s][w]));
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mq[0] = '0; mq[1] = '0;
    contended[0] = 0; contended[1] = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    fork
      manager(0);
      manager(1);
    join
    check(contended[0] > 0 && contended[1] > 0,
          $sformatf("both managers waited for each other (%0d, %0d)", contended[0], contended[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
