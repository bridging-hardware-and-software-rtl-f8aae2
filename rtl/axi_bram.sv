// axi_bram: on-chip block RAM behind an AXI4-Lite subordinate port.
//
// The memory is an array of SIZE_BYTES/4 32-bit words addressed by
// byte address bits [log2(SIZE_BYTES)-1:2]; upper address bits are ignored
// (the interconnect decodes them). Byte strobes are honoured.
// Timing: a write is accepted when address and data are both valid (awready
// and wready rise together for one cycle), the response follows one cycle
// later; a read address is accepted in one cycle and the data returned in
// the next. One transaction is handled at a time, reads first when both
// arrive together. Responses are always OKAY. The RAM is not cleared at
// reset.
//
// Two instances exist in the system: 32 kB of program and data memory and
// 8 kB holding the state images of absent accelerators; both sizes are those
// of the source description, the port timing is this design's.
module axi_bram
  import rrisax_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t axi_i,
  output axil_rsp_t axi_o
);

  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic          rvalid_q, bvalid_q;
  logic [31:0]   rdata_q;
  logic          do_read, do_write;
  logic [AW-1:0] raddr, waddr;

  assign raddr    = axi_i.araddr[AW+1:2];
  assign waddr    = axi_i.awaddr[AW+1:2];
  logic idle;
  assign idle     = !rvalid_q && !bvalid_q;
  assign do_read  = axi_i.arvalid && idle;
  assign do_write = axi_i.awvalid && axi_i.wvalid && !axi_i.arvalid && idle;

  always_ff @(posedge clk_i) begin
    if (do_write)
      for (int b = 0; b < 4; b++)
        if (axi_i.wstrb[b]) mem[waddr][b*8 +: 8] <= axi_i.wdata[b*8 +: 8];
    if (do_read) rdata_q <= mem[raddr];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_q <= 1'b0;
      bvalid_q <= 1'b0;
    end else begin
      if (do_read) rvalid_q <= 1'b1;
      else if (rvalid_q && axi_i.rready) rvalid_q <= 1'b0;
      if (do_write) bvalid_q <= 1'b1;
      else if (bvalid_q && axi_i.bready) bvalid_q <= 1'b0;
    end
  end

  always_comb begin
    axi_o         = '0;
    axi_o.arready = do_read;
    axi_o.awready = do_write;
    axi_o.wready  = do_write;
    axi_o.rvalid  = rvalid_q;
    axi_o.rdata   = rdata_q;
    axi_o.bvalid  = bvalid_q;
  end

endmodule
