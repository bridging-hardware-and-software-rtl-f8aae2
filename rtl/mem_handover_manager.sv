// mem_handover_manager: moves the accelerator-local state of an RM between the
// RM's registers and its memory-resident state image.
//
// Each RM has a configuration entry: the number of 32-bit state words and the
// byte address of word 0 of its image (4-byte aligned; word i lives at
// base + 4*i). A word count of zero marks a stateless RM. The partition
// manager starts one handover at a time:
//   Cleanup (RM -> memory, before the RP is reconfigured): for each word the
//     manager asserts read with memory_cnt = i on the RM's handover port for
//     one cycle and registers the word the RM drives, then writes it over
//     AXI4-Lite; after the write response, i and the address advance.
//   Prepare (memory -> RM, after the new RM is configured): for each word it
//     reads the image over AXI4-Lite and, when the read data arrives, pulses
//     write with memory_cnt = i and the word to the RM; i and the address
//     advance.
// When all words are moved, done pulses for one cycle (informing the
// partition manager). The AXI4-Lite manager has at most one transaction
// outstanding; address and write data are offered together.
//
// The word-by-word procedure, the +1 count / +4 address stepping, the per-RM
// word count and start address, the memory_cnt/read/write handover signals
// and the AXI connection follow the source description. The default image
// addresses (state memory at 0x1000_0000), the one-at-a-time bus use and the
// configuration registers are this design's choices.
module mem_handover_manager
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_RP = 2,
  parameter logic [NUM_RM*32-1:0] INIT_BASE = {
    32'h1000_00c0, 32'h1000_0080, 32'h1000_0040, 32'h1000_0000,   // RM 7..4
    32'h1000_01c0, 32'h1000_0180, 32'h1000_0140, 32'h1000_0100},  // RM 3..0
  parameter logic [NUM_RM*8-1:0]  INIT_WORDS = {
    8'd0, 8'd0, 8'd16, 8'd2,     // RM 7..4: ASCON (5) 16 words, ROL (4) 2 words
    8'd0, 8'd0, 8'd0,  8'd0}
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // control from the partition manager
  input  logic              start_i,
  input  logic              prepare_i,
  input  logic [NUM_RP-1:0] rp_i,
  input  rm_id_t            rm_i,
  output logic              busy_o,
  output logic              done_o,
  // handover ports of the RPs
  output ho_req_t           ho_o       [NUM_RP],
  input  logic [31:0]       ho_rdata_i [NUM_RP],
  // configuration from the command manager
  input  logic              set_base_i,
  input  logic              set_words_i,
  input  rm_id_t            cfg_rm_i,
  input  logic [31:0]       cfg_data_i,
  output logic [31:0]       base_o      [NUM_RM],
  output logic [7:0]        words_o     [NUM_RM],
  output logic [NUM_RM-1:0] stateful_o,
  // AXI4-Lite manager port
  output axil_req_t         axi_o,
  input  axil_rsp_t         axi_i
);

  typedef enum logic [2:0] {IDLE, RD_ADDR, RD_DATA, WR_FETCH, WR_REQ, WR_RESP, DONE} state_e;

  state_e            state_q;
  logic [31:0]       base_q  [NUM_RM];
  logic [7:0]        words_q [NUM_RM];
  logic [NUM_RP-1:0] rp_q;
  logic [7:0]        cnt_q, num_q;
  logic [31:0]       addr_q;
  logic              aw_done_q, w_done_q;
  logic [31:0]       rdata_sel, wdata_q;

  always_comb begin
    rdata_sel = '0;
    for (int k = 0; k < NUM_RP; k++)
      if (rp_q[k]) rdata_sel = ho_rdata_i[k];
  end

  // configuration table
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int m = 0; m < NUM_RM; m++) begin
        base_q[m]  <= INIT_BASE[m*32 +: 32];
        words_q[m] <= INIT_WORDS[m*8 +: 8];
      end
    end else begin
      if (set_base_i)  base_q[cfg_rm_i]  <= {cfg_data_i[31:2], 2'b00};
      if (set_words_i) words_q[cfg_rm_i] <= cfg_data_i[7:0];
    end
  end

  always_comb begin
    for (int m = 0; m < NUM_RM; m++) begin
      base_o[m]     = base_q[m];
      words_o[m]    = words_q[m];
      stateful_o[m] = (words_q[m] != 8'd0);
    end
  end

  // handover sequencer
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= IDLE;
      rp_q      <= '0;
      cnt_q     <= '0;
      num_q     <= '0;
      addr_q    <= '0;
      aw_done_q <= 1'b0;
      w_done_q  <= 1'b0;
      wdata_q   <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (start_i) begin
          rp_q    <= rp_i;
          cnt_q   <= '0;
          num_q   <= words_q[rm_i];
          addr_q  <= base_q[rm_i];
          if (words_q[rm_i] == 8'd0) state_q <= DONE;
          else state_q <= prepare_i ? RD_ADDR : WR_FETCH;
        end
        RD_ADDR: if (axi_i.arready) state_q <= RD_DATA;
        RD_DATA: if (axi_i.rvalid) begin
          cnt_q   <= cnt_q + 8'd1;
          addr_q  <= addr_q + 32'd4;
          state_q <= (cnt_q + 8'd1 == num_q) ? DONE : RD_ADDR;
        end
        WR_FETCH: begin
          wdata_q <= rdata_sel;
          state_q <= WR_REQ;
        end
        WR_REQ: begin
          if (axi_i.awready) aw_done_q <= 1'b1;
          if (axi_i.wready)  w_done_q  <= 1'b1;
          if ((aw_done_q || axi_i.awready) && (w_done_q || axi_i.wready)) begin
            aw_done_q <= 1'b0;
            w_done_q  <= 1'b0;
            state_q   <= WR_RESP;
          end
        end
        WR_RESP: if (axi_i.bvalid) begin
          cnt_q   <= cnt_q + 8'd1;
          addr_q  <= addr_q + 32'd4;
          state_q <= (cnt_q + 8'd1 == num_q) ? DONE : WR_FETCH;
        end
        default: state_q <= IDLE;   // DONE
      endcase
    end
  end

  always_comb begin
    axi_o         = '0;
    axi_o.araddr  = addr_q;
    axi_o.arvalid = (state_q == RD_ADDR);
    axi_o.rready  = (state_q == RD_DATA);
    axi_o.awaddr  = addr_q;
    axi_o.awvalid = (state_q == WR_REQ) && !aw_done_q;
    axi_o.wdata   = wdata_q;
    axi_o.wstrb   = 4'hf;
    axi_o.wvalid  = (state_q == WR_REQ) && !w_done_q;
    axi_o.bready  = (state_q == WR_RESP);

    for (int k = 0; k < NUM_RP; k++) begin
      ho_o[k]       = '0;
      ho_o[k].cnt   = cnt_q;
      ho_o[k].wdata = axi_i.rdata;
      ho_o[k].read  = rp_q[k] && (state_q == WR_FETCH);
      ho_o[k].write = rp_q[k] && (state_q == RD_DATA) && axi_i.rvalid;
    end
    busy_o = (state_q != IDLE);
    done_o = (state_q == DONE);
  end

  a_start_idle: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 start_i |-> state_q == IDLE);

endmodule
