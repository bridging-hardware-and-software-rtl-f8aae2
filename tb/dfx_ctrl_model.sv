// dfx_ctrl_model: behavioural model of the vendor partial-reconfiguration
// (DFX) controller, for simulation only.
//
// Per RP it watches a hardware trigger and the requested RM identifier. One
// reconfiguration runs at a time: when a trigger is seen and the controller
// is idle it raises that RP's decouple signal, reads the first word of the
// partial bitstream over its AXI4-Lite manager port (as the real controller
// fetches the bitstream from memory on the system interconnect), "streams"
// the rest for size / BYTES_PER_CYCLE cycles without further bus traffic,
// drops decouple and then pulses the RP's RM reset for RESET_CYCLES cycles.
// The bitstream addresses are the memory map of the prototype: RP 0
// bitstreams at 0x8000_0000 + rm * 0x6_0000, RP 1 at 0x8030_0000 +
// rm * 0x6_0000, with sizes 360011 and 359203 bytes; the address and the word
// read are reported for checking. A 32-bit configuration port at one word per
// cycle gives BYTES_PER_CYCLE = 4; tests may speed this up.
module dfx_ctrl_model
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_RP          = 2,
  parameter int unsigned BYTES_PER_CYCLE = 4,
  parameter int unsigned RESET_CYCLES    = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [NUM_RP-1:0] trigger_i,
  input  rm_id_t            trigger_rm_i [NUM_RP],
  output logic [NUM_RP-1:0] decouple_o,
  output logic [NUM_RP-1:0] rm_reset_o,
  output logic [31:0]       last_addr_o,
  output logic [31:0]       last_size_o,
  output logic [31:0]       last_word_o,
  output axil_req_t         axi_o,
  input  axil_rsp_t         axi_i,
  output int unsigned       count_o
);

  function automatic logic [31:0] bs_addr(input int unsigned rp, input rm_id_t rm);
    logic [31:0] base;
    base = (rp == 0) ? 32'h8000_0000 : 32'h8030_0000;
    return base + 32'(rm) * 32'h0006_0000;
  endfunction

  function automatic int unsigned bs_size(input int unsigned rp);
    return (rp == 0) ? 360011 : 359203;
  endfunction

  typedef enum logic [1:0] {IDLE, FETCH, STREAM, RESET} st_e;
  st_e         st;
  int unsigned cnt, cur;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st          <= IDLE;
      cnt         <= 0;
      cur         <= 0;
      decouple_o  <= '0;
      rm_reset_o  <= '0;
      last_addr_o <= '0;
      last_size_o <= '0;
      last_word_o <= '0;
      axi_o       <= '0;
      count_o     <= 0;
    end else begin
      unique case (st)
        IDLE: begin
          for (int k = NUM_RP - 1; k >= 0; k--)
            if (trigger_i[k]) begin
              cur         <= k;
              cnt         <= (bs_size(k) + BYTES_PER_CYCLE - 1) / BYTES_PER_CYCLE;
              last_addr_o <= bs_addr(k, trigger_rm_i[k]);
              last_size_o <= bs_size(k);
              decouple_o  <= '0;
              decouple_o[k] <= 1'b1;
              axi_o         <= '0;
              axi_o.araddr  <= bs_addr(k, trigger_rm_i[k]);
              axi_o.arvalid <= 1'b1;
              axi_o.rready  <= 1'b1;
              st          <= FETCH;
            end
        end
        FETCH: begin
          if (axi_i.arready) axi_o.arvalid <= 1'b0;
          if (axi_i.rvalid && axi_o.rready) begin
            last_word_o  <= axi_i.rdata;
            axi_o.rready <= 1'b0;
            st           <= STREAM;
          end
        end
        STREAM: begin
          if (cnt <= 1) begin
            decouple_o <= '0;
            rm_reset_o[cur] <= 1'b1;
            cnt <= RESET_CYCLES;
            st  <= RESET;
          end else cnt <= cnt - 1;
        end
        default: begin
          if (cnt <= 1) begin
            rm_reset_o <= '0;
            count_o    <= count_o + 1;
            st         <= IDLE;
          end else cnt <= cnt - 1;
        end
      endcase
    end
  end
endmodule
