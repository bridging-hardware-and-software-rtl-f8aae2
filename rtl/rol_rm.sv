// rol_rm: reconfigurable module for a hardware loop ("ROL").
//
// Two custom-2 operations, told apart by funct7, turn an incrementing for-loop
// into one instruction before the loop body and one after it:
//   funct7 = 1  loop init : counter <= rs1, loop entry <= PC + 4, rd = rs1
//   funct7 = 2  loop step : counter <= counter + rs1, rd = new counter; when
//                           new counter < rs2 (unsigned) the PC is redirected
//                           to the recorded loop entry.
// Any other funct7 returns the counter and changes nothing. Every operation
// completes in the cycle it arrives (done is combinational, no stall).
//
// The loop state (counter, loop entry PC) is the module's accelerator-local
// state. Through the handover port it is exposed as two 32-bit words:
// word 0 = counter, word 1 = loop entry PC. A software fallback uses the same
// layout in memory.
//
// The operation set, the operand roles and the comparison counter < rs2 follow
// the source description; the unsigned compare, the state word layout and the
// behaviour of undefined funct7 codes are this design's choices.
module rol_rm
  import rrisax_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,      // includes the post-reconfiguration reset
  input  rm_req_t     req_i,
  output rm_rsp_t     rsp_o,
  input  ho_req_t     ho_i,
  output logic [31:0] ho_rdata_o
);

  localparam logic [6:0] F7_INIT = 7'd1;
  localparam logic [6:0] F7_STEP = 7'd2;
  localparam int unsigned STATE_WORDS = 2;

  logic [31:0] counter_q, loop_pc_q;
  logic [31:0] step_val;

  assign step_val = counter_q + req_i.rs1;

  always_comb begin
    rsp_o       = '0;
    rsp_o.done  = req_i.valid;
    rsp_o.wr_rd = req_i.valid;
    unique case (req_i.funct7)
      F7_INIT: rsp_o.rd = req_i.rs1;
      F7_STEP: begin
        rsp_o.rd    = step_val;
        rsp_o.wr_pc = req_i.valid && (step_val < req_i.rs2);
        rsp_o.pc    = loop_pc_q;
      end
      default: rsp_o.rd = counter_q;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      counter_q <= '0;
      loop_pc_q <= '0;
    end else if (ho_i.write) begin
      if (ho_i.cnt == 8'd0) counter_q <= ho_i.wdata;
      if (ho_i.cnt == 8'd1) loop_pc_q <= ho_i.wdata;
    end else if (req_i.valid) begin
      if (req_i.funct7 == F7_INIT) begin
        counter_q <= req_i.rs1;
        loop_pc_q <= req_i.pc + 32'd4;
      end else if (req_i.funct7 == F7_STEP) begin
        counter_q <= step_val;
      end
    end
  end

  always_comb begin
    unique case (ho_i.cnt)
      8'd0:    ho_rdata_o = counter_q;
      8'd1:    ho_rdata_o = loop_pc_q;
      default: ho_rdata_o = '0;
    endcase
  end

  // A handover never overlaps an invocation (the dispatcher stalls it).
  a_no_overlap: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 !((ho_i.read || ho_i.write) && req_i.valid));
  a_ho_range: assert property (@(posedge clk_i) disable iff (!rst_ni)
                               (ho_i.read || ho_i.write) |-> ho_i.cnt < 8'(STATE_WORDS));

endmodule
