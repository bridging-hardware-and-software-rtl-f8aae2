// sw_fallback_manager: hardware side of the software fallback path (miss
// path) for custom-2 instructions whose RM is absent.
//
// States and sequence:
//   IDLE   A miss arrives. The manager buffers rs1, rs2, PC, funct3 and funct7
//          and answers at once without a register write but with a PC write
//          to the fallback entry stub (FALLBACK_STUB_ADDR, 0x18) and a flush,
//          so the core leaves the custom instruction and enters software.
//   ACTIVE The software stub saves the CPU state and calls the fallback
//          function for the buffered RM. Through the command manager it reads
//          the buffered fields, may request a PC override (to emulate a
//          control-flow change) and finally hands over the result. Its return
//          command makes the command manager redirect the PC to the buffered
//          PC, i.e. back to the faulting instruction, and moves this manager
//          to REPLAY. A custom-2 instruction seen in ACTIVE is stalled (a
//          fallback function must not itself use custom-2).
//   REPLAY The faulting instruction executes again. The manager answers it
//          with the buffered result as register write back and, if requested,
//          the override as the next PC; the instruction thereby retires with
//          the architectural effects of a hardware execution. Back to IDLE.
// lock_rm_o marks the RM whose memory-resident state the software may be
// using (ACTIVE or REPLAY), so the partition manager does not start a state
// handover for it meanwhile.
//
// The buffered fields, the stub address, the return via the command manager
// and the replay scheme follow the source description; the three-state
// controller, the stall of nested custom-2 instructions and clearing the
// override per miss are this design's choices.
module sw_fallback_manager
  import rrisax_pkg::*;
#(
  parameter logic [31:0] STUB_ADDR = FALLBACK_STUB_ADDR
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // from the fallback selector
  input  rm_req_t           req_i,
  input  rm_id_t            req_rm_i,
  output rm_rsp_t           rsp_o,
  output logic              replay_o,
  // from the command manager
  input  logic              set_result_i,
  input  logic              set_npc_i,
  input  logic [31:0]       wdata_i,
  input  logic              return_i,
  // buffered context, readable through the command manager
  output rm_id_t            buf_rm_o,
  output logic [6:0]        buf_funct7_o,
  output logic [31:0]       buf_rs1_o,
  output logic [31:0]       buf_rs2_o,
  output logic [31:0]       buf_pc_o,
  output logic [NUM_RM-1:0] lock_rm_o
);

  typedef enum logic [1:0] {IDLE, ACTIVE, REPLAY} state_e;

  state_e      state_q;
  rm_id_t      rm_q;
  logic [6:0]  funct7_q;
  logic [31:0] rs1_q, rs2_q, pc_q, result_q, npc_q;
  logic        npc_valid_q;

  always_comb begin
    rsp_o = '0;
    unique case (state_q)
      IDLE: begin
        rsp_o.done  = req_i.valid;
        rsp_o.wr_pc = 1'b1;
        rsp_o.pc    = STUB_ADDR;
      end
      REPLAY: begin
        rsp_o.done  = req_i.valid;
        rsp_o.wr_rd = 1'b1;
        rsp_o.rd    = result_q;
        rsp_o.wr_pc = npc_valid_q;
        rsp_o.pc    = npc_q;
      end
      default: ;   // ACTIVE: stall
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= IDLE;
      rm_q        <= '0;
      funct7_q    <= '0;
      rs1_q       <= '0;
      rs2_q       <= '0;
      pc_q        <= '0;
      result_q    <= '0;
      npc_q       <= '0;
      npc_valid_q <= 1'b0;
    end else begin
      unique case (state_q)
        IDLE: if (req_i.valid) begin
          rm_q        <= req_rm_i;
          funct7_q    <= req_i.funct7;
          rs1_q       <= req_i.rs1;
          rs2_q       <= req_i.rs2;
          pc_q        <= req_i.pc;
          npc_valid_q <= 1'b0;
          state_q     <= ACTIVE;
        end
        ACTIVE: begin
          if (set_result_i) result_q <= wdata_i;
          if (set_npc_i) begin
            npc_q       <= wdata_i;
            npc_valid_q <= 1'b1;
          end
          if (return_i) state_q <= REPLAY;
        end
        default: if (req_i.valid) state_q <= IDLE;   // REPLAY answered
      endcase
    end
  end

  assign replay_o     = (state_q == REPLAY);
  assign buf_rm_o     = rm_q;
  assign buf_funct7_o = funct7_q;
  assign buf_rs1_o    = rs1_q;
  assign buf_rs2_o    = rs2_q;
  assign buf_pc_o     = pc_q;

  always_comb begin
    lock_rm_o = '0;
    if (state_q != IDLE) lock_rm_o[rm_q] = 1'b1;
  end

  // The replayed instruction is the one that missed.
  a_replay_pc: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                (state_q == REPLAY && req_i.valid) |-> req_i.pc == pc_q);

endmodule
