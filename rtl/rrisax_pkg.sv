// rrisax_pkg: types and constants shared by the runtime-reconfigurable ISA
// extension (ISAX) subsystem.
//
// The subsystem sits next to a RISC-V core whose custom-2 opcode invokes an
// accelerator (a reconfigurable module, RM) and whose custom-3 opcode reaches a
// small command register file. The core side is seen through the stage view of
// a SCAIE-V style ISAX port (isax_req_t / isax_rsp_t):
//   * the core presents valid, the instruction word, rs1, rs2 and PC while the
//     instruction sits in the operand-read stage;
//   * the subsystem holds the instruction there by asserting stall;
//   * in the first cycle with valid=1 and stall=0 the instruction leaves the
//     stage and the core captures wr_rd/rd (register write back) and
//     wr_pc/pc/flush (PC redirect, younger instructions flushed) with it.
// funct3 selects the RM (eight RMs), funct7 the operation within the RM. The
// opcodes, the funct3/funct7 roles, the stub address 0x18 and the seven RP
// states follow the source description; the command codes, the handshake
// timing in this view and the AXI4-Lite bundle layout are this design's own.
package rrisax_pkg;

  localparam int unsigned NUM_RM   = 8;       // funct3 is three bits wide
  localparam int unsigned RM_ID_W  = 3;
  localparam logic [6:0]  OPC_CUSTOM2 = 7'b1011011;
  localparam logic [6:0]  OPC_CUSTOM3 = 7'b1111011;
  localparam logic [31:0] FALLBACK_STUB_ADDR = 32'h0000_0018;

  // RM identifiers (funct3 values)
  localparam logic [2:0] RM_ROL   = 3'd4;    // as encoded in the ROL example
  localparam logic [2:0] RM_ASCON = 3'd5;    // own choice

  typedef logic [RM_ID_W-1:0] rm_id_t;

  // Core-side view of one ISAX port in its operand-read stage.
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] rs1;
    logic [31:0] rs2;
    logic [31:0] pc;
  } isax_req_t;

  // Subsystem answer to the core.
  typedef struct packed {
    logic        stall;
    logic        wr_rd;
    logic [31:0] rd;
    logic        wr_pc;
    logic [31:0] pc;
    logic        flush;
  } isax_rsp_t;

  // Request as seen by a reconfigurable module after dispatch.
  typedef struct packed {
    logic        valid;
    logic [6:0]  funct7;
    logic [31:0] rs1;
    logic [31:0] rs2;
    logic [31:0] pc;
  } rm_req_t;

  // Answer of a reconfigurable module. done may be asserted combinationally
  // in the cycle the request arrives.
  typedef struct packed {
    logic        done;
    logic        wr_rd;
    logic [31:0] rd;
    logic        wr_pc;
    logic [31:0] pc;
  } rm_rsp_t;

  // State-handover port of an RM. read: the RM drives state word cnt on its
  // handover data output; write: the RM stores wdata as state word cnt.
  typedef struct packed {
    logic        read;
    logic        write;
    logic [7:0]  cnt;
    logic [31:0] wdata;
  } ho_req_t;

  // Per-RP states kept by the partition manager.
  typedef enum logic [2:0] {
    RP_EMPTY    = 3'd0,
    RP_PRESENT  = 3'd1,
    RP_CLEANUP  = 3'd2,
    RP_TRIGGER  = 3'd3,
    RP_RECONFIG = 3'd4,
    RP_WAITING  = 3'd5,
    RP_PREPARE  = 3'd6
  } rp_state_e;

  // custom-3 command codes (funct7)
  typedef enum logic [6:0] {
    CMD_FB_RMID      = 7'h00,  // rd = funct3 of the buffered miss
    CMD_FB_RS1       = 7'h01,  // rd = buffered rs1
    CMD_FB_RS2       = 7'h02,  // rd = buffered rs2
    CMD_FB_PC        = 7'h03,  // rd = PC of the faulting instruction
    CMD_FB_FUNCT7    = 7'h04,  // rd = buffered funct7
    CMD_FB_SET_NPC   = 7'h05,  // request PC override = rs1 on replay
    CMD_FB_SET_RES   = 7'h06,  // result = rs1
    CMD_FB_RETURN    = 7'h07,  // jump back to the faulting instruction
    CMD_RP_STATUS    = 7'h10,  // rd = {state, rm} of RP rs1
    CMD_DPR_REQ      = 7'h11,  // load RM rs2 into RP rs1, rd = accepted
    CMD_AUTO_CFG     = 7'h12,  // rs1[0] enable, rs1[1] override next RP = rs2;
                               // rd = enable state before the command
    CMD_FORCE_FB     = 7'h13,  // rs1[7:0]: RMs forced to the fallback path
    CMD_HO_SET_BASE  = 7'h14,  // state image base of RM rs1 = rs2
    CMD_HO_SET_WORDS = 7'h15,  // state words of RM rs1 = rs2 (0: stateless)
    CMD_HO_GET_BASE  = 7'h16,  // rd = state image base of RM rs1
    CMD_HO_GET_WORDS = 7'h17,  // rd = state words of RM rs1
    CMD_CNT_HIT      = 7'h18,  // rd = number of hits
    CMD_CNT_MISS     = 7'h19   // rd = number of misses
  } cmd_e;

  // AXI4-Lite manager-to-subordinate and subordinate-to-manager bundles.
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

endpackage
