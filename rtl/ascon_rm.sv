// ascon_rm: reconfigurable module computing ASCON-128 authenticated
// encryption step by step through custom-2 instructions.
//
// ASCON works on a 320-bit sponge state (five 64-bit words) and a 128-bit key,
// while a custom instruction carries two 32-bit operands and one 32-bit
// result, so one encryption is spread over many invocations (funct7 selects
// the step; "hi" is the first 32 bits of a 64-bit big-endian block):
//   1 KEY_HI    key[127:64] = {rs1, rs2}
//   2 KEY_LO    key[63:0]   = {rs1, rs2}
//   3 NONCE_HI  nonce[127:64] = {rs1, rs2}
//   4 NONCE_LO  nonce[63:0] = {rs1, rs2}; state = IV|key|nonce, p^12,
//               state ^= 0|key                                  (12 rounds)
//   5 AD        x0 ^= {rs1, rs2} (padded associated-data block), p^6
//   6 ENC       x0 ^= {rs1, rs2} (plaintext block, padded by software when it
//               is the last one); rd = x0[63:32], x0[31:0] is buffered. The
//               first ENC applies the domain separation x4 ^= 1.
//   7 ENC_FIN   rd = buffered x0[31:0]; when rs1[0] = 0 (not the last block)
//               p^6 follows; the last block omits the permutation
//   8 TAG       rs1[1:0] = word index; index 0 first runs the finalisation
//               x1 ^= key_hi, x2 ^= key_lo, p^12. rd = word index of
//               {x3 ^ key_hi, x4 ^ key_lo}                    (12 rounds on 0)
// The permutation runs one round per clock cycle. An invocation with a
// permutation stalls the core: the inputs are absorbed in the first cycle,
// the rounds follow, and done rises in the cycle after the last round. So
// NONCE_LO and TAG 0 complete in their 14th cycle, AD and a non-last ENC_FIN
// in their 8th; every other step completes in its first cycle.
//
// Handover image (16 words): 0..9 = x0..x4 (high word first), 10..13 = key
// (high word first), 14 = buffered ciphertext word, 15 = flags (bit 0: domain
// separation done).
//
// The split of the encryption into key/nonce/block/tag calls, two
// instructions per 64-bit block with a buffered second output word, the last
// block without permutation and the four-call tag follow the source
// description. The funct7 codes, the AD call, the IV of ASCON-128 and the
// state word layout are this design's choices.
module ascon_rm
  import rrisax_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  rm_req_t     req_i,
  output rm_rsp_t     rsp_o,
  input  ho_req_t     ho_i,
  output logic [31:0] ho_rdata_o
);

  localparam logic [63:0] IV = 64'h80400c0600000000;  // ASCON-128
  localparam logic [6:0] F7_KEY_HI   = 7'd1;
  localparam logic [6:0] F7_KEY_LO   = 7'd2;
  localparam logic [6:0] F7_NONCE_HI = 7'd3;
  localparam logic [6:0] F7_NONCE_LO = 7'd4;
  localparam logic [6:0] F7_AD       = 7'd5;
  localparam logic [6:0] F7_ENC      = 7'd6;
  localparam logic [6:0] F7_ENC_FIN  = 7'd7;
  localparam logic [6:0] F7_TAG      = 7'd8;

  typedef enum logic [1:0] {S_IDLE, S_PERM, S_RESP} fsm_e;

  logic [63:0]  x_q [5];
  logic [63:0]  x_d [5];
  logic [63:0]  rnd_out [5];
  logic [127:0] key_q;
  logic [31:0]  buf_q;
  logic         dsep_q;          // domain separation applied
  logic [3:0]   round_q;         // current round index (schedule of 12)
  fsm_e         fsm_q;
  logic [63:0]  blk;
  logic [63:0]  tag_w [2];

  assign blk = {req_i.rs1, req_i.rs2};
  assign tag_w[0] = x_q[3] ^ key_q[127:64];
  assign tag_w[1] = x_q[4] ^ key_q[63:0];

  ascon_round u_round (.x_i(x_q), .round_i(round_q), .x_o(rnd_out));

  // Next state in a permutation cycle; the last round of the initialisation
  // also adds the key to x3/x4.
  always_comb begin
    x_d = rnd_out;
    if (round_q == 4'd11 && req_i.funct7 == F7_NONCE_LO) begin
      x_d[3] = rnd_out[3] ^ key_q[127:64];
      x_d[4] = rnd_out[4] ^ key_q[63:0];
    end
  end

  // Does this invocation need a permutation?
  logic needs_perm;
  always_comb begin
    unique case (req_i.funct7)
      F7_NONCE_LO, F7_AD: needs_perm = 1'b1;
      F7_ENC_FIN:         needs_perm = !req_i.rs1[0];
      F7_TAG:             needs_perm = (req_i.rs1[1:0] == 2'd0);
      default:            needs_perm = 1'b0;
    endcase
  end

  // Response: combinational in S_IDLE for single-cycle steps, from S_RESP
  // after a permutation.
  always_comb begin
    rsp_o       = '0;
    rsp_o.done  = req_i.valid && ((fsm_q == S_IDLE && !needs_perm) || fsm_q == S_RESP);
    rsp_o.wr_rd = rsp_o.done;
    unique case (req_i.funct7)
      F7_ENC:     rsp_o.rd = x_q[0][63:32] ^ req_i.rs1;
      F7_ENC_FIN: rsp_o.rd = buf_q;
      F7_TAG: begin
        unique case (req_i.rs1[1:0])
          2'd0: rsp_o.rd = tag_w[0][63:32];
          2'd1: rsp_o.rd = tag_w[0][31:0];
          2'd2: rsp_o.rd = tag_w[1][63:32];
          default: rsp_o.rd = tag_w[1][31:0];
        endcase
      end
      default: rsp_o.rd = '0;
    endcase
  end

  // State update
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < 5; i++) x_q[i] <= '0;
      key_q   <= '0;
      buf_q   <= '0;
      dsep_q  <= 1'b0;
      round_q <= '0;
      fsm_q   <= S_IDLE;
    end else if (ho_i.write) begin
      if (ho_i.cnt < 8'd10) begin
        if (ho_i.cnt[0]) x_q[ho_i.cnt[3:1]][31:0]  <= ho_i.wdata;
        else             x_q[ho_i.cnt[3:1]][63:32] <= ho_i.wdata;
      end else if (ho_i.cnt < 8'd14) begin
        unique case (ho_i.cnt[1:0])
          2'd2: key_q[127:96] <= ho_i.wdata;
          2'd3: key_q[95:64]  <= ho_i.wdata;
          2'd0: key_q[63:32]  <= ho_i.wdata;
          default: key_q[31:0] <= ho_i.wdata;
        endcase
      end else if (ho_i.cnt == 8'd14) begin
        buf_q <= ho_i.wdata;
      end else if (ho_i.cnt == 8'd15) begin
        dsep_q <= ho_i.wdata[0];
      end
    end else begin
      unique case (fsm_q)
        S_IDLE: if (req_i.valid) begin
          unique case (req_i.funct7)
            F7_KEY_HI:   key_q[127:64] <= blk;
            F7_KEY_LO:   key_q[63:0]   <= blk;
            F7_NONCE_HI: x_q[3] <= blk;
            F7_NONCE_LO: begin
              x_q[0] <= IV;
              x_q[1] <= key_q[127:64];
              x_q[2] <= key_q[63:0];
              x_q[4] <= blk;
              dsep_q <= 1'b0;
              round_q <= 4'd0;
              fsm_q   <= S_PERM;
            end
            F7_AD: begin
              x_q[0]  <= x_q[0] ^ blk;
              round_q <= 4'd6;
              fsm_q   <= S_PERM;
            end
            F7_ENC: begin
              x_q[0] <= x_q[0] ^ blk;
              buf_q  <= (x_q[0][31:0] ^ blk[31:0]);
              if (!dsep_q) begin
                x_q[4] <= x_q[4] ^ 64'd1;
                dsep_q <= 1'b1;
              end
            end
            F7_ENC_FIN: if (!req_i.rs1[0]) begin
              round_q <= 4'd6;
              fsm_q   <= S_PERM;
            end
            F7_TAG: if (req_i.rs1[1:0] == 2'd0) begin
              x_q[1]  <= x_q[1] ^ key_q[127:64];
              x_q[2]  <= x_q[2] ^ key_q[63:0];
              round_q <= 4'd0;
              fsm_q   <= S_PERM;
            end
            default: ;
          endcase
        end
        S_PERM: begin
          if (round_q == 4'd11) fsm_q <= S_RESP;
          x_q     <= x_d;
          round_q <= round_q + 4'd1;
        end
        default: if (req_i.valid) fsm_q <= S_IDLE;   // S_RESP: answer given
      endcase
    end
  end

  // Handover read port
  always_comb begin
    ho_rdata_o = '0;
    if (ho_i.cnt < 8'd10)
      ho_rdata_o = ho_i.cnt[0] ? x_q[ho_i.cnt[3:1]][31:0] : x_q[ho_i.cnt[3:1]][63:32];
    else if (ho_i.cnt < 8'd14)
      unique case (ho_i.cnt[1:0])
        2'd2: ho_rdata_o = key_q[127:96];
        2'd3: ho_rdata_o = key_q[95:64];
        2'd0: ho_rdata_o = key_q[63:32];
        default: ho_rdata_o = key_q[31:0];
      endcase
    else if (ho_i.cnt == 8'd14)
      ho_rdata_o = buf_q;
    else if (ho_i.cnt == 8'd15)
      ho_rdata_o = {31'd0, dsep_q};
  end

  // The core holds the request stable while the module stalls it.
  a_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
                           (fsm_q != S_IDLE) |-> req_i.valid);
  a_no_overlap: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 !((ho_i.read || ho_i.write) && req_i.valid));

endmodule
