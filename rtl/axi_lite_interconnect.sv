// axi_lite_interconnect: star interconnect of the microcontroller memory
// system, NUM_M AXI4-Lite managers to NUM_S subordinates.
//
// One transaction is in flight at a time. When idle, the interconnect grants
// the next manager, in round-robin order starting after the last grant, that
// has a read address or a write address and data pending, and decodes the
// subordinate from the address: subordinate s owns the addresses with
// (addr & S_MASK[s]) == S_BASE[s]. While granted, the manager's channels are
// wired straight to that subordinate; the grant ends with the read data or
// write response handshake. An address no subordinate owns is answered by
// the interconnect itself with DECERR. Reads take priority over writes of the
// same manager.
//
// The default map: subordinate 0 = program/data RAM at 0x0000_0000 (32 kB),
// subordinate 1 = accelerator state RAM at 0x1000_0000 (8 kB). The source
// description names the interconnect and its star topology; the address map,
// the arbitration and the single outstanding transaction are this design's.
module axi_lite_interconnect
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_M = 2,
  parameter int unsigned NUM_S = 2,
  parameter logic [NUM_S*32-1:0] S_BASE = {32'h1000_0000, 32'h0000_0000},
  parameter logic [NUM_S*32-1:0] S_MASK = {32'hffff_e000, 32'hffff_8000}
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  axil_req_t m_req_i [NUM_M],
  output axil_rsp_t m_rsp_o [NUM_M],
  output axil_req_t s_req_o [NUM_S],
  input  axil_rsp_t s_rsp_i [NUM_S]
);

  localparam int unsigned MW = (NUM_M > 1) ? $clog2(NUM_M) : 1;
  localparam int unsigned SW = $clog2(NUM_S + 1);   // value NUM_S = no match

  typedef enum logic [2:0] {IDLE, READ, WRITE, ERR_R, ERR_B} state_e;

  state_e        state_q;
  logic [MW-1:0] gnt_q, last_q;
  logic [SW-1:0] sel_q;

  function automatic logic [SW-1:0] decode(input logic [31:0] addr);
    logic [SW-1:0] s;
    s = SW'(NUM_S);
    for (int i = NUM_S - 1; i >= 0; i--)
      if ((addr & S_MASK[i*32 +: 32]) == S_BASE[i*32 +: 32]) s = SW'(i);
    return s;
  endfunction

  // round-robin pick
  logic          pick_valid, pick_read;
  logic [MW-1:0] pick;
  always_comb begin
    pick_valid = 1'b0;
    pick_read  = 1'b0;
    pick       = '0;
    for (int n = 1; n <= NUM_M; n++) begin
      int unsigned m;
      m = (int'(last_q) + n) % NUM_M;
      if (!pick_valid && (m_req_i[m].arvalid || (m_req_i[m].awvalid && m_req_i[m].wvalid))) begin
        pick_valid = 1'b1;
        pick_read  = m_req_i[m].arvalid;
        pick       = MW'(m);
      end
    end
  end

  // subordinate addressed by the picked request (NUM_S: none)
  logic [SW-1:0] pick_sel;
  assign pick_sel = decode(pick_read ? m_req_i[pick].araddr : m_req_i[pick].awaddr);

  // completion handshakes of the selected subordinate
  logic sel_rvalid, sel_bvalid;
  always_comb begin
    sel_rvalid = 1'b0;
    sel_bvalid = 1'b0;
    for (int s = 0; s < NUM_S; s++)
      if (sel_q == SW'(s)) begin
        sel_rvalid = s_rsp_i[s].rvalid;
        sel_bvalid = s_rsp_i[s].bvalid;
      end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= IDLE;
      gnt_q     <= '0;
      last_q    <= MW'(NUM_M - 1);
      sel_q     <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (pick_valid) begin
          gnt_q  <= pick;
          last_q <= pick;
          sel_q  <= pick_sel;
          if (pick_sel == SW'(NUM_S)) state_q <= pick_read ? ERR_R : ERR_B;
          else                 state_q <= pick_read ? READ : WRITE;
        end
        READ:  if (sel_rvalid && m_req_i[gnt_q].rready) state_q <= IDLE;
        WRITE: if (sel_bvalid && m_req_i[gnt_q].bready) state_q <= IDLE;
        ERR_R: if (m_req_i[gnt_q].rready) state_q <= IDLE;
        default: if (m_req_i[gnt_q].bready) state_q <= IDLE;   // ERR_B
      endcase
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_S; s++) s_req_o[s] = '0;
    for (int m = 0; m < NUM_M; m++) m_rsp_o[m] = '0;
    unique case (state_q)
      READ: begin
        for (int s = 0; s < NUM_S; s++)
          if (sel_q == SW'(s)) begin
            s_req_o[s].araddr  = m_req_i[gnt_q].araddr;
            s_req_o[s].arvalid = m_req_i[gnt_q].arvalid;
            s_req_o[s].rready  = m_req_i[gnt_q].rready;
            m_rsp_o[gnt_q].arready = s_rsp_i[s].arready;
            m_rsp_o[gnt_q].rvalid  = s_rsp_i[s].rvalid;
            m_rsp_o[gnt_q].rdata   = s_rsp_i[s].rdata;
            m_rsp_o[gnt_q].rresp   = s_rsp_i[s].rresp;
          end
      end
      WRITE: begin
        for (int s = 0; s < NUM_S; s++)
          if (sel_q == SW'(s)) begin
            s_req_o[s].awaddr  = m_req_i[gnt_q].awaddr;
            s_req_o[s].awvalid = m_req_i[gnt_q].awvalid;
            s_req_o[s].wdata   = m_req_i[gnt_q].wdata;
            s_req_o[s].wstrb   = m_req_i[gnt_q].wstrb;
            s_req_o[s].wvalid  = m_req_i[gnt_q].wvalid;
            s_req_o[s].bready  = m_req_i[gnt_q].bready;
            m_rsp_o[gnt_q].awready = s_rsp_i[s].awready;
            m_rsp_o[gnt_q].wready  = s_rsp_i[s].wready;
            m_rsp_o[gnt_q].bvalid  = s_rsp_i[s].bvalid;
            m_rsp_o[gnt_q].bresp   = s_rsp_i[s].bresp;
          end
      end
      ERR_R: begin
        m_rsp_o[gnt_q].arready = 1'b1;
        m_rsp_o[gnt_q].rvalid  = 1'b1;
        m_rsp_o[gnt_q].rresp   = 2'b11;
      end
      ERR_B: begin
        m_rsp_o[gnt_q].awready = 1'b1;
        m_rsp_o[gnt_q].wready  = 1'b1;
        m_rsp_o[gnt_q].bvalid  = 1'b1;
        m_rsp_o[gnt_q].bresp   = 2'b11;
      end
      default: ;
    endcase
  end

endmodule
