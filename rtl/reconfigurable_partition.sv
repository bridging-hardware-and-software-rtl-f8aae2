// reconfigurable_partition: one reconfigurable partition (RP) with the
// reconfigurable modules (RMs) it can host.
//
// On the FPGA an RP holds exactly one RM at a time and partial reconfiguration
// replaces its logic. In RTL the RP contains one instance of every RM design
// it can host (ROL and ASCON here) and activates only the one whose identifier
// the partition manager reports as hosted; the others see no request and their
// outputs are ignored, which behaves like the absent logic of the real RP.
//
// Decoupling: while the DFX controller's decouple signal is high the RP takes
// no requests and drives no response (all zero), so nothing from a partially
// written RP reaches the static side. The controller's RM reset, emitted when
// reconfiguration ends, resets every RM in this RP, so a newly loaded RM starts
// from its reset state (and is then filled by a Prepare handover if it is
// stateful).
//
// Interface: one custom-2 request/response pair (rm_req_t/rm_rsp_t) from the
// fallback selector, one state-handover port from the memory handover manager
// (the handover word travels on the same operand/result wires in the real
// design; here it is a separate port). All paths are combinational except the
// RMs' own registers.
//
// Decoupling and the reset after reconfiguration follow the source
// description; holding every hostable RM at once is this model's stand-in for
// reconfiguring the fabric.
module reconfigurable_partition
  import rrisax_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        decouple_i,    // from the DFX controller
  input  logic        rm_reset_i,    // from the DFX controller, active high
  input  logic        hosted_valid_i,
  input  rm_id_t      hosted_rm_i,   // RM configured into this RP
  input  rm_req_t     req_i,
  output rm_rsp_t     rsp_o,
  input  ho_req_t     ho_i,
  output logic [31:0] ho_rdata_o
);

  logic    rm_rst_n;
  logic    active;
  rm_req_t rol_req, ascon_req;
  rm_rsp_t rol_rsp, ascon_rsp;
  ho_req_t rol_ho, ascon_ho;
  logic [31:0] rol_ho_rdata, ascon_ho_rdata;

  assign rm_rst_n = rst_ni && !rm_reset_i;
  assign active   = hosted_valid_i && !decouple_i;

  always_comb begin
    rol_req   = '0;
    ascon_req = '0;
    rol_ho    = '0;
    ascon_ho  = '0;
    if (active && hosted_rm_i == RM_ROL) begin
      rol_req = req_i;
      rol_ho  = ho_i;
    end
    if (active && hosted_rm_i == RM_ASCON) begin
      ascon_req = req_i;
      ascon_ho  = ho_i;
    end
  end

  rol_rm u_rol (
    .clk_i, .rst_ni(rm_rst_n), .req_i(rol_req), .rsp_o(rol_rsp),
    .ho_i(rol_ho), .ho_rdata_o(rol_ho_rdata)
  );

  ascon_rm u_ascon (
    .clk_i, .rst_ni(rm_rst_n), .req_i(ascon_req), .rsp_o(ascon_rsp),
    .ho_i(ascon_ho), .ho_rdata_o(ascon_ho_rdata)
  );

  always_comb begin
    rsp_o      = '0;
    ho_rdata_o = '0;
    if (active) begin
      unique case (hosted_rm_i)
        RM_ROL: begin
          rsp_o      = rol_rsp;
          ho_rdata_o = rol_ho_rdata;
        end
        RM_ASCON: begin
          rsp_o      = ascon_rsp;
          ho_rdata_o = ascon_ho_rdata;
        end
        default: ;
      endcase
    end
  end

endmodule
