// auto_reconfig: miss-triggered reconfiguration policy.
//
// When a custom-2 instruction misses (its RM is absent) and the module is
// enabled, it asks the partition manager, one cycle later, to load the
// missing RM into the least recently used RP. RPs that are in the middle of a
// reconfiguration or handover are skipped. The command manager can enable or
// disable the policy and name the RP to use for the next request (a one-shot
// override, consumed by the next accepted request). A request the partition
// manager refuses (RM without bitstream, RM already hosted or on its way, RP
// busy) is dropped; the next miss asks again. Correctness never depends on
// this module: a miss is always served by the fallback path.
//
// Recency: every RP carries an age in 0..NUM_RP-1, all ages distinct. A hit on
// an RP, or a reconfiguration accepted for it, makes it the youngest (age 0)
// and ages every RP that was younger than it. The least recently used RP is
// the eligible RP with the largest age. At reset RP 0 is the oldest.
//
// The miss trigger, the least-recently-used choice and the enable/override
// hooks follow the source description; the age encoding, what counts as a use
// and the drop-on-refusal rule are this design's choices.
module auto_reconfig
  import rrisax_pkg::*;
#(
  parameter int unsigned NUM_RP = 2,
  parameter bit          ENABLE_AT_RESET = 1'b0
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // configuration (command manager)
  input  logic              cfg_i,
  input  logic              cfg_enable_i,
  input  logic              cfg_ovr_valid_i,
  input  logic [7:0]        cfg_ovr_rp_i,
  output logic              enabled_o,
  // events
  input  logic              miss_i,
  input  rm_id_t            miss_rm_i,
  input  logic [NUM_RP-1:0] hit_rp_i,
  input  logic [NUM_RP-1:0] accepted_rp_i,
  input  logic [NUM_RP-1:0] rp_free_i,
  // request to the partition manager
  output logic              req_o,
  output logic [7:0]        req_rp_o,
  output rm_id_t            req_rm_o,
  input  logic              accept_i
);

  localparam int unsigned AW = (NUM_RP > 1) ? $clog2(NUM_RP) : 1;

  logic              en_q, ovr_valid_q;
  logic [7:0]        ovr_rp_q;
  logic [AW-1:0]     age_q [NUM_RP];
  logic              req_q;
  rm_id_t            req_rm_q;
  logic              lru_found;
  logic [7:0]        lru_rp;

  // least recently used eligible RP
  always_comb begin
    logic [AW-1:0] best;
    lru_found = 1'b0;
    lru_rp    = '0;
    best      = '0;
    for (int k = 0; k < NUM_RP; k++)
      if (rp_free_i[k] && (!lru_found || age_q[k] > best)) begin
        lru_found = 1'b1;
        lru_rp    = 8'(k);
        best      = age_q[k];
      end
  end

  assign req_o     = req_q && (ovr_valid_q || lru_found);
  assign req_rp_o  = ovr_valid_q ? ovr_rp_q : lru_rp;
  assign req_rm_o  = req_rm_q;
  assign enabled_o = en_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      en_q        <= ENABLE_AT_RESET;
      ovr_valid_q <= 1'b0;
      ovr_rp_q    <= '0;
      req_q       <= 1'b0;
      req_rm_q    <= '0;
      for (int k = 0; k < NUM_RP; k++) age_q[k] <= AW'(NUM_RP - 1 - k);
    end else begin
      // request one cycle after the miss
      req_q <= miss_i && en_q;
      if (miss_i) req_rm_q <= miss_rm_i;
      if (req_o && accept_i) ovr_valid_q <= 1'b0;
      if (cfg_i) begin
        en_q        <= cfg_enable_i;
        ovr_valid_q <= cfg_ovr_valid_i;
        ovr_rp_q    <= cfg_ovr_rp_i;
      end
      // recency update (at most one use per cycle is expected; the lowest
      // touched RP wins otherwise)
      for (int k = NUM_RP - 1; k >= 0; k--) begin
        if (hit_rp_i[k] || accepted_rp_i[k]) begin
          for (int j = 0; j < NUM_RP; j++)
            if (j == k) age_q[j] <= '0;
            else if (age_q[j] < age_q[k]) age_q[j] <= age_q[j] + 1'b1;
        end
      end
    end
  end

endmodule
