// furbys_victim_select: the FURBYS replacement decision for one set.
//
// Given the valid bits, weights and RRPVs of the active set's ways, the
// weight of the pending PW and the set's pitfall record, it produces the
// decision in one combinational step:
//   step 2  the min module finds the coldest way (FURBYS candidate) and the
//           max module the SRRIP victim;
//   step 3  bypass  = new_weight < min_weight - K (only when check_bypass
//                     is set, i.e. on the first victim search of a PW);
//           degrade = the FURBYS candidate is a way the set evicted within
//                     its last DEPTH evictions (a locally cold "hot" PW);
//   step 4  a multiplexer with select {bypass, degrade} picks the result:
//           0 FURBYS victim, 1 SRRIP victim, 2 bypass.
// The structure and K = 1 follow the evaluated design. Treating a match
// with any recorded slot as "evicting the same way twice" is this design's
// reading of the pitfall rule. srrip_age tells the cache how much to age
// the set's RRPVs when the SRRIP victim is taken.
module furbys_victim_select
  import furbys_pkg::*;
#(
  parameter int unsigned WAYS  = 8,
  parameter int unsigned DEPTH = 2,
  parameter int unsigned K     = 1,
  localparam int unsigned IDX_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]              way_valid,
  input  weight_t [WAYS-1:0]           way_weight,
  input  rrpv_t   [WAYS-1:0]           way_rrpv,
  input  weight_t                      new_weight,
  input  logic                         check_bypass,
  input  logic [DEPTH-1:0]             pit_valid,
  input  logic [DEPTH-1:0][IDX_W-1:0]  pit_way,
  output decision_e                    decision,
  output logic [IDX_W-1:0]             victim_way,
  output logic                         degrade,
  output logic                         bypass,
  output rrpv_t                        srrip_age,
  output weight_t                      min_weight
);

  logic [IDX_W-1:0] min_way, max_way;
  logic             any_valid;
  rrpv_t            max_rrpv;

  furbys_min_module #(.WAYS(WAYS), .WEIGHT_W(WEIGHT_W)) u_min (
    .way_valid (way_valid),
    .way_weight(way_weight),
    .min_weight(min_weight),
    .min_way   (min_way),
    .any_valid (any_valid)
  );

  furbys_max_module #(.WAYS(WAYS), .RRPV_W(RRPV_W)) u_max (
    .way_valid(way_valid),
    .way_rrpv (way_rrpv),
    .max_rrpv (max_rrpv),
    .max_way  (max_way),
    .age      (srrip_age)
  );

  // step 3: compare groups (widened so that min_weight - K cannot wrap)
  always_comb begin
    bypass = check_bypass && any_valid &&
             ((WEIGHT_W + 2)'(new_weight) + (WEIGHT_W + 2)'(K) < (WEIGHT_W + 2)'(min_weight));
  end

  // step 3: detect local pitfall
  always_comb begin
    degrade = 1'b0;
    for (int unsigned d = 0; d < DEPTH; d++)
      if (pit_valid[d] && pit_way[d] == min_way) degrade = 1'b1;
  end

  // step 4: final decision
  always_comb begin
    unique casez ({bypass, degrade})
      2'b1?:   decision = DEC_BYPASS;
      2'b01:   decision = DEC_SRRIP;
      default: decision = DEC_FURBYS;
    endcase
    victim_way = (decision == DEC_SRRIP) ? max_way : min_way;
  end

endmodule
