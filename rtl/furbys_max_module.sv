// furbys_max_module: SRRIP victim search for the active set.
//
// Finds the highest re-reference prediction value (RRPV) among the valid
// ways and the lowest-indexed way that holds it. Classic SRRIP evicts a way
// whose RRPV is at the maximum (3 for 2 bits), incrementing every RRPV until
// one gets there; this module does that in one step by also reporting
// age = RRPV_MAX - max_rrpv, the amount the cache adds to every valid RRPV
// of the set when the SRRIP victim is used. Purely combinational.
module furbys_max_module #(
  parameter int unsigned WAYS   = 8,
  parameter int unsigned RRPV_W = 2,
  localparam int unsigned IDX_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]              way_valid,
  input  logic [WAYS-1:0][RRPV_W-1:0]  way_rrpv,
  output logic [RRPV_W-1:0]            max_rrpv,
  output logic [IDX_W-1:0]             max_way,
  output logic [RRPV_W-1:0]            age
);

  logic found;

  always_comb begin
    max_rrpv = '0;
    max_way  = '0;
    found    = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (way_valid[w] && (!found || way_rrpv[w] > max_rrpv)) begin
        max_rrpv = way_rrpv[w];
        max_way  = IDX_W'(w);
        found    = 1'b1;
      end
    end
    age = found ? ~max_rrpv : '0;  // RRPV_MAX - max_rrpv
  end

endmodule
