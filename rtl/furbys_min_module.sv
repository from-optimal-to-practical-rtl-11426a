// furbys_min_module: finds the lowest weight among the valid ways of the
// active set, and the way that holds it.
//
// Step 2 of the FURBYS victim search: every way's 3-bit hit-rate group is
// compared and the coldest valid way becomes the FURBYS victim candidate.
// Ties go to the lowest way index (this design's choice; the policy leaves
// it open). Invalid ways are ignored; when no way is valid, any_valid is 0
// and min_weight reads as all ones. Purely combinational.
module furbys_min_module #(
  parameter int unsigned WAYS     = 8,
  parameter int unsigned WEIGHT_W = 3,
  localparam int unsigned IDX_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic [WAYS-1:0]                way_valid,
  input  logic [WAYS-1:0][WEIGHT_W-1:0]  way_weight,
  output logic [WEIGHT_W-1:0]            min_weight,
  output logic [IDX_W-1:0]               min_way,
  output logic                           any_valid
);

  always_comb begin
    min_weight = '1;
    min_way    = '0;
    any_valid  = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (way_valid[w] && (!any_valid || way_weight[w] < min_weight)) begin
        min_weight = way_weight[w];
        min_way    = IDX_W'(w);
        any_valid  = 1'b1;
      end
    end
  end

endmodule
