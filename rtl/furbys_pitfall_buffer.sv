// furbys_pitfall_buffer: the local miss-pitfall buffer, one small record per
// cache set of the ways most recently chosen as eviction victims.
//
// Each set keeps DEPTH slots (2 in the evaluated design) of a way index;
// slot 0 is the newest. Recording an eviction shifts the slots by one and
// puts the way in slot 0. When the replacement logic has just degraded to
// SRRIP, 'restart' empties the set's record first, so the SRRIP victim
// becomes the only entry and the next decision is FURBYS again.
//
// Reading is combinational (rd_set -> rd_valid/rd_way); writing happens on
// the clock edge. A valid bit per slot, cleared by reset, marks slots that
// hold a real eviction: that bit is this design's addition to the 3-bit
// slot of the evaluated design, so a freshly reset set never degrades.
module furbys_pitfall_buffer #(
  parameter int unsigned SETS  = 64,
  parameter int unsigned WAYS  = 8,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned IDX_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // read port for the active set
  input  logic [SET_W-1:0]             rd_set,
  output logic [DEPTH-1:0]             rd_valid,
  output logic [DEPTH-1:0][IDX_W-1:0]  rd_way,
  // record one eviction
  input  logic                         wr_en,
  input  logic [SET_W-1:0]             wr_set,
  input  logic [IDX_W-1:0]             wr_way,
  input  logic                         wr_restart
);

  logic [SETS-1:0][DEPTH-1:0]            slot_valid;
  logic [SETS-1:0][DEPTH-1:0][IDX_W-1:0] slot_way;

  assign rd_valid = slot_valid[rd_set];
  assign rd_way   = slot_way[rd_set];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      slot_way   <= '0;
    end else if (wr_en) begin
      for (int unsigned d = DEPTH - 1; d > 0; d--) begin
        slot_valid[wr_set][d] <= wr_restart ? 1'b0 : slot_valid[wr_set][d-1];
        slot_way[wr_set][d]   <= slot_way[wr_set][d-1];
      end
      slot_valid[wr_set][0] <= 1'b1;
      slot_way[wr_set][0]   <= wr_way;
    end
  end

endmodule
