// furbys_frontend_top: the micro-op cache side of a CPU frontend with the
// FURBYS replacement policy.
//
// Two paths meet here. The lookup path (lk_*/rsp_*) asks the micro-op cache
// for a predicted prediction window (PW) and streams its entries back. The
// fill path (dec_*) takes the micro-ops of the legacy decode pipeline,
// including the weight hints that the decoder extracts from marked
// instructions, packs them into PWs in the accumulation buffer and inserts
// each finished PW into the cache, where the FURBYS policy decides to evict
// (coldest weight, or SRRIP after a local miss pitfall) or to bypass it.
// inv_* carries icache line evictions, which the cache mirrors to stay
// inclusive of the icache. Everything outside -- x86 decoding, the icache,
// branch prediction, the offline profiling that produces the hints -- is
// not part of this RTL; their signals are this module's ports.
//
// Timing: see furbys_uop_cache (lookup answers from the next cycle, one
// entry per cycle) and furbys_accumulator (one micro-op per cycle). ev_*
// pulse once per event, for counters.
module furbys_frontend_top
  import furbys_pkg::*;
#(
  parameter int unsigned SETS           = 64,
  parameter int unsigned WAYS           = 8,
  parameter int unsigned PITFALL_DEPTH  = 2,
  parameter int unsigned K              = 1,
  parameter weight_t     DEFAULT_WEIGHT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  // decoded micro-ops from the legacy decode pipeline
  input  logic             dec_valid,
  output logic             dec_ready,
  input  addr_t            dec_addr,
  input  logic [UOP_W-1:0] dec_uop,
  input  logic             dec_has_imm,
  input  logic [IMM_W-1:0] dec_imm,
  input  logic             dec_last,
  input  logic             dec_group_valid,
  input  weight_t          dec_group,
  // lookup
  input  logic             lk_valid,
  output logic             lk_ready,
  input  addr_t            lk_addr,
  input  logic [PWU_W-1:0] lk_uops,
  output logic             rsp_valid,
  output entry_t           rsp_entry,
  output logic [EU_W-1:0]  rsp_nuops,
  output logic             rsp_last,
  output lookup_status_e   rsp_status,
  // icache line evictions
  input  logic             inv_valid,
  input  addr_t            inv_addr,
  // events
  output logic             ev_hit,
  output logic             ev_partial,
  output logic             ev_miss,
  output logic             ev_insert,
  output logic             ev_bypass,
  output logic             ev_evict_furbys,
  output logic             ev_evict_srrip,
  output logic             ev_drop_dup,
  output logic             ev_supersede,
  output logic             ev_drop_big,
  output logic             ev_inval,
  output logic             ev_pw_overflow
);

  logic pw_valid, pw_ready;
  pw_t  pw;

  furbys_accumulator #(.DEFAULT_WEIGHT(DEFAULT_WEIGHT)) u_acc (
    .clk            (clk),
    .rst_n          (rst_n),
    .dec_valid      (dec_valid),
    .dec_ready      (dec_ready),
    .dec_addr       (dec_addr),
    .dec_uop        (dec_uop),
    .dec_has_imm    (dec_has_imm),
    .dec_imm        (dec_imm),
    .dec_last       (dec_last),
    .dec_group_valid(dec_group_valid),
    .dec_group      (dec_group),
    .pw_valid       (pw_valid),
    .pw_ready       (pw_ready),
    .pw             (pw),
    .overflow       (ev_pw_overflow)
  );

  furbys_uop_cache #(
    .SETS(SETS), .WAYS(WAYS), .PITFALL_DEPTH(PITFALL_DEPTH), .K(K)
  ) u_cache (
    .clk            (clk),
    .rst_n          (rst_n),
    .lk_valid       (lk_valid),
    .lk_ready       (lk_ready),
    .lk_addr        (lk_addr),
    .lk_uops        (lk_uops),
    .rsp_valid      (rsp_valid),
    .rsp_entry      (rsp_entry),
    .rsp_nuops      (rsp_nuops),
    .rsp_last       (rsp_last),
    .rsp_status     (rsp_status),
    .ins_valid      (pw_valid),
    .ins_ready      (pw_ready),
    .ins_pw         (pw),
    .inv_valid      (inv_valid),
    .inv_addr       (inv_addr),
    .ev_hit         (ev_hit),
    .ev_partial     (ev_partial),
    .ev_miss        (ev_miss),
    .ev_insert      (ev_insert),
    .ev_bypass      (ev_bypass),
    .ev_evict_furbys(ev_evict_furbys),
    .ev_evict_srrip (ev_evict_srrip),
    .ev_drop_dup    (ev_drop_dup),
    .ev_supersede   (ev_supersede),
    .ev_drop_big    (ev_drop_big),
    .ev_inval       (ev_inval)
  );

endmodule
