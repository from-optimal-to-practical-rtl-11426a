// furbys_uop_cache: set-associative micro-op cache with the FURBYS
// replacement policy.
//
// Organisation (defaults follow the evaluated configuration): SETS x WAYS
// entries (64 x 8 = 512), each entry holding 8 micro-ops and 4 immediates
// plus FURBYS metadata: a 3-bit weight (hit-rate group) and 2 SRRIP bits.
// A prediction window (PW) is indexed by its start address and occupies
// 1..MAX_PW_ENTRIES ways of one set; every way of a PW carries the PW's key
// and its position (seq) inside the PW, so the ways are fetched in order and
// evicted together. The set index is taken from the address bits just above
// the 64-byte line offset, so all PWs of one icache line share a set and an
// icache eviction (inv_*) removes them in one cycle, keeping the cache
// inclusive of the icache.
//
// Lookup (lk_*/rsp_*): a request carries the start address and the number
// of micro-ops the predicted PW needs. One cycle later the cache streams one
// entry per cycle (rsp_valid) until rsp_last, which carries the outcome:
// HIT when all requested micro-ops were delivered -- also when a larger PW
// with the same start is stored, whose entries have intermediate exit points
// at every micro-op here -- PARTIAL when a smaller stored PW delivered only
// its micro-ops (the frontend then decodes the rest), MISS when nothing was
// found (one beat, no micro-ops). A new request is accepted in the cycle of
// rsp_last, so lookups stream back to back. A hit sets the PW's RRPVs to 0.
//
// Insertion (ins_*): one accumulated PW at a time, taking a few cycles
// (insertion is off the lookup path). CHECK: a stored PW with the same start
// and at least as many micro-ops makes the new one redundant (dropped);
// a smaller one is removed so the larger window is kept; a PW with more
// entries than the set has ways (only possible with WAYS < 4) is dropped. ALLOC: while the
// set lacks free ways, the FURBYS victim selection (min module, max module,
// bypass and pitfall compares, decision mux) picks a victim way; its whole
// PW is evicted and the way recorded in the set's pitfall buffer. On the
// first search of a PW the decision may also be to bypass it. WRITE: the
// entries go into the lowest free ways, one per cycle, with the PW's weight
// and RRPV = RRPV_INSERT (2).
//
// What follows the evaluated design: the sizes, the per-entry weight and
// RRPV bits, the two-slot pitfall buffer, bypass when the new weight is
// below the set's minimum weight minus K (K = 1), insertion RRPV 2, the
// four decision steps, keeping the larger of two same-start windows, and
// inclusion with the icache. This design's own choices: the address split,
// the per-way key/seq/size fields, bypass only on the first victim search
// of a PW, RRPV 0 on a hit, the CHECK step's drop rule, and the cycle
// timing of both ports. The ev_* outputs pulse once per event.
module furbys_uop_cache
  import furbys_pkg::*;
#(
  parameter int unsigned SETS          = 64,
  parameter int unsigned WAYS          = 8,
  parameter int unsigned PITFALL_DEPTH = 2,
  parameter int unsigned K             = 1,
  parameter rrpv_t       RRPV_INSERT   = 2'd2,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned IDX_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned KEY_W = ADDR_W - SET_W
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_valid,
  output logic            lk_ready,
  input  addr_t           lk_addr,
  input  logic [PWU_W-1:0] lk_uops,
  output logic            rsp_valid,
  output entry_t          rsp_entry,
  output logic [EU_W-1:0] rsp_nuops,
  output logic            rsp_last,
  output lookup_status_e  rsp_status,
  // insertion from the accumulation buffer
  input  logic            ins_valid,
  output logic            ins_ready,
  input  pw_t             ins_pw,
  // icache line eviction (inclusion)
  input  logic            inv_valid,
  input  addr_t           inv_addr,
  // event pulses
  output logic            ev_hit,
  output logic            ev_partial,
  output logic            ev_miss,
  output logic            ev_insert,
  output logic            ev_bypass,
  output logic            ev_evict_furbys,
  output logic            ev_evict_srrip,
  output logic            ev_drop_dup,
  output logic            ev_supersede,
  output logic            ev_drop_big,
  output logic            ev_inval
);

  typedef logic [KEY_W-1:0] key_t;

  function automatic logic [SET_W-1:0] set_of(addr_t a);
    return a[LINE_OFF_W +: SET_W];
  endfunction
  function automatic key_t key_of(addr_t a);
    return {a[ADDR_W-1:LINE_OFF_W+SET_W], a[LINE_OFF_W-1:0]};
  endfunction

  // ---------------------------------------------------------------- storage
  logic    [SETS-1:0][WAYS-1:0]             m_valid;
  key_t    [SETS-1:0][WAYS-1:0]             m_key;
  logic    [SETS-1:0][WAYS-1:0][SEQ_W-1:0]  m_seq;
  logic    [SETS-1:0][WAYS-1:0][PWE_W-1:0]  m_pw_entries;
  logic    [SETS-1:0][WAYS-1:0][PWU_W-1:0]  m_pw_uops;
  logic    [SETS-1:0][WAYS-1:0][EU_W-1:0]   m_entry_uops;
  weight_t [SETS-1:0][WAYS-1:0]             m_weight;
  rrpv_t   [SETS-1:0][WAYS-1:0]             m_rrpv;
  entry_t                                   data_mem [SETS*WAYS];

  // ---------------------------------------------------------------- lookup
  logic             lk_active;
  logic [SET_W-1:0] lk_set_q;
  key_t             lk_key_q;
  logic [SEQ_W-1:0] lk_seq_q;
  logic             lk_found_q;
  logic [PWE_W-1:0] lk_entries_q;
  logic [PWU_W-1:0] lk_left_q;
  logic [PWU_W-1:0] lk_served_q;

  logic             lk_accept;
  logic [SET_W-1:0] lka_set;
  key_t             lka_key;
  logic [WAYS-1:0]  lka_pw_ways;   // ways of the looked-up PW
  logic             lka_hit;
  logic [IDX_W-1:0] lka_head;

  assign lk_ready  = !lk_active || rsp_last;
  assign lk_accept = lk_valid && lk_ready;
  assign lka_set   = set_of(lk_addr);
  assign lka_key   = key_of(lk_addr);

  always_comb begin
    lka_hit     = 1'b0;
    lka_head    = '0;
    lka_pw_ways = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (m_valid[lka_set][w] && m_key[lka_set][w] == lka_key) begin
        lka_pw_ways[w] = 1'b1;
        if (m_seq[lka_set][w] == '0 && !lka_hit) begin
          lka_hit  = 1'b1;
          lka_head = IDX_W'(w);
        end
      end
    end
  end

  // current beat
  logic             bt_hit;
  logic [IDX_W-1:0] bt_way;
  logic [PWU_W-1:0] bt_take;
  logic [PWU_W-1:0] bt_served;

  always_comb begin
    bt_hit = 1'b0;
    bt_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!bt_hit && m_valid[lk_set_q][w] && m_key[lk_set_q][w] == lk_key_q &&
          m_seq[lk_set_q][w] == lk_seq_q) begin
        bt_hit = 1'b1;
        bt_way = IDX_W'(w);
      end
    end
    bt_hit  = bt_hit && lk_found_q;
    bt_take = '0;
    if (bt_hit)
      bt_take = (PWU_W'(m_entry_uops[lk_set_q][bt_way]) < lk_left_q) ?
                PWU_W'(m_entry_uops[lk_set_q][bt_way]) : lk_left_q;
    bt_served = lk_served_q + bt_take;

    rsp_valid = lk_active;
    rsp_entry = data_mem[{lk_set_q, bt_way}];
    rsp_nuops = EU_W'(bt_take);
    rsp_last  = lk_active && (!bt_hit || bt_take == lk_left_q ||
                              PWE_W'(lk_seq_q) + PWE_W'(1) >= lk_entries_q);
    if (bt_served == '0 && lk_left_q != '0) rsp_status = LK_MISS;
    else if (bt_take == lk_left_q)          rsp_status = LK_HIT;
    else                                    rsp_status = LK_PARTIAL;
  end

  assign ev_hit     = rsp_last && rsp_status == LK_HIT;
  assign ev_partial = rsp_last && rsp_status == LK_PARTIAL;
  assign ev_miss    = rsp_last && rsp_status == LK_MISS;

  // ---------------------------------------------------------------- insertion
  typedef enum logic [1:0] {I_IDLE, I_CHECK, I_ALLOC, I_WRITE} ins_state_e;
  ins_state_e       ist;
  pw_t              pend;
  logic             first_search;
  logic [SEQ_W-1:0] wr_idx;

  logic [SET_W-1:0] p_set;
  key_t             p_key;
  assign p_set     = set_of(pend.start);
  assign p_key     = key_of(pend.start);
  assign ins_ready = (ist == I_IDLE);

  // set view for the pending PW
  logic [WAYS-1:0]  p_free;
  logic [IDX_W:0]   p_nfree;
  logic [IDX_W-1:0] p_first_free;
  logic             p_dup;
  logic [IDX_W-1:0] p_dup_way;
  logic [WAYS-1:0]  p_same_ways;

  always_comb begin
    p_nfree      = '0;
    p_first_free = '0;
    p_dup        = 1'b0;
    p_dup_way    = '0;
    p_same_ways  = '0;
    for (int unsigned w = WAYS; w > 0; w--) begin
      if (!m_valid[p_set][w-1]) begin
        p_first_free = IDX_W'(w - 1);
        p_nfree      = p_nfree + 1'b1;
      end
    end
    p_free = ~m_valid[p_set];
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (m_valid[p_set][w] && m_key[p_set][w] == p_key) begin
        p_same_ways[w] = 1'b1;
        if (m_seq[p_set][w] == '0 && !p_dup) begin
          p_dup     = 1'b1;
          p_dup_way = IDX_W'(w);
        end
      end
    end
  end

  // FURBYS victim selection for the pending PW's set
  logic [PITFALL_DEPTH-1:0]            pit_valid;
  logic [PITFALL_DEPTH-1:0][IDX_W-1:0] pit_way;
  decision_e                           vs_decision;
  logic [IDX_W-1:0]                    vs_way;
  logic                                vs_degrade, vs_bypass;
  rrpv_t                               vs_age;
  weight_t                             vs_min_weight;

  furbys_victim_select #(.WAYS(WAYS), .DEPTH(PITFALL_DEPTH), .K(K)) u_vsel (
    .way_valid   (m_valid[p_set]),
    .way_weight  (m_weight[p_set]),
    .way_rrpv    (m_rrpv[p_set]),
    .new_weight  (pend.weight),
    .check_bypass(first_search),
    .pit_valid   (pit_valid),
    .pit_way     (pit_way),
    .decision    (vs_decision),
    .victim_way  (vs_way),
    .degrade     (vs_degrade),
    .bypass      (vs_bypass),
    .srrip_age   (vs_age),
    .min_weight  (vs_min_weight)
  );

  logic ins_kill;      // icache evicted the line of the pending PW
  logic need_victim;   // ALLOC cycle that evicts or bypasses
  logic do_write;      // WRITE cycle that stores one entry
  logic [WAYS-1:0] victim_ways;

  assign ins_kill = inv_valid && (ist != I_IDLE) &&
                    (inv_addr[ADDR_W-1:LINE_OFF_W] == pend.start[ADDR_W-1:LINE_OFF_W]);
  assign need_victim = (ist == I_ALLOC) && !ins_kill &&
                       (p_nfree < (IDX_W + 1)'(pend.n_entries));
  assign do_write = (ist == I_WRITE) && !ins_kill;

  always_comb begin
    victim_ways = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (m_valid[p_set][w] && m_key[p_set][w] == m_key[p_set][vs_way]) victim_ways[w] = 1'b1;
  end

  furbys_pitfall_buffer #(.SETS(SETS), .WAYS(WAYS), .DEPTH(PITFALL_DEPTH)) u_pit (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_set    (p_set),
    .rd_valid  (pit_valid),
    .rd_way    (pit_way),
    .wr_en     (need_victim && vs_decision != DEC_BYPASS),
    .wr_set    (p_set),
    .wr_way    (vs_way),
    .wr_restart(vs_decision == DEC_SRRIP)
  );

  assign ev_insert       = do_write && (PWE_W'(wr_idx) + PWE_W'(1) == pend.n_entries);
  assign ev_bypass       = need_victim && vs_decision == DEC_BYPASS;
  assign ev_evict_furbys = need_victim && vs_decision == DEC_FURBYS;
  assign ev_evict_srrip  = need_victim && vs_decision == DEC_SRRIP;
  assign ev_drop_dup     = (ist == I_CHECK) && !ins_kill && p_dup &&
                           m_pw_uops[p_set][p_dup_way] >= pend.n_uops;
  assign ev_supersede    = (ist == I_CHECK) && !ins_kill && p_dup && !ev_drop_dup && !ev_drop_big;
  // a PW with more entries than the set has ways can never be stored
  assign ev_drop_big     = (ist == I_CHECK) && !ins_kill && int'(pend.n_entries) > int'(WAYS);

  // ---------------------------------------------------------------- invalidation
  logic [SET_W-1:0] inv_set;
  logic [WAYS-1:0]  inv_ways;
  assign inv_set = set_of(inv_addr);
  always_comb begin
    inv_ways = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (inv_valid && m_valid[inv_set][w] &&
          m_key[inv_set][w][KEY_W-1:LINE_OFF_W] == inv_addr[ADDR_W-1:LINE_OFF_W+SET_W])
        inv_ways[w] = 1'b1;
  end
  assign ev_inval = |inv_ways;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (do_write) data_mem[{p_set, p_first_free}] <= pend.entries[wr_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid      <= '0;
      m_key        <= '0;
      m_seq        <= '0;
      m_pw_entries <= '0;
      m_pw_uops    <= '0;
      m_entry_uops <= '0;
      m_weight     <= '0;
      m_rrpv       <= '0;
      lk_active    <= 1'b0;
      lk_set_q     <= '0;
      lk_key_q     <= '0;
      lk_seq_q     <= '0;
      lk_found_q   <= 1'b0;
      lk_entries_q <= '0;
      lk_left_q    <= '0;
      lk_served_q  <= '0;
      ist          <= I_IDLE;
      pend         <= '0;
      first_search <= 1'b0;
      wr_idx       <= '0;
    end else begin
      // lookup stream
      if (lk_active) begin
        lk_seq_q    <= lk_seq_q + 1'b1;
        lk_left_q   <= lk_left_q - bt_take;
        lk_served_q <= bt_served;
        if (rsp_last) lk_active <= 1'b0;
      end
      if (lk_accept) begin
        lk_active    <= 1'b1;
        lk_set_q     <= lka_set;
        lk_key_q     <= lka_key;
        lk_seq_q     <= '0;
        lk_found_q   <= lka_hit;
        lk_entries_q <= lka_hit ? m_pw_entries[lka_set][lka_head] : PWE_W'(1);
        lk_left_q    <= lk_uops;
        lk_served_q  <= '0;
        if (lka_hit)
          for (int unsigned w = 0; w < WAYS; w++)
            if (lka_pw_ways[w]) m_rrpv[lka_set][w] <= '0;
      end

      // insertion
      unique case (ist)
        I_IDLE: if (ins_valid) begin
          pend         <= ins_pw;
          first_search <= 1'b1;
          wr_idx       <= '0;
          ist          <= I_CHECK;
        end
        I_CHECK: begin
          if (ins_kill || ev_drop_dup || ev_drop_big) ist <= I_IDLE;
          else begin
            if (ev_supersede) m_valid[p_set] <= m_valid[p_set] & ~p_same_ways;
            ist <= I_ALLOC;
          end
        end
        I_ALLOC: begin
          if (ins_kill) ist <= I_IDLE;
          else if (!need_victim) ist <= I_WRITE;
          else begin
            first_search <= 1'b0;
            if (vs_decision == DEC_BYPASS) ist <= I_IDLE;
            else begin
              m_valid[p_set] <= m_valid[p_set] & ~victim_ways;
              if (vs_decision == DEC_SRRIP)
                for (int unsigned w = 0; w < WAYS; w++)
                  if (m_valid[p_set][w]) m_rrpv[p_set][w] <= m_rrpv[p_set][w] + vs_age;
            end
          end
        end
        I_WRITE: begin
          if (ins_kill) ist <= I_IDLE;
          else begin
            m_valid[p_set][p_first_free]      <= 1'b1;
            m_key[p_set][p_first_free]        <= p_key;
            m_seq[p_set][p_first_free]        <= wr_idx;
            m_pw_entries[p_set][p_first_free] <= pend.n_entries;
            m_pw_uops[p_set][p_first_free]    <= pend.n_uops;
            m_entry_uops[p_set][p_first_free] <= pend.entry_uops[wr_idx];
            m_weight[p_set][p_first_free]     <= pend.weight;
            m_rrpv[p_set][p_first_free]       <= RRPV_INSERT;
            wr_idx <= wr_idx + 1'b1;
            if (ev_insert) ist <= I_IDLE;
          end
        end
        default: ist <= I_IDLE;
      endcase

      // icache inclusion: the evicted line's PWs leave the cache
      if (inv_valid)
        m_valid[inv_set] <= m_valid[inv_set] & ~inv_ways;
    end
  end

  // ---------------------------------------------------------------- checks
  // A PW to insert is non-empty and within the entry cap.
  assert property (@(posedge clk) disable iff (!rst_n)
    ins_valid && ins_ready |-> ins_pw.n_entries != '0 &&
                               int'(ins_pw.n_entries) <= int'(MAX_PW_ENTRIES));
  // WRITE is only entered with a free way available.
  assert property (@(posedge clk) disable iff (!rst_n) do_write |-> p_free != '0);

endmodule
