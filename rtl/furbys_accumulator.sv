// furbys_accumulator: the accumulation buffer between the legacy decode
// pipeline and the micro-op cache.
//
// Decoded micro-ops arrive one per cycle on the dec_* port. The first
// micro-op after a finished PW opens a new PW and supplies its start address
// (dec_addr). Micro-ops are packed in order into entries of 8 micro-ops and
// 4 immediates; a micro-op that would overflow either starts the next entry.
// dec_last marks the micro-op that ends the PW (a predicted-taken branch or
// the last instruction of the 64-byte line; the decoder decides).
//
// FURBYS hint handling: the decoder reports a weight hint with a micro-op
// (dec_group_valid/dec_group). The accumulator keeps the first hint seen in
// the PW and passes it with the PW to the cache; a PW without a hint gets
// DEFAULT_WEIGHT (this design's choice).
//
// A finished PW is held in an output register (pw_valid/pw_ready handshake,
// pw held stable while valid and not ready). dec_ready drops only while that
// register is full and not being taken. A PW larger than MAX_PW_ENTRIES
// entries cannot be stored: it is dropped and overflow pulses for one cycle
// when its last micro-op arrives (this design's choice).
module furbys_accumulator
  import furbys_pkg::*;
#(
  parameter weight_t DEFAULT_WEIGHT = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the decoder
  input  logic              dec_valid,
  output logic              dec_ready,
  input  addr_t             dec_addr,        // start address, used on a PW's first uop
  input  logic [UOP_W-1:0]  dec_uop,
  input  logic              dec_has_imm,
  input  logic [IMM_W-1:0]  dec_imm,
  input  logic              dec_last,
  input  logic              dec_group_valid,
  input  weight_t           dec_group,
  // to the micro-op cache
  output logic              pw_valid,
  input  logic              pw_ready,
  output pw_t               pw,
  output logic              overflow
);

  pw_t              acc;          // PW under construction
  logic             open_q;       // a PW is being accumulated
  logic             hint_q;       // acc.weight came from a hint
  logic             ovf_q;        // acc has already overflowed
  logic [SEQ_W-1:0] cur;          // entry being filled
  logic [EI_W-1:0]  cur_imms;     // immediates used in that entry

  logic accept;
  assign dec_ready = !(pw_valid && !pw_ready);
  assign accept    = dec_valid && dec_ready;

  // Where the incoming micro-op goes.
  logic             need_new;     // starts a fresh entry
  logic [PWE_W-1:0] slot_entry;   // entry index (may be MAX_PW_ENTRIES = overflow)
  logic [EU_W-1:0]  slot_uop;
  logic [EI_W-1:0]  slot_imm;
  logic             fits;

  always_comb begin
    if (!open_q) begin
      need_new   = 1'b1;
      slot_entry = '0;
    end else begin
      need_new = (acc.entry_uops[cur] == EU_W'(UOPS_PER_ENTRY)) ||
                 (dec_has_imm && cur_imms == EI_W'(IMMS_PER_ENTRY));
      slot_entry = PWE_W'(cur) + (need_new ? PWE_W'(1) : PWE_W'(0));
    end
    slot_uop = need_new ? '0 : acc.entry_uops[cur];
    slot_imm = need_new ? '0 : cur_imms;
    fits     = !ovf_q && (slot_entry < PWE_W'(MAX_PW_ENTRIES));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      open_q   <= 1'b0;
      hint_q   <= 1'b0;
      ovf_q    <= 1'b0;
      cur      <= '0;
      cur_imms <= '0;
      pw_valid <= 1'b0;
      pw       <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (pw_valid && pw_ready) pw_valid <= 1'b0;

      if (accept) begin
        pw_t nxt;
        logic nxt_hint;
        nxt      = open_q ? acc : '0;
        nxt_hint = open_q && hint_q;
        if (!open_q) begin
          nxt.start  = dec_addr;
          nxt.weight = DEFAULT_WEIGHT;
        end
        if (dec_group_valid && !nxt_hint) begin
          nxt.weight = dec_group;
          nxt_hint   = 1'b1;
        end
        if (fits) begin
          nxt.entries[slot_entry[SEQ_W-1:0]].uops[slot_uop[EU_W-2:0]] = dec_uop;
          if (dec_has_imm)
            nxt.entries[slot_entry[SEQ_W-1:0]].imms[slot_imm[EI_W-2:0]] = dec_imm;
          nxt.entry_uops[slot_entry[SEQ_W-1:0]] = slot_uop + EU_W'(1);
          nxt.n_entries = slot_entry + PWE_W'(1);
          nxt.n_uops    = nxt.n_uops + PWU_W'(1);
        end

        if (dec_last) begin
          open_q <= 1'b0;
          hint_q <= 1'b0;
          ovf_q  <= 1'b0;
          cur    <= '0;
          acc    <= '0;
          if (fits) begin
            pw       <= nxt;
            pw_valid <= 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end else begin
          open_q   <= 1'b1;
          hint_q   <= nxt_hint;
          ovf_q    <= !fits;
          acc      <= nxt;
          if (fits) begin
            cur      <= slot_entry[SEQ_W-1:0];
            cur_imms <= slot_imm + (dec_has_imm ? EI_W'(1) : EI_W'(0));
          end
        end
      end
    end
  end

endmodule
