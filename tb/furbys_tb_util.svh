// Shared testbench helpers for the micro-op cache: the deterministic
// payload of a test prediction window and its packing into entries.
`ifndef FURBYS_TB_UTIL_SVH
`define FURBYS_TB_UTIL_SVH

// Micro-op j of the PW starting at s.
function automatic logic [furbys_pkg::UOP_W-1:0] tb_uop(furbys_pkg::addr_t s, int j);
  return {s[31:0], 8'(j), 16'hC0DE};
endfunction

// A PW of n micro-ops (n <= 32), 8 per entry, no immediates.
function automatic furbys_pkg::pw_t tb_make_pw(furbys_pkg::addr_t s, furbys_pkg::weight_t w, int n);
  furbys_pkg::pw_t p;
  p = '0;
  p.start  = s;
  p.weight = w;
  p.n_uops = furbys_pkg::PWU_W'(n);
  p.n_entries = furbys_pkg::PWE_W'((n + 7) / 8);
  for (int j = 0; j < n; j++) begin
    p.entries[j / 8].uops[j % 8] = tb_uop(s, j);
    p.entry_uops[j / 8] = furbys_pkg::EU_W'((j % 8) + 1);
  end
  return p;
endfunction

`endif
