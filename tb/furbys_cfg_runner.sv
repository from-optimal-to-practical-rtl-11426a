// furbys_cfg_runner: runs a synthetic prediction-window stream through one
// furbys_frontend_top of a given size and associativity, and reports the
// outcome on its ports. Used by tb_furbys_config_sweep to cover the cache
// sizes and associativities of the sensitivity study.
//
// The stream: 6*WAYS PWs crowded into two sets, skewed reuse, short and
// long variants of each PW, random weights, decoding on misses. Every
// delivered micro-op is checked; hits, evictions (FURBYS or SRRIP) and
// bypasses must all occur. With fewer than 4 ways some PWs are larger than
// a set and must be dropped (ev_drop_big).
`include "furbys_tb_util.svh"
module furbys_cfg_runner
  import furbys_pkg::*;
#(
  parameter int unsigned SETS     = 64,
  parameter int unsigned WAYS     = 8,
  parameter int          N_ACCESS = 1500
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int SET_W = $clog2(SETS);
  localparam int N_PW  = 6 * int'(WAYS);

  logic             rst_n;
  logic             dec_valid, dec_ready;
  addr_t            dec_addr;
  logic [UOP_W-1:0] dec_uop;
  logic             dec_has_imm;
  logic [IMM_W-1:0] dec_imm;
  logic             dec_last;
  logic             dec_group_valid;
  weight_t          dec_group;
  logic             lk_valid, lk_ready;
  addr_t            lk_addr;
  logic [PWU_W-1:0] lk_uops;
  logic             rsp_valid;
  entry_t           rsp_entry;
  logic [EU_W-1:0]  rsp_nuops;
  logic             rsp_last;
  lookup_status_e   rsp_status;
  logic             inv_valid;
  addr_t            inv_addr;
  logic ev_hit, ev_partial, ev_miss, ev_insert, ev_bypass, ev_evict_furbys, ev_evict_srrip,
        ev_drop_dup, ev_supersede, ev_drop_big, ev_inval, ev_pw_overflow;

  furbys_frontend_top #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  int c_hit = 0, c_evict = 0, c_bypass = 0, c_big = 0, c_insert = 0;
  always @(posedge clk) if (rst_n) begin
    c_hit += int'(ev_hit); c_evict += int'(ev_evict_furbys) + int'(ev_evict_srrip);
    c_bypass += int'(ev_bypass); c_big += int'(ev_drop_big); c_insert += int'(ev_insert);
  end

  addr_t pw_start [N_PW];
  int    pw_short [N_PW];
  int    pw_long  [N_PW];
  int    pw_w     [N_PW];

  task automatic decode(addr_t s, int w, int n);
    for (int j = 0; j < n; j++) begin
      dec_valid = 1'b1; dec_addr = s; dec_uop = tb_uop(s, j);
      dec_has_imm = 1'b0; dec_imm = '0; dec_last = (j == n - 1);
      dec_group_valid = (j == 0); dec_group = 3'(w);
      @(posedge clk);
      while (!dec_ready) @(posedge clk);
      #1;
    end
    dec_valid = 1'b0; dec_last = 1'b0; dec_group_valid = 1'b0;
  endtask

  task automatic access(addr_t s, int n, output lookup_status_e st);
    int served;
    lk_addr = s; lk_uops = PWU_W'(n); lk_valid = 1'b1;
    while (!lk_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    lk_valid = 1'b0;
    served = 0;
    forever begin
      checks++;
      if (!rsp_valid) begin failures++; $display("FAIL %0dx%0d: no beat", SETS, WAYS); st = LK_MISS; break; end
      for (int u = 0; u < int'(rsp_nuops); u++)
        if (rsp_entry.uops[u] != tb_uop(s, served + u)) begin
          failures++; $display("FAIL %0dx%0d: wrong micro-op", SETS, WAYS); break;
        end
      served += int'(rsp_nuops);
      if (rsp_last) begin
        st = rsp_status;
        checks++;
        if ((st == LK_HIT) != (served == n)) begin
          failures++; $display("FAIL %0dx%0d: %s with %0d of %0d", SETS, WAYS, st.name(), served, n);
        end
        break;
      end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    lookup_status_e st;
    int i, n;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; dec_valid = 1'b0; dec_addr = '0; dec_uop = '0; dec_has_imm = 1'b0; dec_imm = '0;
    dec_last = 1'b0; dec_group_valid = 1'b0; dec_group = '0; lk_valid = 1'b0; lk_addr = '0;
    lk_uops = '0; inv_valid = 1'b0; inv_addr = '0;
    for (int p = 0; p < N_PW; p++) begin
      addr_t a;
      a = '0;
      a[LINE_OFF_W +: SET_W] = SET_W'(1 + (p % 2) * (SETS / 2));
      a[ADDR_W-1:LINE_OFF_W+SET_W] = (ADDR_W - LINE_OFF_W - SET_W)'(50 + p);
      a[3:0] = 4'($urandom);
      pw_start[p] = a;
      pw_short[p] = 1 + int'($urandom % 10);
      pw_long[p]  = pw_short[p] + 1 + int'($urandom % 20);
      pw_w[p]     = int'($urandom % 8);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < N_ACCESS; a++) begin
      i = ($urandom % 3 != 0) ? int'($urandom % (N_PW / 3)) : int'($urandom % N_PW);
      n = ($urandom % 4 == 0) ? pw_long[i] : pw_short[i];
      access(pw_start[i], n, st);
      if (st != LK_HIT) decode(pw_start[i], pw_w[i], n);
    end
    repeat (20) @(posedge clk);
    checks++; if (c_hit == 0)    begin failures++; $display("FAIL %0dx%0d: no hit", SETS, WAYS); end
    checks++; if (c_evict == 0)  begin failures++; $display("FAIL %0dx%0d: no eviction", SETS, WAYS); end
    checks++; if (c_bypass == 0) begin failures++; $display("FAIL %0dx%0d: no bypass", SETS, WAYS); end
    checks++; if ((WAYS < 4) != (c_big > 0)) begin failures++; $display("FAIL %0dx%0d: oversize drops %0d", SETS, WAYS, c_big); end
    $display("%0d sets x %0d ways: hits %0d, inserts %0d, evictions %0d, bypasses %0d, oversize drops %0d",
             SETS, WAYS, c_hit, c_insert, c_evict, c_bypass, c_big);
    done = 1'b1;
  end
endmodule
