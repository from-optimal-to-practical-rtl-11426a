// tb_furbys_frontend_top: end-to-end run of the micro-op cache frontend at
// its default size (64 sets x 8 ways, no parameter overrides).
//
// A synthetic program of prediction windows (PWs) is executed: each access
// looks the PW up; on a miss or partial hit the testbench plays the legacy
// decoder and sends the PW's micro-ops, with the PW's static weight hint,
// through the accumulation buffer, which inserts it while later lookups go
// on. Each PW start has a short and a long variant (a not-taken branch
// inside), so intermediate-exit hits, partial hits and superseding happen.
// The PWs crowd a few sets so the FURBYS policy must evict, degrade to
// SRRIP and bypass; icache line evictions arrive now and then. Every
// micro-op a hit delivers is compared with what was decoded for that
// address, every mechanism must occur at least once, and the lookup
// latency (first beat one cycle after the request) is checked.
`include "furbys_tb_util.svh"
module tb_furbys_frontend_top;
  import furbys_pkg::*;
  localparam int N_PW       = 120;   // distinct PW start addresses
  localparam int N_SETS_USED = 6;
  localparam int N_ACCESS   = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

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

  furbys_frontend_top dut (.*);

  int checks = 0, failures = 0;
  int c_hit = 0, c_partial = 0, c_miss = 0, c_insert = 0, c_bypass = 0, c_furbys = 0, c_srrip = 0,
      c_dup = 0, c_sup = 0, c_big = 0, c_inval = 0, c_ovf = 0, c_exit_hit = 0, c_dec_stall = 0;
  always @(posedge clk) if (rst_n) begin
    c_hit += int'(ev_hit); c_partial += int'(ev_partial); c_miss += int'(ev_miss);
    c_insert += int'(ev_insert); c_bypass += int'(ev_bypass); c_furbys += int'(ev_evict_furbys);
    c_srrip += int'(ev_evict_srrip); c_dup += int'(ev_drop_dup); c_sup += int'(ev_supersede); c_big += int'(ev_drop_big);
    c_inval += int'(ev_inval); c_ovf += int'(ev_pw_overflow);
    c_dec_stall += int'(dec_valid && !dec_ready);
  end

  addr_t pw_start [N_PW];
  int    pw_short [N_PW];
  int    pw_long  [N_PW];
  int    pw_w     [N_PW];

  // Legacy decode of n micro-ops of the PW at s, hint w on the last one.
  task automatic decode(addr_t s, int w, int n);
    for (int j = 0; j < n; j++) begin
      dec_valid = 1'b1; dec_addr = s; dec_uop = tb_uop(s, j);
      dec_has_imm = 1'b0; dec_imm = '0; dec_last = (j == n - 1);
      dec_group_valid = (j == n - 1); dec_group = 3'(w);
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
      if (!rsp_valid) begin failures++; $display("FAIL no beat one cycle on for %h", s); st = LK_MISS; break; end
      for (int u = 0; u < int'(rsp_nuops); u++)
        if (rsp_entry.uops[u] != tb_uop(s, served + u)) begin
          failures++; $display("FAIL wrong micro-op %0d for %h", served + u, s); break;
        end
      served += int'(rsp_nuops);
      if (rsp_last) begin
        st = rsp_status;
        checks++;
        if ((st == LK_HIT && served != n) || (st == LK_PARTIAL && (served == 0 || served >= n)) ||
            (st == LK_MISS && served != 0)) begin
          failures++; $display("FAIL status %s with %0d of %0d uops", st.name(), served, n);
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
    rst_n = 1'b0; dec_valid = 1'b0; dec_addr = '0; dec_uop = '0; dec_has_imm = 1'b0; dec_imm = '0;
    dec_last = 1'b0; dec_group_valid = 1'b0; dec_group = '0; lk_valid = 1'b0; lk_addr = '0;
    lk_uops = '0; inv_valid = 1'b0; inv_addr = '0;
    for (int p = 0; p < N_PW; p++) begin
      pw_start[p] = {36'(100 + p), 6'(3 + 7 * (p % N_SETS_USED)), 6'(4 * ($urandom % 8))};
      pw_short[p] = 1 + int'($urandom % 12);
      pw_long[p]  = pw_short[p] + 1 + int'($urandom % 16);
      pw_w[p]     = int'($urandom % 8);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    decode({36'hFFF, 6'd1, 6'd0}, 4, 40);       // too large for 4 entries
    for (int a = 0; a < N_ACCESS; a++) begin
      // skewed reuse: a hot third of the PWs gets most accesses
      i = ($urandom % 3 != 0) ? int'($urandom % (N_PW / 3)) : int'($urandom % N_PW);
      n = ($urandom % 4 == 0) ? pw_long[i] : pw_short[i];
      access(pw_start[i], n, st);
      if (st == LK_HIT && n < pw_long[i]) c_exit_hit++;
      if (st != LK_HIT) begin
        decode(pw_start[i], pw_w[i], n);
        if (a % 97 == 0) decode(pw_start[i], pw_w[i], n);   // refetched before insertion ends
      end
      if (a % 211 == 0) begin
        inv_addr = pw_start[int'($urandom % N_PW)]; inv_valid = 1'b1;
        @(posedge clk); #1 inv_valid = 1'b0;
      end
    end
    repeat (20) @(posedge clk);

    $display("hits %0d (of which exit-point %0d), partial %0d, miss %0d", c_hit, c_exit_hit, c_partial, c_miss);
    $display("inserts %0d, bypass %0d, furbys evictions %0d, srrip evictions %0d, dup drops %0d, supersedes %0d, invalidations %0d, overflows %0d, decode stalls %0d",
             c_insert, c_bypass, c_furbys, c_srrip, c_dup, c_sup, c_inval, c_ovf, c_dec_stall);
    checks++; if (c_hit + c_partial + c_miss != N_ACCESS) begin failures++; $display("FAIL lookups lost"); end
    checks++; if (c_hit == 0)      begin failures++; $display("FAIL no hit"); end
    checks++; if (c_exit_hit == 0) begin failures++; $display("FAIL no intermediate-exit hit"); end
    checks++; if (c_partial == 0)  begin failures++; $display("FAIL no partial hit"); end
    checks++; if (c_miss == 0)     begin failures++; $display("FAIL no miss"); end
    checks++; if (c_insert == 0)   begin failures++; $display("FAIL no insertion"); end
    checks++; if (c_bypass == 0)   begin failures++; $display("FAIL no bypass"); end
    checks++; if (c_furbys == 0)   begin failures++; $display("FAIL no FURBYS eviction"); end
    checks++; if (c_srrip == 0)    begin failures++; $display("FAIL no SRRIP degradation"); end
    checks++; if (c_dup == 0)      begin failures++; $display("FAIL no duplicate drop"); end
    checks++; if (c_sup == 0)      begin failures++; $display("FAIL no supersede"); end
    checks++; if (c_inval == 0)    begin failures++; $display("FAIL no invalidation"); end
    checks++; if (c_big != 0)      begin failures++; $display("FAIL PW dropped as too big for 8 ways"); end
    checks++; if (c_ovf != 1)      begin failures++; $display("FAIL overflow count %0d", c_ovf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
