// tb_furbys_uop_cache: directed scenarios for the FURBYS micro-op cache at
// its full 64-set, 8-way size. Each scenario works out by hand what the
// policy must do and checks it through lookups and event pulses:
//   hits, intermediate-exit hits, partial hits and misses, with the lookup
//   latency (first beat one cycle after the request, one entry per cycle);
//   keeping the larger of two same-start windows; eviction of the coldest
//   PW; degradation to SRRIP when the same way would be evicted twice;
//   bypass when the new weight is below the set minimum minus K; eviction of
//   a multi-entry PW as a whole; several victims for one insertion;
//   icache-inclusion invalidation.
`include "furbys_tb_util.svh"
module tb_furbys_uop_cache;
  import furbys_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic            lk_valid, lk_ready;
  addr_t           lk_addr;
  logic [PWU_W-1:0] lk_uops;
  logic            rsp_valid;
  entry_t          rsp_entry;
  logic [EU_W-1:0] rsp_nuops;
  logic            rsp_last;
  lookup_status_e  rsp_status;
  logic            ins_valid, ins_ready;
  pw_t             ins_pw;
  logic            inv_valid;
  addr_t           inv_addr;
  logic ev_hit, ev_partial, ev_miss, ev_insert, ev_bypass, ev_evict_furbys, ev_evict_srrip,
        ev_drop_dup, ev_supersede, ev_drop_big, ev_inval;

  furbys_uop_cache dut (.*);

  int checks = 0, failures = 0;
  int c_insert = 0, c_bypass = 0, c_furbys = 0, c_srrip = 0, c_dup = 0, c_sup = 0, c_inval = 0;
  always @(posedge clk) if (rst_n) begin
    c_insert += int'(ev_insert); c_bypass += int'(ev_bypass); c_furbys += int'(ev_evict_furbys);
    c_srrip += int'(ev_evict_srrip); c_dup += int'(ev_drop_dup); c_sup += int'(ev_supersede);
    c_inval += int'(ev_inval);
  end

  function automatic addr_t A(int tag, int set, int off = 0);
    return {36'(tag), 6'(set), 6'(off)};
  endfunction

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic insert(addr_t s, int w, int n);
    ins_pw = tb_make_pw(s, 3'(w), n);
    ins_valid = 1'b1;
    @(posedge clk);
    while (!ins_ready) @(posedge clk);
    #1 ins_valid = 1'b0;
    @(posedge clk);
    while (!ins_ready) @(posedge clk);
    #1;
  endtask

  // Look up (s, n); return status and micro-ops served; check payload and timing.
  task automatic lookup(addr_t s, int n, output lookup_status_e st, output int served);
    int beats, cyc;
    lk_addr = s; lk_uops = PWU_W'(n); lk_valid = 1'b1;
    while (!lk_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    lk_valid = 1'b0;
    served = 0; beats = 0; cyc = 0;
    forever begin
      checks++;
      if (!rsp_valid) begin failures++; $display("FAIL no response beat %0d for %h", beats, s); break; end
      for (int u = 0; u < int'(rsp_nuops); u++)
        if (rsp_entry.uops[u] != tb_uop(s, served + u)) begin
          failures++; $display("FAIL payload %h uop %0d", s, served + u); break;
        end
      served += int'(rsp_nuops);
      beats++;
      if (rsp_last) begin st = rsp_status; break; end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    // one beat per entry delivered, at least one beat
    expect_eq(beats, (served == 0) ? 1 : (served + 7) / 8, "beats = entries delivered");
  endtask

  task automatic expect_lookup(addr_t s, int n, lookup_status_e est, int eserved, string what);
    lookup_status_e st;
    int served;
    lookup(s, n, st, served);
    checks++;
    if (st != est || served != eserved) begin
      failures++; $display("FAIL %s: %s/%0d expected %s/%0d", what, st.name(), served, est.name(), eserved);
    end
  endtask

  int f0, s0, b0;

  initial begin
    rst_n = 1'b0; lk_valid = 1'b0; lk_addr = '0; lk_uops = '0; ins_valid = 1'b0; ins_pw = '0;
    inv_valid = 1'b0; inv_addr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // --- lookup outcomes
    expect_lookup(A(1, 5), 4, LK_MISS, 0, "empty cache misses");
    insert(A(1, 5), 3, 5);
    expect_lookup(A(1, 5), 5, LK_HIT, 5, "full hit");
    expect_lookup(A(1, 5), 3, LK_HIT, 3, "smaller window served from the larger (exit point)");
    expect_lookup(A(1, 5), 12, LK_PARTIAL, 5, "larger window: partial hit");
    expect_lookup(A(1, 5, 4), 2, LK_MISS, 0, "other start address in the same line misses");
    insert(A(2, 5), 3, 20);
    expect_lookup(A(2, 5), 20, LK_HIT, 20, "3-entry PW streams 3 beats");
    expect_lookup(A(2, 5), 9, LK_HIT, 9, "exit point in the second entry");

    // --- same start address: keep the larger window
    insert(A(1, 5), 3, 12);
    expect_eq(c_sup, 1, "larger same-start window supersedes");
    expect_lookup(A(1, 5), 12, LK_HIT, 12, "larger window now hits");
    insert(A(1, 5), 3, 4);
    expect_eq(c_dup, 1, "smaller same-start window is dropped");
    expect_lookup(A(1, 5), 12, LK_HIT, 12, "larger window kept");

    // --- FURBYS victim and local pitfall (set 9): weights 1,7,7,5,6,6,6,6
    insert(A(10, 9), 1, 4);
    insert(A(11, 9), 7, 4);
    insert(A(12, 9), 7, 4);
    insert(A(13, 9), 5, 4);
    for (int t = 14; t < 18; t++) insert(A(t, 9), 6, 4);
    expect_eq(c_furbys + c_srrip + c_bypass, 0, "8 PWs fill 8 ways without eviction");
    insert(A(20, 9), 2, 4);   // PW I(2): the coldest, A(1) in way 0, is evicted
    expect_eq(c_furbys, 1, "FURBYS eviction");
    expect_lookup(A(10, 9), 4, LK_MISS, 0, "coldest PW evicted");
    expect_lookup(A(20, 9), 4, LK_HIT, 4, "new PW inserted");   // its RRPV becomes 0
    expect_lookup(A(11, 9), 4, LK_HIT, 4, "hot PW kept");       // way 1 RRPV 0
    insert(A(10, 9), 1, 4);   // A(1) again: min is I(2) in way 0 -> same way twice -> SRRIP
    expect_eq(c_srrip, 1, "degrade to SRRIP");
    expect_eq(c_bypass, 0, "1 is not below 2 - K");
    expect_lookup(A(20, 9), 4, LK_HIT, 4, "I survives (RRPV 0)");
    expect_lookup(A(11, 9), 4, LK_HIT, 4, "B survives (RRPV 0)");
    expect_lookup(A(12, 9), 4, LK_MISS, 0, "SRRIP victim: first way at max RRPV (way 2)");
    expect_lookup(A(10, 9), 4, LK_HIT, 4, "A inserted");

    // --- bypass (set 10): weights all >= 3
    for (int t = 30; t < 38; t++) insert(A(t, 10), 3 + (t % 5), 8);
    f0 = c_furbys; b0 = c_bypass;
    insert(A(40, 10), 0, 8);
    insert(A(41, 10), 1, 8);
    expect_eq(c_bypass - b0, 2, "weights 0 and 1 bypassed (below 3 - 1)");
    expect_lookup(A(40, 10), 8, LK_MISS, 0, "bypassed PW absent");
    insert(A(42, 10), 2, 8);
    expect_eq(c_bypass - b0, 2, "weight 2 not bypassed");
    expect_eq(c_furbys - f0, 1, "weight 2 evicts the coldest");
    expect_lookup(A(42, 10), 8, LK_HIT, 8, "weight 2 inserted");

    // --- multi-entry PW evicted whole, several victims (set 12)
    insert(A(50, 12), 1, 24);                    // 3 entries, weight 1
    for (int t = 51; t < 56; t++) insert(A(t, 12), 5, 3);
    f0 = c_furbys;
    insert(A(60, 12), 6, 1);
    expect_eq(c_furbys - f0, 1, "one victim frees a 3-entry PW");
    expect_lookup(A(50, 12), 24, LK_MISS, 0, "all entries of the victim PW gone");
    insert(A(61, 12), 6, 1);
    insert(A(62, 12), 6, 1);
    expect_eq(c_furbys - f0, 1, "two freed ways reused without eviction");
    f0 = c_furbys;
    insert(A(63, 12), 7, 17);                    // 3 entries: three weight-5 victims
    expect_eq(c_furbys - f0, 3, "three victims for a 3-entry PW");
    expect_lookup(A(63, 12), 17, LK_HIT, 17, "3-entry PW inserted");

    // --- icache inclusion
    insert(A(70, 20, 8), 4, 6);
    insert(A(70, 20, 40), 4, 6);
    insert(A(71, 20, 8), 4, 6);
    inv_addr = A(70, 20, 17); inv_valid = 1'b1;
    @(posedge clk); #1 inv_valid = 1'b0;
    expect_eq(c_inval, 1, "invalidation event");
    expect_lookup(A(70, 20, 8), 6, LK_MISS, 0, "line evicted from icache: PW gone");
    expect_lookup(A(70, 20, 40), 6, LK_MISS, 0, "second PW of that line gone");
    expect_lookup(A(71, 20, 8), 6, LK_HIT, 6, "other line kept");

    expect_eq(c_insert, 35, "insertions completed");
    $display("events: insert %0d bypass %0d furbys %0d srrip %0d dup %0d supersede %0d inval %0d",
             c_insert, c_bypass, c_furbys, c_srrip, c_dup, c_sup, c_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
