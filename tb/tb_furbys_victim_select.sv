// tb_furbys_victim_select: checks the FURBYS decision (FURBYS victim, SRRIP
// victim after a local pitfall, or bypass) against a reference written
// directly from the policy rules, on directed cases and random sets.
module tb_furbys_victim_select;
  import furbys_pkg::*;
  localparam int unsigned WAYS = 8, DEPTH = 2, K = 1;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WAYS-1:0]         way_valid;
  weight_t [WAYS-1:0]      way_weight;
  rrpv_t   [WAYS-1:0]      way_rrpv;
  weight_t                 new_weight;
  logic                    check_bypass;
  logic [DEPTH-1:0]        pit_valid;
  logic [DEPTH-1:0][2:0]   pit_way;
  decision_e               decision;
  logic [2:0]              victim_way;
  logic                    degrade, bypass;
  rrpv_t                   srrip_age;
  weight_t                 min_weight;
  int checks = 0, failures = 0;

  furbys_victim_select #(.WAYS(WAYS), .DEPTH(DEPTH), .K(K)) dut (.*);

  task automatic check_one(string tag);
    int mw, mi, xr, xi, exp_dec, exp_way, exp_age;
    bit byp, deg;
    mw = 99; mi = 0; xr = -1; xi = 0;
    for (int i = 0; i < WAYS; i++) if (way_valid[i]) begin
      if (int'(way_weight[i]) < mw) begin mw = way_weight[i]; mi = i; end
      if (int'(way_rrpv[i]) > xr)   begin xr = way_rrpv[i];   xi = i; end
    end
    byp = check_bypass && (mw != 99) && (int'(new_weight) < mw - int'(K));
    deg = 0;
    for (int d = 0; d < DEPTH; d++) if (pit_valid[d] && int'(pit_way[d]) == mi) deg = 1;
    exp_dec = byp ? 2 : (deg ? 1 : 0);
    exp_way = (exp_dec == 1) ? xi : mi;
    exp_age = (xr < 0) ? 0 : 3 - xr;
    #1;
    checks++;
    if (int'(decision) != exp_dec || (exp_dec != 2 && int'(victim_way) != exp_way) ||
        int'(srrip_age) != exp_age || bypass != byp || degrade != deg) begin
      failures++;
      $display("FAIL %s: dec %0d way %0d age %0d, expected dec %0d way %0d age %0d",
               tag, decision, victim_way, srrip_age, exp_dec, exp_way, exp_age);
    end
  endtask

  task automatic expect_dec(decision_e d, int way, string tag);
    checks++;
    if (decision != d || (d != DEC_BYPASS && int'(victim_way) != way)) begin
      failures++;
      $display("FAIL %s: got %s way %0d", tag, decision.name(), victim_way);
    end
  endtask

  initial begin
    // Local-pitfall scenario: A(1) B(7) C(7) D(5) in ways 0-3, rest empty.
    way_valid  = 8'b0000_1111;
    way_weight = '0; way_weight[0] = 1; way_weight[1] = 7; way_weight[2] = 7; way_weight[3] = 5;
    way_rrpv   = '0; way_rrpv[0] = 0; way_rrpv[1] = 2; way_rrpv[2] = 1; way_rrpv[3] = 2;
    pit_valid  = '0; pit_way = '0;
    check_bypass = 1'b1;
    new_weight = 2;  #1; expect_dec(DEC_FURBYS, 0, "I(2) evicts coldest A");
    new_weight = 0;  #1; expect_dec(DEC_FURBYS, 0, "weight 0 vs min 1: 0 < 1-1 is false");
    way_weight[0] = 2;
    new_weight = 0;  #1; expect_dec(DEC_BYPASS, 0, "weight 0 vs min 2: bypass");
    check_bypass = 1'b0; #1; expect_dec(DEC_FURBYS, 0, "bypass disabled");
    check_bypass = 1'b1;
    new_weight = 1;  #1; expect_dec(DEC_FURBYS, 0, "weight 1 vs min 2: insert");
    // way 0 was evicted last time: choosing it again degrades to SRRIP
    pit_valid = 2'b01; pit_way[0] = 0;
    #1; expect_dec(DEC_SRRIP, 1, "repeat victim degrades to SRRIP (max RRPV way 1)");
    pit_valid = 2'b10; pit_way[1] = 0; pit_way[0] = 5;
    #1; expect_dec(DEC_SRRIP, 1, "older slot also counts");
    pit_valid = 2'b11; pit_way[1] = 4; pit_way[0] = 5;
    #1; expect_dec(DEC_FURBYS, 0, "no match: FURBYS");
    check_one("directed");

    repeat (3000) begin
      @(posedge clk);
      way_valid    = WAYS'($urandom);
      way_weight   = 24'($urandom);
      way_rrpv     = 16'($urandom);
      new_weight   = 3'($urandom);
      check_bypass = 1'($urandom);
      pit_valid    = 2'($urandom);
      pit_way      = 6'($urandom);
      check_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
