// tb_furbys_accumulator: feeds random prediction windows (random length,
// immediates and weight hints) through the accumulation buffer with random
// back-pressure, and compares every PW it hands out -- start address,
// weight, entry count, micro-op counts and payload -- with a reference
// packing done in the testbench. PWs too large for MAX_PW_ENTRIES entries
// must be dropped with an overflow pulse.
module tb_furbys_accumulator;
  import furbys_pkg::*;
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
  logic             pw_valid, pw_ready;
  pw_t              pw;
  logic             overflow;
  int checks = 0, failures = 0;
  int n_pw_out = 0, n_ovf = 0, exp_ovf = 0, n_hint_default = 0, n_imm_split = 0;

  furbys_accumulator #(.DEFAULT_WEIGHT(3'd0)) dut (.*);

  pw_t exp_q[$];

  // Build one random PW, drive it, and queue its expected packing.
  task automatic send_pw(int n);
    pw_t e;
    int ent, u, im;
    bit hinted;
    e = '0;
    e.start = {$urandom, $urandom};
    e.weight = 3'd0;
    hinted = 0; ent = 0; u = 0; im = 0;
    for (int k = 0; k < n; k++) begin
      logic [UOP_W-1:0] uop;
      logic [IMM_W-1:0] imm;
      bit has_imm, gv;
      weight_t g;
      uop = {$urandom, $urandom}; imm = $urandom;
      has_imm = ($urandom % 3) == 0;
      gv = ($urandom % 6) == 0;
      g = 3'($urandom);
      if (k > 0 && (u == UOPS_PER_ENTRY || (has_imm && im == IMMS_PER_ENTRY))) begin
        if (u != UOPS_PER_ENTRY) n_imm_split++;
        ent++; u = 0; im = 0;
      end
      if (ent < MAX_PW_ENTRIES) begin
        e.entries[ent].uops[u] = uop;
        if (has_imm) e.entries[ent].imms[im] = imm;
        e.entry_uops[ent] = EU_W'(u + 1);
      end
      u++; if (has_imm) im++;
      if (gv && !hinted) begin e.weight = g; hinted = 1; end
      // drive
      dec_valid = 1'b1; dec_addr = (k == 0) ? e.start : addr_t'({$urandom, $urandom});
      dec_uop = uop; dec_has_imm = has_imm; dec_imm = imm; dec_last = (k == n - 1);
      dec_group_valid = gv; dec_group = g;
      @(posedge clk);
      while (!dec_ready) @(posedge clk);
      #1;
      dec_valid = 1'b0;
    end
    if (!hinted) n_hint_default++;
    e.n_entries = PWE_W'(ent + 1);
    e.n_uops = PWU_W'(n);
    if (ent < MAX_PW_ENTRIES) exp_q.push_back(e);
    else exp_ovf++;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_ovf++;
    if (pw_valid && pw_ready) begin
      n_pw_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected PW");
      end else begin
        pw_t e;
        bit bad;
        e = exp_q.pop_front();
        bad = (pw.start != e.start) || (pw.weight != e.weight) || (pw.n_entries != e.n_entries) ||
              (pw.n_uops != e.n_uops);
        for (int i = 0; i < int'(e.n_entries); i++) begin
          if (pw.entry_uops[i] != e.entry_uops[i]) bad = 1;
          for (int u = 0; u < int'(e.entry_uops[i]); u++)
            if (pw.entries[i].uops[u] != e.entries[i].uops[u]) bad = 1;
        end
        for (int i = 0; i < int'(e.n_entries); i++)
          for (int m = 0; m < IMMS_PER_ENTRY; m++)
            if (e.entries[i].imms[m] != '0 && pw.entries[i].imms[m] != e.entries[i].imms[m]) bad = 1;
        if (bad) begin
          failures++;
          $display("FAIL PW %h: got w%0d ent%0d uops%0d, exp w%0d ent%0d uops%0d", e.start,
                   pw.weight, pw.n_entries, pw.n_uops, e.weight, e.n_entries, e.n_uops);
        end
      end
    end
  end

  always @(negedge clk) pw_ready <= ($urandom % 3) != 0;

  initial begin
    rst_n = 1'b0; dec_valid = 1'b0; dec_addr = '0; dec_uop = '0; dec_has_imm = 1'b0; dec_imm = '0;
    dec_last = 1'b0; dec_group_valid = 1'b0; dec_group = '0; pw_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    send_pw(1);
    send_pw(8);
    send_pw(9);
    send_pw(32);
    send_pw(33);     // one entry too many: dropped
    repeat (400) send_pw(1 + int'($urandom % 36));
    dec_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d PWs never came out", exp_q.size()); end
    checks++;
    if (n_ovf != exp_ovf || exp_ovf == 0) begin failures++; $display("FAIL overflow %0d exp %0d", n_ovf, exp_ovf); end
    checks++;
    if (n_imm_split == 0 || n_hint_default == 0) begin failures++; $display("FAIL immediate split or default weight never exercised"); end
    $display("PWs out %0d, overflows %0d, immediate splits %0d, unhinted %0d", n_pw_out, n_ovf, n_imm_split, n_hint_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
