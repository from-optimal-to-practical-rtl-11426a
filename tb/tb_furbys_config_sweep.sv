// tb_furbys_config_sweep: the cache sizes and associativities of the
// sensitivity study, each running the synthetic PW stream of
// furbys_cfg_runner side by side:
//   associativity 2, 4, 16, 32 at 512 entries, and
//   256, 1024, 2048, 4096 entries at 8 ways
// (512 entries, 8 ways is the default and is covered by
// tb_furbys_frontend_top).
module tb_furbys_config_sweep;
  localparam int NCFG = 8;
  localparam int CFG_SETS [NCFG] = '{256, 128, 32, 16, 32, 128, 256, 512};
  localparam int CFG_WAYS [NCFG] = '{2,   4,   16, 32, 8,  8,   8,   8};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [NCFG-1:0] done;
  int cfg_checks [NCFG];
  int cfg_fail   [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    furbys_cfg_runner #(.SETS(CFG_SETS[g]), .WAYS(CFG_WAYS[g])) u_run (
      .clk(clk), .done(done[g]), .checks(cfg_checks[g]), .failures(cfg_fail[g])
    );
  end

  int checks, failures;
  initial begin
    wait (done == '1);
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin checks += cfg_checks[g]; failures += cfg_fail[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    checks = 0; failures = 1;
    for (int g = 0; g < NCFG; g++) begin checks += cfg_checks[g]; failures += cfg_fail[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
