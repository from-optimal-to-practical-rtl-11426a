// tb_furbys_min_module: random and corner-case check of the min module
// against a reference that scans the ways in the testbench.
module tb_furbys_min_module;
  localparam int unsigned WAYS = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WAYS-1:0]      way_valid;
  logic [WAYS-1:0][2:0] way_weight;
  logic [2:0]           min_weight;
  logic [2:0]           min_way;
  logic                 any_valid;
  int checks = 0, failures = 0;

  furbys_min_module #(.WAYS(WAYS), .WEIGHT_W(3)) dut (.*);

  task automatic check_one();
    int best_w, best_i;
    best_w = 8; best_i = -1;
    for (int i = 0; i < WAYS; i++)
      if (way_valid[i] && int'(way_weight[i]) < best_w) begin best_w = way_weight[i]; best_i = i; end
    #1;
    checks++;
    if (best_i < 0) begin
      if (any_valid !== 1'b0) begin failures++; $display("FAIL empty set reported valid"); end
    end else if (!any_valid || int'(min_weight) != best_w || int'(min_way) != best_i) begin
      failures++;
      $display("FAIL valid=%b w=%h got %0d@%0d exp %0d@%0d", way_valid, way_weight, min_weight, min_way, best_w, best_i);
    end
  endtask

  initial begin
    // the example set of the policy description: weights 2,7,...; invalid way ignored
    way_valid = 8'b1111_1101; way_weight = {3'd4, 3'd5, 3'd6, 3'd3, 3'd6, 3'd1, 3'd0, 3'd7};
    check_one();  // way 1 (weight 0) invalid -> way 2 (weight 1)
    way_valid = '0; check_one();
    way_valid = '1; way_weight = '1; check_one();   // all equal -> way 0
    repeat (2000) begin
      @(posedge clk);
      way_valid  = WAYS'($urandom);
      way_weight = {$urandom, $urandom};
      check_one();
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
