// tb_furbys_max_module: checks the SRRIP max module against a reference
// that runs the textbook SRRIP search (age all ways until one reaches 3).
module tb_furbys_max_module;
  localparam int unsigned WAYS = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WAYS-1:0]      way_valid;
  logic [WAYS-1:0][1:0] way_rrpv;
  logic [1:0]           max_rrpv;
  logic [2:0]           max_way;
  logic [1:0]           age;
  int checks = 0, failures = 0;

  furbys_max_module #(.WAYS(WAYS), .RRPV_W(2)) dut (.*);

  task automatic check_one();
    int r[WAYS];
    int steps, vic;
    for (int i = 0; i < WAYS; i++) r[i] = way_rrpv[i];
    steps = 0; vic = -1;
    if (way_valid != 0) begin
      while (vic < 0) begin
        for (int i = 0; i < WAYS; i++) if (vic < 0 && way_valid[i] && r[i] == 3) vic = i;
        if (vic < 0) begin
          for (int i = 0; i < WAYS; i++) r[i]++;
          steps++;
        end
      end
    end
    #1;
    checks++;
    if (vic >= 0 && (int'(max_way) != vic || int'(age) != steps || int'(max_rrpv) != 3 - steps)) begin
      failures++;
      $display("FAIL valid=%b rrpv=%h got way %0d age %0d exp way %0d age %0d", way_valid, way_rrpv, max_way, age, vic, steps);
    end
    if (vic < 0 && age != 0) begin failures++; $display("FAIL empty set aged"); end
  endtask

  initial begin
    way_valid = '1; way_rrpv = {2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2, 2'd2}; check_one(); // all inserted: age 1, way 0
    way_valid = '1; way_rrpv = '0; check_one();                                                   // all hit: age 3
    way_valid = '0; check_one();
    repeat (2000) begin
      @(posedge clk);
      way_valid = WAYS'($urandom);
      way_rrpv  = 16'($urandom);
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
