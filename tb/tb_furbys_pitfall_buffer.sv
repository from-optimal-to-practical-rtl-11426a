// tb_furbys_pitfall_buffer: drives random eviction records into the per-set
// pitfall buffer and compares every set's slots with a reference copy.
module tb_furbys_pitfall_buffer;
  localparam int unsigned SETS = 64, WAYS = 8, DEPTH = 2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic [5:0]            rd_set;
  logic [DEPTH-1:0]      rd_valid;
  logic [DEPTH-1:0][2:0] rd_way;
  logic                  wr_en;
  logic [5:0]            wr_set;
  logic [2:0]            wr_way;
  logic                  wr_restart;
  int checks = 0, failures = 0;

  bit ref_v [SETS][DEPTH];
  int ref_w [SETS][DEPTH];

  furbys_pitfall_buffer #(.SETS(SETS), .WAYS(WAYS), .DEPTH(DEPTH)) dut (.*);

  task automatic compare(int s);
    rd_set = 6'(s);
    #1;
    for (int d = 0; d < DEPTH; d++) begin
      checks++;
      if (rd_valid[d] != ref_v[s][d] || (ref_v[s][d] && int'(rd_way[d]) != ref_w[s][d])) begin
        failures++;
        $display("FAIL set %0d slot %0d: got %b/%0d exp %b/%0d", s, d, rd_valid[d], rd_way[d], ref_v[s][d], ref_w[s][d]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_set = '0; wr_way = '0; wr_restart = 1'b0; rd_set = '0;
    foreach (ref_v[s, d]) begin ref_v[s][d] = 0; ref_w[s][d] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < SETS; s++) compare(s);   // empty after reset
    repeat (3000) begin
      @(negedge clk);
      wr_en      = ($urandom % 3) != 0;
      wr_set     = 6'($urandom % 8);
      wr_way     = 3'($urandom);
      wr_restart = ($urandom % 5) == 0;
      @(posedge clk);
      if (wr_en) begin
        for (int d = DEPTH - 1; d > 0; d--) begin
          ref_v[wr_set][d] = wr_restart ? 0 : ref_v[wr_set][d-1];
          ref_w[wr_set][d] = ref_w[wr_set][d-1];
        end
        ref_v[wr_set][0] = 1; ref_w[wr_set][0] = wr_way;
      end
      @(negedge clk);
      wr_en = 1'b0;
      compare(int'($urandom % 8));
    end
    for (int s = 0; s < SETS; s++) compare(s);
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
