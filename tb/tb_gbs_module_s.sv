// tb_gbs_module_s: exhaustive over the input: map[i] = (i < n), all ones for
// n >= 2^n. Also the pseudo-allocation example: S(3) ^ S(9) marks blocks 3..8.
module tb_gbs_module_s;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic [N:0]    n;
  logic [NB-1:0] map;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_module_s #(.LOG2_BLOCKS(N)) dut (.n(n), .map(map));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NB-1:0] exp_map, s3;
    for (int v = 0; v < 2 ** (N + 1); v++) begin
      n = (N+1)'(v);
      @(posedge clk);
      for (int i = 0; i < NB; i++) exp_map[i] = (i < v);
      checks++;
      if (map !== exp_map) begin
        failures++;
        $display("FAIL n=%0d map=%b", v, map);
      end
    end
    n = 3; @(posedge clk); s3 = map;
    n = 9; @(posedge clk);
    checks++;
    if ((s3 ^ map) !== 16'b0000_0001_1111_1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
