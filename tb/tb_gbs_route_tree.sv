// tb_gbs_route_tree: greedy routing against a loop model.
// The and-or-gate tree (driven with the mode lines of a search for 2^k blocks)
// feeds the routing tree. Whenever the search succeeds, the leftmost 0 of the
// temporary bit-map must be the first block of the free run that ends at the
// lowest free aligned 2^k buddy, and every bit left of it must be 1. The
// second-chance example is checked bit for bit: map 1110000011111000, search
// for 4 blocks, temporary map 1110011111111111.
module tb_gbs_route_tree;
  import gbs_ref_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic [NB-1:0]   bitmap, temp;
  logic [N:0]      m;
  logic [2*NB-1:0] node;
  logic            check1;
  int checks = 0, failures = 0, expanded = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_and_or_tree #(.LOG2_BLOCKS(N)) u_tree (.bitmap(bitmap), .m(m), .node(node), .check1(check1));
  gbs_route_tree  #(.LOG2_BLOCKS(N)) dut    (.node(node), .m(m), .temp(temp));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_k(int k);
    int b = -1, start;
    m = '0;
    for (int l = 1; l <= k; l++) m[l] = 1'b1;
    @(posedge clk);
    for (int a = 0; a < NB && b < 0; a += (1 << k)) begin
      bit free = 1;
      for (int i = a; i < a + (1 << k); i++) if (bitmap[i]) free = 0;
      if (free) b = a;
    end
    if (b < 0) return;
    start = b;
    while (start > 0 && !bitmap[start-1]) start--;
    if (start != b) expanded++;
    checks++;
    if (temp[start] !== 1'b0) begin
      failures++;
      $display("FAIL map=%b k=%0d temp=%b start=%0d", bitmap, k, temp, start);
    end
    for (int i = 0; i < start; i++) if (temp[i] !== 1'b1) begin
      failures++;
      $display("FAIL map=%b k=%0d temp=%b bit %0d left of start %0d", bitmap, k, temp, i, start);
      break;
    end
  endtask

  initial begin
    bitmap = map16("1110000011111000");
    m = 5'b00110;                      // levels 1, 2 OR: 4-block search
    @(posedge clk);
    checks++;
    if (temp !== map16("1110011111111111")) begin
      failures++;
      $display("FAIL example temp=%b", temp);
    end
    for (int t = 0; t < 1000; t++) begin
      automatic int dens = $urandom_range(0, 5);
      for (int i = 0; i < NB; i++) bitmap[i] = ($urandom_range(0, 5) < dens);
      for (int k = 0; k <= N; k++) run_k(k);
    end
    checks++;
    if (expanded == 0) begin
      failures++;
      $display("FAIL no greedy expansion exercised");
    end
    $display("expanded starts: %0d", expanded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
