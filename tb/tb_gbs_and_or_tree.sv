// tb_gbs_and_or_tree: random bit-maps against a loop-based buddy search.
// With levels 1..k in OR mode, the root must be 0 exactly when some aligned
// run of 2^k blocks is all free, and every node at a level l <= k must be the
// OR of the 2^l blocks it covers. Includes the four-block search example of the
// or-gate tree illustration.
module tb_gbs_and_or_tree;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic [NB-1:0]   bitmap;
  logic [N:0]      m;
  logic [2*NB-1:0] node;
  logic            check1;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_and_or_tree #(.LOG2_BLOCKS(N)) dut (.bitmap(bitmap), .m(m), .node(node), .check1(check1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_k(int k);
    bit found = 0;
    m = '0;
    for (int l = 1; l <= k; l++) m[l] = 1'b1;
    @(posedge clk);
    for (int b = 0; b < NB; b += (1 << k)) begin
      bit free = 1;
      for (int i = b; i < b + (1 << k); i++) if (bitmap[i]) free = 0;
      if (free) found = 1;
    end
    checks++;
    if (check1 !== !found) begin
      failures++;
      $display("FAIL map=%b k=%0d check1=%b", bitmap, k, check1);
    end
    for (int l = 1; l <= k; l++)
      for (int j = 0; j < (NB >> l); j++) begin
        bit o = 0;
        for (int i = j << l; i < (j + 1) << l; i++) o |= bitmap[i];
        checks++;
        if (node[(NB >> l) + j] !== o) begin
          failures++;
          $display("FAIL map=%b k=%0d level=%0d node=%0d", bitmap, k, l, j);
        end
      end
  endtask

  initial begin
    // Illustration: four-block groups used 1,1,0,1 (only blocks 8..B free);
    // a search for 4 blocks succeeds on the third group.
    bitmap = '0;
    bitmap[1] = 1; bitmap[3] = 1; bitmap[4] = 1; bitmap[5] = 1; bitmap[6] = 1;
    bitmap[13] = 1; bitmap[14] = 1; bitmap[15] = 1;
    check_k(2);
    checks++;
    if (check1 !== 1'b0 || node[6] !== 1'b0 || node[4] !== 1'b1 || node[5] !== 1'b1 || node[7] !== 1'b1)
      failures++;
    for (int t = 0; t < 400; t++) begin
      automatic int dens = $urandom_range(0, 4);
      for (int i = 0; i < NB; i++) bitmap[i] = ($urandom_range(0, 4) < dens);
      for (int k = 0; k <= N; k++) check_k(k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
