// tb_gbs_mux_arrays: exhaustive check of the searching-size mode lines.
// For every size 0..2^n and both M select values the expected pattern is
// m[l] = 1 for 1 <= l <= k' with k' = ceil(log2 size) (M select 0) or k'-1
// (M select 1, not below 0), and P select = size is not a power of two.
module tb_gbs_mux_arrays;
  localparam int unsigned N = 4;
  logic [N:0] size, m;
  logic       m_sel, p_sel;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_mux_arrays #(.LOG2_BLOCKS(N)) dut (.size(size), .m_sel(m_sel), .m(m), .p_sel(p_sel));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s <= 2 ** N; s++) begin
      for (int ms = 0; ms < 2; ms++) begin
        int k;
        logic [N:0] exp_m;
        logic exp_p;
        k = 0;
        while ((1 << k) < s) k++;
        if (ms == 1 && k > 0) k--;
        exp_m = '0;
        if (s > 0) for (int l = 1; l <= k; l++) exp_m[l] = 1'b1;
        exp_p = (s != 0) && ((s & (s - 1)) != 0);
        size  = (N+1)'(s);
        m_sel = ms[0];
        @(posedge clk);
        checks++;
        if (m !== exp_m || p_sel !== exp_p) begin
          failures++;
          $display("FAIL size=%0d msel=%0d m=%b exp=%b psel=%b exp=%b", s, ms, m, exp_m, p_sel, exp_p);
        end
      end
    end
    // The document's example: size 5 searches 8 blocks, then 4 blocks.
    size = 5; m_sel = 0; @(posedge clk);
    checks++; if (m[3:1] !== 3'b111 || m[4]) failures++;
    m_sel = 1; @(posedge clk);
    checks++; if (m[2:1] !== 2'b11 || m[4:3] !== 2'b00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
