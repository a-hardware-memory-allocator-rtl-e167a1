// tb_gbs_bitmap_update: random allocations and releases against a bit-map
// model. Each step drives head, size and CHECK1/CHECK2 and checks the pseudo
// allocation (blocks head .. head+size-1), CHECK3 (overlap), the result bit and
// the bit-map after the clock edge: OR-ed in on a successful allocation, left
// alone on a failed one or with the strobe low, cleared on a release.
module tb_gbs_bitmap_update;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic clk = 0, rst_n = 0, we = 0, alloc = 0, check1 = 0, check2 = 0;
  logic [N-1:0]  head = '0;
  logic [N:0]    tail = '0;
  logic          check3, result;
  logic [NB-1:0] pseudo, bitmap, model;
  int checks = 0, failures = 0, n_alloc = 0, n_fail = 0, n_rel = 0;
  always #5 clk = ~clk;

  gbs_bitmap_update #(.LOG2_BLOCKS(N)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .alloc(alloc), .head(head), .tail(tail),
    .check1(check1), .check2(check2), .check3(check3), .result(result),
    .pseudo(pseudo), .bitmap(bitmap));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (bitmap !== '0) failures++;
    for (int t = 0; t < 3000; t++) begin
      automatic int h = $urandom_range(0, NB - 1);
      automatic int s = $urandom_range(1, NB);
      logic [NB-1:0] exp_p;
      logic exp_c3, exp_r;
      head   = N'(h);
      tail   = (N+1)'(h + s);
      alloc  = ($urandom_range(0, 2) != 0);
      check1 = ($urandom_range(0, 9) == 0);
      check2 = (h + s > NB);
      we     = ($urandom_range(0, 9) != 0);
      #1;
      for (int i = 0; i < NB; i++) exp_p[i] = (i >= h) && (i < h + s);
      exp_c3 = |(exp_p & model);
      exp_r  = check1 | check2 | exp_c3;
      checks++;
      if (pseudo !== exp_p || check3 !== exp_c3 || result !== exp_r) begin
        failures++;
        $display("FAIL h=%0d s=%0d pseudo=%b c3=%b r=%b", h, s, pseudo, check3, result);
      end
      if (we) begin
        if (!alloc) begin model &= ~exp_p; n_rel++; end
        else if (!exp_r) begin model |= exp_p; n_alloc++; end
        else n_fail++;
      end
      @(negedge clk);
      checks++;
      if (bitmap !== model) begin
        failures++;
        $display("FAIL after step %0d bitmap=%b model=%b", t, bitmap, model);
      end
    end
    checks++;
    if (n_alloc == 0 || n_fail == 0 || n_rel == 0) failures++;
    $display("allocations %0d, refused %0d, releases %0d", n_alloc, n_fail, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
