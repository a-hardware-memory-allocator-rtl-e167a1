// tb_gbs_allocator: end-to-end test of the allocator at its default size
// (16 blocks).
//
// First the worked examples: a 5-block request on map 1110000011111000 fails
// its 8-block search, gets the second chance, finds the buddy at block 4 and is
// expanded to start at block 3; a 6-block request from the same map fails the
// overlap check; a 14-block request on map 1110000000000000 overflows. Then a
// long random stream of allocations and releases is checked, response by
// response, against the loop-based reference model (result, address, CHECK
// bits, second chance and the bit-map). A packing sequence (1 block, then
// 3-block requests) must fill the storage without gaps. Every allocation must answer exactly
// three cycles after it is taken, every release one cycle after. Each mechanism
// (direct hit, second chance, greedy expansion, search failure, overflow,
// overlap, release) is counted and must occur at least once.
module tb_gbs_allocator;
  import gbs_ref_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_ready, req_alloc = 0;
  logic [N:0]    req_size = '0;
  logic [N-1:0]  req_addr = '0;
  logic          resp_valid, resp_fail, resp_sc;
  logic [N-1:0]  resp_addr;
  logic [2:0]    resp_check;
  logic [NB-1:0] bitmap;
  always #5 clk = ~clk;

  gbs_allocator dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_alloc(req_alloc), .req_size(req_size), .req_addr(req_addr),
    .resp_valid(resp_valid), .resp_fail(resp_fail), .resp_addr(resp_addr),
    .resp_second_chance(resp_sc), .resp_check(resp_check), .bitmap(bitmap));

  gbs_ref #(N) model = new();
  int checks = 0, failures = 0;
  int n_direct = 0, n_second = 0, n_expand = 0, n_c1 = 0, n_c2 = 0, n_c3 = 0, n_rel = 0;
  int live_addr[$], live_size[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  // Issue one request and wait for the response. cycles counts the clock
  // cycles after the one that takes the request, up to and including the one
  // with resp_valid.
  task automatic issue(bit alloc, int size, int addr, output int cycles);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_alloc = alloc; req_size = (N+1)'(size); req_addr = N'(addr);
    @(posedge clk);
    #1 req_valid = 0;
    cycles = 1;                      // the cycle that shows resp_valid counts
    while (!resp_valid) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  task automatic do_alloc(int size, output bit fail, output int addr);
    alloc_t r = model.alloc(size);
    int cyc;
    issue(1, size, 0, cyc);
    chk(cyc == 3, $sformatf("allocation took %0d cycles", cyc));
    chk(resp_fail == r.fail, $sformatf("size %0d fail=%b exp %b", size, resp_fail, r.fail));
    chk(resp_sc == r.second_chance, $sformatf("size %0d second chance=%b exp %b", size, resp_sc, r.second_chance));
    chk(resp_check[0] == r.check1, $sformatf("size %0d check1", size));
    if (!r.check1) begin
      chk(resp_addr == N'(r.addr), $sformatf("size %0d addr=%0d exp %0d", size, resp_addr, r.addr));
      chk(resp_check[2:1] == {r.check3, r.check2}, $sformatf("size %0d check3/2=%b exp %b%b", size, resp_check[2:1], r.check3, r.check2));
    end
    @(posedge clk); #1;
    chk(bitmap == model.vec(), $sformatf("bitmap %b exp %b", bitmap, model.vec()));
    if (r.check1) n_c1++;
    else begin
      if (r.check2) n_c2++;
      else if (r.check3) n_c3++;
      if (r.addr != r.buddy) n_expand++;
    end
    if (!r.fail && !r.second_chance) n_direct++;
    if (!r.fail && r.second_chance) n_second++;
    fail = r.fail;
    addr = int'(r.addr);
  endtask

  task automatic do_release(int addr, int size);
    int cyc;
    model.release_area(addr, size);
    issue(0, size, addr, cyc);
    chk(cyc == 1, $sformatf("release took %0d cycles", cyc));
    chk(!resp_fail && resp_addr == N'(addr), "release response");
    @(posedge clk); #1;
    chk(bitmap == model.vec(), $sformatf("after release bitmap %b exp %b", bitmap, model.vec()));
    n_rel++;
  endtask

  initial begin
    bit f;
    int a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    chk(bitmap == '0, "reset bit-map");

    // Build 1110000011111000: 3 blocks at 0, 13 blocks at 3, free 3..7 and 13..15.
    do_alloc(3, f, a);  chk(!f && a == 0, "3 blocks at 0");
    do_alloc(13, f, a); chk(!f && a == 3 && resp_sc, "13 blocks via second chance at 3");
    do_release(3, 5);
    do_release(13, 3);
    chk(bitmap == map16("1110000011111000"), "example map");
    do_alloc(6, f, a);  chk(f && resp_check == 3'b100 && resp_addr == 3, "6 blocks: overlap");
    do_alloc(5, f, a);  chk(!f && a == 3 && resp_sc, "5 blocks: second chance, start 3");
    chk(bitmap == map16("1111111111111000"), "map after 5 blocks");
    do_release(0, 16);
    do_alloc(3, f, a);
    do_alloc(14, f, a); chk(f && resp_check == 3'b010 && resp_addr == 3, "14 blocks: overflow");
    do_alloc(16, f, a); chk(f && resp_check == 3'b010 && resp_sc, "16 blocks: second chance, overflow");
    do_release(0, 16);
    do_alloc(16, f, a); chk(!f && a == 0 && !resp_sc, "16 blocks on an empty map");
    do_alloc(1, f, a);  chk(f && resp_check[0] && resp_sc, "1 block on a full map: search fails");
    do_release(0, 16);

    // Packing: one block, then three-block requests. Greedy routing places each
    // one right after the last, so five fit with no gap and the sixth fails.
    do_alloc(1, f, a);  chk(!f && a == 0, "1 block at 0");
    for (int i = 0; i < 5; i++) begin
      do_alloc(3, f, a);
      chk(!f && a == 1 + 3 * i, $sformatf("packed 3 blocks at %0d", a));
    end
    chk(bitmap == '1, "packed map full");
    do_alloc(3, f, a);  chk(f, "3 blocks on a full map");
    do_release(0, 16);

    // Random stream.
    for (int t = 0; t < 3000; t++) begin
      if (live_addr.size() > 0 && ($urandom_range(0, 2) == 0 || model.allocated() > NB - 2)) begin
        automatic int i = $urandom_range(0, live_addr.size() - 1);
        do_release(live_addr[i], live_size[i]);
        live_addr.delete(i);
        live_size.delete(i);
      end else begin
        automatic int s = ($urandom_range(0, 3) == 0) ? $urandom_range(1, NB) : $urandom_range(1, NB / 4);
        do_alloc(s, f, a);
        if (!f) begin
          live_addr.push_back(a);
          live_size.push_back(s);
        end
      end
    end

    $display("direct %0d second-chance %0d expanded %0d search-fail %0d overflow %0d overlap %0d release %0d",
             n_direct, n_second, n_expand, n_c1, n_c2, n_c3, n_rel);
    chk(n_direct > 0, "direct hit never happened");
    chk(n_second > 0, "second chance never happened");
    chk(n_expand > 0, "greedy expansion never happened");
    chk(n_c1 > 0, "search failure never happened");
    chk(n_c2 > 0, "overflow never happened");
    chk(n_c3 > 0, "overlap never happened");
    chk(n_rel > 0, "release never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
