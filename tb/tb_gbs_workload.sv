// tb_gbs_workload: random request/release streams in the style of the
// allocator's evaluation, on a 1024-block storage.
//
// Every configuration of the evaluation is run: LAMDA = 5, 10, .. 95 and
// DN = 0 .. 7. For each, a stream is generated until 1000 allocation requests
// have been made. LAMDA is the percentage chance that an event is a request
// rather than the release of a random live area (a request is forced when
// nothing is live); request sizes are uniform in 1..MRS with
// MRS = TMS / 2^DN, TMS the storage size. Every response and the bit-map after
// every event are checked against the reference model, and the evaluation
// figures are printed per configuration:
//   ARatio = blocks granted / blocks requested
//   TNFR   = failed requests
//   TNFR_MS_Limit = failures where fewer blocks than requested were free at all
//   TNFR_AL_Limit = failures although a free run at least as long existed
//   ANEF   = average number of free runs (external fragments) over the events
//   ADAA   = average allocated blocks / (highest allocated address + 1)
// The storage is scaled down from the evaluation's 2^20 blocks.
module tb_gbs_workload;
  import gbs_ref_pkg::*;
  localparam int unsigned N  = 10;
  localparam int unsigned NB = 2 ** N;
  localparam int unsigned REQUESTS = 1000;

  logic          clk = 0, rst_n = 0;
  logic          req_valid = 0, req_ready, req_alloc = 0;
  logic [N:0]    req_size = '0;
  logic [N-1:0]  req_addr = '0;
  logic          resp_valid, resp_fail, resp_sc;
  logic [N-1:0]  resp_addr;
  logic [2:0]    resp_check;
  logic [NB-1:0] bitmap;
  always #5 clk = ~clk;

  gbs_allocator #(.LOG2_BLOCKS(N)) dut (
    .clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
    .req_alloc(req_alloc), .req_size(req_size), .req_addr(req_addr),
    .resp_valid(resp_valid), .resp_fail(resp_fail), .resp_addr(resp_addr),
    .resp_second_chance(resp_sc), .resp_check(resp_check), .bitmap(bitmap));

  gbs_ref #(N) model;
  int checks = 0, failures = 0;
  int tot_sc = 0, tot_fail = 0;

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endfunction

  task automatic issue(bit alloc, int size, int addr);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_alloc = alloc; req_size = (N+1)'(size); req_addr = N'(addr);
    @(posedge clk);
    #1 req_valid = 0;
    while (!resp_valid) begin
      @(posedge clk); #1;
    end
  endtask

  task automatic run(int lamda, int dn);
    int mrs = NB >> dn;
    int n_req = 0, n_ev = 0, fail = 0, ms_lim = 0, al_lim = 0;
    longint granted = 0, asked = 0;
    real nef = 0.0, daa = 0.0;
    int live_addr[$], live_size[$];
    model = new();
    issue(0, NB, 0);                    // release everything
    @(posedge clk); #1;
    chk(bitmap == '0, "cleared bit-map");
    while (n_req < REQUESTS) begin
      if (live_addr.size() == 0 || $urandom_range(0, 99) < lamda) begin
        automatic int s = $urandom_range(1, mrs);
        automatic alloc_t r;
        automatic int free_blocks = NB - model.allocated();
        automatic int longest = model.max_free_run();
        r = model.alloc(s);
        issue(1, s, 0);
        chk(resp_fail == r.fail, $sformatf("L%0d DN%0d size %0d fail %b exp %b", lamda, dn, s, resp_fail, r.fail));
        if (!r.fail) chk(resp_addr == N'(r.addr), $sformatf("size %0d addr %0d exp %0d", s, resp_addr, r.addr));
        n_req++;
        asked += s;
        if (r.second_chance) tot_sc++;
        if (r.fail) begin
          fail++;
          if (free_blocks < s) ms_lim++;
          if (longest >= s) al_lim++;
        end else begin
          granted += s;
          live_addr.push_back(r.addr);
          live_size.push_back(s);
        end
      end else begin
        automatic int i = $urandom_range(0, live_addr.size() - 1);
        model.release_area(live_addr[i], live_size[i]);
        issue(0, live_size[i], live_addr[i]);
        live_addr.delete(i);
        live_size.delete(i);
      end
      @(posedge clk); #1;
      chk(bitmap == model.vec(), "bit-map");
      n_ev++;
      nef += model.fragments();
      if (model.highest() >= 0) daa += real'(model.allocated()) / real'(model.highest() + 1);
    end
    tot_fail += fail;
    $display("LAMDA=%0d MRS=TMS/%0d: ARatio=%0.3f TNFR=%0d TNFR_MS_Limit=%0d TNFR_AL_Limit=%0d ANEF=%0.2f ADAA=%0.3f",
             lamda, 1 << dn, real'(granted) / real'(asked), fail, ms_lim, al_lim, nef / n_ev, daa / n_ev);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int dn = 0; dn <= 7; dn++)
      for (int l = 1; l < 20; l++) run(5 * l, dn);
    chk(tot_sc > 0, "second chance never used");
    chk(tot_fail > 0, "no request ever failed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
