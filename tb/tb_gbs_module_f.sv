// tb_gbs_module_f: module F returns the address of the leftmost 0.
// Random maps of every density plus single-zero maps; a map of all ones
// gives the all-ones address.
module tb_gbs_module_f;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic [NB-1:0] temp;
  logic [N-1:0]  addr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_module_f #(.LOG2_BLOCKS(N)) dut (.temp(temp), .addr(addr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int exp_a = NB - 1;
    @(posedge clk);
    for (int i = NB - 1; i >= 0; i--) if (!temp[i]) exp_a = i;
    checks++;
    if (addr !== N'(exp_a)) begin
      failures++;
      $display("FAIL temp=%b addr=%0d exp=%0d", temp, addr, exp_a);
    end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) begin
      temp = '1; temp[i] = 1'b0; check();
    end
    temp = '1; check();
    for (int t = 0; t < 2000; t++) begin
      automatic int dens = $urandom_range(0, 8);
      for (int i = 0; i < NB; i++) temp[i] = ($urandom_range(0, 8) < dens);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
