// tb_gbs_overflow_check: exhaustive over head and size: tail = head + size and
// CHECK2 = 1 exactly when tail > 2^n.
module tb_gbs_overflow_check;
  localparam int unsigned N  = 4;
  localparam int unsigned NB = 2 ** N;
  logic [N-1:0] head;
  logic [N:0]   size, tail;
  logic         check2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  gbs_overflow_check #(.LOG2_BLOCKS(N)) dut (.head(head), .size(size), .tail(tail), .check2(check2));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < NB; h++)
      for (int s = 0; s <= NB; s++) begin
        head = N'(h);
        size = (N+1)'(s);
        @(posedge clk);
        checks++;
        if (tail !== (N+1)'(h + s) || check2 !== (h + s > NB)) begin
          failures++;
          $display("FAIL head=%0d size=%0d tail=%0d check2=%b", h, s, tail, check2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
