// cmp2_mod_tb: self-checking test of the reduced 2-bit comparator over all
// nine legal input cases. Each half is equal, greater or less, encoded as
// the (gt, lt) pair a comparator produces; the expected result is A > B,
// decided by the upper half unless it is equal. One case per clock cycle,
// with a watchdog.
module cmp2_mod_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [1:0] a, b;
  logic gt;

  cmp2_mod dut (.a(a), .b(b), .gt(gt));

  // outcome: 0 = equal, 1 = greater, 2 = less
  function automatic logic is_gt(input int hi, input int lo);
    if (hi == 1) return 1'b1;
    if (hi == 2) return 1'b0;
    return lo == 1;
  endfunction

  initial begin
    a = '0; b = '0;
    for (int hi = 0; hi < 3; hi++) begin
      for (int lo = 0; lo < 3; lo++) begin
        a = {hi == 1, lo == 1};
        b = {hi == 2, lo == 2};
        @(posedge clk);
        checks++;
        if (gt !== is_gt(hi, lo)) begin
          failures++;
          $display("FAIL hi=%0d lo=%0d gt=%b", hi, lo, gt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
