// cmp4_tb: exhaustive self-checking test of the parallel comparator cmp4 at
// its 4-bit default and at 8 bits. The expected gt/lt come from the
// simulator's own unsigned comparison. One input pair per clock cycle; a
// watchdog ends the run with a failure if it does not finish in time.
module cmp4_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] a8, b8;
  logic gt4, lt4, gt8, lt8;

  cmp4 #(.W(4)) dut4 (.a(a4), .b(b4), .gt(gt4), .lt(lt4));
  cmp4 #(.W(8)) dut8 (.a(a8), .b(b8), .gt(gt8), .lt(lt8));

  initial begin
    a4 = '0; b4 = '0; a8 = '0; b8 = '0;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        @(posedge clk);
        checks++;
        if (gt4 !== (x > y) || lt4 !== (x < y)) begin
          failures++;
          $display("FAIL W=4 a=%0d b=%0d gt=%b lt=%b", x, y, gt4, lt4);
        end
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        @(posedge clk);
        checks++;
        if (gt8 !== (x > y) || lt8 !== (x < y)) begin
          failures++;
          $display("FAIL W=8 a=%0d b=%0d gt=%b lt=%b", x, y, gt8, lt8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
