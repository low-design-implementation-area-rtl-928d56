// cmp_lookahead_tb: exhaustive self-checking test of cmp_lookahead at the
// 4-bit default and at a 6-bit width. For each input pair the expected
// cmp[i] is worked out by comparing the two operands shifted right by i+1
// (all bits above i equal). One input pair is applied per clock cycle; a
// watchdog ends the run with a failure if it does not finish in time.
module cmp_lookahead_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [3:0] a4, b4, cmp4_o;
  logic [5:0] a6, b6, cmp6_o;

  cmp_lookahead #(.W(4)) dut4 (.a(a4), .b(b4), .cmp(cmp4_o));
  cmp_lookahead #(.W(6)) dut6 (.a(a6), .b(b6), .cmp(cmp6_o));

  function automatic logic [5:0] expect_cmp(input int unsigned w,
                                            input logic [5:0] a,
                                            input logic [5:0] b);
    logic [5:0] r = '0;
    for (int i = 0; i < w; i++) r[i] = ((a >> (i + 1)) == (b >> (i + 1)));
    return r;
  endfunction

  initial begin
    a4 = '0; b4 = '0; a6 = '0; b6 = '0;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        @(posedge clk);
        checks++;
        if (cmp4_o !== expect_cmp(4, 6'(a4), 6'(b4)) & 6'h0f) begin
          failures++;
          $display("FAIL W=4 a=%b b=%b cmp=%b", a4, b4, cmp4_o);
        end
      end
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        @(posedge clk);
        checks++;
        if (cmp6_o !== expect_cmp(6, a6, b6)) begin
          failures++;
          $display("FAIL W=6 a=%b b=%b cmp=%b", a6, b6, cmp6_o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
