// rca2_module_tb: exhaustive self-checking test of the two-bit adder slice.
// For all 32 combinations of a, b and cin it checks {c_out, sum} against
// a + b + cin and c_mid against the carry out of bit 0. One combination per
// clock cycle, with a watchdog.
module rca2_module_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [1:0] a, b, sum;
  logic cin, c_mid, c_out;

  rca2_module dut (.a(a), .b(b), .cin(cin), .sum(sum), .c_mid(c_mid), .c_out(c_out));

  initial begin
    int unsigned total, low;
    a = '0; b = '0; cin = 1'b0;
    for (int n = 0; n < 32; n++) begin
      {cin, a, b} = 5'(n);
      @(posedge clk);
      total = a + b + cin;
      low   = a[0] + b[0] + cin;
      checks++;
      if ({c_out, sum} !== 3'(total) || c_mid !== low[1]) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b sum=%b c_mid=%b c_out=%b",
                 a, b, cin, sum, c_mid, c_out);
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
