// cmp_adder_top_tb: end-to-end test of cmp_adder_top at its default sizes.
//
// Each clock cycle it drives one comparison and one addition and checks
// every output against values computed in the testbench. It also counts how
// often each mechanism of the design was exercised and fails if one never
// was: each of the three comparison outcomes (greater, less, equal); a
// decision made at each of the eight nibble positions; a decision made in
// each 16-bit half; a carry that ripples from cin through all slices to
// cout; and a carry out produced by the operands alone. A watchdog ends the
// run with a failure if it does not finish in time.
module cmp_adder_top_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [31:0] cmp_a, cmp_b, add_a, add_b, add_sum;
  logic        cmp_gt, add_cin, add_cout;
  logic [9:0]  cmp_gt_w, cmp_lt_w;

  cmp_adder_top dut (
    .cmp_a(cmp_a), .cmp_b(cmp_b), .cmp_gt(cmp_gt),
    .cmp_gt_w(cmp_gt_w), .cmp_lt_w(cmp_lt_w),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .add_sum(add_sum), .add_cout(add_cout)
  );

  int n_gt = 0, n_lt = 0, n_eq = 0;
  int n_nibble_decides [8];
  int n_half_decides [2];
  int n_full_ripple = 0, n_carry_gen = 0;

  task automatic step(input logic [31:0] x, input logic [31:0] y,
                      input logic [31:0] p, input logic [31:0] q, input logic c);
    logic [32:0] sum_v;
    logic [9:0]  eg, el;
    cmp_a = x; cmp_b = y; add_a = p; add_b = q; add_cin = c;
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      eg[k] = x[4*k +: 4] > y[4*k +: 4];
      el[k] = x[4*k +: 4] < y[4*k +: 4];
    end
    for (int h = 0; h < 2; h++) begin
      eg[8+h] = x[16*h +: 16] > y[16*h +: 16];
      el[8+h] = x[16*h +: 16] < y[16*h +: 16];
    end
    sum_v = {1'b0, p} + {1'b0, q} + {32'b0, c};
    checks++;
    if (cmp_gt !== (x > y) || cmp_gt_w !== eg || cmp_lt_w !== el) begin
      failures++;
      $display("FAIL cmp a=%h b=%h gt=%b", x, y, cmp_gt);
    end
    checks++;
    if ({add_cout, add_sum} !== sum_v) begin
      failures++;
      $display("FAIL add a=%h b=%h cin=%b sum=%h cout=%b", p, q, c, add_sum, add_cout);
    end
    // Mechanism coverage.
    if (x > y) n_gt++; else if (x < y) n_lt++; else n_eq++;
    if (x != y) begin
      int top;
      top = 31;
      while (x[top] == y[top]) top--;
      n_nibble_decides[top / 4]++;
      n_half_decides[top / 16]++;
    end
    if ((p ^ q) == 32'hffff_ffff && c) n_full_ripple++;
    if (!c && sum_v[32]) n_carry_gen++;
  endtask

  initial begin
    logic [31:0] x, y;
    cmp_a = '0; cmp_b = '0; add_a = '0; add_b = '0; add_cin = 1'b0;
    foreach (n_nibble_decides[i]) n_nibble_decides[i] = 0;
    foreach (n_half_decides[i]) n_half_decides[i] = 0;
    // Directed: equal operands and a full carry ripple.
    step(32'h1234_5678, 32'h1234_5678, 32'hffff_ffff, 32'h0000_0000, 1'b1);
    step(32'h0000_0000, 32'h0000_0000, 32'h0f0f_0f0f, 32'hf0f0_f0f0, 1'b1);
    // Directed: a difference in each single bit position, both directions.
    for (int i = 0; i < 32; i++) begin
      x = $urandom;
      step(x | (32'h1 << i), (x & ~(32'h1 << i)), $urandom, $urandom, 1'b0);
      step(x & ~(32'h1 << i), (x | (32'h1 << i)), $urandom, $urandom, 1'b1);
    end
    // Random operation mix.
    for (int n = 0; n < 2000; n++) begin
      x = $urandom;
      y = (n % 3 == 0) ? (x ^ (32'h1 << $urandom_range(31, 0))) : $urandom;
      step(x, y, $urandom, $urandom, 1'($urandom));
    end
    // Report and judge coverage.
    $display("coverage: gt=%0d lt=%0d eq=%0d full_ripple=%0d carry_gen=%0d",
             n_gt, n_lt, n_eq, n_full_ripple, n_carry_gen);
    checks++; if (n_gt == 0 || n_lt == 0 || n_eq == 0) failures++;
    checks++; if (n_full_ripple == 0 || n_carry_gen == 0) failures++;
    foreach (n_nibble_decides[i]) begin
      checks++;
      if (n_nibble_decides[i] == 0) begin
        failures++;
        $display("nibble %0d never decided a comparison", i);
      end
    end
    foreach (n_half_decides[i]) begin
      checks++;
      if (n_half_decides[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
