// cmp32_tree_tb: self-checking test of the 32-bit tree comparator.
//
// First it applies eight operand pairs of a reference simulation (values
// 100/50 up to 2100/3000) and checks the result and the nibble and half
// partials against the listed expectations. Then it applies random pairs,
// half of them with a shared upper part so that every tree level gets to
// decide, and checks gt and all partials against the simulator's own
// comparisons. One pair per clock cycle, with a watchdog.
module cmp32_tree_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [31:0] a, b;
  logic        gt;
  logic [9:0]  gt_w, lt_w;

  cmp32_tree dut (.a(a), .b(b), .gt(gt), .gt_w(gt_w), .lt_w(lt_w));

  typedef struct packed {
    logic [31:0] a, b;
    logic        gt;
    logic [9:0]  gt_w, lt_w;
  } vec_t;

  // Reference vectors. Bits 7..0 of the partial vectors are the nibble
  // results, bit 8 the lower 16-bit half.
  vec_t REF [8];

  initial begin
    REF[0] = '{32'd100,  32'd50,   1'b1, 10'h103, 10'h000};
    REF[1] = '{32'd550,  32'd600,  1'b0, 10'h000, 10'h103};
    REF[2] = '{32'd700,  32'd900,  1'b0, 10'h003, 10'h104};
    REF[3] = '{32'd1200, 32'd1200, 1'b0, 10'h000, 10'h000};
    REF[4] = '{32'd1500, 32'd1450, 1'b1, 10'h103, 10'h000};
    REF[5] = '{32'd1800, 32'd1600, 1'b1, 10'h105, 10'h002};
    REF[6] = '{32'd2000, 32'd1980, 1'b1, 10'h102, 10'h001};
    REF[7] = '{32'd2100, 32'd3000, 1'b0, 10'h000, 10'h107};
  end

  task automatic check_random(input logic [31:0] x, input logic [31:0] y);
    logic [9:0] eg, el;
    a = x; b = y;
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      eg[k] = x[4*k +: 4] > y[4*k +: 4];
      el[k] = x[4*k +: 4] < y[4*k +: 4];
    end
    for (int h = 0; h < 2; h++) begin
      eg[8+h] = x[16*h +: 16] > y[16*h +: 16];
      el[8+h] = x[16*h +: 16] < y[16*h +: 16];
    end
    checks++;
    if (gt !== (x > y) || gt_w !== eg || lt_w !== el) begin
      failures++;
      $display("FAIL a=%h b=%h gt=%b gt_w=%b lt_w=%b", x, y, gt, gt_w, lt_w);
    end
  endtask

  initial begin
    logic [31:0] x, y;
    a = '0; b = '0;
    @(posedge clk);
    foreach (REF[i]) begin
      a = REF[i].a; b = REF[i].b;
      @(posedge clk);
      checks++;
      if (gt !== REF[i].gt || gt_w !== REF[i].gt_w || lt_w !== REF[i].lt_w) begin
        failures++;
        $display("FAIL ref %0d a=%0d b=%0d gt=%b gt_w=%h lt_w=%h",
                 i, REF[i].a, REF[i].b, gt, gt_w, lt_w);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      x = $urandom;
      y = $urandom;
      // Share a random number of top bits so that lower levels decide.
      if (n % 2 == 1) begin
        int unsigned keep = $urandom_range(31, 1);
        logic [31:0] mask = ~(32'hffff_ffff >> keep);
        y = (x & mask) | (y & ~mask);
      end
      if (n % 97 == 0) y = x;
      check_random(x, y);
    end
    check_random(32'hffff_ffff, 32'hffff_ffff);
    check_random(32'h8000_0000, 32'h7fff_ffff);
    check_random(32'h0000_0000, 32'h0000_0001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
