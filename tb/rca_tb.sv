// rca_tb: self-checking test of the ripple-carry adder. An 8-bit instance is
// checked exhaustively (all a, b, cin); the 32-bit default instance gets
// corner cases (a carry that ripples through every slice, all ones, zero)
// and random operands. Expected values come from the simulator's own
// addition. One input set per clock cycle, with a watchdog.
module rca_tb;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        cin8, cout8;
  logic [31:0] a32, b32, s32;
  logic        cin32, cout32;

  rca #(.N(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(cout8));
  rca          dut32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(cout32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] expect_v;
    a32 = x; b32 = y; cin32 = c;
    @(posedge clk);
    expect_v = {1'b0, x} + {1'b0, y} + {32'b0, c};
    checks++;
    if ({cout32, s32} !== expect_v) begin
      failures++;
      $display("FAIL N=32 a=%h b=%h cin=%b sum=%h cout=%b", x, y, c, s32, cout32);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0; cin8 = 1'b0; a32 = '0; b32 = '0; cin32 = 1'b0;
    for (int n = 0; n < (1 << 17); n++) begin
      {cin8, a8, b8} = 17'(n);
      @(posedge clk);
      checks++;
      if ({cout8, s8} !== 9'(a8 + b8 + cin8)) begin
        failures++;
        $display("FAIL N=8 a=%h b=%h cin=%b sum=%h cout=%b", a8, b8, cin8, s8, cout8);
      end
    end
    check32(32'hffff_ffff, 32'h0000_0000, 1'b1);
    check32(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check32(32'hffff_ffff, 32'h0000_0001, 1'b0);
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(32'h5555_5555, 32'haaaa_aaaa, 1'b1);
    for (int n = 0; n < 5000; n++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
