// End-to-end, full-size testbench for karatsuba_top at its default 16x16
// bits. It applies the 4-bit example 1010 x 101 = 110010, operand extremes and
// 200,000 random pairs, and compares every product with the integer product
// one clock after the operands change (the multiplier is combinational).
// It also counts how often the adaptive third-term path sees each carry
// combination of the half sums, at the 16-bit level (XH+XL, YH+YL) and at the
// 8-bit level below it (the nibble sums of the high bytes); every combination
// must occur at both levels.
module tb_karatsuba_top;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   carry16 [4];   // {carry of XH+XL, carry of YH+YL} at the 16-bit stage
  int   carry8  [4];   // the same inside the XH*YH 8-bit stage

  logic [15:0] a, b;
  logic [31:0] p;

  karatsuba_top dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y);
    logic cx, cy;
    @(negedge clk);
    a = x; b = y;
    @(posedge clk);
    cx = (int'(x[15:8]) + int'(x[7:0])) > 255;
    cy = (int'(y[15:8]) + int'(y[7:0])) > 255;
    carry16[{cx, cy}]++;
    cx = (int'(x[15:12]) + int'(x[11:8])) > 15;
    cy = (int'(y[15:12]) + int'(y[11:8])) > 15;
    carry8[{cx, cy}]++;
    checks++;
    if (p != 32'(longint'(x) * longint'(y))) begin
      failures++;
      $display("FAIL %0d * %0d got %0d", x, y, p);
    end
  endtask

  initial begin : stimulus
    apply(16'b1010, 16'b101);
    checks++;
    if (p != 32'b110010) begin
      failures++;
      $display("FAIL worked example 1010 x 101 gave %b", p);
    end
    apply(16'h0000, 16'hffff);
    apply(16'hffff, 16'hffff);
    apply(16'hffff, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00ff, 16'hff00);
    for (int i = 0; i < 200000; i++) apply(16'($urandom), 16'($urandom));
    for (int k = 0; k < 4; k++) begin
      $display("carry combination %0d: 16-bit stage %0d, 8-bit stage %0d",
               k, carry16[k], carry8[k]);
      checks++;
      if (carry16[k] == 0 || carry8[k] == 0) begin
        failures++;
        $display("FAIL carry combination %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
