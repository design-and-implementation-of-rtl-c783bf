// Self-checking testbench for cla_adder at its default 16 bits and at 10 bits
// (a width that leaves a partial last group): carry-chain corner cases and
// random words, compared with the integer sum. The result is checked one
// clock after the inputs change.
module tb_cla_adder;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        cin, cout;
  logic [9:0]  a10, b10, s10;
  logic        cout10;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));
  cla_adder #(.W(10)) dut10 (.a(a10), .b(b10), .cin(cin), .sum(s10), .cout(cout10));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] x, logic [15:0] y, logic c);
    @(negedge clk);
    a = x; b = y; cin = c;
    a10 = x[9:0]; b10 = y[9:0];
    @(posedge clk);
    checks++;
    if ({cout, s} != 17'(int'(x) + int'(y) + int'(c))) begin
      failures++;
      $display("FAIL W=16 %h + %h + %b got %b%h", x, y, c, cout, s);
    end
    checks++;
    if ({cout10, s10} != 11'(int'(x[9:0]) + int'(y[9:0]) + int'(c))) begin
      failures++;
      $display("FAIL W=10 %h + %h + %b got %b%h", x[9:0], y[9:0], c, cout10, s10);
    end
  endtask

  initial begin : stimulus
    apply(16'hffff, 16'h0000, 1'b1);   // carry through every group
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h00ff, 16'h0001, 1'b0);
    apply(16'h03ff, 16'h0000, 1'b1);
    for (int i = 0; i < 20000; i++)
      apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
