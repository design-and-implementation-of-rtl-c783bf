// Self-checking testbench for mult2x2: all 16 operand pairs against a*b.
module tb_mult2x2;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [1:0] a, b;
  logic [3:0] p;

  mult2x2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        @(negedge clk);
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        checks++;
        if (p != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
