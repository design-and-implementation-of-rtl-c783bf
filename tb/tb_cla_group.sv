// Self-checking testbench for cla_group: every input of a 4-bit group
// (a, b, cin: 512 cases) and a 3-bit group, compared with the integer sum.
module tb_cla_group;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0] a4, b4, s4;
  logic       c4, co4;
  logic [2:0] a3, b3, s3;
  logic       c3, co3;

  cla_group #(.G(4)) dut4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  cla_group #(.G(3)) dut3 (.a(a3), .b(b3), .cin(c3), .sum(s3), .cout(co3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      {c4, a4, b4} = 9'(v);
      {c3, a3, b3} = 7'(v);
      @(posedge clk);
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL G=4 a=%h b=%h cin=%b got %b%h", a4, b4, c4, co4, s4);
      end
      checks++;
      if ({co3, s3} != 4'(int'(a3) + int'(b3) + int'(c3))) begin
        failures++;
        $display("FAIL G=3 a=%h b=%h cin=%b got %b%h", a3, b3, c3, co3, s3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
