// Self-checking testbench for karatsuba_adaptive_mult. The low-bit product q
// is supplied by the testbench as a[M-1:0]*b[M-1:0]; the block must add the
// carry-bit terms. M = 4 is run over all 1024 operand pairs, the default
// M = 8 over random pairs with every carry-bit combination; results are
// compared with the integer product. The four carry-bit combinations are
// counted and each must occur.
module tb_karatsuba_adaptive_mult;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  int   seen [4];   // occurrences of {a1, b1}

  logic [4:0]  a4, b4;
  logic [7:0]  q4;
  logic [9:0]  p4;
  logic [8:0]  a8, b8;
  logic [15:0] q8;
  logic [17:0] p8;

  karatsuba_adaptive_mult #(.M(4)) dut4 (.a(a4), .b(b4), .q(q4), .p(p4));
  karatsuba_adaptive_mult          dut8 (.a(a8), .b(b8), .q(q8), .p(p8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        @(negedge clk);
        a4 = 5'(i); b4 = 5'(j);
        q4 = 8'((i % 16) * (j % 16));
        a8 = 9'($urandom); b8 = 9'($urandom);
        q8 = 16'(int'(a8[7:0]) * int'(b8[7:0]));
        @(posedge clk);
        seen[{a4[4], b4[4]}]++;
        checks++;
        if (p4 != 10'(i * j)) begin
          failures++;
          $display("FAIL M=4 %0d * %0d got %0d", i, j, p4);
        end
        checks++;
        if (p8 != 18'(int'(a8) * int'(b8))) begin
          failures++;
          $display("FAIL M=8 %0d * %0d got %0d", a8, b8, p8);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL carry combination %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
