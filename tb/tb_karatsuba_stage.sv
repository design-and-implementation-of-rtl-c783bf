// Self-checking testbench for karatsuba_stage: the 4-bit and 8-bit stages over
// every operand pair, and the default 16-bit stage over corner cases and
// random pairs, all compared with the integer product one clock after the
// operands change.
module tb_karatsuba_stage;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [15:0] corner [6];

  karatsuba_stage #(.N(4)) dut4  (.a(a4),  .b(b4),  .p(p4));
  karatsuba_stage #(.N(8)) dut8  (.a(a8),  .b(b8),  .p(p8));
  karatsuba_stage          dut16 (.a(a16), .b(b16), .p(p16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    corner = '{16'h0000, 16'h0001, 16'h00ff, 16'hff00, 16'h8000, 16'hffff};
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        @(negedge clk);
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        if (i < 6 && j < 6) begin
          a16 = corner[i]; b16 = corner[j];
        end else begin
          a16 = 16'($urandom); b16 = 16'($urandom);
        end
        @(posedge clk);
        checks++;
        if (p8 != 16'(i * j)) begin
          failures++;
          $display("FAIL N=8 %0d * %0d got %0d", i, j, p8);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (p4 != 8'(i * j)) begin
            failures++;
            $display("FAIL N=4 %0d * %0d got %0d", i, j, p4);
          end
        end
        checks++;
        if (p16 != 32'(longint'(a16) * longint'(b16))) begin
          failures++;
          $display("FAIL N=16 %0d * %0d got %0d", a16, b16, p16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
