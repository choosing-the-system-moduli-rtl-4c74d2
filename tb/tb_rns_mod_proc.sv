// tb_rns_mod_proc: self-checking test of the ROM-based modular processor.
// Instances for multiply, add and subtract modulo 13 and multiply modulo 16
// are swept over every pair of valid residues; each output is compared one
// clock after the operands with the result worked out here with plain
// integer arithmetic.
module tb_rns_mod_proc;
  import rns_pkg::*;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [3:0] y_mul, y_add, y_sub, y_mul16;

  rns_mod_proc #(.MOD(13), .OP(OP_MUL)) dut_mul   (.clk, .a, .b, .y(y_mul));
  rns_mod_proc #(.MOD(13), .OP(OP_ADD)) dut_add   (.clk, .a, .b, .y(y_add));
  rns_mod_proc #(.MOD(13), .OP(OP_SUB)) dut_sub   (.clk, .a, .b, .y(y_sub));
  rns_mod_proc #(.MOD(16), .OP(OP_MUL)) dut_mul16 (.clk, .a, .b, .y(y_mul16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        @(posedge clk); #1;
        checks++;
        if (y_mul16 != 4'((i * j) % 16)) begin
          failures++; $display("FAIL mul16 %0d*%0d got %0d", i, j, y_mul16);
        end
        if (i < 13 && j < 13) begin
          checks += 3;
          if (y_mul != 4'((i * j) % 13)) begin
            failures++; $display("FAIL mul13 %0d*%0d got %0d", i, j, y_mul);
          end
          if (y_add != 4'((i + j) % 13)) begin
            failures++; $display("FAIL add13 %0d+%0d got %0d", i, j, y_add);
          end
          if (y_sub != 4'((i - j + 13) % 13)) begin
            failures++; $display("FAIL sub13 %0d-%0d got %0d", i, j, y_sub);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
