// tb_mo_adder: self-checking test of the carry-save multi-operand adder.
// Instances with 1, 2, 5 and 23 operands, and one whose sum is kept modulo
// 16 (as for the q_i of the power-of-two decoder), are driven with random
// operands, all-zero and all-ones; each sum is compared with the plain sum
// worked out here, reduced to the output width.
module tb_mo_adder;
  int checks = 0, failures = 0;

  logic [0:0][7:0]   o1;  logic [7:0]  s1;
  logic [1:0][7:0]   o2;  logic [8:0]  s2;
  logic [4:0][12:0]  o5;  logic [15:0] s5;
  logic [4:0][3:0]   oq;  logic [3:0]  sq;
  logic [22:0][7:0]  o23; logic [12:0] s23;

  mo_adder #(.N(1),  .W(8),  .OW(8))  d1  (.ops(o1),  .sum(s1));
  mo_adder #(.N(2),  .W(8),  .OW(9))  d2  (.ops(o2),  .sum(s2));
  mo_adder #(.N(5),  .W(13), .OW(16)) d5  (.ops(o5),  .sum(s5));
  mo_adder #(.N(5),  .W(4),  .OW(4))  dq  (.ops(oq),  .sum(sq));
  mo_adder #(.N(23), .W(8),  .OW(13)) d23 (.ops(o23), .sum(s23));

  task automatic check();
    int unsigned e1 = 0, e2 = 0, e5 = 0, eq = 0, e23 = 0;
    #1;
    e1 = o1[0];
    foreach (o2[i])  e2  += o2[i];
    foreach (o5[i])  e5  += o5[i];
    foreach (oq[i])  eq  += oq[i];
    foreach (o23[i]) e23 += o23[i];
    checks += 5;
    if (32'(s1)  != e1)             begin failures++; $display("FAIL N=1 got %0d exp %0d", s1, e1); end
    if (32'(s2)  != e2)             begin failures++; $display("FAIL N=2 got %0d exp %0d", s2, e2); end
    if (32'(s5)  != e5)             begin failures++; $display("FAIL N=5 got %0d exp %0d", s5, e5); end
    if (32'(sq)  != eq % 16)        begin failures++; $display("FAIL mod16 got %0d exp %0d", sq, eq % 16); end
    if (32'(s23) != e23)            begin failures++; $display("FAIL N=23 got %0d exp %0d", s23, e23); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    o1 = '0; o2 = '0; o5 = '0; oq = '0; o23 = '0;
    check();
    o1 = '1; o2 = '1; o5 = '1; oq = '1; o23 = '1;
    check();
    repeat (3000) begin
      o1[0] = 8'($urandom);
      foreach (o2[i])  o2[i]  = 8'($urandom);
      foreach (o5[i])  o5[i]  = 13'($urandom);
      foreach (oq[i])  oq[i]  = 4'($urandom);
      foreach (o23[i]) o23[i] = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
