// tb_rns_fwd_conv: self-checking test of the binary-to-residue converter.
// Three instances (moduli 13, 16 and 7, 16-bit input) are driven with the
// edge values 0, 1, MOD-1, MOD, 2^16-1 and random words; each residue is
// compared one clock later with x % MOD computed here.
module tb_rns_fwd_conv;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] x;
  logic [3:0] r13, r16;
  logic [2:0] r7;

  rns_fwd_conv #(.MOD(13), .IN_W(16)) dut13 (.clk, .x, .r(r13));
  rns_fwd_conv #(.MOD(16), .IN_W(16)) dut16 (.clk, .x, .r(r16));
  rns_fwd_conv #(.MOD(7),  .IN_W(16)) dut7  (.clk, .x, .r(r7));

  task automatic apply(input logic [15:0] v);
    x = v;
    @(posedge clk); #1;
    checks += 3;
    if (r13 != 4'(v % 13)) begin failures++; $display("FAIL mod13 x=%0d got %0d", v, r13); end
    if (r16 != 4'(v % 16)) begin failures++; $display("FAIL mod16 x=%0d got %0d", v, r16); end
    if (r7  != 3'(v % 7))  begin failures++; $display("FAIL mod7 x=%0d got %0d", v, r7); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    @(posedge clk); #1;
    foreach (x[i]) apply(16'(1) << i);
    apply(16'd0); apply(16'd1); apply(16'd12); apply(16'd13); apply(16'd14);
    apply(16'd6); apply(16'd7); apply(16'hFFFF); apply(16'hFFFE);
    repeat (2000) apply(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
