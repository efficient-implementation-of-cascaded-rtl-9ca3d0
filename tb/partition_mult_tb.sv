// Test of the partition multiplier: the published 32-bit example, corner
// cases and random operands, at the default 32-bit size (R = 8, S = 4) and
// at a second size (R = 4, S = 8), against the * operator of 64-bit
// integers. It also checks the partial sums of the example against the
// published component products, and the two partial products A_E*B and A_O*B.
module partition_mult_tb;
  logic [31:0] a, b;
  logic [63:0] p, p2;
  int checks = 0, failures = 0;

  partition_mult                    dut  (.a, .b, .p);
  partition_mult #(.R(4), .S(8))    dut2 (.a, .b, .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    logic [63:0] ref_p;
    a = ta; b = tb_;
    #1;
    ref_p = 64'(ta) * 64'(tb_);
    checks += 2;
    if (p !== ref_p) begin
      failures++;
      $display("FAIL %0d * %0d: expected %0d got %0d", ta, tb_, ref_p, p);
    end
    if (p2 !== ref_p) begin
      failures++;
      $display("FAIL (R=4,S=8) %0d * %0d: expected %0d got %0d", ta, tb_, ref_p, p2);
    end
  endtask

  initial begin
    // Published example: 44742143 * 179044224 = 8010822273532032.
    check(32'd44742143, 32'd179044224);
    checks++;
    if (p !== 64'd8010822273532032) begin
      failures++;
      $display("FAIL published example: got %0d", p);
    end
    // Published component products of the example.
    checks += 3;
    if (dut.prod[0][0] !== 16'd32640) begin failures++; $display("FAIL A0B0 %0d", dut.prod[0][0]); end
    if (dut.prod[2][0] !== 16'd21760) begin failures++; $display("FAIL A2B0 %0d", dut.prod[2][0]); end
    if (dut.prod[0][1] !== 16'd65025) begin failures++; $display("FAIL A0B1 %0d", dut.prod[0][1]); end
    // A_E*B and A_O*B partial results (the odd tree is stored R bits down).
    checks += 2;
    if (dut.tree_e[1] !== 64'(a & 32'h00FF_00FF) * 64'(b)) begin failures++; $display("FAIL A_E*B"); end
    if ((dut.tree_o[1] << 8) !== 64'(a & 32'hFF00_FF00) * 64'(b)) begin failures++; $display("FAIL A_O*B"); end

    check(32'd0, 32'd0);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hFFFF_FFFF, 32'd1);
    check(32'h8000_0000, 32'h8000_0000);
    check(32'h00FF_00FF, 32'hFF00_FF00);
    for (int i = 0; i < 32; i++) check(32'd1 << i, 32'hDEAD_BEEF);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
