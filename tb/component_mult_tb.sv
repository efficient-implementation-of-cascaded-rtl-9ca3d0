// Exhaustive test of the 8 x 8 component multiplier against the * operator.
module component_mult_tb;
  localparam int unsigned R = 8;
  logic [R-1:0]   a, b;
  logic [2*R-1:0] p;
  int checks = 0, failures = 0;

  component_mult #(.R(R)) dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << R); i++) begin
      for (int j = 0; j < (1 << R); j++) begin
        a = R'(i); b = R'(j);
        #1;
        checks++;
        if (p !== (2*R)'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
