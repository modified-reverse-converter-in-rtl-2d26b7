// tb_hmpe_adder -- exhaustive self-check of the modulo 2^W-1 HMPE adder.
//
// Runs the three widths the converter uses at N = 4 (W = 4, 8, 9) over all
// operand pairs and compares with the reference
//   s = (a + b >= 2^W-1) ? a + b - (2^W-1) : a + b
// computed with plain integer arithmetic. Also counts how often the
// excess-one correction (end-around carry) was taken and requires it to
// happen. Combinational: one time step per vector.
module tb_hmpe_adder;
  int checks = 0, failures = 0, wraps = 0;

  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic [8:0] a9, b9, s9;

  hmpe_adder #(.W(4)) dut4 (.a(a4), .b(b4), .s(s4));
  hmpe_adder #(.W(8)) dut8 (.a(a8), .b(b8), .s(s8));
  hmpe_adder #(.W(9)) dut9 (.a(a9), .b(b9), .s(s9));

  function automatic int unsigned ref_sum(int unsigned a, int unsigned b, int w);
    int unsigned m = (1 << w) - 1;
    return (a + b >= m) ? a + b - m : a + b;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        checks++;
        if (s4 != 4'(ref_sum(i, j, 4))) begin
          failures++;
          $display("W=4 a=%0d b=%0d s=%0d", i, j, s4);
        end
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (dut8.c_star) wraps++;
        if (s8 != 8'(ref_sum(i, j, 8))) begin
          failures++;
          if (failures < 10) $display("W=8 a=%0d b=%0d s=%0d", i, j, s8);
        end
      end
    for (int i = 0; i < 512; i++)
      for (int j = 0; j < 512; j++) begin
        a9 = 9'(i); b9 = 9'(j); #1;
        checks++;
        if (s9 != 9'(ref_sum(i, j, 9))) begin
          failures++;
          if (failures < 10) $display("W=9 a=%0d b=%0d s=%0d", i, j, s9);
        end
      end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("excess-one correction never exercised");
    end
    $display("excess-one corrections: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
