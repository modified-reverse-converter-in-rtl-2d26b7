// tb_csa_eac -- self-check of the carry-save adder with end-around carry.
//
// For W = 8 (the width used at N = 4) and W = 5 it checks, on corner and
// random operands, that the sum vector is the bitwise XOR of the inputs and
// that s + cy == a + b + c modulo 2^W-1. Counts the cases where the top
// carry is rotated into bit 0 and requires at least one.
module tb_csa_eac;
  int checks = 0, failures = 0, eac = 0;

  logic [7:0] a, b, c, s, cy;
  logic [4:0] a5, b5, c5, s5, cy5;

  csa_eac #(.W(8)) dut  (.a(a),  .b(b),  .c(c),  .s(s),  .cy(cy));
  csa_eac #(.W(5)) dut5 (.a(a5), .b(b5), .c(c5), .s(s5), .cy(cy5));

  task automatic check8(logic [7:0] ta, logic [7:0] tb_, logic [7:0] tc);
    a = ta; b = tb_; c = tc; #1;
    checks++;
    if (((ta & tb_) | (ta & tc) | (tb_ & tc)) >> 7) eac++;
    if (s != (ta ^ tb_ ^ tc) ||
        (32'(s) + 32'(cy)) % 255 != (32'(ta) + 32'(tb_) + 32'(tc)) % 255) begin
      failures++;
      if (failures < 10) $display("W=8 a=%h b=%h c=%h s=%h cy=%h", ta, tb_, tc, s, cy);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check8(8'h00, 8'h00, 8'h00);
    check8(8'hff, 8'hff, 8'hff);
    check8(8'h80, 8'h80, 8'h00);
    check8(8'hff, 8'h01, 8'h00);
    for (int i = 0; i < 100000; i++)
      check8(8'($urandom), 8'($urandom), 8'($urandom));
    for (int i = 0; i < 32768; i++) begin
      a5 = 5'(i); b5 = 5'(i >> 5); c5 = 5'(i >> 10); #1;
      checks++;
      if (s5 != (a5 ^ b5 ^ c5) ||
          (32'(s5) + 32'(cy5)) % 31 != (32'(a5) + 32'(b5) + 32'(c5)) % 31) begin
        failures++;
        if (failures < 10) $display("W=5 a=%h b=%h c=%h s=%h cy=%h", a5, b5, c5, s5, cy5);
      end
    end
    checks++;
    if (eac == 0) begin
      failures++;
      $display("end-around carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
