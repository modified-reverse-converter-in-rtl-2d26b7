// tb_hrpx_adder -- self-check of the hybrid XOR/OR (4N+1)-bit subtractor.
//
// Instances at N = 4 (the default), N = 3 and N = 5 (prefix widths 6 and 10,
// not powers of two). Each compares s with P - T mod 2^(4N+1), where
// T = ~b_n, over every b_n and random or corner-case P. Counts how often the
// carry out of the prefix part is 0, so that the OR chain must propagate a
// borrow through the upper part, and how often it is 1.
module tb_hrpx_adder;
  int checks = 0, failures = 0, c_one = 0, c_zero = 0;

  logic [16:0] a4, s4;  logic [7:0] b4;
  logic [12:0] a3, s3;  logic [5:0] b3;
  logic [20:0] a5, s5;  logic [9:0] b5;

  hrpx_adder #(.N(4)) dut4 (.a(a4), .b_n(b4), .s(s4));
  hrpx_adder #(.N(3)) dut3 (.a(a3), .b_n(b3), .s(s3));
  hrpx_adder #(.N(5)) dut5 (.a(a5), .b_n(b5), .s(s5));

  function automatic longint ref_sub(longint p, longint bn, int n);
    longint t = ((64'd1 << (2 * n)) - 1) ^ bn;
    return (p - t) & ((64'd1 << (4 * n + 1)) - 1);
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bn = 0; bn < 256; bn++)
      for (int r = 0; r < 200; r++) begin
        b4 = 8'(bn);
        case (r)
          0: a4 = '0;
          1: a4 = '1;
          2: a4 = 17'h100;
          3: a4 = {9'($urandom), 8'h00};
          default: a4 = 17'($urandom);
        endcase
        #1;
        checks++;
        if (dut4.c_hi[0]) c_one++; else c_zero++;
        if (longint'(s4) != ref_sub(a4, b4, 4)) begin
          failures++;
          if (failures < 10) $display("N=4 a=%h b_n=%h s=%h", a4, b4, s4);
        end
      end
    for (int i = 0; i < 20000; i++) begin
      a3 = 13'($urandom); b3 = 6'($urandom);
      a5 = 21'($urandom); b5 = 10'($urandom);
      #1;
      checks += 2;
      if (longint'(s3) != ref_sub(a3, b3, 3)) begin
        failures++;
        if (failures < 10) $display("N=3 a=%h b_n=%h s=%h", a3, b3, s3);
      end
      if (longint'(s5) != ref_sub(a5, b5, 5)) begin
        failures++;
        if (failures < 10) $display("N=5 a=%h b_n=%h s=%h", a5, b5, s5);
      end
    end
    checks++;
    if (c_one == 0 || c_zero == 0) begin
      failures++;
      $display("prefix-part carry-out not seen both ways: %0d ones, %0d zeros", c_one, c_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
