// tb_opu2 -- self-check of operand preparation unit 2 (N = 4).
//
// For random and corner values of x1, x3, H and K it checks, modulo 2^8-1:
//   v5 == 2^4 * x3,  v6 == 17 * K,  v81 + v7 == -(H + 2^4 * x1)
// and that v81 + v7 keeps H's top bit (weight 2^8 == 1) in the sum.
module tb_opu2;
  int checks = 0, failures = 0;

  logic [3:0] x1, k;
  logic [4:0] x3;
  logic [8:0] h;
  logic [7:0] v5, v6, v81, v7;

  opu2 #(.N(4)) dut (.x1(x1), .x3(x3), .h(h), .k(k), .v5(v5), .v6(v6), .v81(v81), .v7(v7));

  function automatic bit congr(longint a, longint b, longint m);
    return ((a - b) % m + m) % m == 0;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (!congr(v5, longint'(x3) * 16, 255) || !congr(v6, longint'(k) * 17, 255) ||
        !congr(longint'(v81) + longint'(v7) + longint'(h) + longint'(x1) * 16, 0, 255)) begin
      failures++;
      if (failures < 10)
        $display("x1=%0d x3=%0d h=%0d k=%0d -> v5=%0d v6=%0d v81=%0d v7=%0d",
                 x1, x3, h, k, v5, v6, v81, v7);
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
    for (int i = 0; i <= 16; i++)
      for (int j = 0; j <= 14; j++) begin
        x3 = 5'(i); k = 4'(j);
        x1 = 4'($urandom_range(15)); h = 9'($urandom_range(510));
        check();
      end
    for (int i = 0; i <= 510; i++)
      for (int j = 0; j <= 15; j++) begin
        h = 9'(i); x1 = 4'(j);
        x3 = 5'($urandom_range(16)); k = 4'($urandom_range(14));
        check();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
