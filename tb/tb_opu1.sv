// tb_opu1 -- self-check of operand preparation unit 1 (N = 4 and N = 5).
//
// Sweeps every legal value of each residue (the others random) and checks
// the congruences the operands must satisfy:
//   v1 == x2 * 2^(N+1), v2 == -x1 * 2^(N+1)   (mod 2^(2N+1)-1)
//   v3 == x4 * 2^(N-1), v4 == -x3 * 2^(N-1)   (mod 2^N-1)
// using integer arithmetic only.
module tb_opu1;
  int checks = 0, failures = 0, sel42 = 0;

  logic [3:0] x1, x4, v3, v4;
  logic [8:0] x2, v1, v2;
  logic [4:0] x3;
  logic [4:0] y1, y4, w3, w4;
  logic [10:0] y2, w1, w2;
  logic [5:0] y3;

  opu1 #(.N(4)) dut  (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .v1(v1), .v2(v2), .v3(v3), .v4(v4));
  opu1 #(.N(5)) dut5 (.x1(y1), .x2(y2), .x3(y3), .x4(y4), .v1(w1), .v2(w2), .v3(w3), .v4(w4));

  // a == b (mod m) for non-negative a, b
  function automatic bit congr(longint a, longint b, longint m);
    return ((a - b) % m + m) % m == 0;
  endfunction

  task automatic check4();
    #1;
    checks++;
    if (x3 == 5'd16) sel42++;
    if (!congr(v1, longint'(x2) * 32, 511) || !congr(longint'(v2) + longint'(x1) * 32, 0, 511) ||
        !congr(v3, longint'(x4) * 8, 15)  || !congr(longint'(v4) + longint'(x3) * 8, 0, 15)) begin
      failures++;
      if (failures < 10)
        $display("N=4 x1=%0d x2=%0d x3=%0d x4=%0d -> v1=%0d v2=%0d v3=%0d v4=%0d",
                 x1, x2, x3, x4, v1, v2, v3, v4);
    end
  endtask

  task automatic check5();
    #1;
    checks++;
    if (!congr(w1, longint'(y2) * 64, 2047) || !congr(longint'(w2) + longint'(y1) * 64, 0, 2047) ||
        !congr(w3, longint'(y4) * 16, 31)  || !congr(longint'(w4) + longint'(y3) * 16, 0, 31)) begin
      failures++;
      if (failures < 10)
        $display("N=5 x1=%0d x2=%0d x3=%0d x4=%0d", y1, y2, y3, y4);
    end
  endtask

  task automatic rand4();
    x1 = 4'($urandom_range(15));
    x2 = 9'($urandom_range(510));
    x3 = 5'($urandom_range(16));
    x4 = 4'($urandom_range(14));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 15; i++)  begin rand4(); x1 = 4'(i); check4(); end
    for (int i = 0; i <= 510; i++) begin rand4(); x2 = 9'(i); check4(); end
    for (int i = 0; i <= 16; i++)  begin rand4(); x3 = 5'(i); check4(); end
    for (int i = 0; i <= 14; i++)  begin rand4(); x4 = 4'(i); check4(); end
    for (int i = 0; i < 5000; i++) begin
      y1 = 5'($urandom_range(31));
      y2 = 11'($urandom_range(2046));
      y3 = (i % 50 == 0) ? 6'd32 : 6'($urandom_range(32));
      y4 = 5'($urandom_range(30));
      check5();
    end
    checks++;
    if (sel42 == 0) begin
      failures++;
      $display("x3 = 2^N path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
