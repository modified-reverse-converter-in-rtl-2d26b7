// tb_opu3 -- self-check of operand preparation unit 3 (N = 4).
//
// Over all T in [0, 254] and sampled H it checks P == T * 2^9 + H and
// ~T == 255 - T, computed arithmetically.
module tb_opu3;
  int checks = 0, failures = 0;

  logic [7:0]  t, t_n;
  logic [8:0]  h;
  logic [16:0] p;

  opu3 #(.N(4)) dut (.t(t), .h(h), .p(p), .t_n(t_n));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 254; i++)
      for (int j = 0; j < 511; j += 7) begin
        t = 8'(i); h = 9'(j); #1;
        checks++;
        if (int'(p) != i * 512 + j || int'(t_n) != 255 - i) begin
          failures++;
          if (failures < 10) $display("t=%0d h=%0d p=%0d t_n=%0d", i, j, p, t_n);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
