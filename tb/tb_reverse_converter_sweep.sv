// tb_reverse_converter_sweep -- the converter at other sizes than the
// default: N = 2 and N = 3 exhaustively, N = 5, 6, 8 and 10 on the range
// ends plus random values (up to a 51-bit result). Each size runs in an
// rc_sweep_unit; the counts are summed at the end.
module tb_reverse_converter_sweep;
  localparam int U = 6;
  logic [U-1:0] done;
  int c [U];
  int f [U];
  int checks, failures;

  rc_sweep_unit #(.N(2),  .EXHAUSTIVE(1'b1))              u2  (.done(done[0]), .checks(c[0]), .failures(f[0]));
  rc_sweep_unit #(.N(3),  .EXHAUSTIVE(1'b1))              u3  (.done(done[1]), .checks(c[1]), .failures(f[1]));
  rc_sweep_unit #(.N(5),  .EXHAUSTIVE(1'b0), .COUNT(200000)) u5  (.done(done[2]), .checks(c[2]), .failures(f[2]));
  rc_sweep_unit #(.N(6),  .EXHAUSTIVE(1'b0), .COUNT(200000)) u6  (.done(done[3]), .checks(c[3]), .failures(f[3]));
  rc_sweep_unit #(.N(8),  .EXHAUSTIVE(1'b0), .COUNT(200000)) u8  (.done(done[4]), .checks(c[4]), .failures(f[4]));
  rc_sweep_unit #(.N(10), .EXHAUSTIVE(1'b0), .COUNT(200000)) u10 (.done(done[5]), .checks(c[5]), .failures(f[5]));

  initial begin
    #100_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    wait (&done);
    checks = 0;
    failures = 0;
    for (int i = 0; i < U; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
