// tb_reverse_converter -- end-to-end, exhaustive check of the converter at its
// default size (N = 4: moduli 16, 511, 17, 15; M = 2,084,880).
//
// For every X in [0, M) it forms the residues with the % operator (a
// behavioural forward converter), applies them and requires the output to
// equal X. A directed vector (x1, x2, x3, x4) = (8, 9, 10, 10), whose
// value is X = 520, runs first. It counts each mechanism of the datapath and
// fails if one never occurs:
//   - x3 = 2^N, selecting the constant operand v42 in operand preparation 1
//   - the excess-one correction in each of the three HMPE adders (H, K, T)
//   - an end-around carry in each CSA stage
//   - both outcomes of the carry from the prefix part of the HRPX adder
// Combinational: one time step per vector; no latency to check.
module tb_reverse_converter;
  localparam int N = 4;
  localparam longint M1 = 64'd1 << N;
  localparam longint M2 = (64'd1 << (2 * N + 1)) - 1;
  localparam longint M3 = (64'd1 << N) + 1;
  localparam longint M4 = (64'd1 << N) - 1;
  localparam longint M  = M1 * M2 * M3 * M4;

  int checks = 0, failures = 0;
  int n_v42 = 0, n_eac_h = 0, n_eac_k = 0, n_eac_t = 0;
  int n_csa1 = 0, n_csa2 = 0, n_hrpx_c1 = 0, n_hrpx_c0 = 0;

  logic [N-1:0] x1, x4;
  logic [2*N:0] x2;
  logic [N:0]   x3;
  logic [5*N:0] x;

  reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x(x));

  task automatic apply(longint v);
    x1 = N'(v % M1);
    x2 = (2*N+1)'(v % M2);
    x3 = (N+1)'(v % M3);
    x4 = N'(v % M4);
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 10)
        $display("X=%0d residues (%0d, %0d, %0d, %0d) -> %0d", v, x1, x2, x3, x4, x);
    end
    if (x3[N]) n_v42++;
    if (dut.u_hmpe_h.c_star) n_eac_h++;
    if (dut.u_hmpe_k.c_star) n_eac_k++;
    if (dut.u_hmpe_t.c_star) n_eac_t++;
    if (dut.u_csa1.cy[0]) n_csa1++;
    if (dut.u_csa2.cy[0]) n_csa2++;
    if (dut.u_hrpx.c_hi[0]) n_hrpx_c1++; else n_hrpx_c0++;
  endtask

  task automatic require(int count, string what);
    checks++;
    $display("%-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("never exercised: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed vector: residues 8, 9, 10, 10 belong to X = 520.
    x1 = 4'd8; x2 = 9'd9; x3 = 5'd10; x4 = 4'd10;
    #1;
    checks++;
    if (x != 21'd520) begin
      failures++;
      $display("directed vector: X=%0d, expected 520", x);
    end
    for (longint v = 0; v < M; v++) apply(v);
    require(n_v42,     "x3 = 2^N (operand v42)");
    require(n_eac_h,   "excess-one correction, H adder");
    require(n_eac_k,   "excess-one correction, K adder");
    require(n_eac_t,   "excess-one correction, T adder");
    require(n_csa1,    "end-around carry, CSA1");
    require(n_csa2,    "end-around carry, CSA2");
    require(n_hrpx_c1, "HRPX prefix carry-out = 1");
    require(n_hrpx_c0, "HRPX prefix carry-out = 0 (borrow)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
