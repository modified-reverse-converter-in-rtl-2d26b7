// rc_sweep_unit -- testbench helper: checks one reverse_converter instance of
// size N against X for COUNT values of X in [0, M). With EXHAUSTIVE set it
// walks every X (COUNT is then ignored); otherwise it takes the range ends
// and random values. Residues come from the % operator. Raises done when
// finished and reports its check and failure counts.
module rc_sweep_unit #(
  parameter int N          = 5,
  parameter bit EXHAUSTIVE = 1'b0,
  parameter int COUNT      = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam longint M1 = 64'd1 << N;
  localparam longint M2 = (64'd1 << (2 * N + 1)) - 1;
  localparam longint M3 = (64'd1 << N) + 1;
  localparam longint M4 = (64'd1 << N) - 1;
  localparam longint M  = M1 * M2 * M3 * M4;

  logic [N-1:0] x1, x4;
  logic [2*N:0] x2;
  logic [N:0]   x3;
  logic [5*N:0] x;

  reverse_converter #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x(x));

  task automatic apply(longint v);
    x1 = N'(v % M1);
    x2 = (2*N+1)'(v % M2);
    x3 = (N+1)'(v % M3);
    x4 = N'(v % M4);
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 5) $display("N=%0d X=%0d -> %0d", N, v, x);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    if (EXHAUSTIVE) begin
      for (longint v = 0; v < M; v++) apply(v);
    end else begin
      for (longint v = 0; v < 64; v++) begin
        apply(v);
        apply(M - 1 - v);
      end
      for (int i = 0; i < COUNT; i++)
        apply(longint'({$urandom, $urandom} >> 1) % M);
    end
    done = 1'b1;
  end
endmodule
