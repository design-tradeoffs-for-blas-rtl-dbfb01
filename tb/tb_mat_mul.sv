// tb_mat_mul: self-checking test of the matrix-multiply linear array.
// Reduced sizes: K = 4 PEs, blocks of S = 16 (m = 256, m/K = 64 > ADD_LAT),
// n = 32 (2 x 2 output blocks, two block products each) and then n = 16 (a
// single block). A and B hold small integers so C must match exactly; the
// external memory is modelled here as arrays with one cycle of read latency.
// Timing: the product must finish within S + n^3/K (the latency formula) plus
// the drain of S*S words, settle time and start-up per output block. The
// test also checks the memory traffic rate: during computing, A and B are each
// read once every S/K cycles.
module tb_mat_mul;
  import blas_pkg::*;

  localparam int unsigned K = 4;
  localparam int unsigned S = 16;
  localparam int unsigned N_MAX = 32;
  localparam int unsigned AW = 2 * $clog2(N_MAX);

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [$clog2(N_MAX+1)-1:0] n_i = '0;
  logic busy, done;
  logic rd_a_en, rd_b_en, wr_c_en;
  logic [AW-1:0] rd_a_addr, rd_b_addr, wr_c_addr;
  fp64_t rd_a_data = '0, rd_b_data = '0, wr_c_data;
  int checks = 0, failures = 0, cycle = 0;
  int a_reads = 0, c_writes = 0;

  mat_mul #(.K(K), .S(S), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  real Am [N_MAX*N_MAX];
  real Bm [N_MAX*N_MAX];
  real Cm [N_MAX*N_MAX];
  bit  Cw [N_MAX*N_MAX];

  // external memory model
  always @(posedge clk) begin
    if (rd_a_en) begin rd_a_data <= $realtobits(Am[rd_a_addr]); a_reads++; end
    if (rd_b_en) rd_b_data <= $realtobits(Bm[rd_b_addr]);
    if (rst_n && wr_c_en) begin
      Cm[wr_c_addr] <= $bitstoreal(wr_c_data);
      Cw[wr_c_addr] <= 1'b1;
      c_writes++;
    end
  end

  task automatic run(int n);
    int t0, tlim;
    for (int x = 0; x < n * n; x++) begin
      Am[x] = real'(int'($urandom_range(0, 16)) - 8);
      Bm[x] = real'(int'($urandom_range(0, 16)) - 8);
      Cw[x] = 1'b0;
    end
    a_reads = 0; c_writes = 0;
    @(negedge clk);
    n_i = ($clog2(N_MAX+1))'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    tlim = int'(S) + n * n * n / int'(K)
         + (n / int'(S)) * (n / int'(S)) * (int'(S * S) + 4 * int'(K) + int'(S / K)
                                            + int'(MUL_LAT) + int'(ADD_LAT) + 20);
    while (!done && cycle - t0 < 4 * tlim) @(posedge clk);
    @(posedge clk);
    checks++;
    if (cycle - t0 > tlim) begin
      failures++;
      $display("n=%0d took %0d cycles, limit %0d", n, cycle - t0, tlim);
    end
    $display("n=%0d: %0d cycles, n^3/K = %0d", n, cycle - t0, n * n * n / int'(K));
    // every element of C
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        real e;
        e = 0.0;
        for (int q = 0; q < n; q++) e += Am[r * n + q] * Bm[q * n + c];
        checks++;
        if (!Cw[r * n + c] || Cm[r * n + c] != e) begin
          failures++;
          if (failures < 10) $display("C[%0d][%0d] got %f exp %f written %b", r, c, Cm[r * n + c], e, Cw[r * n + c]);
        end
      end
    // traffic: one a per S/K cycles over the n^3/K compute cycles
    checks++;
    if (a_reads != n * n * n / int'(S)) begin
      failures++;
      $display("A read %0d times, expected n^3/S = %0d", a_reads, n * n * n / int'(S));
    end
    checks++;
    if (c_writes != n * n) begin failures++; $display("%0d C writes", c_writes); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32);
    run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
