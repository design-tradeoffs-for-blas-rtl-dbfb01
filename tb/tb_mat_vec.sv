// tb_mat_vec: self-checking test of the blocked matrix-vector multiply.
// Reduced sizes: K = 4 lanes, block B = 128, n = 256 (two column blocks),
// then a second product with n = 128 (one block). x and A hold small integers, so y
// must match the exact product. Within each sub-row the column indices are
// permuted so every lane really looks x_j up by its index. Timing: the run
// must finish within n^2/K plus the pipeline, per-block and load overheads of
// the latency formula (T = n^2/K + nK/B + B + T_red), with 3% allowed for
// the reduction circuit briefly holding the input back, and loading x^{g+1}
// must overlap computing with x^g (counted).
module tb_mat_vec;
  import blas_pkg::*;

  localparam int unsigned K = 4;
  localparam int unsigned B = 128;
  localparam int unsigned N_MAX = 256;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [$clog2(N_MAX+1)-1:0] n_i = '0;
  logic x_valid = 0, x_ready;
  fp64_t x_data = '0;
  logic a_valid = 0, a_ready;
  fp64_t a_data [K];
  logic [$clog2(B)-1:0] a_col [K];
  logic y_valid;
  fp64_t y_data;
  int checks = 0, failures = 0, cycle = 0, overlap = 0;

  mat_vec #(.K(K), .B(B), .N_MAX(N_MAX)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  // x words taken while A elements are also being taken
  always @(posedge clk) if (rst_n && x_valid && x_ready && a_valid && a_ready) overlap++;

  int A [N_MAX][N_MAX];
  int X [N_MAX];
  int yexp [N_MAX];
  int ycnt;

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      checks++;
      if ($bitstoreal(y_data) != real'(yexp[ycnt])) begin
        failures++;
        if (failures < 10) $display("y[%0d] got %f exp %0d", ycnt, $bitstoreal(y_data), yexp[ycnt]);
      end
      ycnt++;
    end
  end

  task automatic run(int n);
    int t0;
    for (int r = 0; r < n; r++) X[r] = int'($urandom_range(0, 20)) - 10;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) A[r][c] = int'($urandom_range(0, 20)) - 10;
    for (int r = 0; r < n; r++) begin
      yexp[r] = 0;
      for (int c = 0; c < n; c++) yexp[r] += A[r][c] * X[c];
    end
    ycnt = 0;
    @(negedge clk);
    n_i = ($clog2(N_MAX+1))'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = cycle;
    fork
      begin : xs
        for (int g = 0; g < n / int'(B); g++)
          for (int j = 0; j < int'(B); j++) begin
            x_valid = 1;
            x_data  = $realtobits(real'(X[g * int'(B) + j]));
            @(posedge clk);
            while (!x_ready) @(posedge clk);
            #1;
          end
        x_valid = 0;
      end
      begin : as
        for (int g = 0; g < n / int'(B); g++)
          for (int r = 0; r < n; r++)
            for (int s = 0; s < int'(B / K); s++) begin
              for (int p = 0; p < int'(K); p++) begin
                int col;
                col = s * int'(K) + (p + s) % int'(K);
                a_col[p]  = ($clog2(B))'(col);
                a_data[p] = $realtobits(real'(A[r][g * int'(B) + col]));
              end
              a_valid = 1;
              @(posedge clk);
              while (!a_ready) @(posedge clk);
              #1;
            end
        a_valid = 0;
      end
    join
    while (ycnt < n && cycle - t0 < 100000) @(posedge clk);
    checks++;
    if (ycnt != n) begin failures++; $display("only %0d of %0d y values", ycnt, n); end
    checks++;
    // formula terms plus 3% for the reduction circuit throttling the input
    if (cycle - t0 > n * n / int'(K) + (n / int'(B)) * (2 * int'(K) + 4) + int'(B)
                     + int'(MUL_LAT) + 12 * int'(ADD_LAT) + 20 + n * n / int'(K) / 32) begin
      failures++;
      $display("n=%0d took %0d cycles", n, cycle - t0);
    end
    $display("n=%0d: %0d cycles, n^2/K = %0d", n, cycle - t0, n * n / int'(K));
  endtask

  initial begin
    for (int p = 0; p < int'(K); p++) begin a_data[p] = '0; a_col[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(256);
    run(128);
    checks++;
    if (overlap == 0) begin failures++; $display("x loading never overlapped computing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
