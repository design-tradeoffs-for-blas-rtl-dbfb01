// tb_blas_top: end-to-end test of the three BLAS engines at their default
// sizes (K1 = K2 = 4, B = 256, K3 = 8, sqrt(m) = 128, N_MAX = 2048).
//  * vec_dot: two vector products of the evaluated length n = 2048, then a
//    burst of 100 one-chunk products that fills the reduction circuit's set
//    tags, so its back-pressure (in_ready low) must occur.
//  * mat_vec: y = A x with n = 512, two column blocks, so block results are
//    accumulated and x^1 loads while x^0 is in use.
//  * mat_mul: C = A B with n = 256: 2 x 2 output blocks of two block products
//    each, so the B row prefetch crosses block boundaries and each output
//    block is drained.
// All data are small integers, so every result is compared exactly. Each
// mechanism is counted and must have happened at least once.
module tb_blas_top;
  import blas_pkg::*;

  localparam int unsigned K1 = 4, K2 = 4, B = 256, K3 = 8, S = 128, N_MAX = 2048;
  localparam int unsigned AW = 2 * $clog2(N_MAX);
  localparam int unsigned NW = $clog2(N_MAX + 1);
  localparam int VN = 2048, MVN = 512, MMN = 256;

  logic clk = 0, rst_n = 0;
  logic vd_in_valid = 0, vd_in_last = 0, vd_in_ready, vd_out_valid;
  fp64_t vd_u [K1], vd_v [K1], vd_out_data;
  logic mv_start = 0, mv_x_valid = 0, mv_x_ready, mv_a_valid = 0, mv_a_ready, mv_y_valid;
  logic [NW-1:0] mv_n = '0, mm_n = '0;
  fp64_t mv_x_data = '0, mv_a_data [K2], mv_y_data;
  logic [$clog2(B)-1:0] mv_a_col [K2];
  logic mm_start = 0, mm_busy, mm_done, mm_rd_a_en, mm_rd_b_en, mm_wr_c_en;
  logic [AW-1:0] mm_rd_a_addr, mm_rd_b_addr, mm_wr_c_addr;
  fp64_t mm_rd_a_data = '0, mm_rd_b_data = '0, mm_wr_c_data;

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_dot = 0, n_backpressure = 0, n_overlap = 0, n_blockacc = 0, n_prefetch = 0, n_drain = 0;

  blas_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- level 1 ----------------
  real vd_q[$];
  always @(posedge clk) begin
    if (rst_n && vd_in_valid && !vd_in_ready) n_backpressure++;
    if (rst_n && vd_out_valid) begin
      real e;
      e = vd_q.pop_front();
      checks++; n_dot++;
      if ($bitstoreal(vd_out_data) != e) begin
        failures++; $display("dot got %f exp %f", $bitstoreal(vd_out_data), e);
      end
    end
  end

  task automatic dot(int n);
    real s;
    bit r;
    s = 0.0;
    for (int c = 0; c < n / int'(K1); c++) begin
      for (int p = 0; p < int'(K1); p++) begin
        real a, b;
        a = real'(int'($urandom_range(0, 16)) - 8);
        b = real'(int'($urandom_range(0, 16)) - 8);
        s += a * b;
        vd_u[p] <= $realtobits(a);
        vd_v[p] <= $realtobits(b);
      end
      vd_in_valid <= 1;
      vd_in_last  <= (c == n / int'(K1) - 1);
      do begin @(negedge clk); r = vd_in_ready; @(posedge clk); end while (!r);
    end
    vd_q.push_back(s);
  endtask

  // ---------------- level 2 ----------------
  int MA [MVN][MVN];
  int MX [MVN];
  int MY [MVN];
  int ycnt = 0;
  always @(posedge clk) begin
    if (rst_n && mv_x_valid && mv_x_ready && mv_a_valid && mv_a_ready) n_overlap++;
    if (rst_n && dut.u_mat_vec.rv && !dut.u_mat_vec.y_first) n_blockacc++;
    if (rst_n && mv_y_valid) begin
      checks++;
      if ($bitstoreal(mv_y_data) != real'(MY[ycnt])) begin
        failures++;
        if (failures < 10) $display("y[%0d] got %f exp %0d", ycnt, $bitstoreal(mv_y_data), MY[ycnt]);
      end
      ycnt++;
    end
  end

  task automatic matvec();
    for (int r = 0; r < MVN; r++) MX[r] = int'($urandom_range(0, 10)) - 5;
    for (int r = 0; r < MVN; r++) for (int c = 0; c < MVN; c++) MA[r][c] = int'($urandom_range(0, 10)) - 5;
    for (int r = 0; r < MVN; r++) begin
      MY[r] = 0;
      for (int c = 0; c < MVN; c++) MY[r] += MA[r][c] * MX[c];
    end
    @(negedge clk);
    mv_n = NW'(MVN); mv_start = 1;
    @(negedge clk);
    mv_start = 0;
    fork
      begin
        for (int j = 0; j < MVN; j++) begin
          mv_x_valid = 1; mv_x_data = $realtobits(real'(MX[j]));
          @(posedge clk);
          while (!mv_x_ready) @(posedge clk);
          #1;
        end
        mv_x_valid = 0;
      end
      begin
        for (int g = 0; g < MVN / int'(B); g++)
          for (int r = 0; r < MVN; r++)
            for (int s = 0; s < int'(B / K2); s++) begin
              for (int p = 0; p < int'(K2); p++) begin
                mv_a_col[p]  = ($clog2(B))'(s * int'(K2) + p);
                mv_a_data[p] = $realtobits(real'(MA[r][g * int'(B) + s * int'(K2) + p]));
              end
              mv_a_valid = 1;
              @(posedge clk);
              while (!mv_a_ready) @(posedge clk);
              #1;
            end
        mv_a_valid = 0;
      end
    join
    while (ycnt < MVN) @(posedge clk);
  endtask

  // ---------------- level 3 ----------------
  real Am [MMN*MMN];
  real Bm [MMN*MMN];
  real Cm [MMN*MMN];
  always @(posedge clk) begin
    if (mm_rd_a_en) mm_rd_a_data <= $realtobits(Am[mm_rd_a_addr]);
    if (mm_rd_b_en) mm_rd_b_data <= $realtobits(Bm[mm_rd_b_addr]);
    if (rst_n && mm_wr_c_en) Cm[mm_wr_c_addr] <= $bitstoreal(mm_wr_c_data);
    // a B row of the next block streamed while the last row of a block is in use
    if (rst_n && mm_rd_b_en && dut.u_mat_mul.state == 3'd2 && 32'(dut.u_mat_mul.q) == S - 1) n_prefetch++;
    if (rst_n && dut.u_mat_mul.drain_go) n_drain++;
  end

  task automatic matmul();
    int t0;
    for (int x = 0; x < MMN * MMN; x++) begin
      Am[x] = real'(int'($urandom_range(0, 8)) - 4);
      Bm[x] = real'(int'($urandom_range(0, 8)) - 4);
      Cm[x] = 1.0e9;
    end
    @(negedge clk);
    mm_n = NW'(MMN); mm_start = 1;
    @(negedge clk);
    mm_start = 0;
    t0 = cycle;
    while (!mm_done) @(posedge clk);
    @(posedge clk);
    $display("matmul n=%0d: %0d cycles, n^3/K = %0d", MMN, cycle - t0, MMN * MMN * MMN / int'(K3));
    for (int r = 0; r < MMN; r++)
      for (int c = 0; c < MMN; c++) begin
        real e;
        e = 0.0;
        for (int q = 0; q < MMN; q++) e += Am[r * MMN + q] * Bm[q * MMN + c];
        checks++;
        if (Cm[r * MMN + c] != e) begin
          failures++;
          if (failures < 10) $display("C[%0d][%0d] got %f exp %f", r, c, Cm[r * MMN + c], e);
        end
      end
  endtask

  initial begin
    for (int p = 0; p < int'(K1); p++) begin vd_u[p] = '0; vd_v[p] = '0; end
    for (int p = 0; p < int'(K2); p++) begin mv_a_data[p] = '0; mv_a_col[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        dot(VN);
        dot(VN);
        for (int i = 0; i < 100; i++) dot(int'(K1));
        vd_in_valid <= 0;
      end
      matvec();
      matmul();
    join
    repeat (20 * ADD_LAT) @(posedge clk);
    checks++;
    if (vd_q.size() != 0) begin failures++; $display("%0d dot products missing", vd_q.size()); end
    $display("mechanisms: dot=%0d backpressure=%0d x_overlap=%0d block_acc=%0d b_prefetch=%0d drain=%0d",
             n_dot, n_backpressure, n_overlap, n_blockacc, n_prefetch, n_drain);
    checks += 6;
    if (n_dot == 0)          begin failures++; $display("no vector product"); end
    if (n_backpressure == 0) begin failures++; $display("reduction circuit never held the input"); end
    if (n_overlap == 0)      begin failures++; $display("x load never overlapped"); end
    if (n_blockacc == 0)     begin failures++; $display("no block accumulation"); end
    if (n_prefetch == 0)     begin failures++; $display("no B prefetch across blocks"); end
    if (n_drain == 0)        begin failures++; $display("no drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
