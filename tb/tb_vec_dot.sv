// tb_vec_dot: self-checking test of the level-1 vector product (K = 4).
// Vector pairs of several lengths (n = 4 up to n = 2048, the evaluated size)
// are streamed back to back, one K-wide chunk per cycle. Elements are small
// multiples of 1/4, so every product and sum is exact and the result must
// equal the exact dot product. Timing: the unit must take a chunk every cycle
// (in_ready never falls), and each result must appear within
// MUL_LAT + 2*ADD_LAT + 8*ADD_LAT cycles of the last chunk, so that the total
// time is n/K plus a fixed pipeline term (T = n/K + T_red).
module tb_vec_dot;
  import blas_pkg::*;

  localparam int unsigned K = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  fp64_t u_i [K], v_i [K];
  logic out_valid;
  fp64_t out_data;
  int checks = 0, failures = 0, cycle = 0, not_ready = 0;

  vec_dot #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && !in_ready) not_ready++;

  real e_q[$];
  int  t_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real e; int t;
      e = e_q.pop_front(); t = t_q.pop_front();
      checks += 2;
      if (($bitstoreal(out_data) - e) > 1.0e-300 || ($bitstoreal(out_data) - e) < -1.0e-300) begin  // +0 and -0 are equal
        failures++;
        $display("MISMATCH got %f exp %f", $bitstoreal(out_data), e);
      end
      if (cycle - t > int'(MUL_LAT + 10 * ADD_LAT)) begin
        failures++;
        $display("result %0d cycles after last chunk", cycle - t);
      end
    end
  end

  task automatic send_pair(int n);
    real s;
    s = 0.0;
    for (int c = 0; c < (n + int'(K) - 1) / int'(K); c++) begin
      fp64_t uu [K], vv [K];
      for (int p = 0; p < int'(K); p++) begin
        real a, b;
        int idx;
        idx = c * int'(K) + p;
        a = (idx < n) ? real'(int'($urandom_range(0, 64)) - 32) / 4.0 : 0.0;
        b = (idx < n) ? real'(int'($urandom_range(0, 64)) - 32) / 4.0 : 0.0;
        uu[p] = $realtobits(a);
        vv[p] = $realtobits(b);
        s += a * b;
      end
      in_valid <= 1;
      for (int p = 0; p < int'(K); p++) begin u_i[p] <= uu[p]; v_i[p] <= vv[p]; end
      in_last <= (c == (n + int'(K) - 1) / int'(K) - 1);
      @(posedge clk);
    end
    e_q.push_back(s);
    t_q.push_back(cycle);
  endtask

  initial begin
    for (int p = 0; p < int'(K); p++) begin u_i[p] = '0; v_i[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_pair(2048);
    send_pair(4);
    send_pair(7);
    send_pair(100);
    send_pair(333);
    send_pair(2048);
    in_valid <= 0;
    repeat (12 * ADD_LAT) @(posedge clk);
    checks += 2;
    if (e_q.size() != 0) begin failures++; $display("%0d results missing", e_q.size()); end
    if (not_ready != 0) begin failures++; $display("in_ready fell %0d times", not_ready); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
