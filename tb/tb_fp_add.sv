// tb_fp_add: self-checking test of the double-precision adder.
// Random operands (normal range, both signs, near-cancellations, large
// exponent gaps) plus special values are applied one per cycle; each result is
// compared with the simulator's own real-number addition and must appear
// exactly LAT cycles after its operands.
module tb_fp_add;
  import blas_pkg::*;

  localparam int unsigned LAT = ADD_LAT;
  localparam int NVEC = 4000;

  logic clk = 0, rst_n = 0;
  logic valid_i = 0;
  fp64_t a_i = '0, b_i = '0;
  logic [15:0] tag_i = '0;
  logic valid_o;
  fp64_t sum_o;
  logic [15:0] tag_o;
  int checks = 0, failures = 0;
  int cycle = 0;

  fp_add #(.LAT(LAT), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp64_t exp_q[$];
  int    t_q[$];

  function automatic fp64_t rnd_fp(int spread);
    logic [10:0] e;
    e = 11'(1023 + int'($urandom_range(0, 2*spread)) - spread);
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_add(fp64_t a, fp64_t b);
    real r;
    r = $bitstoreal(a) + $bitstoreal(b);
    return $realtobits(r);
  endfunction

  task automatic apply(fp64_t a, fp64_t b, fp64_t e);
    valid_i <= 1; a_i <= a; b_i <= b; tag_i <= tag_i + 1;
    exp_q.push_back(e);
    t_q.push_back(cycle + 1);  // operands are captured at the next edge
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      fp64_t e; int t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (sum_o !== e || (cycle - t) != int'(LAT)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH got %h exp %h latency %0d", sum_o, e, cycle - t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // special values
    apply(64'h3FF0000000000000, 64'hBFF0000000000000, 64'h0);            // 1 + -1 = +0
    apply(64'h7FF0000000000000, 64'h3FF0000000000000, 64'h7FF0000000000000);
    apply(64'h7FF0000000000000, 64'hFFF0000000000000, FP_QNAN);
    apply(64'h0, 64'h4000000000000000, 64'h4000000000000000);
    apply(64'h8000000000000000, 64'h8000000000000000, 64'h8000000000000000);
    apply(64'h7FEFFFFFFFFFFFFF, 64'h7FEFFFFFFFFFFFFF, 64'h7FF0000000000000);
    for (int i = 0; i < NVEC; i++) begin
      fp64_t a, b;
      case (i % 4)
        0: begin a = rnd_fp(4);  b = rnd_fp(4);  end
        1: begin a = rnd_fp(60); b = rnd_fp(60); end
        2: begin a = rnd_fp(2);  b = {~a[63], a[62:8], 8'($urandom)}; end // cancellation
        default: begin a = rnd_fp(2); b = {1'($urandom), a[62:52] - 11'($urandom_range(0, 3)), 20'($urandom), 32'($urandom)}; end
      endcase
      apply(a, b, ref_add(a, b));
    end
    valid_i <= 0;
    repeat (LAT + 5) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("missing %0d results", exp_q.size());
    end
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
