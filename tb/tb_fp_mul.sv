// tb_fp_mul: self-checking test of the double-precision multiplier.
// Random operands (normal range, both signs, near-cancellations, large
// exponent gaps) plus special values are applied one per cycle; each result is
// compared with the simulator's own real-number multiplication and must appear
// exactly LAT cycles after its operands.
module tb_fp_mul;
  import blas_pkg::*;

  localparam int unsigned LAT = MUL_LAT;
  localparam int NVEC = 4000;

  logic clk = 0, rst_n = 0;
  logic valid_i = 0;
  fp64_t a_i = '0, b_i = '0;
  logic [15:0] tag_i = '0;
  logic valid_o;
  fp64_t prod_o;
  logic [15:0] tag_o;
  int checks = 0, failures = 0;
  int cycle = 0;

  fp_mul #(.LAT(LAT), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp64_t exp_q[$];
  int    t_q[$];

  function automatic fp64_t rnd_fp(int spread);
    logic [10:0] e;
    e = 11'(1023 + int'($urandom_range(0, 2*spread)) - spread);
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  function automatic fp64_t ref_mul(fp64_t a, fp64_t b);
    real r;
    r = $bitstoreal(a) * $bitstoreal(b);
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
      if (prod_o !== e || (cycle - t) != int'(LAT)) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH got %h exp %h latency %0d", prod_o, e, cycle - t);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // special values
    apply(64'h3FF0000000000000, 64'hBFF0000000000000, 64'hBFF0000000000000); // 1 * -1
    apply(64'h7FF0000000000000, 64'h0, FP_QNAN);                           // inf * 0
    apply(64'h7FF0000000000000, 64'hC000000000000000, 64'hFFF0000000000000);
    apply(64'h8000000000000000, 64'h4000000000000000, 64'h8000000000000000);
    apply(64'h7FE0000000000000, 64'h7FE0000000000000, 64'h7FF0000000000000); // overflow
    apply(64'h3FF8000000000000, 64'h4004000000000000, 64'h400E000000000000); // 1.5*2.5
    for (int i = 0; i < NVEC; i++) begin
      fp64_t a, b;
      case (i % 4)
        0: begin a = rnd_fp(4);  b = rnd_fp(4);  end
        1: begin a = rnd_fp(60); b = rnd_fp(60); end
        2: begin a = rnd_fp(300); b = rnd_fp(300); end
        default: begin a = {1'($urandom), 11'd1023, 52'($urandom) & 52'hF}; b = rnd_fp(1); end
      endcase
      apply(a, b, ref_mul(a, b));
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
