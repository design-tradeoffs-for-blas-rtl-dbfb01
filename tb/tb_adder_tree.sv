// tb_adder_tree: self-checking test of the adder tree (K = 4).
// Random operand sets are applied one per cycle; each sum is compared with the
// same tree of real additions, (d0+d1)+(d2+d3), must carry its tag and must
// appear exactly 2*ADD_LAT cycles after its operands.
module tb_adder_tree;
  import blas_pkg::*;

  localparam int unsigned K = 4;
  localparam int unsigned LAT = 2 * ADD_LAT;

  logic clk = 0, rst_n = 0;
  logic valid_i = 0;
  fp64_t d_i [K];
  logic [7:0] tag_i = '0;
  logic valid_o;
  fp64_t sum_o;
  logic [7:0] tag_o;
  int checks = 0, failures = 0, cycle = 0;

  adder_tree #(.K(K), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  fp64_t e_q[$];
  int    t_q[$];
  logic [7:0] g_q[$];

  function automatic fp64_t rnd_fp();
    return {1'($urandom), 11'(1023 + int'($urandom_range(0, 20)) - 10), 20'($urandom), 32'($urandom)};
  endfunction

  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      fp64_t e; int t; logic [7:0] g;
      e = e_q.pop_front(); t = t_q.pop_front(); g = g_q.pop_front();
      checks++;
      if (sum_o !== e || tag_o !== g || (cycle - t) != int'(LAT)) begin
        failures++;
        if (failures < 10) $display("MISMATCH got %h exp %h tag %h/%h lat %0d", sum_o, e, tag_o, g, cycle - t);
      end
    end
  end

  initial begin
    for (int i = 0; i < int'(K); i++) d_i[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      fp64_t d [K];
      real r;
      for (int i = 0; i < int'(K); i++) d[i] = rnd_fp();
      r = ($bitstoreal(d[0]) + $bitstoreal(d[1])) + ($bitstoreal(d[2]) + $bitstoreal(d[3]));
      valid_i <= (n % 7 != 3);
      for (int i = 0; i < int'(K); i++) d_i[i] <= d[i];
      tag_i <= 8'(n);
      if (n % 7 != 3) begin
        e_q.push_back($realtobits(r)); t_q.push_back(cycle + 1); g_q.push_back(8'(n));
      end
      @(posedge clk);
    end
    valid_i <= 0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (e_q.size() != 0) begin failures++; $display("%0d sums missing", e_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
