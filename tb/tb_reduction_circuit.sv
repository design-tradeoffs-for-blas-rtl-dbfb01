// tb_reduction_circuit: self-checking test of the set reduction circuit.
// Sets of random length (1 to 300 values, many short ones back to back) are
// streamed in, with and without idle cycles. Values are multiples of 1/4 of
// modest size, so every sum is exact in double precision whatever order the
// circuit adds in, and each output must equal the set's exact sum, in set
// order. Timing checks: in a phase of back-to-back sets of 24 or more values
// in_ready never drops (one value per cycle), and every set's sum appears
// within 8*ADD_LAT cycles of its last value (T_red(s) = Theta(s)).
module tb_reduction_circuit;
  import blas_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  fp64_t in_data = '0;
  logic out_valid;
  fp64_t out_data;
  int checks = 0, failures = 0, cycle = 0;
  int stalls_long = 0;
  bit long_phase = 0;

  reduction_circuit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  real exp_q[$];
  int  tlast_q[$];

  always @(posedge clk) begin
    if (long_phase && !in_ready) stalls_long++;
    if (rst_n && out_valid) begin
      real e; int t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %h", out_data);
      end else begin
        e = exp_q.pop_front();
        t = tlast_q.pop_front();
        if ($bitstoreal(out_data) != e) begin
          failures++;
          if (failures < 10) $display("MISMATCH got %f exp %f", $bitstoreal(out_data), e);
        end
        checks++;
        if (cycle - t > 8 * int'(ADD_LAT)) begin
          failures++;
          $display("set finished %0d cycles after its last value", cycle - t);
        end
      end
    end
  end

  task automatic send_set(int len, int gap_pct);
    real s;
    bit  rdy;
    s = 0.0;
    for (int i = 0; i < len; i++) begin
      real v;
      v = real'(int'($urandom_range(0, 8000)) - 4000) / 4.0;
      s += v;
      while (gap_pct != 0 && int'($urandom_range(0, 99)) < gap_pct) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      in_data  <= $realtobits(v);
      in_last  <= (i == len - 1);
      do begin
        @(negedge clk);
        rdy = in_ready;
        @(posedge clk);
      end while (!rdy);
    end
    exp_q.push_back(s);
    tlast_q.push_back(cycle);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // short sets, back to back
    for (int i = 0; i < 200; i++) send_set(int'($urandom_range(1, 6)), 0);
    // mixed lengths with idle cycles
    for (int i = 0; i < 100; i++) send_set(int'($urandom_range(1, 60)), 30);
    // long sets back to back: full rate expected
    long_phase = 1;
    for (int i = 0; i < 40; i++) send_set(int'($urandom_range(24, 300)), 0);
    long_phase = 0;
    in_valid <= 0;
    repeat (20 * ADD_LAT) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d sets never finished", exp_q.size());
    end
    checks++;
    if (stalls_long != 0) begin
      failures++;
      $display("in_ready dropped %0d times with long sets", stalls_long);
    end
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
