// fp_add: pipelined IEEE-754 double-precision adder.
//
// Computes a + b with round-to-nearest-even. The sum is formed in one
// combinational step (align the smaller operand with guard, round and sticky
// bits, add or subtract the significands, normalise, round) and then travels
// through a delay line, so the result of an operand pair accepted in cycle t
// appears in cycle t+LAT. One operand pair is accepted every cycle. The default
// depth of 19 stages is that of the adder the accelerator was characterised
// with; the way the stages are cut is this implementation's own choice (a
// synthesis tool with register retiming can spread the logic over them).
//
// Simplifications (own choice): subnormal operands are read as zero and
// subnormal results are flushed to a signed zero; any NaN result is the quiet
// NaN 0x7FF8_0000_0000_0000. Infinities follow IEEE-754.
//
// A TAG_W-bit side band (tag_i -> tag_o) travels with each operand pair so
// callers can carry control information alongside the data.
module fp_add
  import blas_pkg::*;
#(
  parameter int unsigned LAT   = ADD_LAT,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  fp64_t            a_i,
  input  fp64_t            b_i,
  input  logic [TAG_W-1:0] tag_i,
  output logic             valid_o,
  output fp64_t            sum_o,
  output logic [TAG_W-1:0] tag_o
);

  // ---------------------------------------------------------------------
  // Combinational sum
  // ---------------------------------------------------------------------
  function automatic fp64_t add64(fp64_t a, fp64_t b);
    logic        sa, sb, sl, ss;
    logic [10:0] ea, eb, el, es;
    logic [52:0] ml, ms;
    logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [11:0] d;
    logic [55:0] big, small_sh;
    logic [56:0] sum;
    logic [55:0] norm;
    logic [12:0] e;        // signed working exponent
    int          lz;
    logic [52:0] m;
    logic [53:0] mr;
    logic        g, r, s, up;
    fp64_t       res;

    sa = a[63]; ea = a[62:52];
    sb = b[63]; eb = b[62:52];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_zero = (ea == 11'h000);
    b_zero = (eb == 11'h000);

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      res = FP_QNAN;
    end else if (a_inf) begin
      res = {sa, 11'h7FF, 52'h0};
    end else if (b_inf) begin
      res = {sb, 11'h7FF, 52'h0};
    end else if (a_zero && b_zero) begin
      res = {sa & sb, 63'h0};
    end else if (a_zero) begin
      res = b;
    end else if (b_zero) begin
      res = a;
    end else begin
      // larger magnitude first
      if (a[62:0] >= b[62:0]) begin
        sl = sa; el = ea; ml = {1'b1, a[51:0]};
        ss = sb; es = eb; ms = {1'b1, b[51:0]};
      end else begin
        sl = sb; el = eb; ml = {1'b1, b[51:0]};
        ss = sa; es = ea; ms = {1'b1, a[51:0]};
      end
      d   = {1'b0, el} - {1'b0, es};
      big = {ml, 3'b000};
      if (d >= 12'd56) begin
        small_sh = 56'd1;  // only the sticky bit survives
      end else begin
        small_sh = {ms, 3'b000} >> d;
        if ((({ms, 3'b000} << (12'd56 - d)) & {56{1'b1}}) != '0 && d != 0)
          small_sh[0] = 1'b1;
      end
      if (sl == ss) sum = {1'b0, big} + {1'b0, small_sh};
      else          sum = {1'b0, big} - {1'b0, small_sh};

      e = {2'b00, el};
      if (sum == '0) begin
        res = FP_ZERO;
      end else begin
        if (sum[56]) begin
          norm = sum[56:1];
          norm[0] = sum[1] | sum[0];
          e = e + 13'd1;
        end else begin
          lz = 0;
          for (int i = 55; i >= 0; i--) begin
            if (sum[i]) break;
            lz++;
          end
          norm = sum[55:0] << lz;
          e = e - 13'(lz);
        end
        m  = norm[55:3];
        g  = norm[2];
        r  = norm[1];
        s  = norm[0];
        up = g & (r | s | m[0]);
        mr = {1'b0, m} + {53'd0, up};
        if (mr[53]) begin
          mr = mr >> 1;
          e  = e + 13'd1;
        end
        if ($signed(e) <= 0)            res = {sl, 63'h0};          // flush to zero
        else if ($signed(e) >= 13'sd2047) res = {sl, 11'h7FF, 52'h0}; // overflow
        else                             res = {sl, e[10:0], mr[51:0]};
      end
    end
    return res;
  endfunction

  // ---------------------------------------------------------------------
  // Delay line
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic             v;
    logic [TAG_W-1:0] tag;
    fp64_t            d;
  } stage_t;

  stage_t pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{v: valid_i, tag: tag_i, d: add64(a_i, b_i)};
      for (int i = 1; i < int'(LAT); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign valid_o = pipe[LAT-1].v;
  assign sum_o   = pipe[LAT-1].d;
  assign tag_o   = pipe[LAT-1].tag;

endmodule : fp_add
