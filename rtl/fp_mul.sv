// fp_mul: pipelined IEEE-754 double-precision multiplier.
//
// Computes a * b with round-to-nearest-even. The product of the two 53-bit
// significands is formed, normalised and rounded in one combinational step and
// then delayed, so the product of an operand pair accepted in cycle t appears
// in cycle t+LAT; one pair is accepted every cycle. The default depth of 12
// stages is that of the multiplier the accelerator was characterised with;
// how the logic is cut into stages is left to register retiming.
//
// Simplifications (own choice): subnormal operands are read as zero, subnormal
// results are flushed to a signed zero, and every NaN result is the quiet NaN
// 0x7FF8_0000_0000_0000.
//
// A TAG_W-bit side band (tag_i -> tag_o) travels with each operand pair.
module fp_mul
  import blas_pkg::*;
#(
  parameter int unsigned LAT   = MUL_LAT,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  fp64_t            a_i,
  input  fp64_t            b_i,
  input  logic [TAG_W-1:0] tag_i,
  output logic             valid_o,
  output fp64_t            prod_o,
  output logic [TAG_W-1:0] tag_o
);

  function automatic fp64_t mul64(fp64_t a, fp64_t b);
    logic         s;
    logic [10:0]  ea, eb;
    logic         a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [105:0] p;
    logic [52:0]  m;
    logic [53:0]  mr;
    logic         g, st, up;
    logic [12:0]  e;
    fp64_t        res;

    s  = a[63] ^ b[63];
    ea = a[62:52];
    eb = b[62:52];
    a_nan  = (ea == 11'h7FF) && (a[51:0] != '0);
    b_nan  = (eb == 11'h7FF) && (b[51:0] != '0);
    a_inf  = (ea == 11'h7FF) && (a[51:0] == '0);
    b_inf  = (eb == 11'h7FF) && (b[51:0] == '0);
    a_zero = (ea == 11'h000);
    b_zero = (eb == 11'h000);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      res = FP_QNAN;
    end else if (a_inf || b_inf) begin
      res = {s, 11'h7FF, 52'h0};
    end else if (a_zero || b_zero) begin
      res = {s, 63'h0};
    end else begin
      p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
      e = {2'b00, ea} + {2'b00, eb} - 13'd1023;
      if (p[105]) begin
        m  = p[105:53];
        g  = p[52];
        st = |p[51:0];
        e  = e + 13'd1;
      end else begin
        m  = p[104:52];
        g  = p[51];
        st = |p[50:0];
      end
      up = g & (st | m[0]);
      mr = {1'b0, m} + {53'd0, up};
      if (mr[53]) begin
        mr = mr >> 1;
        e  = e + 13'd1;
      end
      if ($signed(e) <= 0)              res = {s, 63'h0};
      else if ($signed(e) >= 13'sd2047) res = {s, 11'h7FF, 52'h0};
      else                              res = {s, e[10:0], mr[51:0]};
    end
    return res;
  endfunction

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
      pipe[0] <= '{v: valid_i, tag: tag_i, d: mul64(a_i, b_i)};
      for (int i = 1; i < int'(LAT); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign valid_o = pipe[LAT-1].v;
  assign prod_o  = pipe[LAT-1].d;
  assign tag_o   = pipe[LAT-1].tag;

endmodule : fp_mul
