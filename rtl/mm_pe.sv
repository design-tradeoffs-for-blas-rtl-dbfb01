// mm_pe: one processing element of the matrix-multiply linear array.
//
// The PE owns the columns j = p, p+K, p+2K, ... of the current S x S block of
// C (S = sqrt(m)). It holds R = S/K elements of a row of B in registers,
// double-buffered (2R registers: one row in use, the next row arriving), the
// current element a_iq of A in the "A" register, one multiplier, one adder
// and a RAM of S*R = m/K partial sums c'_ij.
//
// Data flow (one cycle per PE hop, left to right):
//  * b_qj passes through; if j mod K == p the PE copies it into register
//    j / K of bank b_bank.
//  * a_iq passes through; the PE latches it and, over the next R cycles,
//    multiplies it with each of its R B registers of bank a_bank and adds the
//    product to c'_{i,j} (c' is read when the product leaves the multiplier and
//    written back ADD_LAT cycles later). With a_first set the product starts a
//    new c' instead (first row of the first block of a C block).
//    A new a_iq arrives every R cycles.
//  * Drain: drain_i travels two cycles per PE. On its arrival the PE
//    sends its S*R partial sums, one every K cycles, into the c chain; in the
//    other cycles it passes on what arrives from the left. The spacing makes
//    the chain leave the last PE as one gap-free stream of C in row-major
//    order.
// A c' entry is rewritten every S*R cycles; that must exceed the adder
// depth (m/k > alpha), which is checked at elaboration.
//
// The register/RAM organisation and the MAC schedule follow the accelerator's
// PE as published; the drain chain and the tags carried with
// a and b are this implementation's own.
module mm_pe
  import blas_pkg::*;
#(
  parameter int unsigned K         = 8,
  parameter int unsigned S         = 128,
  parameter int unsigned P         = 0,      // index of this PE
  parameter int unsigned ADD_LAT_P = ADD_LAT,
  parameter int unsigned MUL_LAT_P = MUL_LAT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the left
  input  logic                 a_valid_i,
  input  fp64_t                a_i,
  input  logic [$clog2(S)-1:0] a_row_i,
  input  logic                 a_first_i,
  input  logic                 a_bank_i,
  input  logic                 b_valid_i,
  input  fp64_t                b_i,
  input  logic [$clog2(S)-1:0] b_col_i,
  input  logic                 b_bank_i,
  input  logic                 drain_i,
  input  logic                 c_valid_i,
  input  fp64_t                c_i,
  // to the right
  output logic                 a_valid_o,
  output fp64_t                a_o,
  output logic [$clog2(S)-1:0] a_row_o,
  output logic                 a_first_o,
  output logic                 a_bank_o,
  output logic                 b_valid_o,
  output fp64_t                b_o,
  output logic [$clog2(S)-1:0] b_col_o,
  output logic                 b_bank_o,
  output logic                 drain_o,
  output logic                 c_valid_o,
  output fp64_t                c_o
);

  localparam int unsigned R    = S / K;
  localparam int unsigned SB   = $clog2(S);
  localparam int unsigned RB   = (R <= 1) ? 1 : $clog2(R);
  localparam int unsigned KB   = (K <= 1) ? 1 : $clog2(K);
  localparam int unsigned WORDS = S * R;
  localparam int unsigned AB   = $clog2(WORDS);

  if (WORDS <= ADD_LAT_P + 1) begin : g_hazard
    $error("mm_pe: m/k = %0d must exceed the adder depth", WORDS);
  end

  // ---------------- pass-through registers ----------------
  logic drain_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid_o <= 1'b0; a_o <= '0; a_row_o <= '0; a_first_o <= 1'b0; a_bank_o <= 1'b0;
      b_valid_o <= 1'b0; b_o <= '0; b_col_o <= '0; b_bank_o <= 1'b0;
      drain_d <= 1'b0; drain_o <= 1'b0;
    end else begin
      a_valid_o <= a_valid_i; a_o <= a_i; a_row_o <= a_row_i;
      a_first_o <= a_first_i; a_bank_o <= a_bank_i;
      b_valid_o <= b_valid_i; b_o <= b_i; b_col_o <= b_col_i; b_bank_o <= b_bank_i;
      drain_d <= drain_i; drain_o <= drain_d;
    end
  end

  // ---------------- B registers ----------------
  fp64_t breg [2][R];
  logic  b_mine;
  logic [RB-1:0] b_idx;

  if (K == 1) begin : g_k1
    assign b_mine = 1'b1;
    assign b_idx  = RB'(b_col_i);
  end else begin : g_kn
    assign b_mine = (b_col_i[KB-1:0] == KB'(P));
    assign b_idx  = RB'(b_col_i >> KB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int bk = 0; bk < 2; bk++)
        for (int r = 0; r < int'(R); r++) breg[bk][r] <= '0;
    end else if (b_valid_i && b_mine) begin
      breg[b_bank_i][b_idx] <= b_i;
    end
  end

  // ---------------- A register and MAC sequencer ----------------
  fp64_t         areg;
  logic [SB-1:0] arow;
  logic          afirst, abank, busy;
  logic [RB-1:0] r_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      areg <= '0; arow <= '0; afirst <= 1'b0; abank <= 1'b0;
      busy <= 1'b0; r_cnt <= '0;
    end else if (a_valid_i) begin
      areg <= a_i; arow <= a_row_i; afirst <= a_first_i; abank <= a_bank_i;
      busy <= 1'b1; r_cnt <= '0;
    end else if (busy) begin
      if (32'(r_cnt) == R - 1) busy <= 1'b0;
      else                     r_cnt <= r_cnt + 1'b1;
    end
  end

  // ---------------- multiplier ----------------
  typedef struct packed {
    logic          first;
    logic [AB-1:0] addr;
  } mtag_t;

  mtag_t mul_tag_i, mul_tag_o;
  logic  mul_v;
  fp64_t prod;

  assign mul_tag_i.first = afirst;
  assign mul_tag_i.addr  = AB'(32'(arow) * R + 32'(r_cnt));

  fp_mul #(.LAT(MUL_LAT_P), .TAG_W($bits(mtag_t))) u_mul (
    .clk, .rst_n,
    .valid_i(busy), .a_i(areg), .b_i(breg[abank][r_cnt]), .tag_i(mul_tag_i),
    .valid_o(mul_v), .prod_o(prod), .tag_o(mul_tag_o)
  );

  // ---------------- adder and c' RAM ----------------
  fp64_t         cram [WORDS];
  logic          add_v;
  fp64_t         sum;
  logic [AB-1:0] add_addr;
  fp64_t         c_old;

  assign c_old = mul_tag_o.first ? {prod[63], 63'h0} : cram[mul_tag_o.addr];

  fp_add #(.LAT(ADD_LAT_P), .TAG_W(AB)) u_add (
    .clk, .rst_n,
    .valid_i(mul_v), .a_i(prod), .b_i(c_old), .tag_i(mul_tag_o.addr),
    .valid_o(add_v), .sum_o(sum), .tag_o(add_addr)
  );

  // ---------------- drain sequencer ----------------
  logic          draining;
  logic [AB-1:0] d_addr;
  logic [KB-1:0] d_gap;

  always_ff @(posedge clk) begin
    if (add_v) cram[add_addr] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      draining  <= 1'b0;
      d_addr    <= '0;
      d_gap     <= '0;
      c_valid_o <= 1'b0;
      c_o       <= '0;
    end else begin
      c_valid_o <= c_valid_i;
      c_o       <= c_i;
      if (drain_i && !draining) begin
        draining <= 1'b1;
        d_addr   <= '0;
        d_gap    <= '0;
      end else if (draining) begin
        if (d_gap == '0) begin
          c_valid_o <= 1'b1;
          c_o       <= cram[d_addr];
          if (32'(d_addr) == WORDS - 1) draining <= 1'b0;
          d_addr <= d_addr + 1'b1;
        end
        d_gap <= (32'(d_gap) == K - 1) ? '0 : d_gap + 1'b1;
      end
    end
  end

  // the chain slot a PE fills must be empty
  assert property (@(posedge clk) disable iff (!rst_n)
                   (draining && d_gap == '0) |-> !c_valid_i)
    else $error("mm_pe %0d: drain collision", P);

endmodule : mm_pe
