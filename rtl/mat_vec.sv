// mat_vec: level-2 BLAS matrix-vector multiply y = A x (blocked).
//
// A (n x n) is processed in n/B blocks of B columns, A^g, with the matching
// blocks x^g of x. Every lane (mv_lane) holds a copy of x^g; each cycle the K
// lanes take K elements of one sub-row of A^g together with their column
// indices, look up x_j locally and multiply. An adder tree sums the K
// products, and the reduction circuit adds up the B/K sub-rows of each row,
// giving (A^g x^g)_i. A further adder accumulates these block results into y,
// kept in an n-word on-chip buffer: y_i += (A^g x^g)_i, with y_i starting at
// zero for g = 0; during the last block the finished y_i leave on
// y_valid/y_data, in row order. Loading x^{g+1} (B words, one per cycle, down
// the chain of lanes) overlaps computing with x^g.
//
// Streams: x_valid/x_data/x_ready carries x block by block (B words each);
// a_valid/a_data/a_col/a_ready carries A^0, A^1, ... each row by row, each row
// as B/K consecutive sub-rows of K elements. a_ready waits until the block's
// x copy has reached every lane. n_i (multiple of B, at most N_MAX) is taken
// on start, which also clears the counters. Latency is about
// n^2/K + B + T_red(B/K) cycles plus pipeline fill (T = Theta(n^2/K)).
//
// Follows the accelerator's matrix-vector architecture (K multipliers with
// local storage, adder tree, reduction circuit, accumulating adder; K = 4 as
// drawn). Own choices: the handshakes, the double-banked x store (2KB words
// instead of KB), and keeping partial y on chip.
module mat_vec
  import blas_pkg::*;
#(
  parameter int unsigned K         = 4,
  parameter int unsigned B         = 256,
  parameter int unsigned N_MAX     = 2048,
  parameter int unsigned ADD_LAT_P = ADD_LAT,
  parameter int unsigned MUL_LAT_P = MUL_LAT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(N_MAX+1)-1:0] n_i,
  input  logic                       x_valid,
  input  fp64_t                      x_data,
  output logic                       x_ready,
  input  logic                       a_valid,
  input  fp64_t                      a_data [K],
  input  logic [$clog2(B)-1:0]       a_col [K],
  output logic                       a_ready,
  output logic                       y_valid,
  output fp64_t                      y_data
);

  localparam int unsigned XB   = $clog2(B);
  localparam int unsigned NB   = $clog2(N_MAX + 1);
  localparam int unsigned RW   = $clog2(N_MAX);
  localparam int unsigned SUBS = B / K;          // sub-rows per row
  localparam int unsigned SB   = (SUBS <= 1) ? 1 : $clog2(SUBS);
  localparam int unsigned TREE_LAT = ((K <= 1) ? 0 : $clog2(K)) * ADD_LAT_P;
  localparam int unsigned PIPE = 1 + MUL_LAT_P + TREE_LAT;

  logic [NB-1:0] n_r;

  // ---------------- x loading ----------------
  logic [XB-1:0] x_addr;
  logic          x_bank;         // bank being loaded
  logic          full [2];       // bank holds a complete x block
  logic          xv [K+1], xbk [K+1];
  fp64_t         xd [K+1];
  logic [XB-1:0] xa [K+1];
  logic          x_take;

  // a bank is marked full when its last word reaches the last lane
  logic xv_busy;                 // a block's tail is still in the chain
  logic [$clog2(K+2)-1:0] tail_cnt;

  assign x_ready = !full[x_bank] && !xv_busy;
  assign x_take  = x_valid && x_ready;

  assign xv[0]  = x_take;
  assign xd[0]  = x_data;
  assign xa[0]  = x_addr;
  assign xbk[0] = x_bank;

  // ---------------- A stream control ----------------
  logic          c_bank;         // bank used for computing
  logic [SB-1:0] sub;
  logic [RW-1:0] row;
  logic          a_take, a_last_sub, a_last_row;
  logic          red_ready;

  assign a_ready    = full[c_bank] && red_ready;
  assign a_take     = a_valid && a_ready;
  assign a_last_sub = (32'(sub) == SUBS - 1);
  assign a_last_row = (32'(row) == 32'(n_r) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_r <= '0; x_addr <= '0; x_bank <= 1'b0; full[0] <= 1'b0; full[1] <= 1'b0;
      xv_busy <= 1'b0; tail_cnt <= '0;
      c_bank <= 1'b0; sub <= '0; row <= '0;
    end else if (start) begin
      n_r <= n_i; x_addr <= '0; x_bank <= 1'b0; full[0] <= 1'b0; full[1] <= 1'b0;
      xv_busy <= 1'b0; tail_cnt <= '0;
      c_bank <= 1'b0; sub <= '0; row <= '0;
    end else begin
      // loading
      if (x_take) begin
        if (32'(x_addr) == B - 1) begin
          x_addr   <= '0;
          xv_busy  <= 1'b1;
          tail_cnt <= '0;
        end else x_addr <= x_addr + 1'b1;
      end
      if (xv_busy) begin
        if (32'(tail_cnt) == K - 1) begin
          xv_busy <= 1'b0;
          full[x_bank] <= 1'b1;
          x_bank <= ~x_bank;
        end else tail_cnt <= tail_cnt + 1'b1;
      end
      // computing
      if (a_take) begin
        if (a_last_sub) begin
          sub <= '0;
          if (a_last_row) begin
            row <= '0;
            full[c_bank] <= 1'b0;
            c_bank <= ~c_bank;
          end else row <= row + 1'b1;
        end else sub <= sub + 1'b1;
      end
    end
  end

  // ---------------- lanes ----------------
  logic  pv [K];
  fp64_t pd [K];
  logic  plast [K];

  for (genvar p = 0; p < int'(K); p++) begin : g_lane
    mv_lane #(.B(B), .MUL_LAT_P(MUL_LAT_P), .TAG_W(1)) u_lane (
      .clk, .rst_n,
      .x_valid_i(xv[p]), .x_i(xd[p]), .x_addr_i(xa[p]), .x_bank_i(xbk[p]),
      .x_valid_o(xv[p+1]), .x_o(xd[p+1]), .x_addr_o(xa[p+1]), .x_bank_o(xbk[p+1]),
      .a_valid_i(a_take), .a_i(a_data[p]), .a_col_i(a_col[p]), .a_bank_i(c_bank),
      .tag_i(a_last_sub),
      .p_valid_o(pv[p]), .p_o(pd[p]), .tag_o(plast[p])
    );
  end

  // ---------------- adder tree and reduction ----------------
  logic  tv, tlast;
  fp64_t tsum;

  adder_tree #(.K(K), .ADD_LAT_P(ADD_LAT_P), .TAG_W(1)) u_tree (
    .clk, .rst_n,
    .valid_i(pv[0]), .d_i(pd), .tag_i(plast[0]),
    .valid_o(tv), .sum_o(tsum), .tag_o(tlast)
  );

  logic  rv;
  fp64_t rd;

  reduction_circuit #(
    .ADD_LAT_P(ADD_LAT_P), .TAGS(64), .FIFO_DEPTH(128), .SLACK(PIPE + 1)
  ) u_red (
    .clk, .rst_n,
    .in_valid(tv), .in_data(tsum), .in_last(tlast), .in_ready(red_ready),
    .out_valid(rv), .out_data(rd)
  );

  // ---------------- accumulation of block results into y ----------------
  fp64_t         ybuf [N_MAX];
  logic [RW-1:0] y_row;
  logic [NB-1:0] y_blk;
  logic          y_first, y_last;

  typedef struct packed {
    logic          last;
    logic [RW-1:0] row;
  } ytag_t;

  ytag_t acc_ti, acc_to;
  logic  acc_v;
  fp64_t acc_sum;

  assign y_first = (y_blk == '0);
  assign y_last  = (32'(y_blk) == 32'(n_r) / B - 1);
  assign acc_ti  = '{last: y_last, row: y_row};

  fp_add #(.LAT(ADD_LAT_P), .TAG_W($bits(ytag_t))) u_acc (
    .clk, .rst_n,
    .valid_i(rv), .a_i(rd), .b_i(y_first ? {rd[63], 63'h0} : ybuf[y_row]), .tag_i(acc_ti),
    .valid_o(acc_v), .sum_o(acc_sum), .tag_o(acc_to)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_row <= '0; y_blk <= '0;
    end else if (start) begin
      y_row <= '0; y_blk <= '0;
    end else if (rv) begin
      if (32'(y_row) == 32'(n_r) - 1) begin
        y_row <= '0;
        y_blk <= y_blk + 1'b1;
      end else y_row <= y_row + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (acc_v) ybuf[acc_to.row] <= acc_sum;
  end

  assign y_valid = acc_v && acc_to.last;
  assign y_data  = acc_sum;

endmodule : mat_vec
