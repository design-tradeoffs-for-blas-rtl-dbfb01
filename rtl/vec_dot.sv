// vec_dot: level-1 BLAS vector product u . v = sum_i u_i * v_i.
//
// K pipelined multipliers each take one element of u and the matching element
// of v per cycle (2K words in per cycle). An adder tree of K-1 adders sums the
// K products into one value per cycle, and the reduction circuit accumulates
// these values, n/K of them per vector pair, into the final product without
// read-after-write stalls. Effective latency is n/K cycles plus the pipeline
// fill and T_red(n/K), i.e. Theta(n/K).
//
// Interface: in_valid/in_ready handshake on a K-wide chunk (u_i, v_i);
// in_last marks the final chunk of a vector pair. If n is not a multiple of K
// the unused lanes of the last chunk carry zeros. Each finished product leaves
// on out_valid/out_data, in order. Several vector pairs may follow each other
// back to back. in_ready only falls when the reduction circuit is full, which
// cannot happen with vectors of more than a few chunks; it is raised early by
// the depth of the multiplier and adder pipelines so nothing in them is lost.
//
// The structure (K multipliers, K-1 tree adders, reduction circuit) and
// K = 4 follow the accelerator's vector-product architecture; the handshake
// and the zero padding are this implementation's choices.
module vec_dot
  import blas_pkg::*;
#(
  parameter int unsigned K         = 4,
  parameter int unsigned ADD_LAT_P = ADD_LAT,
  parameter int unsigned MUL_LAT_P = MUL_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t u_i [K],
  input  fp64_t v_i [K],
  input  logic  in_last,
  output logic  in_ready,
  output logic  out_valid,
  output fp64_t out_data
);

  localparam int unsigned TREE_LAT = ((K <= 1) ? 0 : $clog2(K)) * ADD_LAT_P;
  localparam int unsigned PIPE     = MUL_LAT_P + TREE_LAT;

  logic  take;
  fp64_t prod [K];
  logic  pv [K];
  logic  plast [K];

  assign take = in_valid && in_ready;

  for (genvar p = 0; p < int'(K); p++) begin : g_mul
    fp_mul #(.LAT(MUL_LAT_P), .TAG_W(1)) u_mul (
      .clk, .rst_n,
      .valid_i(take), .a_i(u_i[p]), .b_i(v_i[p]), .tag_i(in_last),
      .valid_o(pv[p]), .prod_o(prod[p]), .tag_o(plast[p])
    );
  end

  logic  tv, tlast;
  fp64_t tsum;

  adder_tree #(.K(K), .ADD_LAT_P(ADD_LAT_P), .TAG_W(1)) u_tree (
    .clk, .rst_n,
    .valid_i(pv[0]), .d_i(prod), .tag_i(plast[0]),
    .valid_o(tv), .sum_o(tsum), .tag_o(tlast)
  );

  reduction_circuit #(
    .ADD_LAT_P(ADD_LAT_P), .TAGS(64), .FIFO_DEPTH(128), .SLACK(PIPE + 1)
  ) u_red (
    .clk, .rst_n,
    .in_valid(tv), .in_data(tsum), .in_last(tlast), .in_ready(in_ready),
    .out_valid, .out_data
  );

endmodule : vec_dot
