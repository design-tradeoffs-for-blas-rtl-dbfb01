// blas_top: the three BLAS engines side by side.
//
// The accelerator offers one engine per BLAS level, each built from the same
// pipelined double-precision adder and multiplier:
//  * vec_dot (level 1): u . v with K1 multipliers, an adder tree and a
//    reduction circuit, fed 2*K1 words per cycle;
//  * mat_vec (level 2): blocked y = A x with K2 multipliers that each keep a
//    local copy of the current block of x, an adder tree, a reduction circuit
//    and an accumulating adder;
//  * mat_mul (level 3): C = A B on a linear array of K3 processing elements
//    with sqrt(m) x sqrt(m) blocking, reading A and B from and writing C to
//    external memory.
// The engines are independent; each has its own ports, prefixed vd_, mv_ and
// mm_. The external memory is not part of this design: the matrix-multiply
// memory ports are brought out. Parameters default to the evaluated
// configurations: K1 = 4 and K2 = 4 (as drawn), B = 256, K3 = 8,
// sqrt(m) = 128, problem sizes up to n = 2048.
module blas_top
  import blas_pkg::*;
#(
  parameter int unsigned K1    = 4,
  parameter int unsigned K2    = 4,
  parameter int unsigned B     = 256,
  parameter int unsigned K3    = 8,
  parameter int unsigned S     = 128,
  parameter int unsigned N_MAX = 2048
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // level 1: vector product
  input  logic                       vd_in_valid,
  input  fp64_t                      vd_u [K1],
  input  fp64_t                      vd_v [K1],
  input  logic                       vd_in_last,
  output logic                       vd_in_ready,
  output logic                       vd_out_valid,
  output fp64_t                      vd_out_data,
  // level 2: matrix-vector multiply
  input  logic                       mv_start,
  input  logic [$clog2(N_MAX+1)-1:0] mv_n,
  input  logic                       mv_x_valid,
  input  fp64_t                      mv_x_data,
  output logic                       mv_x_ready,
  input  logic                       mv_a_valid,
  input  fp64_t                      mv_a_data [K2],
  input  logic [$clog2(B)-1:0]       mv_a_col [K2],
  output logic                       mv_a_ready,
  output logic                       mv_y_valid,
  output fp64_t                      mv_y_data,
  // level 3: matrix multiply and its external memory ports
  input  logic                       mm_start,
  input  logic [$clog2(N_MAX+1)-1:0] mm_n,
  output logic                       mm_busy,
  output logic                       mm_done,
  output logic                       mm_rd_a_en,
  output logic [2*$clog2(N_MAX)-1:0] mm_rd_a_addr,
  input  fp64_t                      mm_rd_a_data,
  output logic                       mm_rd_b_en,
  output logic [2*$clog2(N_MAX)-1:0] mm_rd_b_addr,
  input  fp64_t                      mm_rd_b_data,
  output logic                       mm_wr_c_en,
  output logic [2*$clog2(N_MAX)-1:0] mm_wr_c_addr,
  output fp64_t                      mm_wr_c_data
);

  vec_dot #(.K(K1)) u_vec_dot (
    .clk, .rst_n,
    .in_valid(vd_in_valid), .u_i(vd_u), .v_i(vd_v), .in_last(vd_in_last),
    .in_ready(vd_in_ready), .out_valid(vd_out_valid), .out_data(vd_out_data)
  );

  mat_vec #(.K(K2), .B(B), .N_MAX(N_MAX)) u_mat_vec (
    .clk, .rst_n,
    .start(mv_start), .n_i(mv_n),
    .x_valid(mv_x_valid), .x_data(mv_x_data), .x_ready(mv_x_ready),
    .a_valid(mv_a_valid), .a_data(mv_a_data), .a_col(mv_a_col), .a_ready(mv_a_ready),
    .y_valid(mv_y_valid), .y_data(mv_y_data)
  );

  mat_mul #(.K(K3), .S(S), .N_MAX(N_MAX)) u_mat_mul (
    .clk, .rst_n,
    .start(mm_start), .n_i(mm_n), .busy(mm_busy), .done(mm_done),
    .rd_a_en(mm_rd_a_en), .rd_a_addr(mm_rd_a_addr), .rd_a_data(mm_rd_a_data),
    .rd_b_en(mm_rd_b_en), .rd_b_addr(mm_rd_b_addr), .rd_b_data(mm_rd_b_data),
    .wr_c_en(mm_wr_c_en), .wr_c_addr(mm_wr_c_addr), .wr_c_data(mm_wr_c_data)
  );

endmodule : blas_top
