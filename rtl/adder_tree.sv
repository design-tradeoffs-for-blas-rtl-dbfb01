// adder_tree: pipelined binary tree of floating-point adders.
//
// Sums K values presented together in one cycle and delivers one sum per
// cycle, LAT = ceil(log2 K) * ADD_LAT cycles later. For K a power of two the
// tree has exactly K-1 adders, as in the accelerator's vector and
// matrix-vector datapaths; for other K the inputs are padded with zeros up to
// the next power of two (own choice). A TAG_W-bit side band (for example a
// "last of set" flag) travels with each set of operands. K = 1 is a plain
// wire with zero latency.
module adder_tree
  import blas_pkg::*;
#(
  parameter int unsigned K         = 4,
  parameter int unsigned ADD_LAT_P = ADD_LAT,
  parameter int unsigned TAG_W     = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_i,
  input  fp64_t            d_i [K],
  input  logic [TAG_W-1:0] tag_i,
  output logic             valid_o,
  output fp64_t            sum_o,
  output logic [TAG_W-1:0] tag_o
);

  localparam int unsigned LEVELS = (K <= 1) ? 0 : $clog2(K);
  localparam int unsigned KP     = 1 << LEVELS;

  // node[l][i]: value i entering level l (level LEVELS is the root output)
  fp64_t            node  [LEVELS+1][KP];
  logic             nvalid[LEVELS+1];
  logic [TAG_W-1:0] ntag  [LEVELS+1];

  for (genvar i = 0; i < int'(KP); i++) begin : g_in
    if (i < int'(K)) begin : g_d
      assign node[0][i] = d_i[i];
    end else begin : g_pad
      assign node[0][i] = FP_ZERO;
    end
  end
  assign nvalid[0] = valid_i;
  assign ntag[0]   = tag_i;

  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_level
    localparam int unsigned N = KP >> (l + 1);   // adders on this level
    for (genvar i = 0; i < int'(N); i++) begin : g_add
      logic             v_o;
      logic [TAG_W-1:0] t_o;
      fp_add #(.LAT(ADD_LAT_P), .TAG_W(TAG_W)) u_add (
        .clk, .rst_n,
        .valid_i(nvalid[l]), .a_i(node[l][2*i]), .b_i(node[l][2*i+1]), .tag_i(ntag[l]),
        .valid_o(v_o), .sum_o(node[l+1][i]), .tag_o(t_o)
      );
      if (i == 0) begin : g_side
        assign nvalid[l+1] = v_o;
        assign ntag[l+1]   = t_o;
      end
    end
    for (genvar i = N; i < int'(KP); i++) begin : g_unused
      assign node[l+1][i] = FP_ZERO;
    end
  end

  assign valid_o = nvalid[LEVELS];
  assign sum_o   = node[LEVELS][0];
  assign tag_o   = ntag[LEVELS];

endmodule : adder_tree
