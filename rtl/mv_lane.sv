// mv_lane: one multiplier of the matrix-vector datapath with its local store.
//
// The local store keeps a copy of the current block x^g of x (B words) and,
// in a second bank, the next block x^{g+1} while it is being loaded, so that
// loading overlaps with computing. Each cycle the lane may take one element
// a_ij of A with its column index j (within the block); it reads x_j from the
// bank in use (one cycle, like a block RAM) and multiplies, so the product
// leaves MUL_LAT + 1 cycles after the element arrived.
// x words arrive on x_valid_i with their address and bank and are also passed
// to the next lane one cycle later (the x chain from lane to lane).
// A TAG_W-bit side band travels with each product.
//
// The store-per-multiplier organisation and the x chain follow the
// accelerator's matrix-vector architecture; the second bank is this
// implementation's choice (the overlap of loading and computing needs it).
module mv_lane
  import blas_pkg::*;
#(
  parameter int unsigned B         = 256,
  parameter int unsigned MUL_LAT_P = MUL_LAT,
  parameter int unsigned TAG_W     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // x load chain
  input  logic                 x_valid_i,
  input  fp64_t                x_i,
  input  logic [$clog2(B)-1:0] x_addr_i,
  input  logic                 x_bank_i,
  output logic                 x_valid_o,
  output fp64_t                x_o,
  output logic [$clog2(B)-1:0] x_addr_o,
  output logic                 x_bank_o,
  // A element
  input  logic                 a_valid_i,
  input  fp64_t                a_i,
  input  logic [$clog2(B)-1:0] a_col_i,
  input  logic                 a_bank_i,
  input  logic [TAG_W-1:0]     tag_i,
  output logic                 p_valid_o,
  output fp64_t                p_o,
  output logic [TAG_W-1:0]     tag_o
);

  fp64_t store [2][B];

  always_ff @(posedge clk) begin
    if (x_valid_i) store[x_bank_i][x_addr_i] <= x_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid_o <= 1'b0; x_o <= '0; x_addr_o <= '0; x_bank_o <= 1'b0;
    end else begin
      x_valid_o <= x_valid_i; x_o <= x_i; x_addr_o <= x_addr_i; x_bank_o <= x_bank_i;
    end
  end

  // registered read of x_j alongside the delayed a element
  logic             r_v;
  fp64_t            r_a, r_x;
  logic [TAG_W-1:0] r_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_v <= 1'b0; r_a <= '0; r_x <= '0; r_tag <= '0;
    end else begin
      r_v   <= a_valid_i;
      r_a   <= a_i;
      r_x   <= store[a_bank_i][a_col_i];
      r_tag <= tag_i;
    end
  end

  fp_mul #(.LAT(MUL_LAT_P), .TAG_W(TAG_W)) u_mul (
    .clk, .rst_n,
    .valid_i(r_v), .a_i(r_a), .b_i(r_x), .tag_i(r_tag),
    .valid_o(p_valid_o), .prod_o(p_o), .tag_o(tag_o)
  );

endmodule : mv_lane
