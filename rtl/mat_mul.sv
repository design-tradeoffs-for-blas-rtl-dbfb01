// mat_mul: level-3 BLAS dense matrix multiply C = A * B.
//
// A linear array of K PEs (mm_pe) performs block matrix multiply with
// S x S blocks, S = sqrt(m). For each output block C^{gh} the array runs the
// block products A^{gz} * B^{zh}, z = 0 .. n/S-1, accumulating into the
// partial sums c' held in the PEs' RAMs (m/K words per PE, m in all).
// Within one block product, for each q the controller streams column q of
// A^{gz} (a_iq, i = 0..S-1) into PE_0, one element every R = S/K cycles; each
// PE multiplies it with the R elements of row q of B^{zh} it holds. In the
// same slots the S elements of the next row of B (row q+1, or row 0 of the
// next block) travel down the array into the PEs' second register bank, so
// after one initial load of S words the array never waits for B. Per block
// product this takes S^3/K cycles, so T = S + n^3/K for the whole product,
// plus a drain of S*S cycles per output block, and the external memory sees
// two reads (a and b) per R cycles.
// When the last block product of C^{gh} has settled, the PEs drain c' through
// the array; PE_{K-1} delivers C^{gh} in row-major order, one word per cycle,
// and the controller writes it to the external memory.
//
// External memory interface (own choice): two read ports with a fixed latency
// of one cycle (rd_*_en / rd_*_addr, data on rd_*_data the next cycle) and one
// write port. Matrices are stored row-major, element (r, c) at r*n + c. n is
// given at run time (n_i, a multiple of S, at most N_MAX); start pulses begin
// a product, done pulses when the last word of C has been written.
//
// Follows the accelerator's description: k PEs in a linear array, PE_0 reads
// A and B, PE_{k-1} writes C, A^{gz} column-major and B^{zh} row-major, PE_p
// keeping columns p, k+p, ... of C, one a and one b every sqrt(m)/k cycles,
// K = 8 and m = 128^2 as the evaluated configuration. Own choices: the memory
// interface, the drain that stops the array for S*S cycles per output block,
// and accumulating over z in the PE RAM instead of in a separate adder.
module mat_mul
  import blas_pkg::*;
#(
  parameter int unsigned K         = 8,
  parameter int unsigned S         = 128,     // sqrt(m)
  parameter int unsigned N_MAX     = 2048,
  parameter int unsigned ADD_LAT_P = ADD_LAT,
  parameter int unsigned MUL_LAT_P = MUL_LAT
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [$clog2(N_MAX+1)-1:0]       n_i,
  output logic                             busy,
  output logic                             done,
  output logic                             rd_a_en,
  output logic [2*$clog2(N_MAX)-1:0]       rd_a_addr,
  input  fp64_t                            rd_a_data,
  output logic                             rd_b_en,
  output logic [2*$clog2(N_MAX)-1:0]       rd_b_addr,
  input  fp64_t                            rd_b_data,
  output logic                             wr_c_en,
  output logic [2*$clog2(N_MAX)-1:0]       wr_c_addr,
  output fp64_t                            wr_c_data
);

  localparam int unsigned R   = S / K;
  localparam int unsigned SB  = $clog2(S);
  localparam int unsigned NB  = $clog2(N_MAX + 1);
  localparam int unsigned AW  = 2 * $clog2(N_MAX);
  localparam int unsigned CW  = 2 * SB + 1;
  // cycles from the last a slot until every c' write has landed
  localparam int unsigned SETTLE = 2 + 2 * K + R + MUL_LAT_P + ADD_LAT_P + 4;

  typedef enum logic [2:0] {IDLE, PRELOAD, COMPUTE, SETTLE_W, DRAIN, FINISH} state_t;
  state_t state;

  logic [NB-1:0] n_r;
  logic [NB-1:0] nblk;         // n / S
  logic [NB-1:0] g, h, z;
  logic [SB-1:0] q, i;
  logic [CW-1:0] cnt;          // preload / settle / drain counter
  logic [$clog2(R+1)-1:0] slot;// cycles within an a slot
  logic          bank;         // bank of B row q (parity of rows loaded)

  // next row of B to stream: (row, column block) in global coordinates
  logic [NB-1:0] nb_row, nb_colblk;
  logic          nb_valid;

  always_comb begin
    nb_valid  = 1'b1;
    nb_row    = NB'(32'(z) * S + 32'(q) + 1);
    nb_colblk = h;
    if (32'(q) == S - 1) begin
      if (z != nblk - 1) begin
        nb_row = NB'((32'(z) + 1) * S);
      end else if (h != nblk - 1) begin
        nb_row = '0; nb_colblk = h + 1'b1;
      end else if (g != nblk - 1) begin
        nb_row = '0; nb_colblk = '0;
      end else begin
        nb_valid = 1'b0;
      end
    end
  end

  // issue signals (memory request this cycle, data into PE_0 next cycle)
  logic          iss_a, iss_b;
  logic [SB-1:0] iss_row, iss_col;
  logic          iss_first, iss_abank, iss_bbank;

  always_comb begin
    iss_a = 1'b0; iss_b = 1'b0;
    iss_row = i; iss_col = i;
    iss_first = (z == '0) && (q == '0);
    iss_abank = bank; iss_bbank = ~bank;
    rd_a_addr = AW'((32'(g) * S + 32'(i)) * 32'(n_r) + 32'(z) * S + 32'(q));
    rd_b_addr = AW'(32'(nb_row) * 32'(n_r) + 32'(nb_colblk) * S + 32'(i));
    case (state)
      PRELOAD: begin
        iss_b     = 1'b1;
        iss_col   = cnt[SB-1:0];
        iss_bbank = 1'b0;
        rd_b_addr = AW'(32'(cnt[SB-1:0]));       // row 0 of B^{00}
      end
      COMPUTE: begin
        if (slot == '0) begin
          iss_a = 1'b1;
          iss_b = nb_valid;
        end
      end
      default: ;
    endcase
  end

  assign rd_a_en = iss_a;
  assign rd_b_en = iss_b;

  // control that goes with the data into PE_0 (memory latency of one cycle)
  logic          p_a_v, p_b_v, p_first, p_abank, p_bbank;
  logic [SB-1:0] p_row, p_col;
  logic          drain_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_a_v <= 1'b0; p_b_v <= 1'b0; p_first <= 1'b0; p_abank <= 1'b0;
      p_bbank <= 1'b0; p_row <= '0; p_col <= '0;
    end else begin
      p_a_v <= iss_a; p_b_v <= iss_b; p_first <= iss_first; p_abank <= iss_abank;
      p_bbank <= iss_bbank; p_row <= iss_row; p_col <= iss_col;
    end
  end

  // ---------------- sequencer ----------------
  logic [CW-1:0] c_cnt;        // words of C^{gh} written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; n_r <= '0; nblk <= '0;
      g <= '0; h <= '0; z <= '0; q <= '0; i <= '0;
      cnt <= '0; slot <= '0; bank <= 1'b0;
      drain_go <= 1'b0; done <= 1'b0;
    end else begin
      drain_go <= 1'b0;
      done     <= 1'b0;
      case (state)
        IDLE: if (start) begin
          n_r  <= n_i;
          nblk <= NB'(32'(n_i) / S);
          g <= '0; h <= '0; z <= '0; q <= '0; i <= '0;
          cnt <= '0; slot <= '0; bank <= 1'b0;
          state <= PRELOAD;
        end
        PRELOAD: begin
          if (32'(cnt) == S - 1) begin
            cnt <= '0;
            state <= COMPUTE;
          end else cnt <= cnt + 1'b1;
        end
        COMPUTE: begin
          slot <= (32'(slot) == R - 1) ? '0 : slot + 1'b1;
          if (32'(slot) == R - 1) begin
            if (32'(i) != S - 1) i <= i + 1'b1;
            else begin
              i    <= '0;
              bank <= ~bank;
              if (32'(q) != S - 1) q <= q + 1'b1;
              else begin
                q <= '0;
                if (z != nblk - 1) z <= z + 1'b1;
                else begin
                  z <= '0;
                  cnt <= '0;
                  state <= SETTLE_W;
                end
              end
            end
          end
        end
        SETTLE_W: begin
          if (32'(cnt) == SETTLE) begin
            cnt <= '0;
            drain_go <= 1'b1;
            state <= DRAIN;
          end else cnt <= cnt + 1'b1;
        end
        DRAIN: begin
          if (wr_c_en && 32'(c_cnt) == S * S - 1) begin
            if (h != nblk - 1) begin
              h <= h + 1'b1;
              state <= COMPUTE;
            end else if (g != nblk - 1) begin
              h <= '0;
              g <= g + 1'b1;
              state <= COMPUTE;
            end else begin
              state <= FINISH;
            end
          end
        end
        FINISH: begin
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // ---------------- the linear array ----------------
  logic          av [K+1], a_first [K+1], a_bank [K+1], bv [K+1], b_bank [K+1];
  logic          dr [K+1], cv [K+1];
  fp64_t         ad [K+1], bd [K+1], cd [K+1];
  logic [SB-1:0] a_row [K+1], b_col [K+1];

  assign av[0]      = p_a_v;
  assign ad[0]      = rd_a_data;
  assign a_row[0]   = p_row;
  assign a_first[0] = p_first;
  assign a_bank[0]  = p_abank;
  assign bv[0]      = p_b_v;
  assign bd[0]      = rd_b_data;
  assign b_col[0]   = p_col;
  assign b_bank[0]  = p_bbank;
  assign dr[0]      = drain_go;
  assign cv[0]      = 1'b0;
  assign cd[0]      = FP_ZERO;

  for (genvar p = 0; p < int'(K); p++) begin : g_pe
    mm_pe #(.K(K), .S(S), .P(p), .ADD_LAT_P(ADD_LAT_P), .MUL_LAT_P(MUL_LAT_P)) u_pe (
      .clk, .rst_n,
      .a_valid_i(av[p]), .a_i(ad[p]), .a_row_i(a_row[p]), .a_first_i(a_first[p]),
      .a_bank_i(a_bank[p]),
      .b_valid_i(bv[p]), .b_i(bd[p]), .b_col_i(b_col[p]), .b_bank_i(b_bank[p]),
      .drain_i(dr[p]), .c_valid_i(cv[p]), .c_i(cd[p]),
      .a_valid_o(av[p+1]), .a_o(ad[p+1]), .a_row_o(a_row[p+1]), .a_first_o(a_first[p+1]),
      .a_bank_o(a_bank[p+1]),
      .b_valid_o(bv[p+1]), .b_o(bd[p+1]), .b_col_o(b_col[p+1]), .b_bank_o(b_bank[p+1]),
      .drain_o(dr[p+1]), .c_valid_o(cv[p+1]), .c_o(cd[p+1])
    );
  end

  // ---------------- C write-back from PE_{K-1} ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_cnt <= '0;
    else if (state != DRAIN) c_cnt <= '0;
    else if (cv[K]) c_cnt <= c_cnt + 1'b1;
  end

  assign wr_c_en   = cv[K] && (state == DRAIN);
  assign wr_c_data = cd[K];
  assign wr_c_addr = AW'((32'(g) * S + 32'(c_cnt) / S) * 32'(n_r) + 32'(h) * S + 32'(c_cnt) % S);

endmodule : mat_mul
