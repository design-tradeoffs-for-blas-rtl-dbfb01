// reduction_circuit: sums sets of sequentially delivered floating-point values.
//
// Values arrive one per cycle (in_valid/in_ready handshake); in_last marks the
// final value of a set. Sets may have any length (one value or many) and may
// follow each other back to back. For every set one sum leaves on out_valid /
// out_data, in the order the sets arrived. The problem it solves is the
// read-after-write hazard of accumulating into a deeply pipelined adder: a
// plain accumulator would have to wait ADD_LAT cycles between inputs.
//
// The circuit uses two pipelined adders, as the accelerator's reduction circuit
// does; how they are organised here is this implementation's own design.
//  * Stage 1 (adder A1) keeps up to ADD_LAT partial sums of the open set
//    circulating in its pipeline. An arriving value is added to the partial
//    sum that leaves the pipeline in the same cycle if that partial sum belongs
//    to the same set, otherwise it starts a new partial sum. While no value
//    arrives, partial sums of the open set go round again unchanged (added to a
//    zero of their own sign). Partial sums of a closed set are retired into a
//    FIFO as they leave A1; a set retires at most ADD_LAT of them, and stage 1
//    tells stage 2 how many.
//  * Stage 2 (adder A2) combines the retired partial sums of each set pairwise.
//    Every item is tagged with its set; one holding register per tag keeps an
//    item waiting for a partner; a counter per tag knows how many items of
//    the set remain. When one item remains it is the set's sum; a small
//    reorder table releases sums in set order.
// Up to TAGS sets can be in flight. in_ready drops when all tags are in use or
// when the FIFO could not absorb every partial sum still inside A1. With
// SLACK > 0 it drops SLACK values early, so that an upstream pipeline of
// SLACK stages that samples in_ready at its entrance never loses a value.
//
// Timing: a set of s values completes about s + (1 + ceil(log2(min(s,ADD_LAT))))
// * ADD_LAT cycles after its first value, i.e. T_red(s) = Theta(s); new values
// are accepted every cycle.
module reduction_circuit
  import blas_pkg::*;
#(
  parameter int unsigned ADD_LAT_P  = ADD_LAT,
  parameter int unsigned TAGS       = 32,
  parameter int unsigned FIFO_DEPTH = 64,
  // Values an upstream pipeline may still deliver after in_ready falls.
  parameter int unsigned SLACK      = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t in_data,
  input  logic  in_last,
  output logic  in_ready,
  output logic  out_valid,
  output fp64_t out_data
);

  localparam int unsigned TB  = $clog2(TAGS);
  localparam int unsigned CB  = $clog2(ADD_LAT_P + 2);
  localparam int unsigned FB  = $clog2(FIFO_DEPTH);

  typedef logic [TB-1:0] tag_t;

  // ------------------------------------------------------------------
  // Stage 1
  // ------------------------------------------------------------------
  logic [TB:0]   cur_ptr, out_ptr;   // sets closed / sets emitted (with wrap bit)
  tag_t          cur_tag;
  logic          set_open;
  logic [CB-1:0] slot_cnt;

  logic  a1_vi, a1_vo;
  fp64_t a1_a, a1_b, a1_o;
  tag_t  a1_ti, a1_to;

  logic  accept, same1, retire;
  fp64_t retire_d;
  tag_t  retire_t;
  logic  close;
  logic [CB-1:0] close_cnt;

  assign cur_tag = cur_ptr[TB-1:0];

  fp_add #(.LAT(ADD_LAT_P), .TAG_W(TB)) u_a1 (
    .clk, .rst_n,
    .valid_i(a1_vi), .a_i(a1_a), .b_i(a1_b), .tag_i(a1_ti),
    .valid_o(a1_vo), .sum_o(a1_o), .tag_o(a1_to)
  );

  logic [FB:0] fifo_cnt;

  logic        room;     // a value can be taken now
  logic [TB:0] in_use;   // set tags in use by closed sets
  assign in_use   = cur_ptr - out_ptr;
  assign room     = (32'(in_use) < TAGS) &&
                    (32'(fifo_cnt) + ADD_LAT_P + 2 <= FIFO_DEPTH);
  assign in_ready = (32'(in_use) + SLACK < TAGS) &&
                    (32'(fifo_cnt) + ADD_LAT_P + 2 + SLACK <= FIFO_DEPTH);
  assign accept   = in_valid && room;
  assign same1    = a1_vo && set_open && (a1_to == cur_tag);

  always_comb begin
    a1_vi    = 1'b0;
    a1_a     = in_data;
    a1_b     = {in_data[63], 63'h0};
    a1_ti    = cur_tag;
    retire   = 1'b0;
    retire_d = a1_o;
    retire_t = a1_to;
    close    = accept && in_last;
    close_cnt = slot_cnt + (same1 ? CB'(0) : CB'(1));
    if (accept) begin
      a1_vi = 1'b1;
      if (same1) a1_b = a1_o;
      else       retire = a1_vo;         // a slot of an already closed set
    end else if (same1) begin
      a1_vi = 1'b1;                      // keep the partial sum circulating
      a1_a  = a1_o;
      a1_b  = {a1_o[63], 63'h0};
      a1_ti = a1_to;
    end else begin
      retire = a1_vo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ptr  <= '0;
      set_open <= 1'b0;
      slot_cnt <= '0;
    end else if (accept) begin
      if (in_last) begin
        cur_ptr  <= cur_ptr + 1'b1;
        set_open <= 1'b0;
        slot_cnt <= '0;
      end else begin
        set_open <= 1'b1;
        slot_cnt <= close_cnt;
      end
    end
  end

  // ------------------------------------------------------------------
  // FIFO of retired partial sums
  // ------------------------------------------------------------------
  typedef struct packed {
    tag_t  tag;
    fp64_t d;
  } item_t;

  item_t       fifo [FIFO_DEPTH];
  logic [FB-1:0] wp, rp;
  logic        pop;
  logic        vq;
  item_t       q;

  assign vq = (fifo_cnt != '0);
  assign q  = fifo[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      fifo_cnt <= '0;
      for (int i = 0; i < int'(FIFO_DEPTH); i++) fifo[i] <= '0;
    end else begin
      if (retire) begin
        fifo[wp] <= '{tag: retire_t, d: retire_d};
        wp <= (32'(wp) == FIFO_DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == FIFO_DEPTH - 1) ? '0 : rp + 1'b1;
      fifo_cnt <= fifo_cnt + (FB+1)'(retire) - (FB+1)'(pop);
    end
  end

  // ------------------------------------------------------------------
  // Stage 2
  // ------------------------------------------------------------------
  logic  a2_vi, a2_vo;
  fp64_t a2_a, a2_b, a2_o;
  tag_t  a2_ti, a2_to;

  fp_add #(.LAT(ADD_LAT_P), .TAG_W(TB)) u_a2 (
    .clk, .rst_n,
    .valid_i(a2_vi), .a_i(a2_a), .b_i(a2_b), .tag_i(a2_ti),
    .valid_o(a2_vo), .sum_o(a2_o), .tag_o(a2_to)
  );

  logic          hv   [TAGS];   // holding register valid
  fp64_t         hd   [TAGS];   // holding register data
  logic [CB-1:0] rem  [TAGS];   // items of the set not yet combined
  logic          rv   [TAGS];   // set sum ready
  fp64_t         rd   [TAGS];   // set sum

  // per-cycle decisions
  logic  st_f, st_q;            // store F / Q (into holding register or result)
  logic  clr_f, clr_q;          // clear holding register of F's / Q's tag

  always_comb begin
    a2_vi = 1'b0;
    a2_a  = a2_o;
    a2_b  = q.d;
    a2_ti = a2_to;
    pop   = 1'b0;
    st_f  = 1'b0;
    st_q  = 1'b0;
    clr_f = 1'b0;
    clr_q = 1'b0;
    if (a2_vo && vq && (a2_to == q.tag)) begin
      a2_vi = 1'b1;                          // F + Q
      pop   = 1'b1;
    end else if (a2_vo && hv[a2_to]) begin
      a2_vi = 1'b1;                          // F + H[F]
      a2_b  = hd[a2_to];
      clr_f = 1'b1;
      if (vq && !hv[q.tag]) begin
        st_q = 1'b1;
        pop  = 1'b1;
      end
    end else if (a2_vo) begin
      st_f = 1'b1;
      if (vq) begin
        pop = 1'b1;
        if (hv[q.tag]) begin                 // Q + H[Q]
          a2_vi = 1'b1;
          a2_a  = q.d;
          a2_b  = hd[q.tag];
          a2_ti = q.tag;
          clr_q = 1'b1;
        end else begin
          st_q = 1'b1;
        end
      end
    end else if (vq) begin
      pop = 1'b1;
      if (hv[q.tag]) begin
        a2_vi = 1'b1;
        a2_a  = q.d;
        a2_b  = hd[q.tag];
        a2_ti = q.tag;
        clr_q = 1'b1;
      end else begin
        st_q = 1'b1;
      end
    end
  end

  logic [TB-1:0] op_tag;
  assign op_tag = out_ptr[TB-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAGS); i++) begin
        hv[i]  <= 1'b0;
        hd[i]  <= '0;
        rem[i] <= '0;
        rv[i]  <= 1'b0;
        rd[i]  <= '0;
      end
      out_ptr   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (close) rem[cur_tag] <= close_cnt;
      if (a2_vi) rem[a2_ti] <= rem[a2_ti] - 1'b1;
      if (clr_f) hv[a2_to] <= 1'b0;
      if (clr_q) hv[q.tag] <= 1'b0;
      if (st_f) begin
        if (rem[a2_to] == CB'(1)) begin
          rv[a2_to] <= 1'b1;
          rd[a2_to] <= a2_o;
        end else begin
          hv[a2_to] <= 1'b1;
          hd[a2_to] <= a2_o;
        end
      end
      if (st_q) begin
        if (rem[q.tag] == CB'(1)) begin
          rv[q.tag] <= 1'b1;
          rd[q.tag] <= q.d;
        end else begin
          hv[q.tag] <= 1'b1;
          hd[q.tag] <= q.d;
        end
      end
      // in-order release
      out_valid <= 1'b0;
      if (rv[op_tag]) begin
        out_valid   <= 1'b1;
        out_data    <= rd[op_tag];
        rv[op_tag]  <= 1'b0;
        out_ptr     <= out_ptr + 1'b1;
      end
    end
  end

  // FIFO must never overflow
  assert property (@(posedge clk) disable iff (!rst_n)
                   retire |-> (fifo_cnt < (FB+1)'(FIFO_DEPTH)))
    else $error("reduction_circuit: retire FIFO overflow");

endmodule : reduction_circuit
