// Processing element of Algorithm 3 (block matrix multiply on p PEs with
// total storage M, block side sqrt(M)).
//
// The PE with index IDX computes columns IDX, P+IDX, ..., (W-1)*P+IDX of the
// current sqrt(M) x sqrt(M) block of C, W = sqrt(M)/P columns in all, for
// every row: M/P intermediate results in its local storage (word i*W + t
// holds row i, column t*P+IDX of the block).
//
// Data arrive in slots (mm_pkg::slot_t) that hold one element a_iq of the A
// block and one element of the next B row.  A slot stays W cycles in each PE
// (one cycle for the slots that preload the very first B row) and then moves
// to the right-hand neighbour.  When a slot arrives, a B element whose column
// belongs to this PE is copied into register bank b_bank; the two banks of W
// registers (2*sqrt(M)/p registers) hold row q in use and row q+1 being
// loaded.  During the W cycles of a slot the PE multiplies a_iq with the W
// stored elements of row q, one per cycle, and accumulates into c'_ij.  At
// the first update of an element (first B row of the first block of the sum)
// the adder adds zero; at the last update the sum is final and is sent left
// through the result chain, where own results have priority and incoming
// ones wait in the CoutBuffer, as in Algorithm 1.
//
// Timing: each c'_ij is updated once every M/P cycles, so M/P must exceed
// LAT_ADD.  Products leave the multiplier LAT_MUL cycles after issue; the
// adder reads c'_ij then and writes the sum LAT_ADD cycles later.
// Accumulating the partial products of successive blocks A_gz x B_zh in the
// local storage (z innermost) is this design's choice.
module alg3_pe
  import mm_pkg::*;
#(
  parameter int unsigned P       = 8,
  parameter int unsigned SQRT_M  = 1024,
  parameter int unsigned IDX     = 0,
  parameter int unsigned LAT_MUL = 8,
  parameter int unsigned LAT_ADD = 11
) (
  input  logic     clk,
  input  logic     rst_n,
  input  slot_t    s_in,
  output slot_t    s_out,
  input  c3_word_t c_in,
  output c3_word_t c_out
);

  localparam int unsigned W  = SQRT_M / P;
  localparam int unsigned SD = SQRT_M * W;          // M / P words
  localparam int unsigned TW = $clog2(W + 1);
  localparam int unsigned AW = $clog2(SD + 1);
  localparam int unsigned CWB = $bits(c3_word_t);

  slot_t          rr;
  logic [TW-1:0]  t;
  logic [TW-1:0]  stay_m1;
  fp_t            breg [2][W];

  assign stay_m1 = rr.preload ? '0 : TW'(W - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      t  <= '0;
    end else if (s_in.valid) begin
      rr <= s_in;
      t  <= '0;
    end else if (rr.valid) begin
      if (t == stay_m1) rr.valid <= 1'b0;
      else              t <= t + 1'b1;
    end
  end

  always_comb begin
    s_out = rr;
    s_out.valid = rr.valid && (t == stay_m1);
  end

  // Keep the B elements of this PE's columns.
  always_ff @(posedge clk) begin
    if (rr.valid && t == '0 && rr.b_valid && (rr.b_j % idx_t'(P)) == idx_t'(IDX))
      breg[rr.b_bank][TW'(rr.b_j / idx_t'(P))] <= rr.b;
  end

  // Issue one multiply per cycle while an A element is present.
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [AW-1:0] addr;
    idx_t          row;
    idx_t          col;
  } tag_t;

  localparam int unsigned TL = LAT_MUL + LAT_ADD;
  tag_t tag_q [TL+1];
  logic issue;
  assign issue = rr.valid && rr.a_valid && !rr.preload;

  always_comb begin
    tag_q[0].valid = issue;
    tag_q[0].first = rr.a_first;
    tag_q[0].last  = rr.a_last;
    tag_q[0].addr  = AW'(32'(rr.a_i) * W + 32'(t));
    tag_q[0].row   = rr.row_base + rr.a_i;
    tag_q[0].col   = rr.col_base + idx_t'(32'(t) * P + IDX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int s = 1; s <= int'(TL); s++) tag_q[s] <= '0;
    else        for (int s = 1; s <= int'(TL); s++) tag_q[s] <= tag_q[s-1];
  end

  tag_t tag_add_in, tag_add_out;
  assign tag_add_in  = tag_q[LAT_MUL];
  assign tag_add_out = tag_q[TL];

  logic mul_v, add_v;
  fp_t  mul_y, add_y, st_rd, acc_in;

  fp_mul #(.LAT(LAT_MUL)) u_mul (
    .clk, .rst_n,
    .in_valid (issue),
    .a        (rr.a),
    .b        (breg[rr.a_bank][t]),
    .out_valid(mul_v),
    .y        (mul_y)
  );

  assign acc_in = tag_add_in.first ? '0 : st_rd;

  fp_add #(.LAT(LAT_ADD)) u_add (
    .clk, .rst_n,
    .in_valid (mul_v),
    .a        (mul_y),
    .b        (acc_in),
    .out_valid(add_v),
    .y        (add_y)
  );

  local_store #(.DEPTH(SD)) u_store (
    .clk,
    .we      (tag_add_out.valid),
    .wr_addr (tag_add_out.addr),
    .wr_data (add_y),
    .rd_addr (tag_add_in.addr),
    .rd_data (st_rd)
  );

  // Result chain towards PE 0.
  logic           fin;
  c3_word_t       own, nxt;
  logic [0:0]     push_v;
  logic [CWB-1:0] push_d [1];
  logic [CWB-1:0] head;
  logic           empty, pop;

  assign fin = tag_add_out.valid && tag_add_out.last;

  always_comb begin
    own.valid = 1'b1;
    own.row   = tag_add_out.row;
    own.col   = tag_add_out.col;
    own.data  = add_y;
    pop       = 1'b0;
    push_v[0] = 1'b0;
    push_d[0] = c_in;
    if (fin) begin
      nxt       = own;
      push_v[0] = c_in.valid;
    end else if (!empty) begin
      nxt       = c3_word_t'(head);
      pop       = 1'b1;
      push_v[0] = c_in.valid;
    end else begin
      nxt = c_in;
    end
  end

  cout_buffer #(.W(CWB), .DEPTH(SD), .NPUSH(1)) u_cbuf (
    .clk, .rst_n,
    .push_valid(push_v),
    .push_data (push_d),
    .pop,
    .head,
    .empty,
    .count     ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_out <= '0;
    else        c_out <= nxt;
  end

  initial begin
    assert (SQRT_M % P == 0) else $error("alg3_pe: sqrt(M) must be a multiple of p");
    assert (SD > LAT_ADD)    else $error("alg3_pe: M/p must exceed the adder depth");
  end

endmodule
