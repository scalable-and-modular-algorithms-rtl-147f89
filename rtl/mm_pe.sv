// Processing element of the linear array for Algorithm 1 (R = 1) and
// Algorithm 2 (R = r lanes).
//
// What it does: the PE sits in a chain.  Every cycle the elements of A
// (R lanes, column-major order) and of B (R lanes, row-major order) move one
// PE to the right through the registers RR.A and RR.B.  The PE owns one
// column j of every C sub-matrix and s = S rows of it.  When an element
// b_kj of its column passes, it copies it into B register k mod 2 of that
// lane (the two registers RR.B1/RR.B2, written alternately).  When an element
// a_ik of one of its rows passes, each of its R*R multiplier-adder pairs
// (MACs) computes c'_ij = c'_ij + a_ik * b_kj for one pair of A lane x and
// B lane y, reading and writing c'_ij in the MAC's local storage.  At the
// first step (k = 0) the adder adds zero instead of the stored value; at the
// last step (k = n-1) the sum is final and is sent left on lane y.
//
// Results travel right to left, one word per lane per cycle.  The PE's own
// final results have priority on its output register; words arriving from
// the right in the same cycle are parked in the CoutBuffer, and the buffer
// is emptied in cycles when the PE has no result of its own.  The buffer
// grows only in cycles with an own result, so R*S words always suffice.
//
// Element ownership: with d = n/r the side of a C sub-matrix and
// RG = (N/r)/S row groups, the PE at chain position l owns column l mod d and
// rows (l div d) + m*RG, m = 0 .. d/RG - 1; local storage word m holds row m.
// The PE does not divide: it receives its column/group from its left
// neighbour on the cfg chain and passes (column+1, wrapping at d) on.
// PEs whose group is >= RG own nothing and only forward data.
//
// Timing: one cycle per PE on every stream.  With a_ik in RR.A at cycle t,
// the product leaves the multiplier at t+LAT_MUL, the adder reads c'_ij then
// and its sum appears, and is written back, at t+LAT_MUL+LAT_ADD.  The same
// element is updated again d cycles later, so d must exceed LAT_ADD (the
// data-hazard rule).  Lanes are assumed to move in lock step (same i, k on
// every A lane), which the stream controller guarantees.
module mm_pe
  import mm_pkg::*;
#(
  parameter int unsigned R       = 1,
  parameter int unsigned S       = 20,
  parameter int unsigned RG      = 1,
  parameter int unsigned LAT_MUL = 8,
  parameter int unsigned LAT_ADD = 11
) (
  input  logic    clk,
  input  logic    rst_n,
  input  idx_t    cfg_d,
  input  idx_t    cfg_col_in,
  input  idx_t    cfg_grp_in,
  output idx_t    cfg_col_out,
  output idx_t    cfg_grp_out,
  input  a_word_t a_in  [R],
  input  b_word_t b_in  [R],
  output a_word_t a_out [R],
  output b_word_t b_out [R],
  input  c_word_t c_in  [R],
  output c_word_t c_out [R]
);

  localparam int unsigned AW = $clog2(S+1);
  localparam int unsigned CWB = $bits(c_word_t);

  // ---------------------------------------------------------------- config
  idx_t col_next;
  always_comb begin
    col_next = cfg_col_in + idx_t'(1);
    if (col_next >= cfg_d) begin
      cfg_col_out = '0;
      cfg_grp_out = cfg_grp_in + idx_t'(1);
    end else begin
      cfg_col_out = col_next;
      cfg_grp_out = cfg_grp_in;
    end
  end

  logic active;
  assign active = (cfg_grp_in < idx_t'(RG));

  // ------------------------------------------------------ RR.A and RR.B
  a_word_t rr_a [R];
  b_word_t rr_b [R];
  fp_t     rr_b12 [R][2];    // RR.B1 / RR.B2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < int'(R); q++) begin
        rr_a[q] <= '0;
        rr_b[q] <= '0;
      end
    end else begin
      for (int q = 0; q < int'(R); q++) begin
        rr_a[q] <= a_in[q];
        rr_b[q] <= b_in[q];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int y = 0; y < int'(R); y++) begin
      if (rr_b[y].valid && active && rr_b[y].j == cfg_col_in)
        rr_b12[y][rr_b[y].k[0]] <= rr_b[y].data;
    end
  end

  assign a_out = rr_a;
  assign b_out = rr_b;

  // ------------------------------------------------------------ A match
  logic          hit;
  logic [AW-1:0] slot;
  always_comb begin
    hit  = rr_a[0].valid && active &&
           ((rr_a[0].i % idx_t'(RG)) == cfg_grp_in);
    slot = AW'(rr_a[0].i / idx_t'(RG));
  end

  // Control tags travelling alongside the MAC pipelines.
  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [AW-1:0] slot;
    idx_t          i;
  } tag_t;

  localparam int unsigned TL = LAT_MUL + LAT_ADD;
  tag_t tag_q [TL+1];

  always_comb begin
    tag_q[0].valid = hit;
    tag_q[0].first = rr_a[0].first;
    tag_q[0].last  = rr_a[0].last;
    tag_q[0].slot  = slot;
    tag_q[0].i     = rr_a[0].i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 1; t <= int'(TL); t++) tag_q[t] <= '0;
    end else begin
      for (int t = 1; t <= int'(TL); t++) tag_q[t] <= tag_q[t-1];
    end
  end

  tag_t tag_add_in, tag_add_out;
  assign tag_add_in  = tag_q[LAT_MUL];
  assign tag_add_out = tag_q[TL];

  // ---------------------------------------------------------- R*R MACs
  fp_t mul_y [R][R];
  fp_t add_y [R][R];
  fp_t st_rd [R][R];

  for (genvar gx = 0; gx < R; gx++) begin : g_x
    for (genvar gy = 0; gy < R; gy++) begin : g_y
      logic mul_v, add_v;
      fp_t  acc_in;

      fp_mul #(.LAT(LAT_MUL)) u_mul (
        .clk, .rst_n,
        .in_valid (hit),
        .a        (rr_a[gx].data),
        .b        (rr_b12[gy][rr_a[0].k[0]]),
        .out_valid(mul_v),
        .y        (mul_y[gx][gy])
      );

      assign acc_in = tag_add_in.first ? '0 : st_rd[gx][gy];

      fp_add #(.LAT(LAT_ADD)) u_add (
        .clk, .rst_n,
        .in_valid (mul_v),
        .a        (mul_y[gx][gy]),
        .b        (acc_in),
        .out_valid(add_v),
        .y        (add_y[gx][gy])
      );

      local_store #(.DEPTH(S)) u_store (
        .clk,
        .we      (tag_add_out.valid),
        .wr_addr (tag_add_out.slot),
        .wr_data (add_y[gx][gy]),
        .rd_addr (tag_add_in.slot),
        .rd_data (st_rd[gx][gy])
      );
    end
  end

  // ---------------------------------------------- result chain, per lane
  logic fin;
  assign fin = tag_add_out.valid && tag_add_out.last;

  for (genvar gy = 0; gy < R; gy++) begin : g_lane
    logic [R-1:0]   push_v;
    logic [CWB-1:0] push_d [R];
    logic [CWB-1:0] head;
    logic           empty, pop;
    c_word_t        own [R];
    c_word_t        nxt;

    always_comb begin
      for (int x = 0; x < int'(R); x++) begin
        own[x].valid = fin;
        own[x].x     = LANE_W'(x);
        own[x].i     = tag_add_out.i;
        own[x].j     = cfg_col_in;
        own[x].data  = add_y[x][gy];
      end
      push_v = '0;
      for (int q = 0; q < int'(R); q++) push_d[q] = '0;
      pop = 1'b0;
      if (fin) begin
        nxt = own[0];
        for (int x = 1; x < int'(R); x++) begin
          push_v[x-1] = 1'b1;
          push_d[x-1] = own[x];
        end
        push_v[R-1] = c_in[gy].valid;
        push_d[R-1] = c_in[gy];
      end else if (!empty) begin
        nxt = c_word_t'(head);
        pop = 1'b1;
        push_v[R-1] = c_in[gy].valid;
        push_d[R-1] = c_in[gy];
      end else begin
        nxt = c_in[gy];
      end
    end

    cout_buffer #(.W(CWB), .DEPTH(R*S), .NPUSH(R)) u_cbuf (
      .clk, .rst_n,
      .push_valid(push_v),
      .push_data (push_d),
      .pop,
      .head,
      .empty,
      .count     ()
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) c_out[gy] <= '0;
      else        c_out[gy] <= nxt;
    end
  end

  initial begin
    assert (R >= 1 && R < (1 << LANE_W)) else $error("mm_pe: bad R");
  end

endmodule
