// Stream controller of Algorithm 3: loop counters and external-memory port.
//
// C = A x B is computed block by block with blocks of side SM = sqrt(M):
// for every block row g and block column h of C, and for z = 0 .. NB-1
// (NB = n/SM), the product A_gz x B_zh is accumulated into the PEs' local
// storage; after the last z the block of C is final and drains to memory.
// So blocks of A are read in row-major and blocks of B in column-major
// order.  Inside a block product, A_gz is read column by column and B_zh row
// by row.
//
// Stream produced for PE 0: first the SM elements of row 0 of the first B
// block, one per cycle (preload slots).  Then one slot every W = SM/P cycles:
// the slot with a_iq (column q of A_gz, row i) also carries element i of the
// next B row, which is row q+1 of B_zh, or row 0 of the next block product
// when q is the last column.  Each B row goes to the register bank of its
// parity.  The run takes SM + (n/SM)^3 * M * W cycles of streaming, i.e.
// sqrt(M) + n^3/p, plus the pipeline fill and the C drain.
//
// Memory interface as in mm_ctrl: row-major storage with pitch N, one-cycle
// synchronous reads (one A and one B port), one C write port.  The run-time
// problem size cfg_n must be a multiple of SM and at most N.  done pulses
// when all n*n C elements have been written.
module alg3_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned P      = 8,
  parameter int unsigned SQRT_M = 1024,
  parameter int unsigned N      = 1024,
  localparam int unsigned AW = $clog2(N*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          cfg_n,
  output logic          busy,
  output logic          done,
  output logic          a_rd_en,
  output logic [AW-1:0] a_rd_addr,
  input  fp_t           a_rd_data,
  output logic          b_rd_en,
  output logic [AW-1:0] b_rd_addr,
  input  fp_t           b_rd_data,
  output logic          c_wr_en,
  output logic [AW-1:0] c_wr_addr,
  output fp_t           c_wr_data,
  output slot_t         s_first,
  input  c3_word_t      c_last
);

  localparam int unsigned W  = SQRT_M / P;
  localparam int unsigned WW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, PRELOAD, STREAM, DRAIN} state_t;
  state_t st;

  idx_t nb;                 // n / SM
  idx_t g, h, z, q, i;      // block and element counters
  logic [WW-1:0] wc;        // cycles within a slot
  logic bank;               // bank of B row q
  logic [31:0] c_cnt;

  // The block product that follows (g, h, z) in the loop order.
  logic last_blk;
  idx_t g_n, h_n, z_n;
  always_comb begin
    last_blk = (g == nb - 1) && (h == nb - 1) && (z == nb - 1);
    g_n = g; h_n = h; z_n = z + 1;
    if (z == nb - 1) begin
      z_n = '0;
      h_n = h + 1;
      if (h == nb - 1) begin
        h_n = '0;
        g_n = g + 1;
      end
    end
  end

  logic emit;
  assign emit = (st == PRELOAD) || (st == STREAM && wc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; nb <= '0;
      g <= '0; h <= '0; z <= '0; q <= '0; i <= '0;
      wc <= '0; bank <= 1'b0;
    end else begin
      case (st)
        IDLE: if (start) begin
          nb <= cfg_n / idx_t'(SQRT_M);
          g <= '0; h <= '0; z <= '0; q <= '0; i <= '0;
          wc <= '0; bank <= 1'b0;
          st <= PRELOAD;
        end
        PRELOAD: begin
          if (i == idx_t'(SQRT_M - 1)) begin
            i  <= '0;
            st <= STREAM;
          end else begin
            i <= i + 1;
          end
        end
        STREAM: begin
          if (wc == WW'(W - 1)) begin
            wc <= '0;
            if (i == idx_t'(SQRT_M - 1)) begin
              i <= '0;
              bank <= ~bank;
              if (q == idx_t'(SQRT_M - 1)) begin
                q <= '0;
                if (last_blk) st <= DRAIN;
                else begin
                  g <= g_n; h <= h_n; z <= z_n;
                end
              end else begin
                q <= q + 1;
              end
            end else begin
              i <= i + 1;
            end
          end else begin
            wc <= wc + 1'b1;
          end
        end
        DRAIN: if (done) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  // Element addresses for the slot being emitted.
  logic b_has;
  idx_t b_row, b_col;
  always_comb begin
    b_has = 1'b1;
    if (st == PRELOAD) begin
      b_row = '0;
      b_col = i;
    end else if (q != idx_t'(SQRT_M - 1)) begin
      b_row = idx_t'(32'(z) * SQRT_M) + q + 1;
      b_col = idx_t'(32'(h) * SQRT_M) + i;
    end else begin
      b_has = !last_blk;
      b_row = idx_t'(32'(z_n) * SQRT_M);
      b_col = idx_t'(32'(h_n) * SQRT_M) + i;
    end
  end

  assign a_rd_en   = emit && (st == STREAM);
  assign a_rd_addr = AW'((32'(g) * SQRT_M + 32'(i)) * N + 32'(z) * SQRT_M + 32'(q));
  assign b_rd_en   = emit && b_has;
  assign b_rd_addr = AW'(32'(b_row) * N + 32'(b_col));

  // Slot tags wait one cycle for the memory data.
  slot_t s_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_q <= '0;
    else begin
      s_q          <= '0;
      s_q.valid    <= emit;
      s_q.preload  <= (st == PRELOAD);
      s_q.a_valid  <= (st == STREAM);
      s_q.a_first  <= (z == '0) && (q == '0);
      s_q.a_last   <= (z == nb - 1) && (q == idx_t'(SQRT_M - 1));
      s_q.a_bank   <= bank;
      s_q.a_i      <= i;
      s_q.row_base <= idx_t'(32'(g) * SQRT_M);
      s_q.col_base <= idx_t'(32'(h) * SQRT_M);
      s_q.b_valid  <= b_has;
      s_q.b_bank   <= (st == PRELOAD) ? 1'b0 : ~bank;
      s_q.b_j      <= i;
    end
  end

  always_comb begin
    s_first   = s_q;
    s_first.a = a_rd_data;
    s_first.b = b_rd_data;
  end

  // Write-back of C.
  assign c_wr_en   = c_last.valid;
  assign c_wr_addr = AW'(32'(c_last.row) * N + 32'(c_last.col));
  assign c_wr_data = c_last.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_cnt <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == IDLE) c_cnt <= '0;
      else if (!done) begin
        c_cnt <= c_cnt + 32'(c_last.valid);
        if (c_last.valid && c_cnt + 1 == 32'(nb) * 32'(nb) * SQRT_M * SQRT_M) done <= 1'b1;
      end
    end
  end

endmodule
