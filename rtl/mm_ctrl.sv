// Stream controller of the linear array for Algorithms 1 and 2: the control
// logic with the loop counters, and the array's port to external memory.
//
// After start it reads B row by row (row-major) and A column by column
// (column-major) and feeds them to PE 0, one element per lane per cycle.
// With d = n/R, lane y of B carries columns y*d .. y*d+d-1 and lane x of A
// carries rows x*d .. x*d+d-1 (the sub-matrices B^y and A^x).  A phase is d
// cycles.  B starts one phase before A: in phase k (k >= 1) column k-1 of A
// and row k of B enter PE 0 together, and in phase 0 only row 0 of B.  The
// stream is n+1 phases long.  The counter limits come from the run-time
// problem size cfg_n, so one build serves every n <= N that is a multiple of
// R*RG and has n/R > LAT_ADD (not checked here; see the array).
//
// Memory interface (this design's choice): matrices are stored row-major
// with a row pitch of N words, so element (r, c) is at address r*N + c.
// Reads are issued with *_rd_en and the addressed word must be on *_rd_data
// in the next cycle (a synchronous SRAM).  Each final C element that leaves
// PE 0 is written at once through c_wr_* (one port per lane); done pulses
// for one cycle when all n*n elements of C have been written.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned R = 1,
  parameter int unsigned N = 20,
  localparam int unsigned AW = $clog2(N*N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  idx_t          cfg_n,
  output logic          busy,
  output logic          done,
  output idx_t          cfg_d,
  // external memory
  output logic          a_rd_en,
  output logic [AW-1:0] a_rd_addr [R],
  input  fp_t           a_rd_data [R],
  output logic          b_rd_en,
  output logic [AW-1:0] b_rd_addr [R],
  input  fp_t           b_rd_data [R],
  output logic [R-1:0]  c_wr_en,
  output logic [AW-1:0] c_wr_addr [R],
  output fp_t           c_wr_data [R],
  // PE 0
  output a_word_t       a_first [R],
  output b_word_t       b_first [R],
  input  c_word_t       c_last  [R]
);

  idx_t n_q, d_q;
  logic b_on, a_on;
  idx_t bk, bj, ak, ai;
  logic [31:0] c_cnt;

  assign cfg_d = d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; d_q <= '0;
      b_on <= 1'b0; a_on <= 1'b0;
      bk <= '0; bj <= '0; ak <= '0; ai <= '0;
      busy <= 1'b0;
    end else begin
      if (start && !busy) begin
        n_q  <= cfg_n;
        d_q  <= cfg_n / idx_t'(R);
        busy <= 1'b1;
        b_on <= 1'b1;
        bk <= '0; bj <= '0; ak <= '0; ai <= '0;
      end else begin
        if (b_on) begin
          if (bj == d_q - 1) begin
            bj <= '0;
            bk <= bk + 1;
            if (bk == '0) a_on <= 1'b1;        // A follows one phase later
            if (bk == n_q - 1) b_on <= 1'b0;
          end else begin
            bj <= bj + 1;
          end
        end
        if (a_on) begin
          if (ai == d_q - 1) begin
            ai <= '0;
            ak <= ak + 1;
            if (ak == n_q - 1) a_on <= 1'b0;
          end else begin
            ai <= ai + 1;
          end
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  // Read requests (addresses) for the current counters.
  assign a_rd_en = a_on;
  assign b_rd_en = b_on;
  for (genvar g = 0; g < R; g++) begin : g_addr
    assign a_rd_addr[g] = AW'((32'(g) * 32'(d_q) + 32'(ai)) * N + 32'(ak));
    assign b_rd_addr[g] = AW'(32'(bk) * N + 32'(g) * 32'(d_q) + 32'(bj));
  end

  // Tags wait one cycle for the memory data.
  logic a_v1, b_v1, a_f1, a_l1;
  idx_t ai1, ak1, bk1, bj1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_v1 <= 1'b0; b_v1 <= 1'b0; a_f1 <= 1'b0; a_l1 <= 1'b0;
      ai1 <= '0; ak1 <= '0; bk1 <= '0; bj1 <= '0;
    end else begin
      a_v1 <= a_on;
      b_v1 <= b_on;
      a_f1 <= (ak == '0);
      a_l1 <= (ak == n_q - 1);
      ai1 <= ai; ak1 <= ak; bk1 <= bk; bj1 <= bj;
    end
  end

  always_comb begin
    for (int g = 0; g < int'(R); g++) begin
      a_first[g].valid = a_v1;
      a_first[g].first = a_f1;
      a_first[g].last  = a_l1;
      a_first[g].i     = ai1;
      a_first[g].k     = ak1;
      a_first[g].data  = a_rd_data[g];
      b_first[g].valid = b_v1;
      b_first[g].k     = bk1;
      b_first[g].j     = bj1;
      b_first[g].data  = b_rd_data[g];
    end
  end

  // Write-back of C.
  logic [31:0] n_wr;
  always_comb begin
    n_wr = '0;
    for (int g = 0; g < int'(R); g++) begin
      c_wr_en[g]   = c_last[g].valid;
      c_wr_addr[g] = AW'((32'(c_last[g].x) * 32'(d_q) + 32'(c_last[g].i)) * N
                         + 32'(g) * 32'(d_q) + 32'(c_last[g].j));
      c_wr_data[g] = c_last[g].data;
      n_wr += 32'(c_last[g].valid);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_cnt <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        c_cnt <= '0;
      end else if (busy && !done) begin
        c_cnt <= c_cnt + n_wr;
        if (c_cnt + n_wr == 32'(n_q) * 32'(n_q)) done <= 1'b1;
      end
    end
  end

endmodule
