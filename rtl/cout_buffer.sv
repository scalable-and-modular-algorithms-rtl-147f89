// CoutBuffer: the first-in first-out buffer that holds final C elements
// arriving from the right-hand neighbour while a PE is sending one of its
// own results to the left.
//
// It accepts up to NPUSH words in one cycle (entries with push_valid set are
// stored in index order) and releases one word per cycle (pop).  For a
// one-lane PE NPUSH is 1; a PE with r lanes may have to park r-1 of its own
// results plus one incoming word in the same cycle, so it uses NPUSH = r.
// head is the oldest word and is valid whenever empty is low.  Writes and
// pops take effect at the clock edge; a pop and pushes may happen together.
// Overflow is a design error (the sizing rule makes it impossible) and is
// caught by an assertion.  The assertion is disabled while rst_n is low,
// so a linter sees rst_n used both as an asynchronous reset and as a
// synchronous signal; that use is in the assertion only.  The count output
// is for observation and may be left open.
module cout_buffer #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 20,
  parameter int unsigned NPUSH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPUSH-1:0] push_valid,
  input  logic [W-1:0]     push_data [NPUSH],
  input  logic             pop,
  output logic [W-1:0]     head,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] n_push;

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] p, input int unsigned inc);
    int unsigned t;
    t = (int'(p) + inc) % DEPTH;
    return PW'(t);
  endfunction

  always_comb begin
    n_push = '0;
    for (int q = 0; q < NPUSH; q++) n_push += CW'(push_valid[q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wrap_add(wr_ptr, int'(n_push));
      if (pop && !empty) rd_ptr <= wrap_add(rd_ptr, 1);
      count <= count + n_push - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    int unsigned off;
    off = 0;
    for (int q = 0; q < NPUSH; q++) begin
      if (push_valid[q]) begin
        mem[wrap_add(wr_ptr, off)] <= push_data[q];
        off++;
      end
    end
  end

  assign head  = mem[rd_ptr];
  assign empty = (count == '0);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    32'(count) + 32'(n_push) - 32'(pop && !empty) <= DEPTH)
    else $error("cout_buffer overflow");

endmodule
