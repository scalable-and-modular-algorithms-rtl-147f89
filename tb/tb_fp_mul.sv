// Testbench of the least-compliant double-precision multiplier.
//
// Exact cases (products of small integers and powers of two), zero and
// denormal operands, underflow to zero and overflow saturation are compared
// bit for bit.  Random operands are compared with the simulator's
// round-to-nearest product: round toward zero must give the same bits or the
// pattern one unit in the last place smaller in magnitude.  The result must
// appear exactly LAT cycles after the operands.
module tb_fp_mul;
  import mm_pkg::*;
  localparam int LAT = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  fp_t a = '0, b = '0, y;

  fp_mul #(.LAT(LAT)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { fp_t a; fp_t b; fp_t exact; bit tol; } vec_t;
  vec_t q[$];

  // Expected results are checked LAT cycles after issue.
  fp_t  exp_q [$];
  bit   tol_q [$];
  int   issue_cyc [$];
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ok_rz(fp_t got, fp_t rn);
    if (got == rn) return 1;
    if (got[63] == rn[63] && got[62:0] == rn[62:0] - 63'd1) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      fp_t e; bit t; int ic;
      e = exp_q.pop_front(); t = tol_q.pop_front(); ic = issue_cyc.pop_front();
      checks++;
      if (!(t ? ok_rz(y, e) : (y == e)) || (cyc - ic) != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL mul: got %h expected %h (tol %0d) latency %0d", y, e, t, cyc - ic);
      end
    end
  end

  task automatic issue(fp_t x, fp_t z, fp_t e, bit t);
    @(negedge clk);
    a = x; b = z; in_valid = 1;
    exp_q.push_back(e); tol_q.push_back(t); issue_cyc.push_back(cyc);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // exact products
    for (int k = 0; k < 200; k++) begin
      real x, z;
      x = real'($signed($urandom_range(2000)) - 1000);
      z = real'($signed($urandom_range(2000)) - 1000) / 64.0;
      if (x == 0.0) x = 3.0;
      if (z == 0.0) z = -0.5;
      issue($realtobits(x), $realtobits(z), $realtobits(x * z), 0);
    end
    issue($realtobits(1.5), 64'h0, 64'h0, 0);                        // x * 0
    issue($realtobits(-1.5), 64'h0000_0000_0000_0001, 64'h8000_0000_0000_0000, 0); // denormal in
    issue(64'h0010_0000_0000_0000, 64'h3FD0_0000_0000_0000, 64'h0, 0); // underflow -> 0
    issue($realtobits(1.0e300), $realtobits(1.0e300), 64'h7FEF_FFFF_FFFF_FFFF, 0); // saturate
    issue($realtobits(3.0), $realtobits(1.0/3.0), 64'h3FEF_FFFF_FFFF_FFFF, 0);  // RZ below 1.0
    // random products, one per cycle
    for (int k = 0; k < 2000; k++) begin
      real x, z;
      x = ($urandom / 4294967296.0 - 0.5) * (2.0 ** ($signed($urandom_range(80)) - 40));
      z = ($urandom / 4294967296.0 - 0.5) * (2.0 ** ($signed($urandom_range(80)) - 40));
      @(negedge clk);
      a = $realtobits(x); b = $realtobits(z); in_valid = 1;
      exp_q.push_back($realtobits(x * z)); tol_q.push_back(1); issue_cyc.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
