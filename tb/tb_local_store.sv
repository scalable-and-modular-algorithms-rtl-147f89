// Testbench of the MAC local storage: random writes and same-cycle reads
// against a model array; a read of the address being written returns the old
// word, and the new word from the next cycle on.
module tb_local_store;
  import mm_pkg::*;
  localparam int DEPTH = 20;
  localparam int AW = $clog2(DEPTH+1);
  logic clk = 0;
  always #5 clk = ~clk;

  logic we = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  fp_t wr_data = '0, rd_data;

  local_store #(.DEPTH(DEPTH)) dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);

  int checks = 0, failures = 0;
  fp_t model [DEPTH];
  bit  known [DEPTH];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) known[a] = 0;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data; known[a] = 1;
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we = $urandom_range(1);
      wr_addr = AW'($urandom_range(DEPTH-1));
      wr_data = {$urandom, $urandom};
      rd_addr = (c % 5 == 0) ? wr_addr : AW'($urandom_range(DEPTH-1));
      #1;
      checks++;
      if (rd_data != model[rd_addr]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
      if (we) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
