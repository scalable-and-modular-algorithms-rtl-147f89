// Testbench of the CoutBuffer FIFO with two write ports (the r = 2 case).
//
// Random pushes (0, 1 or 2 per cycle) and pops are applied while a queue in
// the testbench models the expected contents; head, empty and count are
// compared every cycle.  Depth 6, filled to the limit at least once.
module tb_cout_buffer;
  localparam int W = 16, DEPTH = 6, NPUSH = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NPUSH-1:0] push_valid = '0;
  logic [W-1:0]     push_data [NPUSH];
  logic             pop = 0;
  logic [W-1:0]     head;
  logic             empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  cout_buffer #(.W(W), .DEPTH(DEPTH), .NPUSH(NPUSH)) dut (
    .clk, .rst_n, .push_valid, .push_data, .pop, .head, .empty, .count);

  int checks = 0, failures = 0, full_seen = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] next_val = 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_data[0] = '0; push_data[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      int room, np;
      @(negedge clk);
      // compare state
      checks++;
      if (empty != (model.size() == 0) || int'(count) != model.size() ||
          (model.size() > 0 && head != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: count %0d/%0d head %h/%h", c, count, model.size(), head,
                                    model.size() > 0 ? model[0] : '0);
      end
      if (model.size() == DEPTH) full_seen++;
      // choose this cycle's operations (never overflow)
      pop = (model.size() > 0) && ($urandom_range(99) < ((c / 500) % 2 == 0 ? 30 : 70));
      room = DEPTH - model.size() + (pop ? 1 : 0);
      np = $urandom_range(2);
      if (np > room) np = room;
      push_valid = '0;
      for (int q = 0; q < NPUSH; q++) push_data[q] = '0;
      if (np >= 1) begin
        int slot;
        slot = (np == 1) ? $urandom_range(1) : 0;
        push_valid[slot] = 1'b1;
        push_data[slot] = next_val;
      end
      if (np == 2) begin
        push_valid[1] = 1'b1;
        push_data[1] = next_val + 1;
      end
      if (pop) void'(model.pop_front());
      for (int q = 0; q < NPUSH; q++)
        if (push_valid[q]) begin
          model.push_back(push_data[q]);
          next_val++;
        end
    end
    @(negedge clk);
    push_valid = '0; pop = 0;
    checks++;
    if (full_seen == 0) begin
      failures++;
      $display("FAIL: buffer never full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
