// tb_sync_fifo: random pushes and pops on a depth-4 sync_fifo against a
// queue model. Checks the head word, empty and full after every clock,
// that a push into a full queue is dropped and flagged by overflow for one
// clock, that a pop from an empty queue changes nothing, and that a push
// and a pop in the same clock on a full queue both take effect.
module tb_sync_fifo;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] push_data = 0, pop_data;
  logic empty, full, overflow;
  int checks = 0, failures = 0, overflows = 0, full_pushpop = 0;
  int model[$];

  sync_fifo #(.WIDTH(8), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_ovf;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(empty && !full && !overflow, "empty after reset");
    for (int k = 0; k < 3000; k++) begin
      // Bias towards filling during the first half, draining in the second.
      push = ($urandom_range(99) < ((k / 500) % 2 == 0 ? 70 : 30));
      pop  = ($urandom_range(99) < ((k / 500) % 2 == 0 ? 30 : 70));
      push_data = 8'($urandom_range(255));
      chk(empty == (model.size() == 0), "empty flag");
      chk(full == (model.size() == D), "full flag");
      if (model.size() > 0) chk(int'(pop_data) == model[0], "head word");
      exp_ovf = push && model.size() == D && !pop;
      if (push && pop && model.size() == D) full_pushpop++;
      if (pop && model.size() > 0) void'(model.pop_front());
      if (push && !exp_ovf) model.push_back(int'(push_data));
      @(negedge clk);
      chk(overflow == exp_ovf, "overflow pulse");
      if (overflow) overflows++;
    end
    push = 0; pop = 0;
    chk(overflows > 0, "overflow exercised");
    chk(full_pushpop > 0, "push and pop while full exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
