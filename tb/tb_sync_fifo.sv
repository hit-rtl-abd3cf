// tb_sync_fifo: checks the first-word-fall-through FIFO against a queue model
// under random push and pop, including pushes when full (refused by the
// caller here, as the design requires) and pops when empty. Every cycle it
// compares empty, full, the free count and the head word.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0; logic [31:0] din = 0, dout;
  logic empty, full; logic [2:0] free;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  sync_fifo #(.T(logic [31:0]), .DEPTH(6)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .free);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 6) || int'(free) != 6 - q.size() ||
          (q.size() != 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: empty %b full %b free %0d dout %h, model size %0d", i, empty, full, free, dout, q.size());
      end
      push = ($urandom % 2 == 0) && !full;
      pop  = ($urandom % 3 == 0) && !empty;
      din  = $urandom;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
