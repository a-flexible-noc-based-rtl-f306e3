// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, empty/full/count flags and that a full queue accepts push+pop.
module tb_sync_fifo;
  localparam int W = 8, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH) || int'(count) != model.size()) begin
        failures++; $display("flag mismatch cyc %0d size %0d count %0d", cyc, model.size(), count);
      end
      if (!empty) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("data mismatch %h %h", dout, model[0]); end
      end
      pop  = !empty && ($urandom_range(0, 3) != 0 || cyc > 2800);
      push = (cyc < 2800) && (!full || pop) && ($urandom_range(0, 2) != 0 || cyc % 500 < 60);
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
