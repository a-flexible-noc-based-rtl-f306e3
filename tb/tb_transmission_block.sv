// tb_transmission_block: random PCCs of sign bits; s_bit must be their XOR,
// valid for one cycle right after each PCC's last edge.
module tb_transmission_block;
  logic clk = 0, rst_n = 0;
  logic valid, last, sign, s_valid, s_bit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  transmission_block dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit par, pend, pbit;
    valid = 0; last = 0; sign = 0; pend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pcc = 0; pcc < 400; pcc++) begin
      int d;
      d = $urandom_range(1, 12);
      par = 0;
      for (int i = 0; i < d; i++) begin
        @(negedge clk);
        checks++;
        if (s_valid != pend || (pend && s_bit != pbit)) begin
          failures++; $display("pcc %0d: s_valid %0d s_bit %0d exp %0d %0d", pcc, s_valid, s_bit, pend, pbit);
        end
        pend = 0;
        // idle gaps inside a PCC must not disturb the accumulation
        if ($urandom_range(0, 4) == 0) begin
          valid = 0; @(negedge clk);
        end
        valid = 1; sign = 1'($urandom_range(0, 1)); last = (i == d - 1);
        par ^= sign;
      end
      pbit = par; pend = 1;
    end
    @(negedge clk);
    valid = 0;
    checks++;
    if (!s_valid || s_bit != pbit) begin failures++; $display("final syndrome wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
