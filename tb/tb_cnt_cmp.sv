// tb_cnt_cmp: loads random offsets and degrees back to back and checks the
// address sequence, the first/last flags and that a new PCC starts in the
// cycle after the previous one's last read.
module tb_cnt_cmp;
  logic clk = 0, rst_n = 0;
  logic load, ready, adv, valid, first, last;
  logic [11:0] offset, addr;
  logic [4:0] degree;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cnt_cmp #(.AW(12), .DW(5)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_off, exp_deg, cnt_seen;
    load = 0; adv = 1; offset = 0; degree = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int pcc = 0; pcc < 60; pcc++) begin
      exp_off = $urandom_range(0, 4000);
      exp_deg = $urandom_range(1, 20);
      // wait until the counter can take a new PCC
      while (!ready) @(negedge clk);
      load = 1; offset = 12'(exp_off); degree = 5'(exp_deg);
      @(negedge clk);
      load = 0;
      for (int i = 0; i < exp_deg; i++) begin
        checks++;
        if (!valid || addr != 12'(exp_off + i) || first != (i == 0) || last != (i == exp_deg - 1)) begin
          failures++;
          $display("pcc %0d i %0d: valid %0d addr %0d exp %0d first %0d last %0d", pcc, i, valid, addr, exp_off + i, first, last);
        end
        if (i == exp_deg - 1) begin
          checks++;
          if (!ready) begin failures++; $display("not ready on last"); end
        end else begin
          @(negedge clk);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("valid after end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
