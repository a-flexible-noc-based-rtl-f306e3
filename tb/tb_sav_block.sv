// tb_sav_block: random groups of c syndromes, with idle cycles; `odd` must
// rise exactly when the first odd group completes and stay high until clr.
module tb_sav_block;
  logic clk = 0, rst_n = 0;
  logic clr, valid, s, odd;
  logic [7:0] c;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sav_block #(.CNTW(8)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 0; valid = 0; s = 0; c = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 200; run++) begin
      int groups, cc;
      bit exp_odd;
      cc = $urandom_range(1, 12); groups = $urandom_range(1, 11);
      @(negedge clk); clr = 1; c = 8'(cc); @(negedge clk); clr = 0;
      exp_odd = 0;
      for (int g = 0; g < groups; g++) begin
        bit par;
        par = 0;
        for (int k = 0; k < cc; k++) begin
          s = ($urandom_range(0, 9) < (run % 3 == 0 ? 0 : 2)) ? 1'b1 : 1'b0;  // some runs all zero
          par ^= s;
          valid = 1;
          @(negedge clk);
          valid = 0;
          if ($urandom_range(0, 3) == 0) @(negedge clk);
          checks++;
          if (odd != (exp_odd || (k == cc - 1 && par))) begin
            failures++; $display("run %0d g %0d k %0d: odd %0d", run, g, k, odd);
          end
        end
        exp_odd |= par;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
