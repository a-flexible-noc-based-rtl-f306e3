// tb_min_extract: streams random PCCs (degree 1..20) back to back and checks
// the first and second minimum magnitude and the sign XOR one cycle after the
// last input.
module tb_min_extract;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, in_last, res_valid, sign_all;
  llr_t in_val;
  logic [QW-2:0] min1, min2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  min_extract dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e1, e2, es, d, m, pending, p1, p2, ps;
    bit have;
    in_valid = 0; in_first = 0; in_last = 0; in_val = 0; have = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pcc = 0; pcc < 300; pcc++) begin
      d = $urandom_range(1, 20);
      e1 = QMAX; e2 = QMAX; es = 0;
      for (int i = 0; i < d; i++) begin
        @(negedge clk);
        // result of the previous PCC appears one cycle after its last input
        if (have) begin
          checks++;
          if (!res_valid || min1 != p1 || min2 != p2 || sign_all != ps[0]) begin
            failures++; $display("pcc %0d: got %0d %0d %0d exp %0d %0d %0d", pcc - 1, min1, min2, sign_all, p1, p2, ps);
          end
          have = 0;
        end else if (i > 0) begin
          checks++;
          if (res_valid) begin failures++; $display("spurious res_valid"); end
        end
        in_val = llr_t'($urandom_range(0, 2 * QMAX) - QMAX);
        if (pcc % 7 == 0 && i > 0) in_val = -in_val;  // repeated magnitudes
        m = in_val < 0 ? -in_val : in_val;
        es ^= in_val < 0;
        if (m < e1) begin e2 = e1; e1 = m; end else if (m < e2) e2 = m;
        in_valid = 1; in_first = (i == 0); in_last = (i == d - 1);
      end
      p1 = e1; p2 = e2; ps = es; have = 1;
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
    checks++;
    if (!res_valid || min1 != p1 || min2 != p2 || sign_all != ps[0]) begin
      failures++; $display("last pcc mismatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
