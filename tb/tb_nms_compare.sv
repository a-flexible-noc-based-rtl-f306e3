// tb_nms_compare: random and corner inputs against eq. (8) with 1/alpha = 0.75
// (truncated x/2 + x/4) and the sign of the other edges.
module tb_nms_compare;
  import ldpc_pkg::*;
  llr_t lqmj, r_new;
  logic [QW-2:0] min1, min2;
  logic sign_all;
  int checks = 0, failures = 0;

  nms_compare dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int mag, m1, m2, sel, sc, exp;
      bit neg;
      m1 = $urandom_range(0, QMAX);
      m2 = $urandom_range(m1, QMAX);
      mag = (n % 3 == 0) ? m1 : $urandom_range(m1, QMAX);
      lqmj = llr_t'(($urandom_range(0, 1) == 1) ? -mag : mag);
      if (mag == 0) lqmj = 0;
      min1 = (QW-1)'(m1); min2 = (QW-1)'(m2); sign_all = 1'($urandom_range(0, 1));
      #1;
      sel = (mag == m1) ? m2 : m1;
      sc  = sel / 2 + sel / 4;
      neg = sign_all ^ (lqmj < 0);
      exp = neg ? -sc : sc;
      checks++;
      if (int'(r_new) != exp) begin
        failures++; $display("lqmj %0d m1 %0d m2 %0d s %0d: got %0d exp %0d", lqmj, m1, m2, sign_all, r_new, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
