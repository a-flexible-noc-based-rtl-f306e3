// min_extract: MINIMUM EXTRACTION unit with the cumulative sign XOR.
//
// Streams the d values L(q_mj) of one PCC, one per cycle (`in_valid`, with
// `in_first`/`in_last` marking the PCC bounds), and keeps the smallest and the
// second smallest magnitude (normalized min-sum, eq. 6 and 7) and the XOR of
// all sign bits. When the last value arrives the results of the PCC appear on
// the outputs with `res_valid` for one cycle (registered, one cycle after
// in_last); the next PCC can start in the cycle after in_last. With a single
// input the second minimum is the largest magnitude QMAX.
module min_extract
  import ldpc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_first,
  input  logic          in_last,
  input  llr_t          in_val,
  output logic          res_valid,
  output logic [QW-2:0] min1,
  output logic [QW-2:0] min2,
  output logic          sign_all
);
  logic [QW-2:0] m1, m2, mag, n1, n2;
  logic          sg, ns;

  always_comb begin
    mag = in_val[QW-1] ? (QW-1)'(-in_val) : in_val[QW-2:0];
    // restart the running values at the first input of a PCC
    n1 = in_first ? (QW-1)'(QMAX) : m1;
    n2 = in_first ? (QW-1)'(QMAX) : m2;
    ns = in_first ? 1'b0 : sg;
    ns = ns ^ in_val[QW-1];
    if (mag < n1) begin
      n2 = n1;
      n1 = mag;
    end else if (mag < n2) begin
      n2 = mag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1 <= '0; m2 <= '0; sg <= 1'b0;
      res_valid <= 1'b0;
      min1 <= '0; min2 <= '0; sign_all <= 1'b0;
    end else begin
      res_valid <= in_valid && in_last;
      if (in_valid) begin
        m1 <= n1; m2 <= n2; sg <= ns;
        if (in_last) begin
          min1 <= n1; min2 <= n2; sign_all <= ns;
        end
      end
    end
  end
endmodule
