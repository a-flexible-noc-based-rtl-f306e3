// sav_block: SAV block (SB) of the early stopping block.
//
// Computes, one after the other, the parity of the syndrome accumulation
// vector elements a_h = sum_k s_(h+kz) (eq. 9) assigned to it. Syndromes of one
// element arrive consecutively, one per cycle (`valid`, `s`); every `c`
// syndromes (c = M/z) the XOR accumulator holds the parity of one element and
// restarts. `odd` goes high, and stays high until `clr`, as soon as any
// element is odd: the codeword is then of Type I and decoding must go on.
// Only the parity of a_h matters, so an XOR gate and a one-bit register
// replace an adder; the running count of c is this design's choice.
module sav_block #(
  parameter int CNTW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            valid,
  input  logic            s,
  input  logic [CNTW-1:0] c,
  output logic            odd
);
  logic            acc;
  logic [CNTW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= 1'b0; cnt <= '0; odd <= 1'b0;
    end else if (clr) begin
      acc <= 1'b0; cnt <= '0; odd <= 1'b0;
    end else if (valid) begin
      if (cnt == c - 1'b1) begin
        if (acc ^ s) odd <= 1'b1;
        acc <= 1'b0;
        cnt <= '0;
      end else begin
        acc <= acc ^ s;
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
