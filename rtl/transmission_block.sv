// transmission_block: Transmission Block (TB) of iteration early stopping.
//
// Computes the syndrome bit s_i of each PCC while the PE produces it: the XOR
// of the sign bits (hard decisions) of the PCC's updated extrinsics
// L(q_j^new), fed one per cycle with `last` on the PCC's final edge. The bit
// leaves on a dedicated link to the early stopping block, registered, with
// s_valid one cycle after the last edge. It works alongside the PE and adds
// no latency to an iteration.
module transmission_block (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic last,
  input  logic sign,
  output logic s_valid,
  output logic s_bit
);
  logic acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= 1'b0;
      s_valid <= 1'b0;
      s_bit   <= 1'b0;
    end else begin
      s_valid <= valid && last;
      if (valid) begin
        if (last) begin
          s_bit <= acc ^ sign;
          acc   <= 1'b0;
        end else begin
          acc <= acc ^ sign;
        end
      end
    end
  end
endmodule
