// shuffle_network: shuffling network (SN) of the early stopping block.
//
// P single-bit input ports (the SMin memories) and P output ports (the SMout
// memories). Each output port j takes the syndrome of the input port named by
// its ceil(log2 P)-bit control word sel[j], so one cycle moves up to P
// syndromes along any pattern of paths; P*ceil(log2 P) control bits per cycle
// come from the SNM memory, as sized for the decoder. The mux-per-output
// structure is this design's choice. Purely combinational.
module shuffle_network #(
  parameter int P  = 9,
  parameter int SW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0]  din,
  input  logic [SW-1:0] sel [P],
  output logic [P-1:0]  dout
);
  always_comb begin
    for (int j = 0; j < P; j++)
      dout[j] = (int'(sel[j]) < P) ? din[sel[j]] : 1'b0;
  end
endmodule
