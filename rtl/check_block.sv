// check_block: Check Block (CB) of message stopping, at the PE output buffer.
//
// Subtracts |L(q_j^new)| from the threshold THR; the sign of the difference is
// the stopped flag F (F = 1 when |L| > THR). The packet for the NoC is
// assembled as F | RO | DNI | PAYLOAD, with RO and DNI taken from the PE's
// destination table. With ms_en low F is forced to 0 and every message is an
// ordinary one. What the PE does with F (send once, then never again) is in
// the PE. Purely combinational.
module check_block
  import ldpc_pkg::*;
(
  input  llr_t          l_new,
  input  logic [QW-2:0] thr,
  input  logic          ms_en,
  input  dni_t          dni,
  input  logic [AW-1:0] ro,
  output packet_t       pkt
);
  logic [QW-2:0] mag;
  logic [QW-1:0] diff;

  always_comb begin
    mag  = l_new[QW-1] ? (QW-1)'(-l_new) : l_new[QW-2:0];
    diff = {1'b0, thr} - {1'b0, mag};
    pkt.f       = ms_en && diff[QW-1];
    pkt.ro      = ro;
    pkt.dni     = dni;
    pkt.payload = l_new;
  end
endmodule
