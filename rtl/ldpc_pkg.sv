// ldpc_pkg: types and constants shared by the NoC-based LDPC decoder.
//
// The decoder moves extrinsic LLR messages between processing elements (PEs)
// over a 2-D torus network on chip. Every message is one flit carrying the
// packet of the message-stopping decoder: a stop flag F, the write address RO
// in the destination L(q) memory, the destination node identifier DNI and the
// extrinsic value itself (PAYLOAD). The field order F, RO, DNI, PAYLOAD follows
// the packet drawn for the check block; the field widths are this design's
// choice: 8-bit messages (the precision of all evaluated decoders), a 12-bit RO
// that addresses up to 4096 memory locations, and a DNI made of a 3-bit x and a
// 3-bit y coordinate (torus up to 8 x 8).
package ldpc_pkg;

  // Message (LLR) precision in bits, two's complement.
  localparam int QW = 8;
  // Largest representable magnitude: messages saturate to +/- QMAX.
  localparam int QMAX = (1 << (QW - 1)) - 1;
  // Largest magnitude of L(q_mj) as seen by the check-node part (minimum
  // extraction and compare). L(q_mj) itself is kept one bit wider and added to
  // R_mj unclipped (eq. 5), so the posterior loses nothing to this limit; with
  // |R_mj| <= 0.75 * EXT_MAX a posterior at QMAX still gives |L(q_mj)| >
  // EXT_MAX, so the check-node inputs are unchanged by saturation of L(q).
  localparam int EXT_MAX = QMAX / 2;
  // Width of the RO field (L(q) memory write address).
  localparam int AW = 12;
  // Width of one torus coordinate inside the DNI.
  localparam int CW = 3;

  typedef logic signed [QW-1:0] llr_t;
  // L(q_mj) before clipping: one bit wider than a message.
  typedef logic signed [QW:0]   ext_t;

  typedef struct packed {
    logic [CW-1:0] y;
    logic [CW-1:0] x;
  } dni_t;

  typedef struct packed {
    logic          f;        // stopped flag: last delivery of this message
    logic [AW-1:0] ro;       // write address in the destination L(q) memory
    dni_t          dni;      // destination node
    llr_t          payload;  // extrinsic value
  } packet_t;

  localparam int PKT_W = $bits(packet_t);

  // Router port numbering.
  typedef enum logic [2:0] {
    PORT_L = 3'd0,  // local PE
    PORT_N = 3'd1,  // y - 1
    PORT_E = 3'd2,  // x + 1
    PORT_S = 3'd3,  // y + 1
    PORT_W = 3'd4   // x - 1
  } port_e;

  localparam int NPORTS = 5;

  // Configuration targets inside a PE / the early stopping block.
  typedef enum logic [2:0] {
    CFG_LLR  = 3'd0,  // PE: channel LLR into an L(q) memory location
    CFG_DEG  = 3'd1,  // PE: degree of the PCC at index addr
    CFG_DEST = 3'd2,  // PE: {DNI, RO} of the message produced at location addr
    CFG_NPC  = 3'd3,  // PE: number of PCCs scheduled on the PE
    CFG_SNM  = 3'd4,  // ESB: shuffle control of output port idx at cycle addr
    CFG_SWA  = 3'd5,  // ESB: {we, address} for SMout idx at cycle addr
    CFG_ESB  = 3'd6   // ESB: addr 0 = shuffle cycles, 1 = SAV group size c
  } cfg_mem_e;

  // Saturate a wider signed value into an llr_t.
  function automatic llr_t sat_llr(input logic signed [QW+1:0] v);
    if (v > $signed((QW+2)'(QMAX))) return llr_t'(QMAX);
    else if (v < -$signed((QW+2)'(QMAX))) return llr_t'(-QMAX);
    else return llr_t'(v);
  endfunction

  // Saturate a wider signed value to +/- EXT_MAX (check-node input L(q_mj) of eq. 1).
  function automatic llr_t sat_ext(input logic signed [QW+1:0] v);
    if (v > $signed((QW+2)'(EXT_MAX))) return llr_t'(EXT_MAX);
    else if (v < -$signed((QW+2)'(EXT_MAX))) return llr_t'(-EXT_MAX);
    else return llr_t'(v);
  endfunction

endpackage
