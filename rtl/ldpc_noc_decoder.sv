// ldpc_noc_decoder: fully flexible NoC-based layered LDPC decoder with message
// stopping and iteration early stopping.
//
// P = NX*NY processing elements (PEs), each attached to one routing element of
// a 2-D torus NoC. The parity check constraints (PCCs) of the code are spread
// over the PEs by an off-line schedule, loaded through the configuration port
// together with the channel LLRs. In each iteration every PE updates its PCCs
// with normalized min-sum and sends each updated extrinsic, as a one-flit
// packet, to the PE and memory location that hold the next PCC of the same
// code bit. Nothing in the hardware depends on the code's structure: any code
// whose PCCs fit NPC per PE, of degree up to ND, can be run.
// Traffic reduction:
//   message stopping  - extrinsics above THR are delivered a last time, flagged,
//                       and then no longer sent (ms_en);
//   early stopping    - per-PCC syndromes go to the early stopping block, which
//                       stops decoding when all SAV elements are even (es_en).
// Interface:
//   cfg_*     configuration writes (see ldpc_pkg::cfg_mem_e); cfg_idx selects
//             the PE (PE tables) or the port (ESB tables).
//   go        start decoding the loaded frame; done rises when finished, with
//             the number of iterations and whether early stopping ended it.
//   rd_*      read back an L(q) memory location (one-cycle latency) to take
//             the hard decisions.
//   statistics: messages sent / stopped and router head-of-line waits since go.
// Defaults: a 3 x 3 torus (the smallest decoder evaluated with both methods),
// 8-bit messages, NPC = 128 and ND = 20 (enough for every WiMAX code on nine
// PEs; the 2304-bit rate-1/2 code with early stopping needs NPC and
// SMI_DEPTH of 132, because its z = 96 is not a multiple of nine), up to 10
// iterations given on it_max.
module ldpc_noc_decoder
  import ldpc_pkg::*;
#(
  parameter int NX         = 3,
  parameter int NY         = 3,
  parameter int NPC        = 128,
  parameter int ND         = 20,
  parameter int FIFO_DEPTH = 8,
  parameter int OB_DEPTH   = 8,
  parameter int SMI_DEPTH  = 128,
  parameter int SMO_DEPTH  = 132
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  cfg_mem_e      cfg_mem,
  input  logic [7:0]    cfg_idx,
  input  logic [AW-1:0] cfg_addr,
  input  logic [31:0]   cfg_data,
  input  logic [QW-2:0] thr,
  input  logic          ms_en,
  input  logic          es_en,
  input  logic [3:0]    it_max,
  input  logic          go,
  output logic          busy,
  output logic          done,
  output logic [3:0]    iterations,
  output logic          es_stopped,
  input  logic [7:0]    rd_pe,
  input  logic [AW-1:0] rd_addr,
  output llr_t          rd_data,
  output logic [31:0]   msg_sent_cnt,
  output logic [31:0]   msg_stopped_cnt,
  output logic [31:0]   noc_wait_cnt
);
  localparam int P = NX * NY;

  logic           frame_clr, pe_start, first_iter, esb_start;
  logic           esb_busy, esb_done, esb_stop, noc_busy;
  logic [P-1:0]   pe_busy, s_valid, s_bit, sent, stopped;
  logic [P-1:0]   inj_valid, inj_ready, ej_valid;
  packet_t [P-1:0] inj_pkt, ej_pkt;
  llr_t           pe_rd [P];
  logic [15:0]    blocked;
  logic [7:0]     rd_pe_q;

  for (genvar p = 0; p < P; p++) begin : g_pe
    pe #(.NPC(NPC), .ND(ND), .OB_DEPTH(OB_DEPTH)) u_pe (
      .clk, .rst_n,
      .cfg_we    (cfg_we && cfg_idx == 8'(p) && cfg_mem <= CFG_NPC),
      .cfg_mem   (cfg_mem),
      .cfg_addr  (cfg_addr),
      .cfg_data  (cfg_data),
      .frame_clr (frame_clr),
      .start     (pe_start),
      .first_iter(first_iter),
      .thr       (thr),
      .ms_en     (ms_en),
      .busy      (pe_busy[p]),
      .inj_valid (inj_valid[p]),
      .inj_pkt   (inj_pkt[p]),
      .inj_ready (inj_ready[p]),
      .ej_valid  (ej_valid[p]),
      .ej_pkt    (ej_pkt[p]),
      .s_valid   (s_valid[p]),
      .s_bit     (s_bit[p]),
      .msg_sent  (sent[p]),
      .msg_stopped(stopped[p]),
      .rd_addr   (rd_addr),
      .rd_data   (pe_rd[p])
    );
  end

  noc_torus #(.NX(NX), .NY(NY), .FIFO_DEPTH(FIFO_DEPTH)) u_noc (
    .clk, .rst_n,
    .inj_valid, .inj_pkt, .inj_ready,
    .ej_valid, .ej_pkt, .ej_ready('1),
    .busy   (noc_busy),
    .blocked(blocked)
  );

  esb #(.P(P), .SMI_DEPTH(SMI_DEPTH), .SMO_DEPTH(SMO_DEPTH)) u_esb (
    .clk, .rst_n,
    .s_valid, .s_bit,
    .start   (esb_start),
    .cfg_we  (cfg_we),
    .cfg_mem (cfg_mem),
    .cfg_addr(cfg_addr),
    .cfg_idx (cfg_idx),
    .cfg_data(cfg_data),
    .busy    (esb_busy),
    .done    (esb_done),
    .stop    (esb_stop)
  );

  decoder_ctrl #(.ITW(4)) u_ctrl (
    .clk, .rst_n,
    .go, .it_max, .es_en,
    .all_idle  (pe_busy == '0 && !noc_busy),
    .esb_busy, .esb_done, .esb_stop,
    .frame_clr, .pe_start, .first_iter, .esb_start,
    .busy, .done, .iterations, .es_stopped
  );

  // statistics
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      msg_sent_cnt    <= '0;
      msg_stopped_cnt <= '0;
      noc_wait_cnt    <= '0;
      rd_pe_q         <= '0;
    end else begin
      rd_pe_q <= rd_pe;
      if (go) begin
        msg_sent_cnt    <= '0;
        msg_stopped_cnt <= '0;
        noc_wait_cnt    <= '0;
      end else begin
        msg_sent_cnt    <= msg_sent_cnt + 32'($countones(sent));
        msg_stopped_cnt <= msg_stopped_cnt + 32'($countones(stopped));
        noc_wait_cnt    <= noc_wait_cnt + 32'(blocked);
      end
    end
  end

  assign rd_data = (int'(rd_pe_q) < P) ? pe_rd[rd_pe_q] : '0;
endmodule
