// pe: processing element of the NoC-based layered LDPC decoder.
//
// The PE runs the layered normalized min-sum update, eq. (1) to (8), for the
// NPC parity check constraints (PCCs) scheduled on it, one edge per cycle.
// Memories, all NPC x ND deep (block k holds the ND edge locations of the
// k-th scheduled PCC, filled from offset k*ND):
//   L(q) MEMORY  incoming extrinsics L(q_j^old); written by the NoC at the
//                packet's RO address (or with the channel LLRs at frame load,
//                cfg_data[QW-1:0], with the fresh mark in cfg_data[QW])
//   R MEMORY     check-to-variable messages R_mj, same addressing
//   DEST table   {DNI, RO} of the message each location produces
//   DEG table    degree of each scheduled PCC
// Pipeline, per PCC:
//   phase A  CNT/CMP reads the PCC's locations; L(q_mj) = L(q_j) - R_mj^old
//            (eq. 1) goes to MINIMUM EXTRACTION and, with its address and
//            destination, into the short edge FIFO.
//   phase B  once the PCC's minima are known, each edge leaves the FIFO:
//            COMPARE and 1/alpha give R_mj^new (eq. 8), written back to R
//            MEMORY; L(q_j^new) = L(q_mj) + R_mj^new (eq. 5) passes the Check
//            Block and enters the OUTPUT BUFFER towards the NoC, and its sign
//            feeds the Transmission Block (syndrome of the PCC).
// Phase B of one PCC overlaps phase A of the next, so an iteration injects
// sum(degrees) messages in about that many cycles plus a pipeline fill of a few
// cycles. Up to four PCCs are in flight (read, waiting for their minima, being
// sent), which bounds the edge FIFO to 4*ND and keeps even degree-1 PCCs at one
// edge per cycle.
//
// Input readiness: a location is "fresh" once this iteration's message for it
// has arrived from the NoC; a PCC is read only when all its locations are
// fresh (or frozen), and reading consumes the flags. This keeps the layered
// order exact whatever the NoC delays: a PCC never works on a value that its
// previous layer has not yet updated. At frame load cfg_data[QW] marks the
// locations whose channel LLR is already their first-iteration input (the
// first PCC of each code bit); the others wait for the previous layer.
//
// Message stopping: a message whose |L(q_j^new)| exceeds THR is sent once more
// with F = 1 and never again during the frame (a per-location "sent final"
// flag); the receiving PE marks the location frozen and ignores later writes
// to it, so the value stays saturated there. Flags clear on frame_clr.
// In the first iteration of a frame R_mj^old is taken as 0, so R MEMORY needs
// no clearing. L(q_mj) is computed one bit wider than a message and used at
// full width in eq. (5); only the copy fed to the minimum extraction and the
// compare is clipped to +/-EXT_MAX. Clipping L(q_mj) before eq. (5) would drop
// part of the posterior while the R_mj later subtracted from it stays whole,
// and the values then drift towards zero over the iterations.
//
// The memory organisation, CNT/CMP, the datapath order and the check block
// follow the decoder's description; the pipeline control, the input-readiness (fresh) flags, the
// destination table that builds the packet header, the exact message-stopping
// bookkeeping and the configuration port are this design's choices. With
// message stopping the RO field supplies the write address, so the write
// address generator memory of the statically routed decoder is not needed.
module pe
  import ldpc_pkg::*;
#(
  parameter int NPC      = 128,  // max PCCs per PE
  parameter int ND       = 20,   // max PCC degree
  parameter int OB_DEPTH = 8     // output buffer depth
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration / frame load
  input  logic          cfg_we,
  input  cfg_mem_e      cfg_mem,
  input  logic [AW-1:0] cfg_addr,
  input  logic [31:0]   cfg_data,
  // iteration control
  input  logic          frame_clr,   // clear message-stopping flags
  input  logic          start,       // begin one iteration
  input  logic          first_iter,  // R_mj^old = 0
  input  logic [QW-2:0] thr,
  input  logic          ms_en,
  output logic          busy,
  // NoC
  output logic          inj_valid,
  output packet_t       inj_pkt,
  input  logic          inj_ready,
  input  logic          ej_valid,
  input  packet_t       ej_pkt,
  // syndrome link to the early stopping block
  output logic          s_valid,
  output logic          s_bit,
  // statistics
  output logic          msg_sent,
  output logic          msg_stopped,
  // read-back of L(q) MEMORY while idle (1-cycle latency)
  input  logic [AW-1:0] rd_addr,
  output llr_t          rd_data
);
  localparam int DEPTH = NPC * ND;
  localparam int LAW   = $clog2(DEPTH);
  localparam int DW    = $clog2(ND + 1);
  localparam int KW    = $clog2(NPC + 1);
  localparam int DSTW  = $bits(dni_t) + AW;

  typedef struct packed {
    ext_t            lqmj;
    logic [LAW-1:0]  addr;
    logic [DSTW-1:0] dest;
    logic            last;
  } edge_t;

  typedef struct packed {
    logic [QW-2:0] min1;
    logic [QW-2:0] min2;
    logic          sign_all;
  } minres_t;

  // ---------------------------------------------------------------- storage
  llr_t            lq_mem   [DEPTH];
  llr_t            r_mem    [DEPTH];
  logic [DSTW-1:0] dest_mem [DEPTH];
  logic [DW-1:0]   deg_mem  [NPC];
  logic [DEPTH-1:0] frozen, sent_final, fresh;
  logic [KW-1:0]   npc;

  // ---------------------------------------------------------------- control
  logic          running;
  logic [KW-1:0] k;          // next PCC to issue
  localparam int MAXF = 4;   // PCCs allowed in flight
  logic [2:0]    inflight;   // PCCs issued but not finished in phase B
  logic          cnt_ready, cnt_valid, cnt_first, cnt_last, cnt_load;
  logic [LAW-1:0] cnt_addr;
  logic [DW-1:0] cur_deg;

  logic [ND-1:0] blk_ready, blk_need;

  assign cur_deg  = deg_mem[k[$clog2(NPC)-1:0]];
  // inputs of PCC k that have arrived in this iteration (or are frozen)
  always_comb begin
    for (int i = 0; i < ND; i++) begin
      blk_need[i]  = (i < int'(cur_deg));
      blk_ready[i] = fresh[int'(k) * ND + i] || frozen[int'(k) * ND + i];
    end
  end
  assign cnt_load = running && (k < npc) && (inflight < 3'(MAXF)) && (cur_deg != '0) &&
                    ((blk_need & ~blk_ready) == '0);

  cnt_cmp #(.AW(LAW), .DW(DW)) u_cnt (
    .clk, .rst_n,
    .load  (cnt_load),
    .offset(LAW'(k) * LAW'(ND)),
    .degree(cur_deg),
    .ready (cnt_ready),
    .adv   (1'b1),
    .valid (cnt_valid),
    .addr  (cnt_addr),
    .first (cnt_first),
    .last  (cnt_last)
  );

  wire issue = cnt_load && cnt_ready;
  wire skip  = running && (k < npc) && (cur_deg == '0);

  // ---------------------------------------------------------------- phase A
  logic           a1_valid, a1_first, a1_last;
  logic [LAW-1:0] a1_addr;
  llr_t           lq_rd, r_rd;
  logic [DSTW-1:0] dest_rd;
  ext_t           lqmj_w;
  llr_t           lqmj;

  always_ff @(posedge clk) begin
    lq_rd   <= lq_mem[running ? cnt_addr : LAW'(rd_addr)];
    r_rd    <= r_mem[cnt_addr];
    dest_rd <= dest_mem[cnt_addr];
  end
  assign rd_data = lq_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_valid <= 1'b0; a1_first <= 1'b0; a1_last <= 1'b0; a1_addr <= '0;
    end else begin
      a1_valid <= cnt_valid;
      a1_first <= cnt_first;
      a1_last  <= cnt_last;
      a1_addr  <= cnt_addr;
    end
  end

  // eq. (1)
  assign lqmj_w = ext_t'(lq_rd) - (first_iter ? ext_t'(0) : ext_t'(r_rd));
  assign lqmj   = sat_ext((QW+2)'(lqmj_w));

  logic    mx_valid;
  minres_t mx_res;
  min_extract u_min (
    .clk, .rst_n,
    .in_valid (a1_valid),
    .in_first (a1_first),
    .in_last  (a1_last),
    .in_val   (lqmj),
    .res_valid(mx_valid),
    .min1     (mx_res.min1),
    .min2     (mx_res.min2),
    .sign_all (mx_res.sign_all)
  );

  edge_t   e_in, e_head;
  logic    e_empty, e_full, e_pop;
  minres_t res_head;
  logic    res_empty, res_pop;

  assign e_in = '{lqmj: lqmj_w, addr: a1_addr, dest: dest_rd, last: a1_last};

  sync_fifo #(.W($bits(edge_t)), .DEPTH(MAXF * ND)) u_edge_fifo (
    .clk, .rst_n,
    .push(a1_valid), .din(e_in),
    .pop(e_pop), .dout(e_head), .empty(e_empty), .full(e_full), .count()
  );

  sync_fifo #(.W($bits(minres_t)), .DEPTH(MAXF)) u_res_fifo (
    .clk, .rst_n,
    .push(mx_valid), .din(mx_res),
    .pop(res_pop), .dout(res_head), .empty(res_empty), .full(), .count()
  );

  // ---------------------------------------------------------------- phase B
  llr_t    r_new, l_new;
  packet_t pkt;
  logic    ob_full, ob_empty, send;
  dni_t    e_dni;
  logic [AW-1:0] e_ro;

  assign e_pop   = !e_empty && !res_empty && !ob_full;
  assign res_pop = e_pop && e_head.last;
  assign {e_dni, e_ro} = e_head.dest;

  nms_compare u_cmp (
    .lqmj    (sat_ext((QW+2)'(e_head.lqmj))),
    .min1    (res_head.min1),
    .min2    (res_head.min2),
    .sign_all(res_head.sign_all),
    .r_new   (r_new)
  );

  // eq. (5)
  assign l_new = sat_llr((QW+2)'(e_head.lqmj) + (QW+2)'(r_new));

  check_block u_cb (
    .l_new(l_new), .thr(thr), .ms_en(ms_en), .dni(e_dni), .ro(e_ro), .pkt(pkt)
  );

  assign send = e_pop && !sent_final[e_head.addr];

  sync_fifo #(.W(PKT_W), .DEPTH(OB_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .push(send), .din(pkt),
    .pop(inj_ready && !ob_empty), .dout(inj_pkt), .empty(ob_empty), .full(ob_full), .count()
  );
  assign inj_valid = !ob_empty;

  transmission_block u_tb (
    .clk, .rst_n,
    .valid(e_pop), .last(e_head.last), .sign(l_new[QW-1]),
    .s_valid, .s_bit
  );

  assign msg_sent    = send;
  assign msg_stopped = e_pop && !send;

  // ---------------------------------------------------------------- writes
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_mem == CFG_LLR)
      lq_mem[LAW'(cfg_addr)] <= llr_t'(cfg_data[QW-1:0]);
    else if (ej_valid && !frozen[LAW'(ej_pkt.ro)])
      lq_mem[LAW'(ej_pkt.ro)] <= ej_pkt.payload;
    if (cfg_we && cfg_mem == CFG_DEST) dest_mem[LAW'(cfg_addr)] <= cfg_data[DSTW-1:0];
    if (cfg_we && cfg_mem == CFG_DEG)  deg_mem[cfg_addr[$clog2(NPC)-1:0]] <= cfg_data[DW-1:0];
    if (e_pop) r_mem[e_head.addr] <= r_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frozen     <= '0;
      sent_final <= '0;
      fresh      <= '0;
      npc        <= '0;
      running    <= 1'b0;
      k          <= '0;
      inflight   <= '0;
    end else begin
      if (cfg_we && cfg_mem == CFG_NPC) npc <= cfg_data[KW-1:0];
      if (frame_clr) begin
        frozen     <= '0;
        sent_final <= '0;
      end else begin
        if (ej_valid && ej_pkt.f) frozen[LAW'(ej_pkt.ro)] <= 1'b1;
        if (send && pkt.f) sent_final[e_head.addr] <= 1'b1;
      end
      // fresh: written by the NoC (or marked at frame load), consumed at issue
      if (cfg_we && cfg_mem == CFG_LLR) fresh[LAW'(cfg_addr)] <= cfg_data[QW];
      if (ej_valid) fresh[LAW'(ej_pkt.ro)] <= 1'b1;
      if (issue)
        for (int i = 0; i < ND; i++) if (blk_need[i]) fresh[int'(k) * ND + i] <= 1'b0;
      if (start) begin
        running <= 1'b1;
        k       <= '0;
      end else if (running) begin
        if (issue || skip) k <= k + 1'b1;
        if (k >= npc && inflight == 0) running <= 1'b0;
      end
      inflight <= inflight + (issue ? 3'd1 : 3'd0) - (res_pop ? 3'd1 : 3'd0);
    end
  end

  assign busy = running || !ob_empty;

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !running)
    else $error("pe: start while an iteration runs");
  a_edge_room : assert property (@(posedge clk) disable iff (!rst_n) !(a1_valid && e_full && !e_pop))
    else $error("pe: edge FIFO overflow");
endmodule
