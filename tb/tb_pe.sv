// tb_pe: one processing element with 6 PCCs of random degree (1..5) and
// random memory contents. The check-node inputs are clipped to +/-EXT_MAX
// while eq. (5) uses the unclipped L(q_mj). Three iterations are run against a reference model
// of eq. (1)-(8) kept here: every packet (F, RO, DNI, payload), every syndrome
// bit, message suppression after a final (F=1) delivery, frozen locations
// ignoring later NoC writes, R memory reuse from the second iteration, and
// the L(q) read-back are compared. In iterations 2 and 3 the new inputs are
// delivered only after the start, in random order: the PE must wait for them
// (nothing may leave before they arrive). The first iteration runs with the NoC
// always ready and must finish within sum(degrees) + ND + 8 cycles (one edge per cycle plus the pipeline fill); the others see
// random back-pressure.
module tb_pe;
  import ldpc_pkg::*;
  localparam int NPC = 6, ND = 5;
  logic clk = 0, rst_n = 0;
  logic cfg_we; cfg_mem_e cfg_mem; logic [AW-1:0] cfg_addr; logic [31:0] cfg_data;
  logic frame_clr, start, first_iter, ms_en, busy;
  logic [QW-2:0] thr;
  logic inj_valid, inj_ready, ej_valid, s_valid, s_bit, msg_sent, msg_stopped;
  packet_t inj_pkt, ej_pkt;
  logic [AW-1:0] rd_addr;
  llr_t rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pe #(.NPC(NPC), .ND(ND), .OB_DEPTH(4)) dut (.*);

  int deg [NPC];
  int lq  [NPC*ND];
  int rm  [NPC*ND];
  logic [$bits(dni_t)+AW-1:0] dest [NPC*ND];
  bit sentf [NPC*ND];
  bit frz   [NPC*ND];
  packet_t exp_pkt[$];
  bit exp_syn[$];
  int stopped_exp;

  function automatic int sat(int v);
    return v > QMAX ? QMAX : (v < -QMAX ? -QMAX : v);
  endfunction

  // reference iteration
  task automatic model_iter(bit first);
    for (int k = 0; k < NPC; k++) begin
      int m1, m2, sg, q[ND], qc[ND], syn;
      m1 = QMAX; m2 = QMAX; sg = 0; syn = 0;
      for (int i = 0; i < deg[k]; i++) begin
        int a, mg;
        a = k * ND + i;
        q[i] = lq[a] - (first ? 0 : rm[a]);
        qc[i] = q[i] > EXT_MAX ? EXT_MAX : (q[i] < -EXT_MAX ? -EXT_MAX : q[i]);
        mg = qc[i] < 0 ? -qc[i] : qc[i];
        sg ^= (q[i] < 0);
        if (mg < m1) begin m2 = m1; m1 = mg; end else if (mg < m2) m2 = mg;
      end
      for (int i = 0; i < deg[k]; i++) begin
        int a, mg, sel, sc, r, l;
        packet_t pk;
        a = k * ND + i;
        mg = qc[i] < 0 ? -qc[i] : qc[i];
        sel = (mg == m1) ? m2 : m1;
        sc = sel / 2 + sel / 4;
        r = (sg ^ (q[i] < 0)) ? -sc : sc;
        rm[a] = r;
        l = sat(q[i] + r);
        syn ^= (l < 0);
        {pk.dni, pk.ro} = dest[a];
        pk.payload = llr_t'(l);
        pk.f = ms_en && ((l < 0 ? -l : l) > int'(thr));
        if (!sentf[a]) begin
          exp_pkt.push_back(pk);
          if (pk.f) sentf[a] = 1;
        end else stopped_exp++;
      end
      exp_syn.push_back(syn[0]);
    end
  endtask

  task automatic cfg(cfg_mem_e m, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_mem = m; cfg_addr = AW'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // collect outputs
  int stopped_seen, got_pkts, pkts_before;
  always @(posedge clk) begin
    if (rst_n && inj_valid && inj_ready) begin
      got_pkts++;
      checks++;
      if (exp_pkt.size() == 0) begin failures++; $display("unexpected packet"); end
      else begin
        packet_t e;
        e = exp_pkt.pop_front();
        if (inj_pkt != e) begin
          failures++;
          $display("packet: got f%0d ro%0d dni%0h pl%0d exp f%0d ro%0d dni%0h pl%0d",
                   inj_pkt.f, inj_pkt.ro, inj_pkt.dni, inj_pkt.payload, e.f, e.ro, e.dni, e.payload);
        end
      end
    end
    if (rst_n && s_valid) begin
      checks++;
      if (exp_syn.size() == 0 || exp_syn.pop_front() != s_bit) begin failures++; $display("syndrome mismatch"); end
    end
    if (rst_n && msg_stopped) stopped_seen++;
  end

  bit random_ready;
  always @(negedge clk) inj_ready = random_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int total, cyc;
    cfg_we = 0; cfg_mem = CFG_LLR; cfg_addr = 0; cfg_data = 0;
    frame_clr = 0; start = 0; first_iter = 1; ms_en = 1; thr = 7'd40;
    ej_valid = 0; ej_pkt = '0; rd_addr = 0; random_ready = 0;
    stopped_exp = 0; stopped_seen = 0; got_pkts = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    total = 0;
    for (int k = 0; k < NPC; k++) begin
      deg[k] = $urandom_range(1, ND); total += deg[k];
      cfg(CFG_DEG, k, deg[k]);
      for (int i = 0; i < ND; i++) begin
        int a;
        a = k * ND + i;
        lq[a] = $urandom_range(0, 120) - 60;
        dest[a] = ($bits(dni_t)+AW)'($urandom);
        sentf[a] = 0; frz[a] = 0;
        cfg(CFG_LLR, a, (lq[a] & 32'hff) | (1 << QW));   // fresh: first-layer input
        cfg(CFG_DEST, a, int'(dest[a]));
      end
    end
    cfg(CFG_NPC, 0, NPC);
    @(negedge clk); frame_clr = 1; @(negedge clk); frame_clr = 0;

    // iteration 1: timing
    model_iter(1);
    @(negedge clk); start = 1; first_iter = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > total + ND + 8) begin failures++; $display("iteration took %0d cycles for %0d edges", cyc, total); end
    $display("iteration 1: %0d edges in %0d cycles", total, cyc);
    repeat (3) @(negedge clk);

    // NoC writes before iteration 2: one location frozen by an F = 1 message,
    // then a later write to it that must be ignored
    ej_valid = 1; ej_pkt = '0; ej_pkt.ro = 0; ej_pkt.payload = 8'sd100; ej_pkt.f = 1;
    frz[0] = 1; lq[0] = 100;
    @(negedge clk);
    ej_pkt.payload = -8'sd3; ej_pkt.f = 0;
    @(negedge clk);
    ej_valid = 0;

    // iterations 2 and 3: the PE is started first and the new inputs arrive
    // afterwards, in random order, so PCCs must wait for them; back-pressure
    random_ready = 1;
    for (int it = 0; it < 2; it++) begin
      int order [$];
      for (int k = 0; k < NPC; k++)
        for (int i = 0; i < deg[k]; i++) if (!frz[k * ND + i]) order.push_back(k * ND + i);
      order.shuffle();
      foreach (order[n]) lq[order[n]] = $urandom_range(0, 120) - 60;
      model_iter(0);
      pkts_before = got_pkts;
      @(negedge clk); start = 1; first_iter = 0; @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      // nothing may leave before the inputs of the first PCC are there
      checks++;
      if (got_pkts != pkts_before) begin failures++; $display("PE ran ahead of its inputs"); end
      foreach (order[n]) begin
        ej_valid = 1; ej_pkt = '0; ej_pkt.ro = AW'(order[n]); ej_pkt.payload = llr_t'(lq[order[n]]);
        @(negedge clk);
        ej_valid = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
    end
    checks++;
    if (exp_pkt.size() != 0 || exp_syn.size() != 0) begin failures++; $display("missing outputs %0d %0d", exp_pkt.size(), exp_syn.size()); end
    checks++;
    if (stopped_seen != stopped_exp || stopped_exp == 0) begin failures++; $display("stopped %0d exp %0d", stopped_seen, stopped_exp); end

    // read-back
    for (int a = 0; a < NPC * ND; a += 3) begin
      @(negedge clk); rd_addr = AW'(a); @(negedge clk);
      checks++;
      if (int'(rd_data) != lq[a]) begin failures++; $display("readback %0d: %0d exp %0d", a, rd_data, lq[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
