// tb_ldpc_noc_decoder: end-to-end test of the decoder on a 2 x 2 torus.
//
// A quasi-cyclic code (z = 8, 4 x 10 base matrix, N = 80, M = 32) is built by
// ldpc_tb_pkg together with its schedule on the four PEs and the early
// stopping tables, loaded through the configuration port, and frames of the
// all-zero codeword with channel errors are decoded in every mode:
// message stopping on/off, early stopping on/off. Checked per frame:
//   - the information bits decode to zero;
//   - every PCC update produces one message, sent or stopped:
//     sent + stopped = edges * iterations, and nothing is stopped with
//     message stopping off;
//   - without early stopping the decoder runs exactly it_max iterations;
//   - an error-free frame with early stopping stops after 2 iterations (the
//     syndromes of iteration 1 are judged during iteration 2).
// Each mechanism must occur at least once over the run: early stop, a run to
// it_max, stopped messages, router contention, channel errors corrected.
module tb_ldpc_noc_decoder;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int NX = 2, NY = 2, NPC = 8, ND = 8, SMI = 8, SMO = 8;
  localparam int SOW = $clog2(SMO + 1);

  logic clk = 0, rst_n = 0;
  logic cfg_we; cfg_mem_e cfg_mem; logic [7:0] cfg_idx; logic [AW-1:0] cfg_addr; logic [31:0] cfg_data;
  logic [QW-2:0] thr; logic ms_en, es_en, go, busy, done, es_stopped;
  logic [3:0] it_max, iterations;
  logic [7:0] rd_pe; logic [AW-1:0] rd_addr; llr_t rd_data;
  logic [31:0] msg_sent_cnt, msg_stopped_cnt, noc_wait_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ldpc_noc_decoder #(.NX(NX), .NY(NY), .NPC(NPC), .ND(ND), .SMI_DEPTH(SMI), .SMO_DEPTH(SMO)) dut (.*);

  qc_code code;
  int n_es_stop, n_itmax, n_msg_stop, n_wait, n_corrected;

  task automatic wr(cfg_mem_e m, int idx, int a, int d);
    cfg_we = 1; cfg_mem = m; cfg_idx = 8'(idx); cfg_addr = AW'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_code();
    for (int pe = 0; pe < code.p; pe++) begin
      int cnt;
      cnt = 0;
      for (int r = pe; r < code.m; r += code.p) begin
        wr(CFG_DEG, pe, code.loc_of(r), code.row_deg[r]);
        for (int pos = 0; pos < code.row_deg[r]; pos++)
          wr(CFG_DEST, pe, code.addr_of(r, pos), code.dest_of(r, pos, AW));
        cnt++;
      end
      wr(CFG_NPC, pe, 0, cnt);
    end
    for (int t = 0; t < code.rows_per_pe(); t++)
      for (int j = 0; j < code.p; j++) begin
        wr(CFG_SNM, j, t, j);
        wr(CFG_SWA, j, t, code.swa_of(j, t, SOW));
      end
    wr(CFG_ESB, 0, 0, code.rows_per_pe());
    wr(CFG_ESB, 0, 1, code.mb);
  endtask

  task automatic run_frame(int nerr, bit ms, bit es, int t, int itm);
    int llr [];
    int errs, cyc;
    make_llrs(code.n, nerr, llr);
    errs = 0;
    for (int j = 0; j < code.n; j++) if (llr[j] < 0) errs++;
    for (int r = 0; r < code.m; r++)
      for (int pos = 0; pos < code.row_deg[r]; pos++)
        wr(CFG_LLR, code.pe_of(r), code.addr_of(r, pos),
           (llr[code.row_col[r][pos]] & 8'hff) | (code.is_first(r, pos) << QW));
    ms_en = ms; es_en = es; thr = (QW-1)'(t); it_max = 4'(itm);
    go = 1; @(negedge clk); go = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    // hard decisions of the information bits
    begin
      int bad;
      bad = 0;
      for (int j = 0; j < code.kb * code.z; j++) begin
        int pe, a;
        code.where(j, pe, a);
        rd_pe = 8'(pe); rd_addr = AW'(a);
        @(negedge clk); @(negedge clk);
        if (rd_data < 0) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("frame errs %0d ms %0d es %0d: %0d info bits wrong", errs, ms, es, bad); end
      else if (errs > 0) n_corrected++;
    end
    checks++;
    if (int'(msg_sent_cnt + msg_stopped_cnt) != code.edges * int'(iterations) || (!ms && msg_stopped_cnt != 0)) begin
      failures++; $display("messages: sent %0d stopped %0d, edges %0d x %0d iterations", msg_sent_cnt, msg_stopped_cnt, code.edges, iterations);
    end
    if (!es) begin
      checks++;
      if (int'(iterations) != itm || es_stopped) begin failures++; $display("no ES: %0d iterations", iterations); end
    end
    if (es && nerr == 0) begin
      checks++;
      if (iterations != 2 || !es_stopped) begin failures++; $display("clean frame: %0d iterations, es_stopped %0d", iterations, es_stopped); end
    end
    if (es_stopped) n_es_stop++;
    if (int'(iterations) == itm) n_itmax++;
    if (msg_stopped_cnt != 0) n_msg_stop++;
    if (noc_wait_cnt != 0) n_wait++;
    $display("frame: %0d channel errors, ms %0d es %0d -> %0d iterations in %0d cycles, sent %0d stopped %0d, waits %0d",
             errs, ms, es, iterations, cyc, msg_sent_cnt, msg_stopped_cnt, noc_wait_cnt);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cfg_we = 0; cfg_mem = CFG_LLR; cfg_idx = 0; cfg_addr = 0; cfg_data = 0;
    thr = 20; ms_en = 0; es_en = 0; go = 0; it_max = 10; rd_pe = 0; rd_addr = 0;
    n_es_stop = 0; n_itmax = 0; n_msg_stop = 0; n_wait = 0; n_corrected = 0;
    code = new(8, 4, 10, ND, NX, NY, 7);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    load_code();
    run_frame(0, 1, 1, 24, 10);
    run_frame(3, 0, 0, 24, 10);
    run_frame(3, 1, 1, 24, 10);
    run_frame(4, 0, 1, 24, 10);
    run_frame(2, 1, 0, 26, 6);
    for (int f = 0; f < 6; f++) run_frame(1 + f % 3, f % 2, 1, 22 + f, 10);
    checks++; if (n_es_stop == 0)   begin failures++; $display("early stop never happened"); end
    checks++; if (n_itmax == 0)     begin failures++; $display("it_max never reached"); end
    checks++; if (n_msg_stop == 0)  begin failures++; $display("no message was stopped"); end
    checks++; if (n_wait == 0)      begin failures++; $display("no NoC contention"); end
    checks++; if (n_corrected == 0) begin failures++; $display("no channel error corrected"); end
    $display("early stops %0d, it_max runs %0d, frames with stopped messages %0d, with contention %0d, corrected %0d",
             n_es_stop, n_itmax, n_msg_stop, n_wait, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
