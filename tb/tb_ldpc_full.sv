// tb_ldpc_full: the decoder at its default size (3 x 3 torus, 128 PCCs of up
// to 20 edges per PE, ESB memories of 128 / 132 entries), with no parameter
// overridden, decoding a rate-1/2 quasi-cyclic code close to the largest
// WiMAX size: z = 90, a 12 x 24 base matrix, N = 2160, M = 1080, i.e. 120
// PCCs per PE. z is a multiple of P = 9, which the early stopping tables built
// by ldpc_tb_pkg require (each shuffle cycle then sends the nine syndromes to
// nine different SMout memories). The code,
// its mapping on the nine PEs and the early stopping tables come from
// ldpc_tb_pkg and are loaded through the configuration port.
//
// Two frames of the all-zero codeword with channel errors are decoded:
//   1. message stopping and early stopping on (the mode the decoder is meant
//      to run in);
//   2. both off, it_max = 4.
// Checked per frame: the information bits decode to zero, sent + stopped =
// edges * iterations, stopped messages only with message stopping on, the
// first frame ends by early stopping and the second after exactly it_max
// iterations. The cycles per iteration must stay within 1.5 x edges / P
// (the PE issue rate of one edge per cycle plus NoC latency and contention).
module tb_ldpc_full;
  import ldpc_pkg::*;
  import ldpc_tb_pkg::*;

  localparam int NX = 3, NY = 3, ND = 20, SMO = 132;
  localparam int SOW = $clog2(SMO + 1);

  logic clk = 0, rst_n = 0;
  logic cfg_we; cfg_mem_e cfg_mem; logic [7:0] cfg_idx; logic [AW-1:0] cfg_addr; logic [31:0] cfg_data;
  logic [QW-2:0] thr; logic ms_en, es_en, go, busy, done, es_stopped;
  logic [3:0] it_max, iterations;
  logic [7:0] rd_pe; logic [AW-1:0] rd_addr; llr_t rd_data;
  logic [31:0] msg_sent_cnt, msg_stopped_cnt, noc_wait_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ldpc_noc_decoder dut (.*);

  qc_code code;

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

  task automatic run_frame(int nerr, bit ms, bit es, int itm);
    int llr [];
    int errs, cyc, bad;
    make_llrs(code.n, nerr, llr);
    errs = 0;
    for (int j = 0; j < code.n; j++) if (llr[j] < 0) errs++;
    for (int r = 0; r < code.m; r++)
      for (int pos = 0; pos < code.row_deg[r]; pos++)
        wr(CFG_LLR, code.pe_of(r), code.addr_of(r, pos),
           (llr[code.row_col[r][pos]] & 'hff) | (code.is_first(r, pos) << QW));
    ms_en = ms; es_en = es; thr = 24; it_max = 4'(itm);
    go = 1; @(negedge clk); go = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    bad = 0;
    for (int j = 0; j < code.kb * code.z; j++) begin
      int pe, a;
      code.where(j, pe, a);
      rd_pe = 8'(pe); rd_addr = AW'(a);
      @(negedge clk); @(negedge clk);
      if (rd_data < 0) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d information bits wrong", bad); end
    checks++;
    if (int'(msg_sent_cnt + msg_stopped_cnt) != code.edges * int'(iterations) || (!ms && msg_stopped_cnt != 0)) begin
      failures++; $display("messages: sent %0d stopped %0d, edges %0d x %0d iterations", msg_sent_cnt, msg_stopped_cnt, code.edges, iterations);
    end
    checks++;
    if (es ? !es_stopped : (int'(iterations) != itm || es_stopped)) begin
      failures++; $display("iterations %0d, es_stopped %0d", iterations, es_stopped);
    end
    // one PCC edge leaves each PE per cycle at best: an iteration needs at
    // least edges / P cycles; allow 50 % for NoC latency and contention
    checks++;
    if (cyc / int'(iterations) > 3 * code.edges / (2 * code.p)) begin
      failures++; $display("%0d cycles per iteration, bound %0d", cyc / int'(iterations), 3 * code.edges / (2 * code.p));
    end
    $display("frame: %0d channel errors, ms %0d es %0d -> %0d iterations in %0d cycles (%0d per iteration), sent %0d stopped %0d, waits %0d",
             errs, ms, es, iterations, cyc, cyc / int'(iterations), msg_sent_cnt, msg_stopped_cnt, noc_wait_cnt);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: decoder did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_mem = CFG_LLR; cfg_idx = 0; cfg_addr = 0; cfg_data = 0;
    thr = 24; ms_en = 0; es_en = 0; go = 0; it_max = 10; rd_pe = 0; rd_addr = 0;
    code = new(90, 12, 24, ND, NX, NY, 11);
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    load_code();
    $display("code: N %0d M %0d, %0d edges, %0d PCCs per PE", code.n, code.m, code.edges, code.rows_per_pe());
    run_frame(20, 1, 1, 10);
    run_frame(20, 0, 0, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
