// tb_esb: early stopping block with P = 4 syndrome links, a quasi-cyclic
// layout with z = 8 and c = 4 (M = 32 PCCs, row r on PE r mod 4). The
// shuffle tables are built here from that layout. Syndrome sets of three
// kinds are decoded: all zero, Type II (every SAV element even) and random.
// The next set streams in while the previous one is shuffled, as in the
// decoder. STOP is compared with the SAV parities computed here, and the
// latency from start to done must stay within 2*M/P + 3 cycles.
module tb_esb;
  import ldpc_pkg::*;
  localparam int P = 4, Z = 8, C = 4, M = Z * C, RPP = M / P;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] s_valid, s_bit;
  logic start, cfg_we, busy, done, stop;
  cfg_mem_e cfg_mem; logic [AW-1:0] cfg_addr; logic [7:0] cfg_idx; logic [31:0] cfg_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  esb #(.P(P), .SMI_DEPTH(RPP), .SMO_DEPTH(RPP)) dut (.*);

  bit syn [M];
  bit nxt [M];

  task automatic cfg(cfg_mem_e m, int idx, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_mem = m; cfg_idx = 8'(idx); cfg_addr = AW'(a); cfg_data = 32'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic bit ref_stop(bit s [M]);
    for (int h = 0; h < Z; h++) begin
      int a;
      a = 0;
      for (int k = 0; k < C; k++) a += s[h + k * Z];
      if (a % 2) return 0;
    end
    return 1;
  endfunction

  task automatic make_set(int kind, output bit s [M]);
    for (int r = 0; r < M; r++) s[r] = 0;
    if (kind == 1) begin
      // Type II: pairs of ones inside the same SAV element
      for (int n = 0; n < 3; n++) begin
        int h, k1, k2;
        h = $urandom_range(0, Z - 1); k1 = $urandom_range(0, C - 1); k2 = (k1 + 1) % C;
        s[h + k1 * Z] ^= 1; s[h + k2 * Z] ^= 1;
      end
    end else if (kind == 2) begin
      for (int r = 0; r < M; r++) s[r] = 1'($urandom_range(0, 1));
    end
  endtask

  // stream a set: entry t of PE i at cycle 2 + 2t after `from`
  task automatic stream(bit s [M]);
    for (int t = 0; t < RPP; t++) begin
      @(negedge clk); s_valid = '0;
      @(negedge clk);
      for (int i = 0; i < P; i++) begin s_valid[i] = 1; s_bit[i] = s[t * P + i]; end
    end
    @(negedge clk); s_valid = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int nstop;
  initial begin
    s_valid = 0; s_bit = 0; start = 0; cfg_we = 0; cfg_mem = CFG_SNM; cfg_addr = 0; cfg_idx = 0; cfg_data = 0;
    nstop = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // tables: SMin_i entry t holds row r = t*P + i of SAV element h = r mod Z,
    // which goes to SMout (h mod P) at slot (h / P) * C + r / Z
    for (int t = 0; t < RPP; t++)
      for (int j = 0; j < P; j++) begin
        int r, h;
        cfg(CFG_SNM, j, t, j);
        r = t * P + j; h = r % Z;
        cfg(CFG_SWA, j, t, (1 << $clog2(RPP + 1)) | ((h / P) * C + r / Z));
      end
    cfg(CFG_ESB, 0, 0, RPP);
    cfg(CFG_ESB, 0, 1, C);

    make_set(0, syn);
    stream(syn);
    for (int n = 0; n < 30; n++) begin
      int lat;
      bit exp;
      make_set(n % 3, nxt);
      exp = ref_stop(syn);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      lat = 1;
      fork
        stream(nxt);
        begin
          while (!done) begin @(negedge clk); lat++; end
          checks++;
          if (stop != exp) begin failures++; $display("set %0d: stop %0d exp %0d", n, stop, exp); end
          checks++;
          if (lat > 2 * RPP + 3) begin failures++; $display("latency %0d", lat); end
          if (stop) nstop++;
        end
      join
      syn = nxt;
    end
    checks++;
    if (nstop == 0 || nstop == 30) begin failures++; $display("stop decisions not mixed: %0d", nstop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
