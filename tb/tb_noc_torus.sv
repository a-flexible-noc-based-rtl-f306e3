// tb_noc_torus: 3 x 3 torus; every node injects 300 packets to random
// destinations (itself included) under random ejection back-pressure. Each
// packet must come out once, unchanged, at the node its DNI names; the network
// must drain (busy low) and contention must have been seen. A lone packet
// travelling one hop must arrive in 4 cycles (two routers, two cycles each).
module tb_noc_torus;
  import ldpc_pkg::*;
  localparam int NX = 3, NY = 3, P = NX * NY, PER = 300;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] inj_valid, inj_ready, ej_valid, ej_ready;
  packet_t [P-1:0] inj_pkt, ej_pkt;
  logic busy;
  logic [15:0] blocked;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  noc_torus #(.NX(NX), .NY(NY), .FIFO_DEPTH(8)) dut (.*);

  packet_t sent_pkt [P * PER];
  bit      got      [P * PER];
  int cnt [P];
  int nrecv, nblk;
  bit drv_on = 1;

  always @(negedge clk) begin
    if (drv_on) begin
      for (int n = 0; n < P; n++) begin
        if (inj_valid[n] && !inj_ready[n]) continue;
        inj_valid[n] = 0;
        if (cnt[n] < PER && $urandom_range(0, 2) == 0) begin
          packet_t p;
          int id;
          id = n * PER + cnt[n];
          p.ro = AW'(id);
          p.dni.x = CW'($urandom_range(0, NX - 1));
          p.dni.y = CW'($urandom_range(0, NY - 1));
          p.f = 1'($urandom_range(0, 1));
          p.payload = llr_t'($urandom);
          sent_pkt[id] = p;
          inj_pkt[n] = p; inj_valid[n] = 1;
        end
      end
      for (int n = 0; n < P; n++) ej_ready[n] = 1'($urandom_range(0, 4) != 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (blocked != 0) nblk++;
      for (int n = 0; n < P; n++) begin
        if (inj_valid[n] && inj_ready[n]) cnt[n]++;
        if (ej_valid[n] && ej_ready[n]) begin
          int id;
          id = int'(ej_pkt[n].ro);
          checks++;
          nrecv++;
          if (id >= P * PER || got[id] || sent_pkt[id] != ej_pkt[n] ||
              int'(ej_pkt[n].dni.x) != n % NX || int'(ej_pkt[n].dni.y) != n / NX) begin
            failures++; $display("node %0d: bad packet id %0d", n, id);
          end else got[id] = 1;
        end
      end
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit all;
    inj_valid = 0; inj_pkt = '0; ej_ready = '1; nrecv = 0; nblk = 0;
    for (int n = 0; n < P; n++) cnt[n] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int n = 0; n < P; n++) if (cnt[n] < PER) all = 0;
    end while (!all);
    repeat (300) @(negedge clk);
    checks++;
    if (nrecv != P * PER || busy) begin failures++; $display("received %0d of %0d, busy %0d", nrecv, P * PER, busy); end
    checks++;
    if (nblk == 0) begin failures++; $display("no contention"); end
    // one-hop latency: node 0 -> node 1
    begin
      int lat;
      drv_on = 0; ej_ready = '1;
      @(negedge clk);
      inj_pkt[0] = '0; inj_pkt[0].dni.x = 1; inj_valid[0] = 1;
      @(negedge clk); inj_valid[0] = 0; lat = 1;
      while (!ej_valid[1]) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 4) begin failures++; $display("one-hop latency %0d", lat); end
    end
    $display("delivered %0d packets, %0d cycles with waiting heads", nrecv, nblk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
