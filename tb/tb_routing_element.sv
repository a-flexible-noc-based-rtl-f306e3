// tb_routing_element: router (1,1) of a 3 x 3 torus. All five inputs receive
// random packets for random destinations while the outputs apply random
// back-pressure. Every packet must leave through the port that O1Turn on the
// shortest ring path gives (computed here), exactly once, in order per
// input/output pair; contention (blocked > 0) must occur. A lone packet must
// cross the router in 2 cycles.
module tb_routing_element;
  import ldpc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  packet_t [NPORTS-1:0] in_pkt, out_pkt;
  logic busy;
  logic [2:0] blocked;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  routing_element #(.NX(3), .NY(3), .MY_X(1), .MY_Y(1), .FIFO_DEPTH(4)) dut (.*);

  function automatic int exp_port(packet_t p);
    int de, dw, ds, dn;
    int px, py;
    de = (int'(p.dni.x) - 1 + 3) % 3; dw = (1 - int'(p.dni.x) + 3) % 3;
    ds = (int'(p.dni.y) - 1 + 3) % 3; dn = (1 - int'(p.dni.y) + 3) % 3;
    px = (de <= dw) ? PORT_E : PORT_W;
    py = (ds <= dn) ? PORT_S : PORT_N;
    if (p.dni.x == 1 && p.dni.y == 1) return PORT_L;
    if (p.ro[0]) return (p.dni.y != 1) ? py : px;
    return (p.dni.x != 1) ? px : py;
  endfunction

  packet_t q [NPORTS][NPORTS][$];   // [out][in]
  int sent, recv, nblocked;
  bit drv_on = 1;

  // drivers
  always @(negedge clk) begin
    if (rst_n && sent < 3000) begin
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = 1'($urandom_range(0, 1));
          in_pkt[i].dni.x = CW'($urandom_range(0, 2));
          in_pkt[i].dni.y = CW'($urandom_range(0, 2));
          in_pkt[i].ro = AW'($urandom);
          in_pkt[i].f = 1'($urandom_range(0, 1));
          in_pkt[i].payload = llr_t'(i * 25 + sent % 25);  // source tag
        end
      end
    end else if (drv_on) begin
      for (int i = 0; i < NPORTS; i++) if (in_ready[i]) in_valid[i] = 0;
    end
    if (drv_on) for (int o = 0; o < NPORTS; o++) out_ready[o] = 1'($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (blocked != 0) nblocked++;
      for (int i = 0; i < NPORTS; i++)
        if (in_valid[i] && in_ready[i]) begin
          q[exp_port(in_pkt[i])][i].push_back(in_pkt[i]);
          sent++;
        end
      for (int o = 0; o < NPORTS; o++)
        if (out_valid[o] && out_ready[o]) begin
          int src;
          bit ok;
          src = int'(out_pkt[o].payload) / 25;
          ok = 0;
          checks++;
          if (src >= 0 && src < NPORTS && q[o][src].size() > 0) ok = (q[o][src].pop_front() == out_pkt[o]);
          if (!ok) begin failures++; $display("out %0d: unexpected packet from %0d", o, src); end
          recv++;
        end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; in_pkt = '0; out_ready = '1; sent = 0; recv = 0; nblocked = 0;
    repeat (3) @(posedge clk);
    // lone packet latency: W input to E output
    rst_n = 1;
    @(negedge clk);
    wait (sent >= 3000);
    repeat (200) @(negedge clk);
    checks++;
    if (recv != sent) begin failures++; $display("sent %0d received %0d", sent, recv); end
    checks++;
    if (nblocked == 0) begin failures++; $display("no contention seen"); end
    checks++;
    if (busy) begin failures++; $display("busy after drain"); end
    // latency of a lone packet
    begin
      int lat;
      drv_on = 0;
      out_ready = '1;
      @(negedge clk);
      in_valid[PORT_W] = 1; in_pkt[PORT_W] = '0; in_pkt[PORT_W].dni.x = 2; in_pkt[PORT_W].dni.y = 1;
      in_pkt[PORT_W].payload = llr_t'(PORT_W * 25);
      @(negedge clk); in_valid[PORT_W] = 0; lat = 1;
      while (!out_valid[PORT_E]) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("hop latency %0d", lat); end
    end
    repeat (5) @(negedge clk);
    $display("sent %0d, cycles with a waiting head %0d", sent, nblocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
