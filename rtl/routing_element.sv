// routing_element: five-port router of one NoC node.
//
// Input-queued: each of the five inputs (local PE, N, E, S, W) has a FIFO.
// The control unit (CU_RE) computes the output port of each FIFO head with
// O1Turn routing (re_route) and, per output, grants one requesting head in
// round-robin order. The crossbar then moves the granted head into that
// output's register. Outputs use valid/ready: a register is free when it is
// empty or its content is taken in the same cycle, so a port moves one packet
// per cycle. in_ready is "FIFO not full", which gives loss-free back-pressure
// between neighbouring nodes.
//
// Latency: a packet written into an input FIFO in cycle t can be in the output
// register at the end of cycle t+1 (one cycle in the FIFO, one in the register),
// i.e. two cycles per hop without contention.
//
// The structure (input FIFOs, crossbar, output registers, a control unit that
// reads FIFOs and writes registers) follows the node drawn for the torus; the
// FIFO depth, the arbitration and the handshake are this design's choices.
// blocked counts heads that requested an output and were not served this
// cycle (contention or back-pressure); it is for statistics only.
module routing_element
  import ldpc_pkg::*;
#(
  parameter int NX         = 3,
  parameter int NY         = 3,
  parameter int MY_X       = 0,
  parameter int MY_Y       = 0,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic    [NPORTS-1:0]  in_valid,
  input  packet_t [NPORTS-1:0]  in_pkt,
  output logic    [NPORTS-1:0]  in_ready,
  output logic    [NPORTS-1:0]  out_valid,
  output packet_t [NPORTS-1:0]  out_pkt,
  input  logic    [NPORTS-1:0]  out_ready,
  output logic                  busy,
  output logic    [2:0]         blocked
);
  packet_t [NPORTS-1:0] head;
  logic    [NPORTS-1:0] fifo_empty, fifo_full, pop;
  port_e                route [NPORTS];
  logic    [NPORTS-1:0] req   [NPORTS];   // req[out][in]
  logic    [NPORTS-1:0] grant [NPORTS];   // grant[out][in]
  logic    [2:0]        rr_ptr [NPORTS];  // highest priority input per output
  logic    [NPORTS-1:0] load;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    sync_fifo #(.W(PKT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (in_valid[i] && in_ready[i]),
      .din  (in_pkt[i]),
      .pop  (pop[i]),
      .dout (head[i]),
      .empty(fifo_empty[i]),
      .full (fifo_full[i]),
      .count()
    );
    assign in_ready[i] = !fifo_full[i];

    re_route #(.NX(NX), .NY(NY)) u_route (
      .my_x    (CW'(MY_X)),
      .my_y    (CW'(MY_Y)),
      .dni     (head[i].dni),
      .yx_first(head[i].ro[0]),
      .port    (route[i])
    );
  end

  // Requests, round-robin grant and crossbar select.
  always_comb begin
    int idx;
    idx = 0;
    for (int o = 0; o < NPORTS; o++) begin
      load[o] = !out_valid[o] || out_ready[o];
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !fifo_empty[i] && (int'(route[i]) == o);
      grant[o] = '0;
      for (int kk = 0; kk < NPORTS; kk++) begin
        idx = (int'(rr_ptr[o]) + kk) % NPORTS;
        if (load[o] && req[o][idx] && grant[o] == '0) grant[o][idx] = 1'b1;
      end
    end
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) pop = pop | grant[o];
  end

  always_comb begin
    int n;
    n = 0;
    for (int i = 0; i < NPORTS; i++)
      if (!fifo_empty[i] && !pop[i]) n++;
    blocked = 3'(n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_pkt   <= '0;
      for (int o = 0; o < NPORTS; o++) rr_ptr[o] <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (load[o]) begin
          out_valid[o] <= (grant[o] != '0);
          for (int i = 0; i < NPORTS; i++) begin
            if (grant[o][i]) begin
              out_pkt[o] <= head[i];
              rr_ptr[o]  <= 3'((i + 1) % NPORTS);
            end
          end
        end
      end
    end
  end

  assign busy = (fifo_empty != '1) || (out_valid != '0);

  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_onehot_grant : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant[o]))
      else $error("routing_element: two inputs granted one output");
    a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_pkt[o]))
      else $error("routing_element: output changed while stalled");
  end
endmodule
