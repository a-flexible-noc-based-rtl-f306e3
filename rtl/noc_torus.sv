// noc_torus: two-dimensional toroidal mesh of routing elements.
//
// NX x NY nodes; node n = y*NX + x holds one routing element whose local port
// connects to the processing element of the same index. Every router links to
// its four neighbours with wrap-around in both dimensions: the E output of
// (x,y) feeds the W input of (x+1 mod NX, y), the S output feeds the N input of
// (x, y+1 mod NY), and so on. All links are valid/ready, one packet per cycle.
// busy is high while any packet is stored anywhere in the network; blocked is
// the number of FIFO heads that waited this cycle over all routers.
// The topology and the 5-port node follow the torus drawn for the decoder;
// the default 3 x 3 size is the smallest decoder evaluated with both traffic
// reduction methods.
module noc_torus
  import ldpc_pkg::*;
#(
  parameter int NX         = 3,
  parameter int NY         = 3,
  parameter int FIFO_DEPTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // injection from the PEs
  input  logic    [NX*NY-1:0]     inj_valid,
  input  packet_t [NX*NY-1:0]     inj_pkt,
  output logic    [NX*NY-1:0]     inj_ready,
  // ejection to the PEs
  output logic    [NX*NY-1:0]     ej_valid,
  output packet_t [NX*NY-1:0]     ej_pkt,
  input  logic    [NX*NY-1:0]     ej_ready,
  output logic                    busy,
  output logic    [15:0]          blocked
);
  localparam int P = NX * NY;

  logic    [NPORTS-1:0] in_valid  [P];
  packet_t [NPORTS-1:0] in_pkt    [P];
  logic    [NPORTS-1:0] in_ready  [P];
  logic    [NPORTS-1:0] out_valid [P];
  packet_t [NPORTS-1:0] out_pkt   [P];
  logic    [NPORTS-1:0] out_ready [P];
  logic    [P-1:0]      node_busy;
  logic    [2:0]        node_blocked [P];

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int N  = y * NX + x;
      localparam int NE = y * NX + (x + 1) % NX;
      localparam int NW = y * NX + (x + NX - 1) % NX;
      localparam int NN = ((y + NY - 1) % NY) * NX + x;
      localparam int NS = ((y + 1) % NY) * NX + x;

      routing_element #(.NX(NX), .NY(NY), .MY_X(x), .MY_Y(y), .FIFO_DEPTH(FIFO_DEPTH)) u_re (
        .clk, .rst_n,
        .in_valid (in_valid[N]),
        .in_pkt   (in_pkt[N]),
        .in_ready (in_ready[N]),
        .out_valid(out_valid[N]),
        .out_pkt  (out_pkt[N]),
        .out_ready(out_ready[N]),
        .busy     (node_busy[N]),
        .blocked  (node_blocked[N])
      );

      // inputs of node N
      assign in_valid[N][PORT_L] = inj_valid[N];
      assign in_pkt[N][PORT_L]   = inj_pkt[N];
      assign inj_ready[N]        = in_ready[N][PORT_L];
      assign in_valid[N][PORT_W] = out_valid[NW][PORT_E];
      assign in_pkt[N][PORT_W]   = out_pkt[NW][PORT_E];
      assign in_valid[N][PORT_E] = out_valid[NE][PORT_W];
      assign in_pkt[N][PORT_E]   = out_pkt[NE][PORT_W];
      assign in_valid[N][PORT_N] = out_valid[NN][PORT_S];
      assign in_pkt[N][PORT_N]   = out_pkt[NN][PORT_S];
      assign in_valid[N][PORT_S] = out_valid[NS][PORT_N];
      assign in_pkt[N][PORT_S]   = out_pkt[NS][PORT_N];

      // outputs of node N
      assign ej_valid[N]          = out_valid[N][PORT_L];
      assign ej_pkt[N]            = out_pkt[N][PORT_L];
      assign out_ready[N][PORT_L] = ej_ready[N];
      assign out_ready[N][PORT_E] = in_ready[NE][PORT_W];
      assign out_ready[N][PORT_W] = in_ready[NW][PORT_E];
      assign out_ready[N][PORT_S] = in_ready[NS][PORT_N];
      assign out_ready[N][PORT_N] = in_ready[NN][PORT_S];
    end
  end

  assign busy = |node_busy;

  always_comb begin
    blocked = '0;
    for (int n = 0; n < P; n++) blocked += 16'(node_blocked[n]);
  end
endmodule
