// esb: Early Stopping Block (ESB), iteration early stopping from the syndrome
// accumulation vector (SAV).
//
// Step 1  each PE's transmission block sends one syndrome bit s_i per PCC on
//         its own link; the bits are stored in order in that PE's SMin memory.
// Step 2  on `start` the stored syndromes are moved to the P SMout memories
//         through the shuffling network: in cycle t every SMin_i offers entry
//         t, the SNM memory word of cycle t selects for each output j the
//         input to take, and SWA_j[t] gives the SMout_j write address and
//         write enable. This regroups the syndromes by SAV element.
// Step 3  a shared counter (CNT) reads SMout_0..P-1 in parallel, one entry per
//         cycle, into the P SAV blocks; each SMout holds whole SAV elements,
//         c consecutive entries each. The OR of the SBs' "odd element" flags
//         means a Type I codeword; STOP is its complement: every SAV element
//         is even, so the remaining errors (if any) are in the last parity
//         bits and decoding may stop.
// Latency from start to done: n_shuf + max(SMout fill) + 1 cycles, about
// 2*M/P. `start` also rewinds the SMin write pointers, so the next
// iteration's syndromes can stream in while the previous ones are shuffled:
// entry t is read in cycle t, before a PE can have produced its (t+1)-th
// syndrome.
// The step structure and the memory kinds follow the block as described;
// SMout is sized SMO_DEPTH (enough for whole SAV elements, see below) rather
// than exactly M/P, and the regrouping tables are supplied by configuration.
// Configuration: CFG_SNM (addr = cycle, idx = output port), CFG_SWA (addr =
// cycle, idx = SMout, data = {we, address}), CFG_ESB addr 0 = shuffle cycles
// (max syndromes per PE), addr 1 = c = M/z.
module esb
  import ldpc_pkg::*;
#(
  parameter int P         = 9,
  parameter int SMI_DEPTH = 128,   // M/P for M = 1152, P = 9
  parameter int SMO_DEPTH = 132    // ceil(z/P)*c for z = 96, c = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  s_valid,
  input  logic [P-1:0]  s_bit,
  input  logic          start,
  input  logic          cfg_we,
  input  cfg_mem_e      cfg_mem,
  input  logic [AW-1:0] cfg_addr,
  input  logic [7:0]    cfg_idx,
  input  logic [31:0]   cfg_data,
  output logic          busy,
  output logic          done,
  output logic          stop
);
  localparam int SW  = (P > 1) ? $clog2(P) : 1;
  localparam int SIW = $clog2(SMI_DEPTH);
  localparam int SOW = $clog2(SMO_DEPTH + 1);

  typedef struct packed {
    logic           we;
    logic [SOW-1:0] addr;
  } swa_t;

  typedef enum logic [1:0] {S_IDLE, S_SHUF, S_SAV, S_FIN} state_e;

  logic [SMI_DEPTH-1:0] smin  [P];
  logic [SMO_DEPTH-1:0] smout [P];
  logic [SW-1:0]        snm   [SMI_DEPTH][P];
  swa_t                 swa   [P][SMI_DEPTH];
  logic [SIW:0]         wptr  [P];
  logic [SOW-1:0]       len   [P];
  logic [SIW:0]         n_shuf;
  logic [7:0]           c_len;

  state_e         state;
  logic [SOW-1:0] t;        // CNT
  logic [SOW-1:0] max_len;

  // shuffling network
  logic [P-1:0]  sn_in, sn_out;
  logic [SW-1:0] sn_sel [P];
  always_comb begin
    for (int i = 0; i < P; i++) begin
      sn_in[i]  = smin[i][SIW'(t)];
      sn_sel[i] = snm[SIW'(t)][i];
    end
  end
  shuffle_network #(.P(P), .SW(SW)) u_sn (.din(sn_in), .sel(sn_sel), .dout(sn_out));

  // SAV blocks
  logic [P-1:0] sb_valid, sb_bit, sb_odd;
  always_comb begin
    for (int j = 0; j < P; j++) begin
      sb_valid[j] = (state == S_SAV) && (t < len[j]);
      sb_bit[j]   = smout[j][t];
    end
  end
  for (genvar j = 0; j < P; j++) begin : g_sb
    sav_block #(.CNTW(8)) u_sb (
      .clk, .rst_n, .clr(start), .valid(sb_valid[j]), .s(sb_bit[j]), .c(c_len), .odd(sb_odd[j])
    );
  end

  always_comb begin
    max_len = '0;
    for (int j = 0; j < P; j++) if (len[j] > max_len) max_len = len[j];
  end

  // step 1 and configuration
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++)
      if (s_valid[i] && wptr[i] < SMI_DEPTH && !start) smin[i][SIW'(wptr[i])] <= s_bit[i];
    if (cfg_we && cfg_mem == CFG_SNM && int'(cfg_idx) < P)
      snm[SIW'(cfg_addr)][cfg_idx] <= cfg_data[SW-1:0];
    if (cfg_we && cfg_mem == CFG_SWA && int'(cfg_idx) < P)
      swa[cfg_idx][SIW'(cfg_addr)] <= swa_t'(cfg_data[SOW:0]);
    // step 2 writes
    if (state == S_SHUF)
      for (int j = 0; j < P; j++)
        if (swa[j][SIW'(t)].we) smout[j][swa[j][SIW'(t)].addr] <= sn_out[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      t      <= '0;
      done   <= 1'b0;
      stop   <= 1'b0;
      n_shuf <= '0;
      c_len  <= 8'd1;
      for (int i = 0; i < P; i++) begin
        wptr[i] <= '0;
        len[i]  <= '0;
      end
    end else begin
      done <= 1'b0;
      if (cfg_we && cfg_mem == CFG_ESB && cfg_addr == 0) n_shuf <= cfg_data[SIW:0];
      if (cfg_we && cfg_mem == CFG_ESB && cfg_addr == 1) c_len  <= cfg_data[7:0];
      for (int i = 0; i < P; i++) begin
        if (start) wptr[i] <= '0;
        else if (s_valid[i] && wptr[i] < SMI_DEPTH) wptr[i] <= wptr[i] + 1'b1;
      end
      unique case (state)
        S_IDLE: if (start) begin
          state <= (n_shuf != 0) ? S_SHUF : S_SAV;
          t     <= '0;
          for (int j = 0; j < P; j++) len[j] <= '0;
        end
        S_SHUF: begin
          for (int j = 0; j < P; j++)
            if (swa[j][SIW'(t)].we && swa[j][SIW'(t)].addr >= len[j])
              len[j] <= swa[j][SIW'(t)].addr + 1'b1;
          if (int'(t) + 1 >= int'(n_shuf) || int'(t) + 1 >= SMI_DEPTH) begin
            state <= S_SAV;
            t     <= '0;
          end else t <= t + 1'b1;
        end
        S_SAV: begin
          if (int'(t) + 1 >= int'(max_len)) state <= S_FIN;
          else t <= t + 1'b1;
        end
        S_FIN: begin
          state <= S_IDLE;
          done  <= 1'b1;
          stop  <= !(|sb_odd);
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("esb: start while busy");
endmodule
