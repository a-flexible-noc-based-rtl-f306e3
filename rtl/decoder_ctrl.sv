// decoder_ctrl: iteration controller of the decoder.
//
// After `go` (frame loaded) it clears the message-stopping flags and runs
// decoding iterations. An iteration starts all PEs together and ends when
// every PE has injected all its messages and the NoC is empty (all_idle).
// The next iteration starts at once; with early stopping enabled the early
// stopping block (ESB) is started with it, on the syndromes of the iteration
// just finished, so its ~2M/P cycles overlap the next iteration. A STOP
// decision therefore takes effect at the end of the iteration after the one
// whose syndromes satisfied the criterion. Decoding ends after that, or after
// it_max iterations. If the ESB is still busy when an iteration ends, the
// controller waits for it.
// Running a fixed maximum number of iterations, overlapping the ESB with the
// following iteration and the delayed stop follow the decoder's description;
// the exact sequencing is this design's.
module decoder_ctrl #(
  parameter int ITW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [ITW-1:0] it_max,
  input  logic           es_en,
  input  logic           all_idle,
  input  logic           esb_busy,
  input  logic           esb_done,
  input  logic           esb_stop,
  output logic           frame_clr,
  output logic           pe_start,
  output logic           first_iter,
  output logic           esb_start,
  output logic           busy,
  output logic           done,
  output logic [ITW-1:0] iterations,
  output logic           es_stopped
);
  typedef enum logic [2:0] {C_IDLE, C_START, C_WAIT, C_RUN, C_DECIDE, C_DONE} state_e;
  state_e state;
  logic   stop_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      frame_clr  <= 1'b0;
      pe_start   <= 1'b0;
      esb_start  <= 1'b0;
      first_iter <= 1'b0;
      iterations <= '0;
      es_stopped <= 1'b0;
      stop_flag  <= 1'b0;
    end else begin
      frame_clr <= 1'b0;
      pe_start  <= 1'b0;
      esb_start <= 1'b0;
      if (esb_done && esb_stop && es_en) stop_flag <= 1'b1;
      unique case (state)
        C_IDLE, C_DONE: if (go) begin
          state      <= C_START;
          frame_clr  <= 1'b1;
          iterations <= '0;
          es_stopped <= 1'b0;
          stop_flag  <= 1'b0;
          first_iter <= 1'b1;
        end
        C_START: begin
          pe_start  <= 1'b1;
          esb_start <= es_en && (iterations != 0);
          stop_flag <= 1'b0;
          state     <= C_WAIT;
        end
        C_WAIT: state <= C_RUN;   // let the PEs raise busy
        C_RUN: if (all_idle) begin
          iterations <= iterations + 1'b1;
          first_iter <= 1'b0;
          state      <= C_DECIDE;
        end
        C_DECIDE: if (!(es_en && esb_busy)) begin
          if (stop_flag || (esb_done && esb_stop && es_en)) begin
            es_stopped <= (iterations < it_max);
            state      <= C_DONE;
          end else if (iterations >= it_max) begin
            state <= C_DONE;
          end else begin
            state <= C_START;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE) && (state != C_DONE);
  assign done = (state == C_DONE);
endmodule
