// tb_decoder_ctrl: the iteration controller against simple models of the PEs
// (busy for a random number of cycles after each start) and of the early
// stopping block (busy for a fixed time, STOP answered from a chosen
// iteration on). Checked: frame_clr on go, one pe_start per iteration,
// first_iter only in the first one, esb_start from the second iteration on
// (and never with es_en low), it_max iterations without early stopping, a
// stop one iteration after the stopping syndromes, and waiting for a slow ESB.
module tb_decoder_ctrl;
  logic clk = 0, rst_n = 0;
  logic go, es_en, all_idle, esb_busy, esb_done, esb_stop;
  logic [3:0] it_max, iterations;
  logic frame_clr, pe_start, first_iter, esb_start, busy, done, es_stopped;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  decoder_ctrl #(.ITW(4)) dut (.*);

  int pe_left, esb_left, esb_lat, stop_from, n_start, n_esb, n_clr, first_bad;
  int esb_iter;   // iteration whose syndromes the ESB is working on

  always @(posedge clk) begin
    if (!rst_n) begin
      pe_left = 0; esb_left = 0; n_start = 0; n_esb = 0; n_clr = 0; first_bad = 0;
    end else begin
      esb_done <= 0;
      if (pe_start) begin
        n_start++;
        if (first_iter != (n_start == 1)) first_bad++;
        pe_left = $urandom_range(5, 40);
      end else if (pe_left > 0) pe_left--;
      if (esb_start) begin
        n_esb++; esb_left = esb_lat; esb_iter = n_start - 2;  // syndromes of the previous iteration (0-based)
      end else if (esb_left > 0) begin
        esb_left--;
        if (esb_left == 0) begin
          esb_done <= 1;
          esb_stop <= (esb_iter >= stop_from);
        end
      end
      if (frame_clr) n_clr++;
    end
    all_idle <= (pe_left == 0) && !pe_start;
    esb_busy <= (esb_left > 0) || esb_start;
  end

  task automatic frame(bit es, int itm, int sfrom, int lat, int exp_iter, bit exp_es);
    es_en = es; it_max = 4'(itm); stop_from = sfrom; esb_lat = lat;
    n_start = 0; n_esb = 0; n_clr = 0; first_bad = 0;
    @(negedge clk); go = 1; @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(iterations) != exp_iter || n_start != exp_iter || es_stopped != exp_es) begin
      failures++; $display("es %0d itmax %0d from %0d lat %0d: iterations %0d starts %0d es_stopped %0d, exp %0d %0d",
                           es, itm, sfrom, lat, iterations, n_start, es_stopped, exp_iter, exp_es);
    end
    checks++;
    if (n_clr != 1 || first_bad != 0) begin failures++; $display("frame_clr %0d first_iter errors %0d", n_clr, first_bad); end
    checks++;
    if (n_esb != (es ? exp_iter - 1 : 0)) begin failures++; $display("esb starts %0d", n_esb); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    go = 0; es_en = 0; it_max = 10; esb_done = 0; esb_stop = 0; all_idle = 1; esb_busy = 0; esb_lat = 3;
    repeat (3) @(posedge clk); rst_n = 1;
    frame(0, 10, 0, 3, 10, 0);     // no early stopping: it_max iterations
    frame(1, 10, 99, 3, 10, 0);    // criterion never met
    frame(1, 10, 2, 3, 4, 1);      // syndromes of iteration 3 (index 2) stop after iteration 4
    frame(1, 10, 0, 3, 2, 1);      // stop as early as possible
    frame(1, 10, 0, 60, 2, 1);     // ESB slower than an iteration: controller waits
    frame(1, 5, 4, 3, 5, 0);       // criterion met too late: it_max ends decoding
    frame(0, 3, 0, 3, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
