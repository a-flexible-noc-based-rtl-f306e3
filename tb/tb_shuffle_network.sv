// tb_shuffle_network: random inputs and random path controls on a 9-port
// network; each output must carry the selected input.
module tb_shuffle_network;
  localparam int P = 9, SW = 4;
  logic [P-1:0] din, dout;
  logic [SW-1:0] sel [P];
  int checks = 0, failures = 0;

  shuffle_network #(.P(P), .SW(SW)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      din = P'($urandom);
      for (int j = 0; j < P; j++) sel[j] = SW'($urandom_range(0, P - 1));
      #1;
      for (int j = 0; j < P; j++) begin
        checks++;
        if (dout[j] != din[sel[j]]) begin failures++; $display("out %0d sel %0d", j, sel[j]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
