// tb_check_block: F must be set exactly when |L| > THR (and ms_en is high),
// and the packet must carry RO, DNI and the payload unchanged.
module tb_check_block;
  import ldpc_pkg::*;
  llr_t l_new;
  logic [QW-2:0] thr;
  logic ms_en;
  dni_t dni;
  logic [AW-1:0] ro;
  packet_t pkt;
  int checks = 0, failures = 0;

  check_block dut (.*);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int v, t;
      bit ef;
      v = $urandom_range(0, 2 * QMAX) - QMAX;
      t = (n % 4 == 0) ? (v < 0 ? -v : v) : $urandom_range(0, QMAX);   // boundary cases
      l_new = llr_t'(v); thr = (QW-1)'(t); ms_en = (n % 10 != 9);
      dni = dni_t'($urandom); ro = AW'($urandom);
      #1;
      ef = ms_en && ((v < 0 ? -v : v) > t);
      checks++;
      if (pkt.f != ef || pkt.ro != ro || pkt.dni != dni || pkt.payload != l_new) begin
        failures++; $display("v %0d thr %0d en %0d: f %0d exp %0d", v, t, ms_en, pkt.f, ef);
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
