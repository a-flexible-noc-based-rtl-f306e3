// cnt_cmp: read-address counter of the PE (CNT/CMP).
//
// For one parity check constraint (PCC) it counts `degree` successive L(q) /
// R memory locations starting at `offset`, the first location of the PCC's
// block. The comparator recognises the last read and flags it with `last`;
// in that same cycle a new offset and degree may be loaded, so consecutive
// PCCs are read back to back with no idle cycle.
//
// Interface: `load` with `offset`/`degree` is accepted when `ready` is high.
// While `valid` is high, `addr` is the current read address; `adv` consumes it.
// A degree of zero loads nothing. Counter and comparator are as described for
// the PE; the handshake is this design's.
module cnt_cmp #(
  parameter int AW = 12,   // address width of the memories read
  parameter int DW = 5     // width of the degree
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] offset,
  input  logic [DW-1:0] degree,
  output logic          ready,
  input  logic          adv,
  output logic          valid,
  output logic [AW-1:0] addr,
  output logic          first,
  output logic          last
);
  logic [AW-1:0] base;
  logic [DW-1:0] cnt, deg;

  assign addr  = base + AW'(cnt);
  assign first = valid && (cnt == '0);
  assign last  = valid && (cnt == deg - 1'b1);
  assign ready = !valid || (adv && last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      base  <= '0;
      cnt   <= '0;
      deg   <= '0;
    end else if (load && ready) begin
      valid <= (degree != '0);
      base  <= offset;
      cnt   <= '0;
      deg   <= degree;
    end else if (valid && adv) begin
      if (last) valid <= 1'b0;
      else      cnt   <= cnt + 1'b1;
    end
  end
endmodule
