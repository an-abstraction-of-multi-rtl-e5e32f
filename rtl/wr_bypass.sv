// wr_bypass: forwarding for zero-delay writes.
//
// The low-level table commits writes at the clock edge. When the memory is
// configured for zero-delay writing, a read of an address that is written in
// the same cycle must already see the new data. This block sits on the
// low-level read data: for each read port it compares the address with every
// enabled write port and, on a match, replaces the table's data with the
// written data. When several write ports hit the same address the choice
// follows the table's collision policy (lowest-numbered port, or that port's
// free value under COLL_RANDOM), so the forwarded value equals the value the
// table stores at the edge. The forwarding requirement is the method's; the
// comparator structure is this design's. Purely combinational.
module wr_bypass
  import abs_mem_pkg::*;
#(
  parameter int unsigned  AW   = 16,
  parameter int unsigned  DW   = 8,
  parameter int unsigned  RP   = 4,
  parameter int unsigned  WP   = 4,
  parameter coll_policy_e COLL = COLL_PRIORITY
) (
  input  logic          rd_en    [RP],
  input  logic [AW-1:0] rd_addr  [RP],
  input  logic [DW-1:0] mem_data [RP],
  input  logic          wr_en    [WP],
  input  logic [AW-1:0] wr_addr  [WP],
  input  logic [DW-1:0] wr_data  [WP],
  input  logic [DW-1:0] wr_free  [WP],
  output logic [DW-1:0] rd_data  [RP],
  output logic          fwd      [RP]
);

  always_comb begin
    for (int k = 0; k < RP; k++) begin
      logic multi;
      multi      = 1'b0;
      fwd[k]     = 1'b0;
      rd_data[k] = mem_data[k];
      for (int p = WP - 1; p >= 0; p--) begin
        if (rd_en[k] && wr_en[p] && wr_addr[p] == rd_addr[k]) begin
          multi      = fwd[k];
          fwd[k]     = 1'b1;
          rd_data[k] = (COLL == COLL_RANDOM && multi) ? wr_free[p] : wr_data[p];
        end
      end
    end
  end

endmodule
