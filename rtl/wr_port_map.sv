// wr_port_map: mapping logic of one write port of the abstract memory.
//
// A write of `unit` least addressable units (1 <= unit <= NU) at `addr` is
// split over NU low-level write ports j = 1..NU, each one cell of LAU bits:
//   ll_en[j]   = en && unit >= j
//   ll_addr[j] = addr + j - 1     (little endian)
//              = addr + unit - j  (big endian)
//   ll_data[j] = data[j*LAU-1 : (j-1)*LAU]
// so chunk j of the data, counted from the least significant end, lands in
// the cell its endianness assigns it. The enable and address equations are
// the method's; the data slice is indexed by j (the chunk the port carries).
// Address arithmetic wraps modulo 2**AW (this design's choice). Purely
// combinational.
module wr_port_map
  import abs_mem_pkg::*;
#(
  parameter int unsigned AW     = 16,
  parameter int unsigned LAU    = 8,
  parameter int unsigned NU     = 2,
  parameter endian_e     ENDIAN = ENDIAN_LITTLE,
  localparam int unsigned UW    = $clog2(NU + 1)
) (
  input  logic              en,
  input  logic [AW-1:0]     addr,
  input  logic [UW-1:0]     unit,
  input  logic [NU*LAU-1:0] data,
  output logic              ll_en   [NU],
  output logic [AW-1:0]     ll_addr [NU],
  output logic [LAU-1:0]    ll_data [NU]
);

  always_comb begin
    for (int j = 1; j <= NU; j++) begin
      ll_en[j-1] = en && (unit >= UW'(j));
      if (ENDIAN == ENDIAN_LITTLE) ll_addr[j-1] = addr + AW'(j - 1);
      else                         ll_addr[j-1] = addr + AW'(unit) - AW'(j);
      ll_data[j-1] = data[(j-1)*LAU +: LAU];
    end
  end

endmodule
