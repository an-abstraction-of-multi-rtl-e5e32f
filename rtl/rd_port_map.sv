// rd_port_map: mapping logic of one read port of the abstract memory.
//
// A read of `unit` least addressable units (1 <= unit <= NU) at `addr` is
// split over NU low-level read ports j = 1..NU, each one cell of LAU bits:
//   ll_en[j]   = en && unit >= j          (only the needed ports are enabled)
//   ll_addr[j] = addr + j - 1             (little endian)
//              = addr + unit - j          (big endian)
// and the interface data is rebuilt with chunk 1 in the least significant
// bits; chunk j > 1 is the low-level data when ll_en[j] is set (or when the
// port is disabled, where the data is undefined anyway) and zero otherwise,
// so a narrow read returns zeros in the upper bits. These equations are the
// method's own. Address arithmetic wraps modulo 2**AW, which is this
// design's choice. Purely combinational; NU low-level ports per read port.
module rd_port_map
  import abs_mem_pkg::*;
#(
  parameter int unsigned AW     = 16,
  parameter int unsigned LAU    = 8,
  parameter int unsigned NU     = 2,
  parameter endian_e     ENDIAN = ENDIAN_LITTLE,
  localparam int unsigned UW    = $clog2(NU + 1)
) (
  input  logic [AW-1:0]     addr,
  input  logic              en,
  input  logic [UW-1:0]     unit,
  output logic [NU*LAU-1:0] data,
  output logic              ll_en   [NU],
  output logic [AW-1:0]     ll_addr [NU],
  input  logic [LAU-1:0]    ll_data [NU]
);

  always_comb begin
    for (int j = 1; j <= NU; j++) begin
      ll_en[j-1] = en && (unit >= UW'(j));
      if (ENDIAN == ENDIAN_LITTLE) ll_addr[j-1] = addr + AW'(j - 1);
      else                         ll_addr[j-1] = addr + AW'(unit) - AW'(j);
    end
  end

  always_comb begin
    data = '0;
    data[LAU-1:0] = ll_data[0];
    for (int j = 2; j <= NU; j++) begin
      if (ll_en[j-1] || !ll_en[0]) data[(j-1)*LAU +: LAU] = ll_data[j-1];
    end
  end

endmodule
