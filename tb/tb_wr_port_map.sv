// tb_wr_port_map: self-checking test of the write-port mapping logic.
//
// Random writes of 1..4 bytes go through a little-endian and a big-endian
// instance; a 256-byte scratch memory per instance is written through the
// low-level ports and compared with the bytes the access should have placed:
// byte b of the data at addr+b (little endian) or addr+unit-1-b (big
// endian), nothing else touched.
module tb_wr_port_map;
  import abs_mem_pkg::*;

  localparam int AW = 8, LAU = 8, NU = 4, UW = 3;

  logic              en;
  logic [AW-1:0]     addr;
  logic [UW-1:0]     unit;
  logic [NU*LAU-1:0] data;
  logic              en_le [NU], en_be [NU];
  logic [AW-1:0]     ad_le [NU], ad_be [NU];
  logic [LAU-1:0]    d_le [NU], d_be [NU];

  wr_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN_LITTLE)) dut_le (
    .en, .addr, .unit, .data, .ll_en(en_le), .ll_addr(ad_le), .ll_data(d_le));
  wr_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN_BIG)) dut_be (
    .en, .addr, .unit, .data, .ll_en(en_be), .ll_addr(ad_be), .ll_data(d_be));

  int checks = 0, failures = 0;
  logic [LAU-1:0] m_le [256], m_be [256], r_le [256], r_be [256];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      m_le[a] = '0; m_be[a] = '0; r_le[a] = '0; r_be[a] = '0;
    end
    for (int t = 0; t < 1000; t++) begin
      en   = ($urandom_range(0, 3) != 0);
      unit = UW'($urandom_range(1, NU));
      addr = (t % 7 == 0) ? AW'(8'hFF) : AW'($urandom);
      data = $urandom;
      #1;
      for (int j = 0; j < NU; j++) begin
        check("en_le", 64'(en_le[j]), 64'(en && j < int'(unit)));
        check("en_be", 64'(en_be[j]), 64'(en && j < int'(unit)));
        if (en_le[j]) m_le[ad_le[j]] = d_le[j];
        if (en_be[j]) m_be[ad_be[j]] = d_be[j];
      end
      if (en)
        for (int b = 0; b < int'(unit); b++) begin
          r_le[8'(int'(addr) + b)]                  = data[b*LAU +: LAU];
          r_be[8'(int'(addr) + int'(unit) - 1 - b)] = data[b*LAU +: LAU];
        end
      for (int a = 0; a < 256; a++) begin
        check("mem_le", 64'(m_le[a]), 64'(r_le[a]));
        check("mem_be", 64'(m_be[a]), 64'(r_be[a]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
