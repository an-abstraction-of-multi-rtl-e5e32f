// tb_rd_port_map: self-checking test of the read-port mapping logic.
//
// Two instances (little and big endian, four units of 8 bits) get random
// enables, addresses, units and low-level data. Expected values are worked
// out per cell: the cell holding byte b of the result is addr+b (little
// endian) or addr+unit-1-b (big endian); only the first `unit` low-level
// ports are enabled; result bytes at or above `unit` read as zero.
module tb_rd_port_map;
  import abs_mem_pkg::*;

  localparam int AW = 8, LAU = 8, NU = 4, UW = 3;

  logic [AW-1:0]     addr;
  logic              en;
  logic [UW-1:0]     unit;
  logic [LAU-1:0]    ll_data [NU];
  logic [NU*LAU-1:0] data_le, data_be;
  logic              en_le [NU], en_be [NU];
  logic [AW-1:0]     ad_le [NU], ad_be [NU];

  rd_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN_LITTLE)) dut_le (
    .addr, .en, .unit, .data(data_le), .ll_en(en_le), .ll_addr(ad_le), .ll_data);
  rd_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN_BIG)) dut_be (
    .addr, .en, .unit, .data(data_be), .ll_en(en_be), .ll_addr(ad_be), .ll_data);

  int checks = 0, failures = 0;

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
    for (int t = 0; t < 2000; t++) begin
      logic [NU*LAU-1:0] all, exp;
      en   = ($urandom_range(0, 3) != 0);
      unit = UW'($urandom_range(1, NU));
      addr = (t % 5 == 0) ? AW'(8'hFE) : AW'($urandom);
      for (int j = 0; j < NU; j++) ll_data[j] = LAU'($urandom);
      #1;
      all = '0;
      for (int j = 0; j < NU; j++) all[j*LAU +: LAU] = ll_data[j];
      exp = all;
      if (en) for (int b = 0; b < NU; b++) if (b >= int'(unit)) exp[b*LAU +: LAU] = '0;
      check("data_le", 64'(data_le), 64'(exp));
      check("data_be", 64'(data_be), 64'(exp));
      for (int j = 0; j < NU; j++) begin
        check("en_le", 64'(en_le[j]), 64'(en && j < int'(unit)));
        check("en_be", 64'(en_be[j]), 64'(en && j < int'(unit)));
        if (en && j < int'(unit)) begin
          logic [AW-1:0] e_le, e_be;
          e_le = AW'(int'(addr) + j);
          e_be = AW'(int'(addr) + int'(unit) - 1 - j);
          check("ad_le", 64'(ad_le[j]), 64'(e_le));
          check("ad_be", 64'(ad_be[j]), 64'(e_be));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
