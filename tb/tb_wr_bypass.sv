// tb_wr_bypass: self-checking test of zero-delay write forwarding.
//
// Random reads and writes over a 16-address space (so that reads often hit
// a same-cycle write and writes often collide) go to a priority and a
// random-collision instance. Expected read data: the table data when no
// enabled write matches the read address; otherwise the data of the
// lowest-numbered matching write port, or, with random collisions and two
// or more matching writes, that port's free value.
module tb_wr_bypass;
  import abs_mem_pkg::*;

  localparam int AW = 4, DW = 8, RP = 3, WP = 3;

  logic          rd_en [RP];
  logic [AW-1:0] rd_addr [RP];
  logic [DW-1:0] mem_data [RP];
  logic          wr_en [WP];
  logic [AW-1:0] wr_addr [WP];
  logic [DW-1:0] wr_data [WP], wr_free [WP];
  logic [DW-1:0] d_p [RP], d_r [RP];
  logic          f_p [RP], f_r [RP];

  wr_bypass #(.AW(AW), .DW(DW), .RP(RP), .WP(WP), .COLL(COLL_PRIORITY)) dut_p (
    .rd_en, .rd_addr, .mem_data, .wr_en, .wr_addr, .wr_data, .wr_free, .rd_data(d_p), .fwd(f_p));
  wr_bypass #(.AW(AW), .DW(DW), .RP(RP), .WP(WP), .COLL(COLL_RANDOM)) dut_r (
    .rd_en, .rd_addr, .mem_data, .wr_en, .wr_addr, .wr_data, .wr_free, .rd_data(d_r), .fwd(f_r));

  int checks = 0, failures = 0, n_fwd = 0, n_multi = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
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
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < RP; k++) begin
        rd_en[k] = ($urandom_range(0, 3) != 0);
        rd_addr[k] = AW'($urandom);
        mem_data[k] = DW'($urandom);
      end
      for (int p = 0; p < WP; p++) begin
        wr_en[p] = ($urandom_range(0, 1) == 1);
        wr_addr[p] = AW'($urandom_range(0, 5));
        wr_data[p] = DW'($urandom);
        wr_free[p] = DW'($urandom);
      end
      #1;
      for (int k = 0; k < RP; k++) begin
        int first, nmatch;
        logic [DW-1:0] ep, er;
        first = -1; nmatch = 0;
        for (int p = 0; p < WP; p++)
          if (rd_en[k] && wr_en[p] && wr_addr[p] == rd_addr[k]) begin
            if (first < 0) first = p;
            nmatch++;
          end
        ep = (first < 0) ? mem_data[k] : wr_data[first];
        er = (first < 0) ? mem_data[k] : (nmatch > 1) ? wr_free[first] : wr_data[first];
        if (rd_en[k]) begin
          check("data_p", 32'(d_p[k]), 32'(ep));
          check("data_r", 32'(d_r[k]), 32'(er));
        end
        check("fwd_p", 32'(f_p[k]), 32'(first >= 0));
        check("fwd_r", 32'(f_r[k]), 32'(first >= 0));
        if (first >= 0) n_fwd++;
        if (nmatch > 1) n_multi++;
      end
    end
    $display("forwarded=%0d multi=%0d", n_fwd, n_multi);
    if (n_fwd == 0 || n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
