// tb_abs_mem: self-checking test of the complete abstract memory.
//
// Two configurations run on the same random traffic (2 read and 2 write
// ports, 1..4-byte units, a 64-byte address space so that accesses overlap):
//   cfg 0: little endian, priority collisions, zero-delay read, one-cycle write
//   cfg 1: big endian, random collisions, one-cycle read, zero-delay write
// The reference of each is an explicit byte array with a "touched" bit per
// byte. Byte b of an access of u bytes at address a lives at a+b (little)
// or a+u-1-b (big). Low-level port i*4+b carries that byte; an untouched
// byte first read takes the free value of the lowest such read port.
// Several writers of one byte: lowest low-level port wins, or under random
// collisions that port's free value. With zero-delay writes a read of a
// byte written in the same cycle returns the written value. Checked: read
// data (zero above the unit) and its latency, the row count, collision and
// forwarding flags. The test fails if a mechanism never occurs.
module tb_abs_mem;
  import abs_mem_pkg::*;

  localparam int AW = 6, LAU = 8, NU = 4, NR = 2, NW = 2, DEPTH = 64, UW = 3;
  localparam int DW = NU * LAU, LR = NR * NU, LW = NW * NU, NCELL = 1 << AW;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           rd_en [NR];
  logic [AW-1:0]  rd_addr [NR];
  logic [UW-1:0]  rd_unit [NR];
  logic [LAU-1:0] rd_free [LR];
  logic           wr_en [NW];
  logic [AW-1:0]  wr_addr [NW];
  logic [UW-1:0]  wr_unit [NW];
  logic [DW-1:0]  wr_data [NW];
  logic [LAU-1:0] wr_free [LW];
  logic [AW-1:0]  sh_addr [LR];

  logic [DW-1:0]  rdata [2][NR];
  logic           rvalid [2][NR];
  logic [6:0]     used [2];
  logic           ovf [2], coll [2], fwd [2];

  for (genvar c = 0; c < 2; c++) begin : g_dut
    logic           ll_en [LR];
    logic [AW-1:0]  ll_addr [LR];
    logic           ll_hit [LR];
    logic           sh_hit [LR];
    logic [LAU-1:0] sh_val [LR];
    abs_mem #(
      .AW(AW), .LAU(LAU), .NU(NU), .NR(NR), .NW(NW), .DEPTH(DEPTH),
      .ENDIAN(c == 0 ? ENDIAN_LITTLE : ENDIAN_BIG),
      .COLL(c == 0 ? COLL_PRIORITY : COLL_RANDOM),
      .READ_DELAY(c == 1), .WRITE_DELAY(c == 0)
    ) dut (
      .clk, .rst_n, .rd_en, .rd_addr, .rd_unit, .rd_data(rdata[c]), .rd_valid(rvalid[c]),
      .rd_free, .wr_en, .wr_addr, .wr_unit, .wr_data, .wr_free,
      .ll_rd_en(ll_en), .ll_rd_addr(ll_addr), .ll_rd_hit(ll_hit),
      .sh_addr, .sh_hit, .sh_val,
      .used(used[c]), .overflow(ovf[c]), .collision(coll[c]), .forwarded(fwd[c]));
  end

  int checks = 0, failures = 0;
  int n_miss = 0, n_hit = 0, n_coll = 0, n_fwd = 0, n_narrow = 0, n_wide = 0;

  logic [LAU-1:0] cur [2][NCELL];
  bit             known [2][NCELL];
  logic [DW-1:0]  pend [NR];   // cfg 1 expected data for the next cycle
  bit             pend_v [NR];

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int cell_of(int a, int u, int b, bit big);
    return big ? (a + u - 1 - b) % NCELL : (a + b) % NCELL;
  endfunction

  // value of byte `c` as seen by a read in this cycle under config m
  function automatic logic [LAU-1:0] byte_val(int m, int c);
    int nw, first;
    nw = 0; first = -1;
    if (m == 1) begin  // zero-delay write: forward same-cycle writes
      for (int i = 0; i < NW; i++)
        for (int b = 0; b < NU; b++)
          if (wr_en[i] && b < int'(wr_unit[i]) && cell_of(wr_addr[i], wr_unit[i], b, 1) == c) begin
            if (first < 0) first = i * NU + b;
            nw++;
          end
      if (nw == 1) return wr_data[first / NU][(first % NU)*LAU +: LAU];
      if (nw > 1) return wr_free[first];
    end
    if (known[m][c]) return cur[m][c];
    for (int i = 0; i < NR; i++)
      for (int b = 0; b < NU; b++)
        if (rd_en[i] && b < int'(rd_unit[i]) && cell_of(rd_addr[i], rd_unit[i], b, m == 1) == c)
          return rd_free[i * NU + b];
    return '0;
  endfunction

  function automatic logic [DW-1:0] exp_read(int m, int i);
    logic [DW-1:0] v;
    v = '0;
    for (int b = 0; b < int'(rd_unit[i]); b++)
      v[b*LAU +: LAU] = byte_val(m, cell_of(rd_addr[i], rd_unit[i], b, m == 1));
    return v;
  endfunction

  task automatic update(int m);
    logic [LAU-1:0] rv [NCELL];
    bit             rt [NCELL];
    for (int c = 0; c < NCELL; c++) rt[c] = 0;
    // reads of untouched bytes take the free value (as seen before writes)
    for (int i = 0; i < NR; i++)
      for (int b = 0; b < NU; b++)
        if (rd_en[i] && b < int'(rd_unit[i])) begin
          int c;
          c = cell_of(rd_addr[i], rd_unit[i], b, m == 1);
          if (!known[m][c] && !rt[c]) begin
            rt[c] = 1;
            rv[c] = rd_free[i * NU + b];
          end
        end
    for (int c = 0; c < NCELL; c++) if (rt[c]) begin known[m][c] = 1; cur[m][c] = rv[c]; end
    // writes: lowest low-level port wins, random collisions take its free value
    for (int c = 0; c < NCELL; c++) begin
      int nw, first;
      nw = 0; first = -1;
      for (int i = 0; i < NW; i++)
        for (int b = 0; b < NU; b++)
          if (wr_en[i] && b < int'(wr_unit[i]) && cell_of(wr_addr[i], wr_unit[i], b, m == 1) == c) begin
            if (first < 0) first = i * NU + b;
            nw++;
          end
      if (nw > 0) begin
        known[m][c] = 1;
        cur[m][c] = (m == 1 && nw > 1) ? wr_free[first]
                                       : wr_data[first / NU][(first % NU)*LAU +: LAU];
      end
    end
  endtask

  function automatic int touched(int m);
    int n;
    n = 0;
    for (int c = 0; c < NCELL; c++) n += known[m][c];
    return n;
  endfunction

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < NCELL; c++) begin known[m][c] = 0; cur[m][c] = '0; end
    for (int i = 0; i < NR; i++) begin
      rd_en[i] = 0; rd_addr[i] = '0; rd_unit[i] = 1; pend[i] = '0; pend_v[i] = 0;
    end
    for (int i = 0; i < NW; i++) begin wr_en[i] = 0; wr_addr[i] = '0; wr_unit[i] = 1; wr_data[i] = '0; end
    for (int k = 0; k < LR; k++) begin rd_free[k] = '0; sh_addr[k] = '0; end
    for (int k = 0; k < LW; k++) wr_free[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      // cfg 1 data of last cycle's reads
      for (int i = 0; i < NR; i++) begin
        check("valid1", 32'(rvalid[1][i]), 32'(pend_v[i]));
        if (pend_v[i]) check("data1", rdata[1][i], pend[i]);
      end
      for (int m = 0; m < 2; m++) begin
        check("used", 32'(used[m]), 32'(touched(m)));
        check("ovf", 32'(ovf[m]), 0);
      end
      for (int i = 0; i < NR; i++) begin
        rd_en[i] = ($urandom_range(0, 2) != 0);
        rd_addr[i] = AW'($urandom);
        rd_unit[i] = UW'($urandom_range(1, NU));
      end
      for (int i = 0; i < NW; i++) begin
        wr_en[i] = ($urandom_range(0, 2) == 0);
        wr_addr[i] = AW'($urandom_range(0, (t < 300) ? 7 : NCELL - 1));
        wr_unit[i] = UW'($urandom_range(1, NU));
        wr_data[i] = $urandom;
      end
      for (int k = 0; k < LR; k++) rd_free[k] = LAU'($urandom);
      for (int k = 0; k < LW; k++) wr_free[k] = LAU'($urandom);
      #1;
      for (int i = 0; i < NR; i++) begin
        if (rd_en[i]) begin
          check("data0", rdata[0][i], exp_read(0, i));
          if (rd_unit[i] < NU) n_narrow++; else n_wide++;
          if (known[0][rd_addr[i]]) n_hit++; else n_miss++;
        end
        check("valid0", 32'(rvalid[0][i]), 32'(rd_en[i]));
        pend[i] = exp_read(1, i);
        pend_v[i] = rd_en[i];
      end
      if (coll[0]) n_coll++;
      if (fwd[1]) n_fwd++;
      update(0);
      update(1);
    end
    $display("hits=%0d misses=%0d collisions=%0d forwards=%0d narrow=%0d wide=%0d",
             n_hit, n_miss, n_coll, n_fwd, n_narrow, n_wide);
    if (n_hit == 0 || n_miss == 0 || n_coll == 0 || n_fwd == 0 || n_narrow == 0 || n_wide == 0) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
