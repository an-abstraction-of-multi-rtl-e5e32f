// tb_abs_mem_table: self-checking test of the low-level abstract table.
//
// Three tables see the same random reads and writes over a 32-cell space:
// one with priority write collisions, one with random (free-value)
// collisions, and a small one that must overflow. The reference is an
// explicit array of all 32 cells with a "touched" bit per cell; a cell's
// initial value is defined by the free input of the first read that touches
// it. Checked every cycle: read data, the hit flag, the row count (= number
// of touched cells), the collision flag, the shadow lookup of observed
// initial values, and the sticky overflow flag.
module tb_abs_mem_table;
  import abs_mem_pkg::*;

  localparam int AW = 5, DW = 8, RP = 3, WP = 3, SP = 2, DEPTH = 32, SMALL = 8;
  localparam int NCELL = 1 << AW;
  localparam int CYCLES = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          rd_en [RP];
  logic [AW-1:0] rd_addr [RP];
  logic [DW-1:0] rd_free [RP];
  logic          wr_en [WP];
  logic [AW-1:0] wr_addr [WP];
  logic [DW-1:0] wr_data [WP];
  logic [DW-1:0] wr_free [WP];
  logic [AW-1:0] sh_addr [SP];

  logic [DW-1:0] rd_data_p [RP], rd_data_r [RP], rd_data_s [RP];
  logic          rd_hit_p [RP], rd_hit_r [RP], rd_hit_s [RP];
  logic          sh_hit_p [SP], sh_hit_r [SP], sh_hit_s [SP];
  logic [DW-1:0] sh_val_p [SP], sh_val_r [SP], sh_val_s [SP];
  logic [5:0]    used_p, used_r;
  logic [3:0]    used_s;
  logic          ovf_p, ovf_r, ovf_s, coll_p, coll_r, coll_s;

  abs_mem_table #(.AW(AW), .DW(DW), .RP(RP), .WP(WP), .SP(SP), .DEPTH(DEPTH),
                  .COLL(COLL_PRIORITY)) dut_p (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_free, .rd_data(rd_data_p), .rd_hit(rd_hit_p),
    .wr_en, .wr_addr, .wr_data, .wr_free, .sh_addr, .sh_hit(sh_hit_p), .sh_val(sh_val_p),
    .used(used_p), .overflow(ovf_p), .collision(coll_p));
  abs_mem_table #(.AW(AW), .DW(DW), .RP(RP), .WP(WP), .SP(SP), .DEPTH(DEPTH),
                  .COLL(COLL_RANDOM)) dut_r (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_free, .rd_data(rd_data_r), .rd_hit(rd_hit_r),
    .wr_en, .wr_addr, .wr_data, .wr_free, .sh_addr, .sh_hit(sh_hit_r), .sh_val(sh_val_r),
    .used(used_r), .overflow(ovf_r), .collision(coll_r));
  abs_mem_table #(.AW(AW), .DW(DW), .RP(RP), .WP(WP), .SP(SP), .DEPTH(SMALL),
                  .COLL(COLL_PRIORITY)) dut_s (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_free, .rd_data(rd_data_s), .rd_hit(rd_hit_s),
    .wr_en, .wr_addr, .wr_data, .wr_free, .sh_addr, .sh_hit(sh_hit_s), .sh_val(sh_val_s),
    .used(used_s), .overflow(ovf_s), .collision(coll_s));

  int checks = 0, failures = 0;
  int n_coll = 0, n_hit = 0, n_miss = 0, n_sh = 0;

  // reference state: index 0 = priority table, 1 = random table
  logic [DW-1:0] cur   [2][NCELL];
  bit            known [2][NCELL];
  bit            iobs  [2][NCELL];
  logic [DW-1:0] ival  [2][NCELL];
  int            ntouched;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // expected read value of port k in model m (before this cycle's update)
  function automatic logic [DW-1:0] exp_read(int m, int k);
    if (known[m][rd_addr[k]]) return cur[m][rd_addr[k]];
    for (int q = 0; q < RP; q++)
      if (rd_en[q] && rd_addr[q] == rd_addr[k]) return rd_free[q];
    return rd_free[k];
  endfunction

  task automatic update(int m);
    logic [DW-1:0] rv [RP];
    for (int k = 0; k < RP; k++) rv[k] = exp_read(m, k);
    for (int k = 0; k < RP; k++) begin
      if (rd_en[k] && !known[m][rd_addr[k]]) begin
        known[m][rd_addr[k]] = 1;
        cur[m][rd_addr[k]]   = rv[k];
        iobs[m][rd_addr[k]]  = 1;
        ival[m][rd_addr[k]]  = rv[k];
      end
    end
    for (int p = 0; p < WP; p++) begin
      if (wr_en[p]) begin
        bit lower, higher;
        lower = 0; higher = 0;
        for (int q = 0; q < WP; q++)
          if (q != p && wr_en[q] && wr_addr[q] == wr_addr[p]) begin
            if (q < p) lower = 1; else higher = 1;
          end
        if (!lower) begin
          known[m][wr_addr[p]] = 1;
          cur[m][wr_addr[p]] = (m == 1 && higher) ? wr_free[p] : wr_data[p];
        end
      end
    end
  endtask

  initial begin
    repeat (CYCLES + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < NCELL; a++) begin
        known[m][a] = 0; iobs[m][a] = 0; cur[m][a] = '0; ival[m][a] = '0;
      end
    ntouched = 0;
    for (int k = 0; k < RP; k++) begin rd_en[k] = 0; rd_addr[k] = '0; rd_free[k] = '0; end
    for (int p = 0; p < WP; p++) begin
      wr_en[p] = 0; wr_addr[p] = '0; wr_data[p] = '0; wr_free[p] = '0;
    end
    for (int s = 0; s < SP; s++) sh_addr[s] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      check("used_p", 32'(used_p), 32'(ntouched));
      check("used_r", 32'(used_r), 32'(ntouched));
      check("ovf_s", 32'(ovf_s), 32'(ntouched > SMALL));
      check("ovf_p", 32'(ovf_p), 0);
      for (int k = 0; k < RP; k++) begin
        rd_en[k]   = ($urandom_range(0, 1) == 1);
        rd_addr[k] = AW'($urandom_range(0, NCELL - 1));
        rd_free[k] = DW'($urandom);
      end
      // slow the address space coverage so hits and misses both occur
      for (int p = 0; p < WP; p++) begin
        wr_en[p]   = ($urandom_range(0, 2) == 0);
        wr_addr[p] = AW'($urandom_range(0, (c < 200) ? 7 : NCELL - 1));
        wr_data[p] = DW'($urandom);
        wr_free[p] = DW'($urandom);
      end
      for (int s = 0; s < SP; s++) sh_addr[s] = AW'($urandom_range(0, NCELL - 1));
      #1;
      for (int k = 0; k < RP; k++) begin
        if (rd_en[k]) begin
          check("rd_p", 32'(rd_data_p[k]), 32'(exp_read(0, k)));
          check("rd_r", 32'(rd_data_r[k]), 32'(exp_read(1, k)));
          check("hit_p", 32'(rd_hit_p[k]), 32'(known[0][rd_addr[k]]));
          if (known[0][rd_addr[k]]) n_hit++; else n_miss++;
        end
      end
      for (int s = 0; s < SP; s++) begin
        check("sh_hit", 32'(sh_hit_p[s]), 32'(iobs[0][sh_addr[s]]));
        if (iobs[0][sh_addr[s]]) begin
          check("sh_val", 32'(sh_val_p[s]), 32'(ival[0][sh_addr[s]]));
          n_sh++;
        end
      end
      begin
        bit ce;
        ce = 0;
        for (int p = 0; p < WP; p++)
          for (int q = 0; q < p; q++)
            if (wr_en[p] && wr_en[q] && wr_addr[p] == wr_addr[q]) ce = 1;
        check("coll", 32'(coll_p), 32'(ce));
        if (ce) n_coll++;
      end
      update(0);
      update(1);
      ntouched = 0;
      for (int a = 0; a < NCELL; a++) ntouched += known[0][a];
    end
    $display("hits=%0d misses=%0d collisions=%0d shadow_hits=%0d", n_hit, n_miss, n_coll, n_sh);
    if (n_coll == 0 || n_hit == 0 || n_miss == 0 || n_sh == 0 || !ovf_s) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
