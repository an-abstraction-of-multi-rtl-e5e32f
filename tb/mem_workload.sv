// mem_workload: random-traffic checker for one abs_mem configuration (used
// by tb_table1_memories). It instantiates abs_mem with the given sizes,
// default timing (zero-delay read, one-cycle write), little endian and
// priority collisions, and drives N_OPS cycles of random reads and writes
// of random units to HOT randomly chosen addresses spread over the whole
// address space, so that no more than HOT*NU cells (<= DEPTH) are touched.
// The reference is an associative array of touched cells; an untouched
// cell's value is defined by the free input of the first read that sees it.
// Every read result and the row count are checked.
module mem_workload
  import abs_mem_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned LAU   = 8,
  parameter int unsigned NU    = 1,
  parameter int unsigned NR    = 2,
  parameter int unsigned NW    = 2,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned HOT   = 16,
  parameter int          N_OPS = 500,
  localparam int unsigned UW = $clog2(NU + 1),
  localparam int unsigned DW = NU * LAU,
  localparam int unsigned LR = NR * NU,
  localparam int unsigned LW = NW * NU,
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);

  logic           rst_n;
  logic           rd_en [NR], rd_valid [NR], wr_en [NW];
  logic [AW-1:0]  rd_addr [NR], wr_addr [NW];
  logic [UW-1:0]  rd_unit [NR], wr_unit [NW];
  logic [DW-1:0]  rd_data [NR], wr_data [NW];
  logic [LAU-1:0] rd_free [LR], wr_free [LW], sh_val [LR];
  logic           ll_rd_en [LR], ll_rd_hit [LR], sh_hit [LR];
  logic [AW-1:0]  ll_rd_addr [LR], sh_addr [LR];
  logic [CW-1:0]  used;
  logic           overflow, collision, forwarded;

  abs_mem #(.AW(AW), .LAU(LAU), .NU(NU), .NR(NR), .NW(NW), .DEPTH(DEPTH)) dut (.*);

  logic [LAU-1:0] ref_mem [int];
  logic [AW-1:0]  hot [HOT];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t (AW=%0d)", what, got, exp, $time, AW);
    end
  endtask

  function automatic int cell_at(logic [AW-1:0] a, int b);
    return (int'(a) + b) % (1 << AW);
  endfunction

  function automatic logic [DW-1:0] exp_read(int i);
    logic [DW-1:0] v;
    v = '0;
    for (int b = 0; b < int'(rd_unit[i]); b++) begin
      int c;
      bit found;
      c = cell_at(rd_addr[i], b);
      found = 0;
      if (ref_mem.exists(c)) begin
        v[b*LAU +: LAU] = ref_mem[c];
        found = 1;
      end
      for (int q = 0; q < NR && !found; q++)
        for (int bq = 0; bq < NU && !found; bq++)
          if (rd_en[q] && bq < int'(rd_unit[q]) && cell_at(rd_addr[q], bq) == c) begin
            v[b*LAU +: LAU] = rd_free[q * NU + bq];
            found = 1;
          end
    end
    return v;
  endfunction

  task automatic update();
    logic [LAU-1:0] rv [int];
    for (int i = 0; i < NR; i++)
      if (rd_en[i]) begin
        logic [DW-1:0] v;
        v = exp_read(i);
        for (int b = 0; b < int'(rd_unit[i]); b++)
          if (!ref_mem.exists(cell_at(rd_addr[i], b))) rv[cell_at(rd_addr[i], b)] = v[b*LAU +: LAU];
      end
    foreach (rv[c]) ref_mem[c] = rv[c];
    // highest port first, so the lowest-numbered writer of a cell is last
    for (int i = NW - 1; i >= 0; i--)
      for (int b = NU - 1; b >= 0; b--)
        if (wr_en[i] && b < int'(wr_unit[i])) ref_mem[cell_at(wr_addr[i], b)] = wr_data[i][b*LAU +: LAU];
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; rst_n = 0;
    for (int h = 0; h < HOT; h++) hot[h] = AW'($urandom);
    for (int i = 0; i < NR; i++) begin rd_en[i] = 0; rd_addr[i] = '0; rd_unit[i] = 1; end
    for (int i = 0; i < NW; i++) begin wr_en[i] = 0; wr_addr[i] = '0; wr_unit[i] = 1; wr_data[i] = '0; end
    for (int k = 0; k < LR; k++) begin rd_free[k] = '0; sh_addr[k] = '0; end
    for (int k = 0; k < LW; k++) wr_free[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < N_OPS; t++) begin
      for (int i = 0; i < NR; i++) begin
        rd_en[i] = ($urandom_range(0, 2) != 0);
        rd_addr[i] = hot[$urandom_range(0, HOT - 1)];
        rd_unit[i] = UW'($urandom_range(1, NU));
      end
      for (int i = 0; i < NW; i++) begin
        wr_en[i] = ($urandom_range(0, 2) == 0);
        wr_addr[i] = hot[$urandom_range(0, HOT - 1)];
        wr_unit[i] = UW'($urandom_range(1, NU));
        wr_data[i] = DW'($urandom);
      end
      for (int k = 0; k < LR; k++) rd_free[k] = LAU'($urandom);
      #1;
      for (int i = 0; i < NR; i++)
        if (rd_en[i]) check("read", 64'(rd_data[i]), 64'(exp_read(i)));
      update();
      @(negedge clk);
      check("used", 64'(used), 64'(ref_mem.num()));
      check("overflow", 64'(overflow), 0);
    end
    done = 1;
  end

endmodule
