// tb_abs_mem_corr_full: one complete correspondence run on the top with all
// parameters at their defaults (16-bit addresses, byte cells, byte and word
// units, two read and two write ports, 64 rows per table). corr_driver
// plays model A, replays it as model B with shadowing, reads without
// shadowing, and fills A's table to overflow, checking every read.
module tb_abs_mem_corr_full;
  import abs_mem_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  bit done;

  logic rst_n, shadow_en;
  logic        a_rd_en [2], a_rd_valid [2], a_wr_en [2];
  logic [15:0] a_rd_addr [2], a_wr_addr [2], a_rd_data [2], a_wr_data [2];
  logic [1:0]  a_rd_unit [2], a_wr_unit [2];
  logic [7:0]  a_rd_free [4], a_wr_free [4];
  logic [6:0]  a_used;
  logic        a_overflow, a_collision, a_forwarded;
  logic        b_rd_en [2], b_rd_valid [2], b_wr_en [2];
  logic [15:0] b_rd_addr [2], b_wr_addr [2], b_rd_data [2], b_wr_data [2];
  logic [1:0]  b_rd_unit [2], b_wr_unit [2];
  logic [7:0]  b_rd_free [4], b_wr_free [4];
  logic [6:0]  b_used;
  logic        b_overflow, b_collision, b_forwarded;
  logic [2:0]  shadowed;

  abs_mem_corr dut (.*);

  corr_driver #(.N_OPS(400)) u_drv (.*);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
