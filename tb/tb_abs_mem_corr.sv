// tb_abs_mem_corr: end-to-end test of the correspondence-checking pair.
//
// Two copies of the top run side by side, each driven and checked by
// corr_driver through a complete correspondence run (model A executes,
// model B replays with shadowing, B without shadowing, A overflows):
//   u_def: all parameters at their defaults (little endian, priority
//          collisions, zero-delay read, one-cycle write, 64 rows)
//   u_alt: big endian, random collisions, one-cycle read, zero-delay write
// so every mechanism of the memory occurs: allocation on a miss, hits,
// narrow and full-width units, write collisions, same-cycle forwarding,
// the read buffer, shadowed reads and table overflow.
module tb_abs_mem_corr;
  import abs_mem_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks [2], failures [2];
  bit done [2];

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam endian_e      EN = (g == 0) ? ENDIAN_LITTLE : ENDIAN_BIG;
    localparam coll_policy_e CP = (g == 0) ? COLL_PRIORITY : COLL_RANDOM;
    localparam bit           RD = (g == 1);
    localparam bit           WD = (g == 0);
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

    if (g == 0) begin : g_top
      abs_mem_corr u_def (.*);
    end else begin : g_top
      abs_mem_corr #(.ENDIAN(EN), .COLL(CP), .READ_DELAY(RD), .WRITE_DELAY(WD)) u_alt (.*);
    end

    corr_driver #(.ENDIAN(EN), .COLL(CP), .READ_DELAY(RD), .WRITE_DELAY(WD)) u_drv (
      .*, .checks(checks[g]), .failures(failures[g]), .done(done[g]));
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
endmodule
