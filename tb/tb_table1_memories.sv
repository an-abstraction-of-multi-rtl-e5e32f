// tb_table1_memories: the abstract memory in the register-file and memory
// sizes of the processors it was evaluated on (4 x 8 bit to 65536 x 8 bit),
// each with random traffic to a few hot addresses and an explicit reference.
// Widths and depths per instance:
//   4 x 8     : AW=2,  LAU=8,  NU=1      16 x 8  : AW=4,  LAU=8,  NU=1
//   256 x 8   : AW=8,  LAU=8,  NU=1      16 x 16 : AW=4,  LAU=16, NU=1
//   2048 x 8 bytes and words : AW=11, LAU=8, NU=2
//   32 x 16   : AW=5,  LAU=16, NU=1
//   32768 x 16: AW=15, LAU=16, NU=1
//   65536 x 8 bytes and words: AW=16, LAU=8, NU=2
// Port counts (2 read, 2 write) and DEPTH (64) are the memory's defaults.
module tb_table1_memories;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 8;
  int checks [N], failures [N];
  bit done [N];

  mem_workload #(.AW(2),  .LAU(8),  .NU(1), .HOT(4))  w_tiny_rf  (.clk, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  mem_workload #(.AW(4),  .LAU(8),  .NU(1), .HOT(16)) w_spp8_rf  (.clk, .checks(checks[1]), .failures(failures[1]), .done(done[1]));
  mem_workload #(.AW(8),  .LAU(8),  .NU(1), .HOT(24)) w_spp8_mem (.clk, .checks(checks[2]), .failures(failures[2]), .done(done[2]));
  mem_workload #(.AW(4),  .LAU(16), .NU(1), .HOT(16)) w_spp16_rf (.clk, .checks(checks[3]), .failures(failures[3]), .done(done[3]));
  mem_workload #(.AW(11), .LAU(8),  .NU(2), .HOT(24)) w_spp16_mem(.clk, .checks(checks[4]), .failures(failures[4]), .done(done[4]));
  mem_workload #(.AW(5),  .LAU(16), .NU(1), .HOT(24)) w_codea_rf (.clk, .checks(checks[5]), .failures(failures[5]), .done(done[5]));
  mem_workload #(.AW(15), .LAU(16), .NU(1), .HOT(24)) w_codea_s  (.clk, .checks(checks[6]), .failures(failures[6]), .done(done[6]));
  mem_workload #(.AW(16), .LAU(8),  .NU(2), .HOT(24)) w_codea_m  (.clk, .checks(checks[7]), .failures(failures[7]), .done(done[7]));

  function automatic int total(int a [N]);
    int s;
    s = 0;
    for (int i = 0; i < N; i++) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    bit all;
    all = 0;
    while (!all) begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < N; i++) all &= done[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
