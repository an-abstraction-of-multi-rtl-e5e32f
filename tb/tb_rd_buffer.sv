// tb_rd_buffer: self-checking test of the one-cycle read buffer.
//
// Random enables and data are driven on two ports; after each rising edge
// the outputs must equal what was on the inputs in the previous cycle, and
// reset must clear them.
module tb_rd_buffer;
  localparam int DW = 16, N = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          en_i [N], valid_o [N];
  logic [DW-1:0] data_i [N], data_o [N];
  logic          pen [N];
  logic [DW-1:0] pdat [N];

  rd_buffer #(.DW(DW), .N(N)) dut (.clk, .rst_n, .en_i, .data_i, .valid_o, .data_o);

  int checks = 0, failures = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin en_i[k] = 1; data_i[k] = 16'hBEEF; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check("rst_valid", 32'(valid_o[k]), 0);
      check("rst_data", 32'(data_o[k]), 0);
    end
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      for (int k = 0; k < N; k++) begin
        en_i[k] = ($urandom_range(0, 1) == 1);
        data_i[k] = DW'($urandom);
        pen[k] = en_i[k];
        pdat[k] = data_i[k];
      end
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        check("valid", 32'(valid_o[k]), 32'(pen[k]));
        check("data", 32'(data_o[k]), 32'(pdat[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
