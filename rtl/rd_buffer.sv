// rd_buffer: unit buffer that turns zero-delay reads into one-cycle reads.
//
// Registers the data of N read ports at each rising edge, so data requested
// in cycle t appears in cycle t+1. valid_o marks the cycle after an enabled
// read; it is this design's addition (the method only adds the register).
// Synchronous active-low reset clears the data and valid bits.
module rd_buffer #(
  parameter int unsigned DW = 16,
  parameter int unsigned N  = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en_i    [N],
  input  logic [DW-1:0] data_i  [N],
  output logic          valid_o [N],
  output logic [DW-1:0] data_o  [N]
);

  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (!rst_n) begin
        valid_o[k] <= 1'b0;
        data_o[k]  <= '0;
      end else begin
        valid_o[k] <= en_i[k];
        data_o[k]  <= data_i[k];
      end
    end
  end

endmodule
