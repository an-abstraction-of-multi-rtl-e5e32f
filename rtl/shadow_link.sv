// shadow_link: shadowing of unconstrained reads between two abstract memories.
//
// In correspondence checking two models of one design run one after the
// other, each with its own abstract memory, and both must see the same
// initial contents. When the second memory reads a cell it has not recorded,
// its table would return a free value; this block instead asks the first
// memory (through its shadow lookup ports) whether it has observed that
// cell's initial value, and if so supplies that value as the free input.
// Otherwise the external free value passes on. shadow_en switches the
// mechanism on. Purely combinational; P is the number of low-level read
// ports of the second memory. The lookup of the *initial* value (not the
// first memory's current value) is this design's reading of the scheme; the
// counter of shadowed reads (shadowed) is a per-cycle status output.
module shadow_link #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 8,
  parameter int unsigned P  = 4,
  localparam int unsigned PW = $clog2(P + 1)
) (
  input  logic          shadow_en,
  // read requests of the second memory
  input  logic          b_rd_en   [P],
  input  logic [AW-1:0] b_rd_addr [P],
  input  logic          b_rd_hit  [P],
  // lookup into the first memory
  output logic [AW-1:0] a_sh_addr [P],
  input  logic          a_sh_hit  [P],
  input  logic [DW-1:0] a_sh_val  [P],
  // free values
  input  logic [DW-1:0] ext_free  [P],
  output logic [DW-1:0] b_free    [P],
  output logic [PW-1:0] shadowed
);

  always_comb begin
    shadowed = '0;
    for (int k = 0; k < P; k++) begin
      a_sh_addr[k] = b_rd_addr[k];
      if (shadow_en && a_sh_hit[k]) begin
        b_free[k] = a_sh_val[k];
        if (b_rd_en[k] && !b_rd_hit[k]) shadowed = shadowed + 1'b1;
      end else begin
        b_free[k] = ext_free[k];
      end
    end
  end

endmodule
