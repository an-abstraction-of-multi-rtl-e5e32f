// abs_mem_corr: pair of abstract memories set up for correspondence checking.
//
// Correspondence checking runs two models of one processor (for example an
// instruction-set model and the RTL) from the same environment state and
// compares the environments afterwards. Each model gets its own abstract
// memory: mem_a for the model executed first, mem_b for the one executed
// second. Because both memories start with unconstrained contents, a cell
// that both models read before writing must return the same value in both.
// shadow_link provides that: when mem_b reads a cell it has not recorded,
// and mem_a has observed that cell's initial value, mem_b receives mem_a's
// value instead of its own free input. shadow_en = 0 leaves the two
// memories independent.
//
// Each side brings out the full abs_mem interface (a_* and b_*), including
// its free-value inputs and status flags; shadowed counts the low-level
// reads of mem_b served from mem_a in the current cycle. mem_a's own shadow
// lookup is served to mem_b; mem_b's lookup ports are not used and are tied
// to address 0. Timing is that of abs_mem. Parameters pass to both memories.
// mem_a's low-level request outputs and mem_b's lookup outputs are not
// needed by the pair and stay unconnected internally (lint reports them as
// unused signals).
module abs_mem_corr
  import abs_mem_pkg::*;
#(
  parameter int unsigned  AW          = 16,
  parameter int unsigned  LAU         = 8,
  parameter int unsigned  NU          = 2,
  parameter int unsigned  NR          = 2,
  parameter int unsigned  NW          = 2,
  parameter int unsigned  DEPTH       = 64,
  parameter endian_e      ENDIAN      = ENDIAN_LITTLE,
  parameter coll_policy_e COLL        = COLL_PRIORITY,
  parameter bit           READ_DELAY  = 1'b0,
  parameter bit           WRITE_DELAY = 1'b1,
  localparam int unsigned UW          = $clog2(NU + 1),
  localparam int unsigned DW          = NU * LAU,
  localparam int unsigned LR          = NR * NU,
  localparam int unsigned LW          = NW * NU,
  localparam int unsigned CW          = $clog2(DEPTH + 1),
  localparam int unsigned PW          = $clog2(LR + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shadow_en,
  // memory of the model executed first
  input  logic           a_rd_en    [NR],
  input  logic [AW-1:0]  a_rd_addr  [NR],
  input  logic [UW-1:0]  a_rd_unit  [NR],
  output logic [DW-1:0]  a_rd_data  [NR],
  output logic           a_rd_valid [NR],
  input  logic [LAU-1:0] a_rd_free  [LR],
  input  logic           a_wr_en    [NW],
  input  logic [AW-1:0]  a_wr_addr  [NW],
  input  logic [UW-1:0]  a_wr_unit  [NW],
  input  logic [DW-1:0]  a_wr_data  [NW],
  input  logic [LAU-1:0] a_wr_free  [LW],
  output logic [CW-1:0]  a_used,
  output logic           a_overflow,
  output logic           a_collision,
  output logic           a_forwarded,
  // memory of the model executed second
  input  logic           b_rd_en    [NR],
  input  logic [AW-1:0]  b_rd_addr  [NR],
  input  logic [UW-1:0]  b_rd_unit  [NR],
  output logic [DW-1:0]  b_rd_data  [NR],
  output logic           b_rd_valid [NR],
  input  logic [LAU-1:0] b_rd_free  [LR],
  input  logic           b_wr_en    [NW],
  input  logic [AW-1:0]  b_wr_addr  [NW],
  input  logic [UW-1:0]  b_wr_unit  [NW],
  input  logic [DW-1:0]  b_wr_data  [NW],
  input  logic [LAU-1:0] b_wr_free  [LW],
  output logic [CW-1:0]  b_used,
  output logic           b_overflow,
  output logic           b_collision,
  output logic           b_forwarded,
  // shadowing activity
  output logic [PW-1:0]  shadowed
);

  logic           a_ll_rd_en   [LR];
  logic [AW-1:0]  a_ll_rd_addr [LR];
  logic           a_ll_rd_hit  [LR];
  logic [AW-1:0]  a_sh_addr    [LR];
  logic           a_sh_hit     [LR];
  logic [LAU-1:0] a_sh_val     [LR];
  logic           b_ll_rd_en   [LR];
  logic [AW-1:0]  b_ll_rd_addr [LR];
  logic           b_ll_rd_hit  [LR];
  logic [AW-1:0]  b_sh_addr    [LR];
  logic           b_sh_hit     [LR];
  logic [LAU-1:0] b_sh_val     [LR];
  logic [LAU-1:0] b_free       [LR];

  always_comb for (int k = 0; k < LR; k++) b_sh_addr[k] = '0;

  abs_mem #(
    .AW(AW), .LAU(LAU), .NU(NU), .NR(NR), .NW(NW), .DEPTH(DEPTH), .ENDIAN(ENDIAN),
    .COLL(COLL), .READ_DELAY(READ_DELAY), .WRITE_DELAY(WRITE_DELAY)
  ) mem_a (
    .clk, .rst_n,
    .rd_en(a_rd_en), .rd_addr(a_rd_addr), .rd_unit(a_rd_unit), .rd_data(a_rd_data),
    .rd_valid(a_rd_valid), .rd_free(a_rd_free),
    .wr_en(a_wr_en), .wr_addr(a_wr_addr), .wr_unit(a_wr_unit), .wr_data(a_wr_data),
    .wr_free(a_wr_free),
    .ll_rd_en(a_ll_rd_en), .ll_rd_addr(a_ll_rd_addr), .ll_rd_hit(a_ll_rd_hit),
    .sh_addr(a_sh_addr), .sh_hit(a_sh_hit), .sh_val(a_sh_val),
    .used(a_used), .overflow(a_overflow), .collision(a_collision), .forwarded(a_forwarded)
  );

  shadow_link #(.AW(AW), .DW(LAU), .P(LR)) u_shadow (
    .shadow_en,
    .b_rd_en(b_ll_rd_en), .b_rd_addr(b_ll_rd_addr), .b_rd_hit(b_ll_rd_hit),
    .a_sh_addr(a_sh_addr), .a_sh_hit(a_sh_hit), .a_sh_val(a_sh_val),
    .ext_free(b_rd_free), .b_free(b_free), .shadowed(shadowed)
  );

  abs_mem #(
    .AW(AW), .LAU(LAU), .NU(NU), .NR(NR), .NW(NW), .DEPTH(DEPTH), .ENDIAN(ENDIAN),
    .COLL(COLL), .READ_DELAY(READ_DELAY), .WRITE_DELAY(WRITE_DELAY)
  ) mem_b (
    .clk, .rst_n,
    .rd_en(b_rd_en), .rd_addr(b_rd_addr), .rd_unit(b_rd_unit), .rd_data(b_rd_data),
    .rd_valid(b_rd_valid), .rd_free(b_free),
    .wr_en(b_wr_en), .wr_addr(b_wr_addr), .wr_unit(b_wr_unit), .wr_data(b_wr_data),
    .wr_free(b_wr_free),
    .ll_rd_en(b_ll_rd_en), .ll_rd_addr(b_ll_rd_addr), .ll_rd_hit(b_ll_rd_hit),
    .sh_addr(b_sh_addr), .sh_hit(b_sh_hit), .sh_val(b_sh_val),
    .used(b_used), .overflow(b_overflow), .collision(b_collision), .forwarded(b_forwarded)
  );

endmodule
