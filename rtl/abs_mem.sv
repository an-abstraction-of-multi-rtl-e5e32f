// abs_mem: abstract multi-port memory with arbitrary addressable units.
//
// A drop-in replacement for a large memory in a design under formal
// verification. It keeps the memory's interface - NR read ports and NW write
// ports, each with enable, address, data and unit - but stores only the
// cells that are touched, so its state grows with the number of accesses,
// not with the address space, and every cell starts with an unconstrained
// (free) value the first time it is read.
//
// Structure: each interface port goes through a mapping block (rd_port_map,
// wr_port_map) that splits an access of `unit` least addressable units
// (LAU bits each, 1 <= unit <= NU) into NU single-cell accesses at
// consecutive addresses, ordered by ENDIAN. The NR*NU and NW*NU low-level
// ports drive one abs_mem_table. Read data of a narrow access is zero-filled
// above the accessed unit.
//
// Timing: by default reads are combinational and writes take effect at the
// next rising edge. WRITE_DELAY = 0 adds wr_bypass so a read sees data
// written in the same cycle; READ_DELAY = 1 adds rd_buffer so read data
// appears one cycle after the request (rd_valid marks it). Write collisions
// follow COLL. Synchronous active-low reset empties the table.
//
// Free values: rd_free supplies, per low-level read port (index i*NU+j-1),
// the value returned when a never-accessed cell is read; wr_free supplies
// the value stored on a COLL_RANDOM collision. A model checker leaves them
// unconstrained; a simulation drives them. The ll_rd_* outputs and sh_*
// lookup ports connect two memories for shadowing (see shadow_link).
//
// The method fixes the interface, the table, the mapping equations and the
// timing options; port counts, widths and DEPTH are parameters whose
// defaults follow a 16-bit processor with 65536 byte cells (byte and word
// units); two read and two write ports and DEPTH = 64 are this design's
// choice.
module abs_mem
  import abs_mem_pkg::*;
#(
  parameter int unsigned  AW          = 16,  // address width (65536 cells)
  parameter int unsigned  LAU         = 8,   // least addressable unit, bits
  parameter int unsigned  NU          = 2,   // greatest unit / least unit
  parameter int unsigned  NR          = 2,   // interface read ports (m)
  parameter int unsigned  NW          = 2,   // interface write ports
  parameter int unsigned  DEPTH       = 64,  // table rows (d)
  parameter endian_e      ENDIAN      = ENDIAN_LITTLE,
  parameter coll_policy_e COLL        = COLL_PRIORITY,
  parameter bit           READ_DELAY  = 1'b0, // 1: one-cycle read
  parameter bit           WRITE_DELAY = 1'b1, // 0: zero-delay write
  localparam int unsigned UW          = $clog2(NU + 1),
  localparam int unsigned DW          = NU * LAU,
  localparam int unsigned LR          = NR * NU,
  localparam int unsigned LW          = NW * NU,
  localparam int unsigned CW          = $clog2(DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // read ports
  input  logic           rd_en      [NR],
  input  logic [AW-1:0]  rd_addr    [NR],
  input  logic [UW-1:0]  rd_unit    [NR],
  output logic [DW-1:0]  rd_data    [NR],
  output logic           rd_valid   [NR],
  input  logic [LAU-1:0] rd_free    [LR],
  // write ports
  input  logic           wr_en      [NW],
  input  logic [AW-1:0]  wr_addr    [NW],
  input  logic [UW-1:0]  wr_unit    [NW],
  input  logic [DW-1:0]  wr_data    [NW],
  input  logic [LAU-1:0] wr_free    [LW],
  // low-level read requests (for a shadowed partner)
  output logic           ll_rd_en   [LR],
  output logic [AW-1:0]  ll_rd_addr [LR],
  output logic           ll_rd_hit  [LR],
  // shadow lookup served to a partner
  input  logic [AW-1:0]  sh_addr    [LR],
  output logic           sh_hit     [LR],
  output logic [LAU-1:0] sh_val     [LR],
  // status
  output logic [CW-1:0]  used,
  output logic           overflow,
  output logic           collision,
  output logic           forwarded
);

  logic [LAU-1:0] ll_rd_mem  [LR];  // table read data
  logic [LAU-1:0] ll_rd_data [LR];  // after forwarding
  logic           ll_fwd     [LR];
  logic           ll_wr_en   [LW];
  logic [AW-1:0]  ll_wr_addr [LW];
  logic [LAU-1:0] ll_wr_data [LW];
  logic [DW-1:0]  rd_comb    [NR];

  for (genvar i = 0; i < NR; i++) begin : g_rd
    logic           m_en   [NU];
    logic [AW-1:0]  m_addr [NU];
    logic [LAU-1:0] m_data [NU];
    rd_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN)) u_map (
      .addr(rd_addr[i]), .en(rd_en[i]), .unit(rd_unit[i]), .data(rd_comb[i]),
      .ll_en(m_en), .ll_addr(m_addr), .ll_data(m_data)
    );
    for (genvar j = 0; j < NU; j++) begin : g_u
      assign ll_rd_en[i*NU+j]   = m_en[j];
      assign ll_rd_addr[i*NU+j] = m_addr[j];
      assign m_data[j]          = ll_rd_data[i*NU+j];
    end
  end

  for (genvar i = 0; i < NW; i++) begin : g_wr
    logic           m_en   [NU];
    logic [AW-1:0]  m_addr [NU];
    logic [LAU-1:0] m_data [NU];
    wr_port_map #(.AW(AW), .LAU(LAU), .NU(NU), .ENDIAN(ENDIAN)) u_map (
      .en(wr_en[i]), .addr(wr_addr[i]), .unit(wr_unit[i]), .data(wr_data[i]),
      .ll_en(m_en), .ll_addr(m_addr), .ll_data(m_data)
    );
    for (genvar j = 0; j < NU; j++) begin : g_u
      assign ll_wr_en[i*NU+j]   = m_en[j];
      assign ll_wr_addr[i*NU+j] = m_addr[j];
      assign ll_wr_data[i*NU+j] = m_data[j];
    end
  end

  abs_mem_table #(
    .AW(AW), .DW(LAU), .RP(LR), .WP(LW), .SP(LR), .DEPTH(DEPTH), .COLL(COLL)
  ) u_table (
    .clk, .rst_n,
    .rd_en(ll_rd_en), .rd_addr(ll_rd_addr), .rd_free(rd_free),
    .rd_data(ll_rd_mem), .rd_hit(ll_rd_hit),
    .wr_en(ll_wr_en), .wr_addr(ll_wr_addr), .wr_data(ll_wr_data), .wr_free(wr_free),
    .sh_addr(sh_addr), .sh_hit(sh_hit), .sh_val(sh_val),
    .used(used), .overflow(overflow), .collision(collision)
  );

  if (WRITE_DELAY == 1'b0) begin : g_bypass
    wr_bypass #(.AW(AW), .DW(LAU), .RP(LR), .WP(LW), .COLL(COLL)) u_bypass (
      .rd_en(ll_rd_en), .rd_addr(ll_rd_addr), .mem_data(ll_rd_mem),
      .wr_en(ll_wr_en), .wr_addr(ll_wr_addr), .wr_data(ll_wr_data), .wr_free(wr_free),
      .rd_data(ll_rd_data), .fwd(ll_fwd)
    );
  end else begin : g_no_bypass
    always_comb begin
      for (int k = 0; k < LR; k++) begin
        ll_rd_data[k] = ll_rd_mem[k];
        ll_fwd[k]     = 1'b0;
      end
    end
  end

  always_comb begin
    forwarded = 1'b0;
    for (int k = 0; k < LR; k++) forwarded |= ll_fwd[k];
  end

  if (READ_DELAY == 1'b1) begin : g_rdbuf
    rd_buffer #(.DW(DW), .N(NR)) u_rdbuf (
      .clk, .rst_n, .en_i(rd_en), .data_i(rd_comb), .valid_o(rd_valid), .data_o(rd_data)
    );
  end else begin : g_rd_direct
    always_comb begin
      for (int i = 0; i < NR; i++) begin
        rd_data[i]  = rd_comb[i];
        rd_valid[i] = rd_en[i];
      end
    end
  end

  // an enabled port carries a unit between 1 and NU
  for (genvar i = 0; i < NR; i++) begin : g_rd_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     rd_en[i] |-> (rd_unit[i] >= UW'(1) && rd_unit[i] <= UW'(NU)));
  end
  for (genvar i = 0; i < NW; i++) begin : g_wr_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     wr_en[i] |-> (wr_unit[i] >= UW'(1) && wr_unit[i] <= UW'(NU)));
  end

endmodule
