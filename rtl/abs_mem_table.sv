// abs_mem_table: low-level abstract memory (one addressable unit per cell).
//
// Instead of holding every cell of a large memory, the table remembers only
// the cells that have been touched: DEPTH rows of (address, value) pairs and
// a counter r_q of rows in use. A read searches rows 0..r_q-1; on a hit it
// returns the stored value, on a miss it returns the port's free input
// rd_free (an unconstrained value: a primary input for a model checker, a
// random or reference value in simulation) and a new row is allocated that
// keeps this value from then on, so later reads of that address agree. A
// write updates the matching row or allocates one. Several ports that miss
// on the same new address in one cycle share a single row; reads are ranked
// before writes and lower port numbers before higher ones when rows are
// handed out, and a second read of the same fresh address returns the first
// read's free value.
//
// Timing follows the basic model of the method: reads are combinational
// (zero delay), writes and allocations take effect at the next rising edge
// (one-cycle delay). Reset (rst_n low, synchronous) empties the table.
//
// Write collisions (two enabled write ports on one address in one cycle):
// COLL_PRIORITY stores the lowest-numbered port's data; COLL_RANDOM stores
// wr_free of the lowest-numbered colliding port. The port ranking and the
// choice of which free input carries the random value are this design's.
//
// For shadowing, each row also remembers the value its cell held before any
// write, when that value was observed by a read (init_known). The sh_*
// lookup ports return it for a partner memory. This bookkeeping is this
// design's reading of the shadowing scheme.
//
// The method sizes DEPTH so that it never runs out (d = k*(ports) for BMC
// depth k). If it does, the access is not recorded and the sticky overflow
// flag is raised; this flag is this design's addition.
module abs_mem_table
  import abs_mem_pkg::*;
#(
  parameter int unsigned  AW    = 16,   // address width
  parameter int unsigned  DW    = 8,    // cell (least addressable unit) width
  parameter int unsigned  RP    = 4,    // read ports
  parameter int unsigned  WP    = 4,    // write ports
  parameter int unsigned  SP    = 4,    // shadow lookup ports
  parameter int unsigned  DEPTH = 64,   // address-value pairs (d)
  parameter coll_policy_e COLL  = COLL_PRIORITY,
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // read ports
  input  logic          rd_en   [RP],
  input  logic [AW-1:0] rd_addr [RP],
  input  logic [DW-1:0] rd_free [RP],
  output logic [DW-1:0] rd_data [RP],
  output logic          rd_hit  [RP],
  // write ports
  input  logic          wr_en   [WP],
  input  logic [AW-1:0] wr_addr [WP],
  input  logic [DW-1:0] wr_data [WP],
  input  logic [DW-1:0] wr_free [WP],
  // shadow lookup of observed initial values
  input  logic [AW-1:0] sh_addr [SP],
  output logic          sh_hit  [SP],
  output logic [DW-1:0] sh_val  [SP],
  // status
  output logic [CW-1:0] used,
  output logic          overflow,
  output logic          collision
);

  localparam int unsigned NA = RP + WP;

  logic [AW-1:0] a_q  [DEPTH];
  logic [DW-1:0] v_q  [DEPTH];
  logic          ik_q [DEPTH];
  logic [DW-1:0] iv_q [DEPTH];
  logic [CW-1:0] r_q;
  logic          ovf_q;

  logic [AW-1:0] a_d  [DEPTH];
  logic [DW-1:0] v_d  [DEPTH];
  logic          ik_d [DEPTH];
  logic [DW-1:0] iv_d [DEPTH];
  logic [CW-1:0] r_d;
  logic          ovf_now;

  logic          acc_en   [NA];
  logic [AW-1:0] acc_addr [NA];
  logic          hit      [NA];
  logic [IW-1:0] hidx     [NA];
  logic          first    [NA];  // first miss on its address this cycle
  logic          tv       [NA];  // a row is assigned to this access
  logic [IW-1:0] tgt      [NA];  // that row
  logic [DW-1:0] rd_miss  [RP];  // value returned by a read miss
  logic          wcoll    [WP];  // write port collides with a lower port
  logic          wlead    [WP];  // lowest port of a collision group

  always_comb begin
    for (int k = 0; k < RP; k++) begin
      acc_en[k]   = rd_en[k];
      acc_addr[k] = rd_addr[k];
    end
    for (int k = 0; k < WP; k++) begin
      acc_en[RP+k]   = wr_en[k];
      acc_addr[RP+k] = wr_addr[k];
    end
  end

  // table search
  always_comb begin
    for (int k = 0; k < NA; k++) begin
      hit[k]  = 1'b0;
      hidx[k] = '0;
      for (int i = 0; i < DEPTH; i++) begin
        if (!hit[k] && (CW'(i) < r_q) && (a_q[i] == acc_addr[k])) begin
          hit[k]  = 1'b1;
          hidx[k] = IW'(i);
        end
      end
    end
  end

  // row assignment for this cycle's accesses
  always_comb begin
    logic [CW:0] cnt;
    cnt     = {1'b0, r_q};
    ovf_now = 1'b0;
    for (int k = 0; k < NA; k++) begin
      first[k] = 1'b0;
      tv[k]    = 1'b0;
      tgt[k]   = '0;
      if (acc_en[k]) begin
        if (hit[k]) begin
          tv[k]  = 1'b1;
          tgt[k] = hidx[k];
        end else begin
          first[k] = 1'b1;
          for (int q = 0; q < k; q++) begin
            if (first[k] && acc_en[q] && !hit[q] && acc_addr[q] == acc_addr[k]) begin
              first[k] = 1'b0;
              tv[k]    = tv[q];
              tgt[k]   = tgt[q];
            end
          end
          if (first[k]) begin
            if (cnt < (CW+1)'(DEPTH)) begin
              tv[k]  = 1'b1;
              tgt[k] = cnt[IW-1:0];
              cnt    = cnt + 1'b1;
            end else begin
              ovf_now = 1'b1;
            end
          end
        end
      end
    end
    r_d = cnt[CW-1:0];
  end

  // read data
  always_comb begin
    for (int k = 0; k < RP; k++) begin
      rd_miss[k] = rd_free[k];
      for (int q = k - 1; q >= 0; q--) begin
        if (rd_en[q] && !hit[q] && rd_addr[q] == rd_addr[k]) rd_miss[k] = rd_free[q];
      end
      rd_hit[k]  = hit[k];
      rd_data[k] = hit[k] ? v_q[hidx[k]] : rd_miss[k];
    end
  end

  // write collisions
  always_comb begin
    for (int p = 0; p < WP; p++) begin
      wcoll[p] = 1'b0;
      wlead[p] = 1'b0;
    end
    for (int p = 0; p < WP; p++) begin
      for (int q = 0; q < WP; q++) begin
        if (q != p && wr_en[p] && wr_en[q] && wr_addr[p] == wr_addr[q]) begin
          if (q < p) wcoll[p] = 1'b1;
          else       wlead[p] = 1'b1;
        end
      end
    end
    collision = 1'b0;
    for (int p = 0; p < WP; p++) collision |= wcoll[p];
  end

  // next table contents
  always_comb begin
    a_d  = a_q;
    v_d  = v_q;
    ik_d = ik_q;
    iv_d = iv_q;
    for (int k = 0; k < NA; k++) begin
      if (first[k] && tv[k]) begin
        a_d[tgt[k]] = acc_addr[k];
        if (k < RP) begin
          v_d[tgt[k]]  = rd_free[k];
          ik_d[tgt[k]] = 1'b1;
          iv_d[tgt[k]] = rd_free[k];
        end else begin
          ik_d[tgt[k]] = 1'b0;
        end
      end
    end
    // highest port first so that the lowest-numbered port is applied last
    for (int p = WP - 1; p >= 0; p--) begin
      if (wr_en[p] && tv[RP+p]) begin
        if (COLL == COLL_RANDOM && wlead[p]) v_d[tgt[RP+p]] = wr_free[p];
        else if (!(COLL == COLL_RANDOM && wcoll[p])) v_d[tgt[RP+p]] = wr_data[p];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q   <= '0;
      ovf_q <= 1'b0;
    end else begin
      a_q   <= a_d;
      v_q   <= v_d;
      ik_q  <= ik_d;
      iv_q  <= iv_d;
      r_q   <= r_d;
      ovf_q <= ovf_q | ovf_now;
    end
  end

  // shadow lookup
  always_comb begin
    for (int s = 0; s < SP; s++) begin
      sh_hit[s] = 1'b0;
      sh_val[s] = '0;
      for (int i = 0; i < DEPTH; i++) begin
        if (!sh_hit[s] && (CW'(i) < r_q) && a_q[i] == sh_addr[s] && ik_q[i]) begin
          sh_hit[s] = 1'b1;
          sh_val[s] = iv_q[i];
        end
      end
    end
  end

  assign used     = r_q;
  assign overflow = ovf_q;

  // the row counter never passes the table size
  assert property (@(posedge clk) disable iff (!rst_n) r_q <= CW'(DEPTH));

endmodule
