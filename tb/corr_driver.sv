// corr_driver: stimulus and checker for abs_mem_corr (used by the end-to-end
// testbenches). It plays a correspondence-checking run in four phases:
//   A  model A runs N_OPS cycles of random byte/word reads and writes in a
//      16-byte window, then reads 8 more fresh bytes; every read is checked
//      against an explicit byte-array reference seeded from a_rd_free.
//   B  with shadowing on, model B replays the same operations (without the
//      8 extra reads) using different free values; each read must return
//      exactly what A's read returned.
//   C  with shadowing off, B reads the 8 extra bytes: it must now return its
//      own free values, which differ from A's.
//   D  A reads fresh bytes until its table is full; the overflow flag must
//      rise exactly when more distinct bytes are requested than DEPTH.
// Read latency is checked (READ_DELAY), as are collisions and forwarding.
// Each mechanism is counted; one that never occurs counts as a failure.
module corr_driver
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
  parameter int           N_OPS       = 200,
  localparam int unsigned UW = $clog2(NU + 1),
  localparam int unsigned DW = NU * LAU,
  localparam int unsigned LR = NR * NU,
  localparam int unsigned LW = NW * NU,
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned PW = $clog2(LR + 1)
) (
  input  logic           clk,
  output logic           rst_n,
  output logic           shadow_en,
  output logic           a_rd_en    [NR],
  output logic [AW-1:0]  a_rd_addr  [NR],
  output logic [UW-1:0]  a_rd_unit  [NR],
  input  logic [DW-1:0]  a_rd_data  [NR],
  input  logic           a_rd_valid [NR],
  output logic [LAU-1:0] a_rd_free  [LR],
  output logic           a_wr_en    [NW],
  output logic [AW-1:0]  a_wr_addr  [NW],
  output logic [UW-1:0]  a_wr_unit  [NW],
  output logic [DW-1:0]  a_wr_data  [NW],
  output logic [LAU-1:0] a_wr_free  [LW],
  input  logic [CW-1:0]  a_used,
  input  logic           a_overflow,
  input  logic           a_collision,
  input  logic           a_forwarded,
  output logic           b_rd_en    [NR],
  output logic [AW-1:0]  b_rd_addr  [NR],
  output logic [UW-1:0]  b_rd_unit  [NR],
  input  logic [DW-1:0]  b_rd_data  [NR],
  input  logic           b_rd_valid [NR],
  output logic [LAU-1:0] b_rd_free  [LR],
  output logic           b_wr_en    [NW],
  output logic [AW-1:0]  b_wr_addr  [NW],
  output logic [UW-1:0]  b_wr_unit  [NW],
  output logic [DW-1:0]  b_wr_data  [NW],
  output logic [LAU-1:0] b_wr_free  [LW],
  input  logic [CW-1:0]  b_used,
  input  logic           b_overflow,
  input  logic           b_collision,
  input  logic           b_forwarded,
  input  logic [PW-1:0]  shadowed,
  output int             checks,
  output int             failures,
  output bit             done
);

  localparam int BASE = 'h1230;
  localparam int WIN  = 16;
  localparam int XTRA = 8;      // extra bytes read by A only
  localparam bit BIG  = (ENDIAN == ENDIAN_BIG);
  localparam bit RND  = (COLL == COLL_RANDOM);
  localparam bit ZWD  = (WRITE_DELAY == 1'b0);

  // recorded operations of phase A
  logic           op_rd_en   [N_OPS][NR];
  logic [AW-1:0]  op_rd_addr [N_OPS][NR];
  logic [UW-1:0]  op_rd_unit [N_OPS][NR];
  logic           op_wr_en   [N_OPS][NW];
  logic [AW-1:0]  op_wr_addr [N_OPS][NW];
  logic [UW-1:0]  op_wr_unit [N_OPS][NW];
  logic [DW-1:0]  op_wr_data [N_OPS][NW];
  logic [LAU-1:0] op_wr_free [N_OPS][LW];
  logic [DW-1:0]  op_rd_data [N_OPS][NR];   // A's read results
  logic [DW-1:0]  xtra_a     [XTRA];

  // reference of memory A: byte contents for touched addresses
  logic [LAU-1:0] ref_mem [int];

  int n_miss, n_hit, n_narrow, n_wide, n_coll, n_fwd, n_shadow, n_indep, n_ovf;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int addr_of(logic [AW-1:0] a, logic [UW-1:0] u, int b);
    return BIG ? (int'(a) + int'(u) - 1 - b) % (1 << AW) : (int'(a) + b) % (1 << AW);
  endfunction

  // value a read of byte c sees in this cycle (A's inputs)
  function automatic logic [LAU-1:0] byte_val(int c);
    int nw, first;
    nw = 0; first = -1;
    if (ZWD) begin
      for (int i = 0; i < NW; i++)
        for (int b = 0; b < NU; b++)
          if (a_wr_en[i] && b < int'(a_wr_unit[i]) && addr_of(a_wr_addr[i], a_wr_unit[i], b) == c) begin
            if (first < 0) first = i * NU + b;
            nw++;
          end
      if (nw == 1 || (nw > 1 && !RND)) return a_wr_data[first / NU][(first % NU)*LAU +: LAU];
      if (nw > 1) return a_wr_free[first];
    end
    if (ref_mem.exists(c)) return ref_mem[c];
    for (int i = 0; i < NR; i++)
      for (int b = 0; b < NU; b++)
        if (a_rd_en[i] && b < int'(a_rd_unit[i]) && addr_of(a_rd_addr[i], a_rd_unit[i], b) == c)
          return a_rd_free[i * NU + b];
    return '0;
  endfunction

  function automatic logic [DW-1:0] exp_read(int i);
    logic [DW-1:0] v;
    v = '0;
    for (int b = 0; b < int'(a_rd_unit[i]); b++)
      v[b*LAU +: LAU] = byte_val(addr_of(a_rd_addr[i], a_rd_unit[i], b));
    return v;
  endfunction

  // commit A's accesses of this cycle to the reference
  task automatic update();
    logic [LAU-1:0] rv [int];
    for (int i = 0; i < NR; i++)
      for (int b = 0; b < NU; b++)
        if (a_rd_en[i] && b < int'(a_rd_unit[i])) begin
          int c;
          c = addr_of(a_rd_addr[i], a_rd_unit[i], b);
          if (!ref_mem.exists(c) && !rv.exists(c)) rv[c] = a_rd_free[i * NU + b];
        end
    foreach (rv[c]) ref_mem[c] = rv[c];
    for (int i = 0; i < NW; i++)
      for (int b = 0; b < NU; b++)
        if (a_wr_en[i] && b < int'(a_wr_unit[i])) begin
          int c, nw, first;
          c = addr_of(a_wr_addr[i], a_wr_unit[i], b);
          nw = 0; first = -1;
          for (int i2 = 0; i2 < NW; i2++)
            for (int b2 = 0; b2 < NU; b2++)
              if (a_wr_en[i2] && b2 < int'(a_wr_unit[i2]) &&
                  addr_of(a_wr_addr[i2], a_wr_unit[i2], b2) == c) begin
                if (first < 0) first = i2 * NU + b2;
                nw++;
              end
          if (first == i * NU + b)
            ref_mem[c] = (RND && nw > 1) ? a_wr_free[first] : a_wr_data[i][b*LAU +: LAU];
        end
  endtask

  task automatic idle_all();
    for (int i = 0; i < NR; i++) begin
      a_rd_en[i] = 0; a_rd_addr[i] = '0; a_rd_unit[i] = 1;
      b_rd_en[i] = 0; b_rd_addr[i] = '0; b_rd_unit[i] = 1;
    end
    for (int i = 0; i < NW; i++) begin
      a_wr_en[i] = 0; a_wr_addr[i] = '0; a_wr_unit[i] = 1; a_wr_data[i] = '0;
      b_wr_en[i] = 0; b_wr_addr[i] = '0; b_wr_unit[i] = 1; b_wr_data[i] = '0;
    end
    for (int k = 0; k < LR; k++) begin a_rd_free[k] = '0; b_rd_free[k] = '0; end
    for (int k = 0; k < LW; k++) begin a_wr_free[k] = '0; b_wr_free[k] = '0; end
  endtask

  // one cycle: drive at the falling edge, look at combinational outputs 1
  // time unit later; one-cycle reads are sampled at the next falling edge
  logic [DW-1:0] pend_a [NR];
  bit            pend_v [NR];

  initial begin
    checks = 0; failures = 0; done = 0;
    n_miss = 0; n_hit = 0; n_narrow = 0; n_wide = 0; n_coll = 0; n_fwd = 0;
    n_shadow = 0; n_indep = 0; n_ovf = 0;
    rst_n = 0; shadow_en = 0;
    idle_all();
    for (int i = 0; i < NR; i++) begin pend_a[i] = '0; pend_v[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // ---------------- phase A ----------------
    for (int t = 0; t < N_OPS + 1 + READ_DELAY; t++) begin
      idle_all();
      if (t < N_OPS) begin
        for (int i = 0; i < NR; i++) begin
          a_rd_en[i]   = ($urandom_range(0, 2) != 0);
          a_rd_unit[i] = UW'($urandom_range(1, NU));
          a_rd_addr[i] = AW'(BASE + $urandom_range(0, WIN - NU));
        end
        for (int i = 0; i < NW; i++) begin
          a_wr_en[i]   = ($urandom_range(0, 2) == 0);
          a_wr_unit[i] = UW'($urandom_range(1, NU));
          a_wr_addr[i] = AW'(BASE + $urandom_range(0, (t < N_OPS / 4) ? 2 : WIN - NU));
          a_wr_data[i] = DW'({$urandom, $urandom});
        end
        for (int k = 0; k < LR; k++) a_rd_free[k] = LAU'($urandom);
        for (int k = 0; k < LW; k++) a_wr_free[k] = LAU'($urandom);
        for (int i = 0; i < NR; i++) begin
          op_rd_en[t][i] = a_rd_en[i]; op_rd_addr[t][i] = a_rd_addr[i];
          op_rd_unit[t][i] = a_rd_unit[i];
        end
        for (int i = 0; i < NW; i++) begin
          op_wr_en[t][i] = a_wr_en[i]; op_wr_addr[t][i] = a_wr_addr[i];
          op_wr_unit[t][i] = a_wr_unit[i]; op_wr_data[t][i] = a_wr_data[i];
        end
        for (int k = 0; k < LW; k++) op_wr_free[t][k] = a_wr_free[k];
      end else if (t == N_OPS) begin
        // A alone reads XTRA fresh bytes (one byte per port per cycle is enough
        // to make each allocation visible); spread over the ports
        for (int i = 0; i < NR && i < XTRA; i++) begin
          a_rd_en[i] = 1; a_rd_unit[i] = 1; a_rd_addr[i] = AW'(BASE + 32 + i);
        end
        for (int k = 0; k < LR; k++) a_rd_free[k] = LAU'($urandom);
      end
      #1;
      if (READ_DELAY) begin
        for (int i = 0; i < NR; i++) begin
          check("a_valid", 64'(a_rd_valid[i]), 64'(pend_v[i]));
          if (pend_v[i]) begin
            check("a_data", 64'(a_rd_data[i]), 64'(pend_a[i]));
            if (t - 1 < N_OPS) op_rd_data[t-1][i] = a_rd_data[i];
            else xtra_a[i] = a_rd_data[i];
          end
        end
      end
      for (int i = 0; i < NR; i++) begin
        logic [DW-1:0] e;
        e = exp_read(i);
        if (a_rd_en[i]) begin
          bit fresh;
          fresh = 0;
          for (int b = 0; b < int'(a_rd_unit[i]); b++)
            if (!ref_mem.exists(addr_of(a_rd_addr[i], a_rd_unit[i], b))) fresh = 1;
          if (fresh) n_miss++; else n_hit++;
          if (int'(a_rd_unit[i]) < NU) n_narrow++; else n_wide++;
          if (!READ_DELAY) begin
            check("a_data", 64'(a_rd_data[i]), 64'(e));
            check("a_valid", 64'(a_rd_valid[i]), 1);
            if (t < N_OPS) op_rd_data[t][i] = a_rd_data[i];
            else xtra_a[i] = a_rd_data[i];
          end
        end
        pend_a[i] = e;
        pend_v[i] = a_rd_en[i];
      end
      if (a_collision) n_coll++;
      if (a_forwarded) n_fwd++;
      update();
      @(negedge clk);
    end
    check("a_used", 64'(a_used), 64'(ref_mem.num()));

    // ---------------- phase B: replay on B with shadowing ----------------
    shadow_en = 1;
    for (int i = 0; i < NR; i++) pend_v[i] = 0;
    for (int t = 0; t < N_OPS + READ_DELAY; t++) begin
      idle_all();
      if (t < N_OPS) begin
        for (int i = 0; i < NR; i++) begin
          b_rd_en[i] = op_rd_en[t][i]; b_rd_addr[i] = op_rd_addr[t][i];
          b_rd_unit[i] = op_rd_unit[t][i];
        end
        for (int i = 0; i < NW; i++) begin
          b_wr_en[i] = op_wr_en[t][i]; b_wr_addr[i] = op_wr_addr[t][i];
          b_wr_unit[i] = op_wr_unit[t][i]; b_wr_data[i] = op_wr_data[t][i];
        end
        for (int k = 0; k < LW; k++) b_wr_free[k] = op_wr_free[t][k];
        for (int k = 0; k < LR; k++) b_rd_free[k] = LAU'($urandom);
      end
      #1;
      if (shadowed != '0) n_shadow++;
      for (int i = 0; i < NR; i++) begin
        if (READ_DELAY) begin
          check("b_valid", 64'(b_rd_valid[i]), 64'(pend_v[i]));
          if (pend_v[i]) check("b_vs_a", 64'(b_rd_data[i]), 64'(op_rd_data[t-1][i]));
          pend_v[i] = b_rd_en[i];
        end else if (b_rd_en[i]) begin
          check("b_vs_a", 64'(b_rd_data[i]), 64'(op_rd_data[t][i]));
        end
      end
      @(negedge clk);
    end
    check("b_used", 64'(b_used), 64'(a_used - CW'(XTRA < NR ? XTRA : NR)));

    // ---------------- phase C: no shadowing, B reads A's extra bytes ----------
    shadow_en = 0;
    idle_all();
    for (int i = 0; i < NR && i < XTRA; i++) begin
      b_rd_en[i] = 1; b_rd_unit[i] = 1; b_rd_addr[i] = AW'(BASE + 32 + i);
    end
    for (int k = 0; k < LR; k++) b_rd_free[k] = ~LAU'(xtra_a[k / NU][LAU-1:0]);
    #1;
    check("no_shadow_count", 64'(shadowed), 0);
    if (!READ_DELAY) begin
      for (int i = 0; i < NR && i < XTRA; i++) begin
        check("b_indep", 64'(b_rd_data[i][LAU-1:0]), 64'(b_rd_free[i * NU]));
        if (b_rd_data[i][LAU-1:0] != xtra_a[i][LAU-1:0]) n_indep++;
      end
      @(negedge clk);
    end else begin
      @(negedge clk);
      idle_all();
      #1;
      for (int i = 0; i < NR && i < XTRA; i++) begin
        logic [LAU-1:0] inv;
        inv = ~xtra_a[i][LAU-1:0];
        check("b_indep", 64'(b_rd_data[i][LAU-1:0]), 64'(inv));
        if (b_rd_data[i][LAU-1:0] != xtra_a[i][LAU-1:0]) n_indep++;
      end
      @(negedge clk);
    end

    // ---------------- phase D: fill A's table until it overflows -----------
    begin
      int distinct, next;
      distinct = ref_mem.num();
      next = 'h4000;
      while (distinct <= DEPTH + 2) begin
        idle_all();
        for (int i = 0; i < NR; i++) begin
          a_rd_en[i] = 1; a_rd_unit[i] = 1; a_rd_addr[i] = AW'(next); next++;
        end
        distinct += NR;
        @(negedge clk);
        check("overflow", 64'(a_overflow), 64'(distinct > DEPTH));
        check("used_cap", 64'(a_used), 64'(distinct > DEPTH ? DEPTH : distinct));
        if (a_overflow) n_ovf++;
      end
    end
    idle_all();

    $display("mechanisms: miss=%0d hit=%0d narrow=%0d wide=%0d collision=%0d forward=%0d shadowed=%0d independent=%0d overflow=%0d",
             n_miss, n_hit, n_narrow, n_wide, n_coll, n_fwd, n_shadow, n_indep, n_ovf);
    if (n_miss == 0 || n_hit == 0 || n_narrow == 0 || n_wide == 0 || n_coll == 0 ||
        n_shadow == 0 || n_indep == 0 || n_ovf == 0 || (ZWD && n_fwd == 0)) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    done = 1;
  end

endmodule
