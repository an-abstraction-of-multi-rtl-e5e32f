// tb_shadow_link: self-checking test of the shadowing selector.
//
// Random request, lookup and free values with shadowing on and off. The
// second memory's free value must be the first memory's observed initial
// value when shadowing is on and the lookup hits, otherwise the external
// free value; the lookup address must be the request address; `shadowed`
// must count enabled missing requests served from the first memory.
module tb_shadow_link;
  localparam int AW = 8, DW = 8, P = 4;

  logic          shadow_en;
  logic          b_rd_en [P], b_rd_hit [P], a_sh_hit [P];
  logic [AW-1:0] b_rd_addr [P], a_sh_addr [P];
  logic [DW-1:0] a_sh_val [P], ext_free [P], b_free [P];
  logic [2:0]    shadowed;

  shadow_link #(.AW(AW), .DW(DW), .P(P)) dut (.*);

  int checks = 0, failures = 0, n_sh = 0;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int cnt;
      shadow_en = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < P; k++) begin
        b_rd_en[k] = ($urandom_range(0, 1) == 1);
        b_rd_hit[k] = ($urandom_range(0, 1) == 1);
        a_sh_hit[k] = ($urandom_range(0, 1) == 1);
        b_rd_addr[k] = AW'($urandom);
        a_sh_val[k] = DW'($urandom);
        ext_free[k] = DW'($urandom);
      end
      #1;
      cnt = 0;
      for (int k = 0; k < P; k++) begin
        check("addr", 32'(a_sh_addr[k]), 32'(b_rd_addr[k]));
        check("free", 32'(b_free[k]), 32'((shadow_en && a_sh_hit[k]) ? a_sh_val[k] : ext_free[k]));
        if (shadow_en && a_sh_hit[k] && b_rd_en[k] && !b_rd_hit[k]) cnt++;
      end
      check("count", 32'(shadowed), 32'(cnt));
      n_sh += cnt;
    end
    if (n_sh == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
