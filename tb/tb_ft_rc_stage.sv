// tb_ft_rc_stage: exhaustive check of the duplicated XY routing stage.
//
// For every destination of the 8x8 mesh, several router positions, every
// combination of the two fault flags and random unreachable-port masks, the result
// is compared with a reference XY routing function and the secondary-path table of
// the modified crossbar (out1<-M2, out2<-M3, out3<-M2, out4<-M5, out5<-M4).
module tb_ft_rc_stage;
  import noc_pkg::*;

  logic [NODE_W-1:0]    dest;
  logic [COORD_W-1:0]   cur_x, cur_y;
  logic                 f_p, f_d;
  logic [NUM_PORTS-1:0] unreach;
  logic                 valid, fsp, using_dup;
  port_t                route, sp;

  ft_rc_stage dut (
    .dest(dest), .cur_x(cur_x), .cur_y(cur_y), .fault_primary(f_p), .fault_dup(f_d),
    .port_unreach(unreach), .valid(valid), .route(route), .sp(sp), .fsp(fsp),
    .using_dup(using_dup)
  );

  int checks = 0, failures = 0;
  int sec_tab [5] = '{1, 2, 1, 4, 3};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int ref_route(int dx, int dy, int x, int y);
    if (dx > x) return 2;
    if (dx < x) return 4;
    if (dy > y) return 1;
    if (dy < y) return 3;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pos = 0; pos < 64; pos += 9) begin
      cur_x = 3'(pos % 8);
      cur_y = 3'(pos / 8);
      for (int d = 0; d < 64; d++) begin
        for (int fc = 0; fc < 4; fc++) begin
          int exp_r;
          dest    = 6'(d);
          f_p     = fc[0];
          f_d     = fc[1];
          unreach = 5'($urandom_range(31));
          #1;
          exp_r = ref_route(d % 8, d / 8, int'(cur_x), int'(cur_y));
          check(valid == !(f_p && f_d), $sformatf("valid=%0d with faults %0d%0d", valid, f_d, f_p));
          check(using_dup == (f_p && !f_d), "duplicate unit use");
          if (valid) begin
            check(int'(route) == exp_r, $sformatf("dest %0d at (%0d,%0d): route %0d exp %0d",
                                               d, cur_x, cur_y, route, exp_r));
            check(fsp == unreach[exp_r], "FSP flag");
            check(int'(sp) == (unreach[exp_r] ? sec_tab[exp_r] : exp_r), "SP field");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
