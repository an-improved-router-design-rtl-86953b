// tb_ft_crossbar: random traffic through the 5x5 crossbar with secondary paths.
//
// Each cycle a random set of output ports is served, each from a random input, and
// for each one the test picks the primary multiplexer or, at random or because the
// primary one is flagged faulty, the secondary one (out1<-M2, out2<-M3, out3<-M2,
// out4<-M5, out5<-M4), never giving a multiplexer two jobs. Outputs must carry
// exactly the chosen input's flit; unused outputs must be idle. A job given to a
// faulty multiplexer, or to one that cannot reach the asked-for output, must vanish.
module tb_ft_crossbar;
  import noc_pkg::*;

  flit_t [NUM_PORTS-1:0] in_flit, out_flit;
  logic  [NUM_PORTS-1:0] m_valid, mux_fault, out_valid;
  port_t [NUM_PORTS-1:0] m_sel, m_dst;

  ft_crossbar dut (
    .in_flit(in_flit), .m_valid(m_valid), .m_sel(m_sel), .m_dst(m_dst),
    .mux_fault(mux_fault), .out_valid(out_valid), .out_flit(out_flit)
  );

  int checks = 0, failures = 0;
  int sec_tab [5] = '{1, 2, 1, 4, 3};
  int n_secondary = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int   exp_src [5];
      bit   exp_v   [5];
      bit   used    [5];
      for (int i = 0; i < NUM_PORTS; i++) in_flit[i] = $urandom();
      mux_fault = (t < 2000) ? 5'($urandom_range(31)) & 5'($urandom_range(31)) : '0;
      m_valid = '0; m_sel = '0; m_dst = '0;
      for (int o = 0; o < 5; o++) begin used[o] = 0; exp_v[o] = 0; exp_src[o] = 0; end
      for (int o = 0; o < 5; o++) begin
        if ($urandom_range(3) != 0) begin
          int m, src;
          m   = ($urandom_range(3) == 0 || mux_fault[o]) ? sec_tab[o] : o;
          src = $urandom_range(4);
          if (!used[m]) begin
            used[m]    = 1;
            m_valid[m] = 1'b1;
            m_sel[m]   = port_t'(src);
            m_dst[m]   = port_t'(o);
            if (!mux_fault[m]) begin
              exp_v[o]   = 1;
              exp_src[o] = src;
              if (m != o) n_secondary++;
            end
          end
        end
      end
      // a job for an output the multiplexer cannot reach is dropped
      if ($urandom_range(7) == 0) begin
        if (!used[0]) begin
          used[0] = 1; m_valid[0] = 1'b1; m_sel[0] = 3'd1; m_dst[0] = 3'd4;
        end
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        check(out_valid[o] == exp_v[o], $sformatf("t=%0d out%0d valid %0d exp %0d", t, o + 1, out_valid[o], exp_v[o]));
        if (exp_v[o])
          check(out_flit[o] == in_flit[exp_src[o]], $sformatf("t=%0d out%0d data", t, o + 1));
      end
    end
    check(n_secondary > 100, "secondary paths rarely exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
