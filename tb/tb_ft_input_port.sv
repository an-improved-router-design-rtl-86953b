// tb_ft_input_port: test of one input port: VC buffers, state fields, routing,
// credits and the VC-to-VC transfer.
//
// The test plays the upstream router (per-VC credits, one packet per VC at a time)
// and both allocators (VA grants after a random delay, SA grants to a random
// requesting VC). Directed cases check the cycle timing of RC and VA, the route and
// secondary-path fields, the duplicate routing unit and the transfer of a partly
// received packet into the default-winner VC, with its later flits following it and
// its credits returned under the VC number used on the link. A random phase with the
// first SA arbiter faulty then checks flit order, routes and credit numbering.
module tb_ft_input_port;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  logic                   in_valid, credit_out_valid, f_rc_p, f_rc_d, sa_fault, sa_gnt;
  vc_t                    in_vc, credit_out_vc, dw_vc, sa_gnt_vc;
  flit_t                  in_flit, pop_flit;
  logic  [NUM_PORTS-1:0]  unreach;
  logic  [NUM_VCS-1:0]    va_req, va_gnt, credit_ok, sa_req;
  port_t [NUM_VCS-1:0]    va_port, sa_port;
  vc_t   [NUM_VCS-1:0]    va_gnt_vc;
  vc_state_t [NUM_VCS-1:0] vc_state;
  vc_state_t              pop_state;
  logic                   xfer_busy, rc_busy, rc_dup_used;

  ft_input_port dut (
    .clk(clk), .rst_n(rst_n), .cur_x(3'd3), .cur_y(3'd3),
    .in_valid(in_valid), .in_vc(in_vc), .in_flit(in_flit),
    .credit_out_valid(credit_out_valid), .credit_out_vc(credit_out_vc),
    .fault_rc_primary(f_rc_p), .fault_rc_dup(f_rc_d), .port_unreach(unreach),
    .sa_fault(sa_fault), .dw_vc(dw_vc),
    .va_req(va_req), .va_port(va_port), .va_gnt(va_gnt), .va_gnt_vc(va_gnt_vc),
    .vc_state(vc_state), .credit_ok(credit_ok), .sa_req(sa_req), .sa_port(sa_port),
    .sa_gnt(sa_gnt), .sa_gnt_vc(sa_gnt_vc), .pop_flit(pop_flit), .pop_state(pop_state),
    .xfer_busy(xfer_busy), .rc_busy(rc_busy), .rc_dup_used(rc_dup_used)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int id, int seq, int len, logic [5:0] dest);
    flit_t f;
    f = '0;
    f[31] = (seq == 0); f[30] = (seq == len - 1); f[29:24] = dest;
    f[23:12] = id[11:0]; f[11:8] = seq[3:0]; f[7:0] = 8'(id + 3 * seq);
    return f;
  endfunction

  task automatic idle_inputs();
    in_valid = 1'b0; va_gnt = '0; sa_gnt = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0; idle_inputs(); in_vc = '0; in_flit = '0; va_gnt_vc = '0; sa_gnt_vc = '0;
    f_rc_p = 1'b0; f_rc_d = 1'b0; sa_fault = 1'b0; dw_vc = '0; unreach = '0; credit_ok = '1;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  // random-phase state
  int up_cred [NUM_VCS];
  int up_pkt  [NUM_VCS];
  int up_seq  [NUM_VCS];
  int up_len  [NUM_VCS];
  int pk_lvc  [4096];
  int pk_len  [4096];
  int pk_next [4096];
  int pk_route [4096];
  logic [5:0] pk_dest [4096];
  int va_wait [NUM_VCS];
  int n_pkts, n_done, n_xfer;

  function automatic int ref_route(logic [5:0] d);
    if (d[2:0] > 3) return 2;
    if (d[2:0] < 3) return 4;
    if (d[5:3] > 3) return 1;
    if (d[5:3] < 3) return 3;
    return 0;
  endfunction

  initial begin
    do_reset();

    // ---- 1. RC then VA timing, fields, pops and credits ----
    in_valid = 1'b1; in_vc = 2'd2; in_flit = mk(1, 0, 3, {3'd3, 3'd6});  // east
    @(negedge clk);
    in_flit = mk(1, 1, 3, {3'd3, 3'd6});
    check(rc_busy && !va_req[2], "RC not in the cycle after the write");
    @(negedge clk);
    in_flit = mk(1, 2, 3, {3'd3, 3'd6});
    check(va_req[2] && va_port[2] == 3'd2 && !vc_state[2].fsp, "VA request or route wrong");
    va_gnt[2] = 1'b1; va_gnt_vc[2] = 2'd1;
    @(negedge clk);
    idle_inputs();
    check(vc_state[2].g == G_ACTIVE && vc_state[2].o == 2'd1, "O field not written");
    check(sa_req[2] && sa_port[2] == 3'd2, "SA request wrong");
    for (int s = 0; s < 3; s++) begin
      sa_gnt = 1'b1; sa_gnt_vc = 2'd2; #1;
      check(pop_flit == mk(1, s, 3, {3'd3, 3'd6}), $sformatf("popped flit %0d", s));
      check(credit_out_valid && credit_out_vc == 2'd2, "credit not returned");
      check(pop_state.r == 3'd2 && pop_state.o == 2'd1, "pop state");
      @(negedge clk);
    end
    idle_inputs();
    check(vc_state[2].g == G_IDLE && !sa_req[2], "VC not idle after the tail");

    // ---- 2. secondary path fields and duplicate RC unit ----
    unreach = 5'b00100; f_rc_p = 1'b1;
    in_valid = 1'b1; in_vc = 2'd0; in_flit = mk(2, 0, 1, {3'd3, 3'd7});  // east
    @(negedge clk);
    idle_inputs();
    check(rc_busy && rc_dup_used, "duplicate RC unit not used");
    @(negedge clk);
    check(va_req[0] && vc_state[0].fsp && vc_state[0].sp == 3'd1 && va_port[0] == 3'd2,
          "secondary-path fields wrong");
    va_gnt[0] = 1'b1; va_gnt_vc[0] = 2'd3;
    @(negedge clk);
    idle_inputs();
    check(sa_req[0] && sa_port[0] == 3'd1, "SA does not ask for the secondary port");
    sa_gnt = 1'b1; sa_gnt_vc = 2'd0;
    @(negedge clk);
    idle_inputs();
    // both RC units faulty: no route
    f_rc_d = 1'b1;
    in_valid = 1'b1; in_vc = 2'd1; in_flit = mk(3, 0, 1, {3'd0, 3'd0});
    @(negedge clk);
    idle_inputs();
    repeat (3) begin
      check(!rc_busy && !va_req[1], "routed with both RC units faulty");
      @(negedge clk);
    end

    // ---- 3. transfer of a partly received packet into the default winner ----
    do_reset();
    in_valid = 1'b1; in_vc = 2'd3; in_flit = mk(4, 0, 3, {3'd3, 3'd3});   // local
    @(negedge clk);
    in_flit = mk(4, 1, 3, {3'd3, 3'd3});
    @(negedge clk);
    idle_inputs();
    va_gnt[3] = 1'b1; va_gnt_vc[3] = 2'd2;
    @(negedge clk);
    idle_inputs();
    sa_fault = 1'b1; dw_vc = 2'd0; #1;
    check(xfer_busy, "no transfer into the empty default winner");
    @(negedge clk);
    check(!xfer_busy && vc_state[0].g == G_ACTIVE && vc_state[0].o == 2'd2 &&
          vc_state[3].g == G_IDLE && sa_req[0] && !sa_req[3], "state fields not moved");
    // the tail arrives on link VC 3 and must land behind the moved flits
    in_valid = 1'b1; in_vc = 2'd3; in_flit = mk(4, 2, 3, {3'd3, 3'd3});
    sa_gnt = 1'b1; sa_gnt_vc = 2'd0; #1;
    check(pop_flit == mk(4, 0, 3, {3'd3, 3'd3}) && credit_out_vc == 2'd3, "first moved flit");
    @(negedge clk);
    in_valid = 1'b0; #1;
    check(pop_flit == mk(4, 1, 3, {3'd3, 3'd3}) && credit_out_vc == 2'd3, "second moved flit");
    @(negedge clk); #1;
    check(pop_flit == mk(4, 2, 3, {3'd3, 3'd3}) && credit_out_vc == 2'd3, "tail after transfer");
    @(negedge clk);
    idle_inputs();
    check(vc_state[0].g == G_IDLE, "default winner not released");

    // ---- 4. random traffic, first SA arbiter faulty half of the time ----
    do_reset();
    n_pkts = 0; n_done = 0; n_xfer = 0;
    for (int v = 0; v < NUM_VCS; v++) begin
      up_cred[v] = BUF_DEPTH; up_pkt[v] = -1; va_wait[v] = 0;
    end
    for (int c = 0; c < 20000; c++) begin
      logic sg; vc_t sv; logic cv; vc_t cvc; flit_t pf;
      sa_fault = 1'((c / 2000) % 2);
      dw_vc    = vc_t'((c / 7) % NUM_VCS);
      // upstream: open packets, send one flit
      in_valid = 1'b0;
      begin
        int v;
        v = $urandom_range(NUM_VCS-1);
        if (up_pkt[v] < 0 && up_cred[v] == BUF_DEPTH && n_pkts < 4000 && $urandom_range(3) == 0) begin
          int id;
          id = n_pkts++;
          up_pkt[v] = id; up_seq[v] = 0;
          pk_len[id] = 1 + $urandom_range(5); pk_lvc[id] = v; pk_next[id] = 0;
          pk_dest[id] = 6'($urandom_range(63)); pk_route[id] = ref_route(pk_dest[id]);
        end
        for (int k = 0; k < NUM_VCS; k++) begin
          int w;
          w = (v + k) % NUM_VCS;
          if (!in_valid && up_pkt[w] >= 0 && up_cred[w] > 0) begin
            int id;
            id = up_pkt[w];
            in_valid = 1'b1; in_vc = vc_t'(w);
            in_flit = mk(id, up_seq[w], pk_len[id], pk_dest[id]);
            up_cred[w]--; up_seq[w]++;
            if (up_seq[w] == pk_len[id]) up_pkt[w] = -1;
          end
        end
      end
      // VA: grant after a short random wait
      va_gnt = '0;
      for (int v = 0; v < NUM_VCS; v++)
        if (va_req[v]) begin
          if (va_wait[v] == 0) va_wait[v] = 1 + $urandom_range(3);
          else if (--va_wait[v] == 0) begin va_gnt[v] = 1'b1; va_gnt_vc[v] = vc_t'($urandom_range(3)); end
        end
      // SA: random requesting VC, only the default winner when the arbiter is faulty
      sa_gnt = 1'b0;
      #1;
      if (xfer_busy) n_xfer++;
      if (!xfer_busy) begin
        if (sa_fault) begin
          if (sa_req[dw_vc] && $urandom_range(3) != 0) begin sa_gnt = 1'b1; sa_gnt_vc = dw_vc; end
        end else begin
          int v;
          v = $urandom_range(NUM_VCS-1);
          if (sa_req[v] && $urandom_range(3) != 0) begin sa_gnt = 1'b1; sa_gnt_vc = vc_t'(v); end
        end
      end
      #1;
      sg = sa_gnt; sv = sa_gnt_vc; cv = credit_out_valid; cvc = credit_out_vc; pf = pop_flit;
      if (sg) begin
        int id, seq;
        id = pf[23:12]; seq = pf[11:8];
        check(cv, "pop without credit");
        check(pk_next[id] == seq, $sformatf("packet %0d flit %0d out of order", id, seq));
        check(pf == mk(id, seq, pk_len[id], pk_dest[id]), "flit content");
        check(int'(cvc) == pk_lvc[id], "credit returned under the wrong VC number");
        check(int'(pop_state.r) == pk_route[id], "route of popped flit");
        pk_next[id] = seq + 1;
        if (seq == pk_len[id] - 1) n_done++;
        up_cred[cvc]++;
      end
      @(negedge clk);
    end
    check(n_done > 1000, $sformatf("only %0d packets completed", n_done));
    check(n_xfer > 20, $sformatf("only %0d transfers", n_xfer));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
