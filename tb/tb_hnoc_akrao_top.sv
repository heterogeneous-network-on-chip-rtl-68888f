// tb_hnoc_akrao_top: end-to-end test of the HNoC router node at its default
// parameters.
//
// 1. Reference run: the word sequence of the design's reference simulation
//    (ports A..D = 14,1E,28,32 then 19,23,2D,38 hex) sent from port B and C
//    to ports A, B and C; the port registers must end at A=23, B=2D, C=2D,
//    D untouched.
// 2. Latency of a lone packet: 4 cycles on the normal path, 2 on the bypass.
// 3. Random traffic, 3000 packets, with phases in which the delivery side is
//    stalled so that the input buffer congests. Every packet carries a unique
//    payload; a scoreboard checks that each one leaves exactly once, on
//    Output Address equal to its destination, with its payload intact.
// Each mechanism of the design is counted and must occur at least once:
// bypass on request, bypass because of congestion, bypass refused by the
// permission mask, input rejection, rotation by interval, by packet count and
// by request, the secure-control stall of the input allocator, a merge
// conflict at the output, an aged request, a high-priority packet and an
// unavailable output port.
module tb_hnoc_akrao_top;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic RES;
  data_t port_in [N_PORTS];
  logic in_valid, in_prio, in_fast, in_ready, rekey_req, out_valid, out_ready, congested;
  addr_t in_add, out_add, out_addr;
  logic [N_PORTS-1:0] fwd_perm, port_ready, port_strobe;
  data_t out_data;
  data_t port_out [N_PORTS];
  epoch_t key_epoch;

  hnoc_akrao_top dut (.*);

  int checks = 0, failures = 0;
  int exp_dst [data_t][$];   // payload -> destinations still expected
  int sent = 0, delivered = 0;

  // mechanism counters
  int n_bypass_fast, n_bypass_cong, n_perm_refused, n_reject, n_stall, n_conflict;
  int n_aged, n_prio, n_port_blocked, n_rot_interval, n_rot_pkts, n_rot_req;

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitor: falling edge, all signals settled
  always @(negedge clk) begin
    if (!RES) begin
      if (in_valid && in_ready) begin
        data_t w;
        w = port_in[in_add];
        exp_dst[w].push_back(int'(out_add));
        sent++;
        if (in_prio) n_prio++;
      end
      if (dut.to_fwd && in_fast) n_bypass_fast++;
      if (dut.to_fwd && !in_fast) n_bypass_cong++;
      if (in_valid && in_fast && !fwd_perm[out_add]) n_perm_refused++;
      if (in_valid && !in_ready) n_reject++;
      if (dut.u_router.rotating && dut.isa_valid) n_stall++;
      if (dut.u_osab.conflict != '0) n_conflict++;
      if (dut.u_isabm.aged != '0) n_aged++;
      if ((dut.u_osab.empty & ~port_ready) != '0) n_port_blocked++;
      if (dut.u_router.rotating) begin
        if (rekey_req) n_rot_req++;
        else if (dut.u_router.u_keys.pkts >= 16) n_rot_pkts++;
        else n_rot_interval++;
      end
      if (out_valid && out_ready) begin
        delivered++;
        if (!exp_dst.exists(out_data))
          check(0, $sformatf("unexpected or duplicated payload %h", out_data));
        else begin
          int hit[$];
          hit = exp_dst[out_data].find_first_index(x) with (x == int'(out_addr));
          check(hit.size() == 1,
                $sformatf("payload %h left on port %0d, not a destination it was sent to", out_data, out_addr));
          if (hit.size() == 1) exp_dst[out_data].delete(hit[0]);
          if (exp_dst[out_data].size() == 0) exp_dst.delete(out_data);
        end
      end
    end
  end

  task automatic set_ports(input data_t a, b, c, d);
    port_in[0] = a; port_in[1] = b; port_in[2] = c; port_in[3] = d;
  endtask

  // inject one packet, waiting while it is refused
  task automatic inject(input int src, input int dst, input bit prio, input bit fast);
    in_add = addr_t'(src); out_add = addr_t'(dst); in_prio = prio; in_fast = fast;
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  task automatic drain(input int cycles);
    in_valid = 1'b0; out_ready = 1'b1; port_ready = '1;
    repeat (cycles) @(posedge clk);
    #1;
  endtask

  initial begin
    int lat;
    data_t tag;
    RES = 1'b1;
    in_valid = 1'b0; in_prio = 1'b0; in_fast = 1'b0; in_add = '0; out_add = '0;
    rekey_req = 1'b0; fwd_perm = 4'b1111; port_ready = '1; out_ready = 1'b1;
    set_ports(32'h14, 32'h1E, 32'h28, 32'h32);
    n_bypass_fast = 0; n_bypass_cong = 0; n_perm_refused = 0; n_reject = 0; n_stall = 0;
    n_conflict = 0; n_aged = 0; n_prio = 0; n_port_blocked = 0;
    n_rot_interval = 0; n_rot_pkts = 0; n_rot_req = 0;
    repeat (3) @(posedge clk);
    #1 RES = 1'b0;

    // ---- 1. reference run
    inject(1, 0, 0, 0);          // B -> A : 1E
    inject(1, 2, 0, 0);          // B -> C : 1E
    drain(10);
    check(port_out[0] == 32'h1E && port_out[2] == 32'h1E, "first phase: A and C show 1E");
    set_ports(32'h19, 32'h23, 32'h2D, 32'h38);
    inject(1, 0, 0, 0);          // B -> A : 23
    inject(2, 1, 0, 0);          // C -> B : 2D
    inject(2, 2, 0, 1);          // C -> C : 2D over the bypass
    drain(10);
    check(port_out[0] == 32'h23, $sformatf("port A = %h, expected 23", port_out[0]));
    check(port_out[1] == 32'h2D, $sformatf("port B = %h, expected 2D", port_out[1]));
    check(port_out[2] == 32'h2D, $sformatf("port C = %h, expected 2D", port_out[2]));
    check(port_out[3] == 32'h0,  "port D never written");

    // ---- 2. latency
    for (int path = 0; path < 2; path++) begin
      set_ports(32'h5000 + path, 0, 0, 0);
      in_add = 0; out_add = 3; in_prio = 0; in_fast = path[0]; in_valid = 1'b1;
      @(posedge clk); #1;
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 20) begin
        @(posedge clk); #1;
        lat++;
      end
      check(lat == (path ? 2 : 4), $sformatf("%s path latency %0d", path ? "bypass" : "normal", lat));
      drain(5);
    end

    // ---- 3. random traffic
    tag = 32'h1000_0000;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 250) % 4;   // 0: free, 1: output stalled, 2: some ports blocked, 3: free
      for (int p = 0; p < N_PORTS; p++) port_in[p] = $urandom;
      in_add = addr_t'($urandom);
      out_add = addr_t'($urandom);
      port_in[in_add] = tag;
      tag++;
      in_prio = ($urandom % 5) == 0;
      in_fast = ($urandom % 6) == 0;
      fwd_perm = (phase == 2) ? 4'b0111 : 4'b1111;
      in_valid = 1'b1;
      do begin
        out_ready  = (phase == 1) ? (($urandom % 8) == 0) : 1'b1;
        port_ready = (phase == 2) ? (4'($urandom) | 4'b0011) : 4'b1111;
        rekey_req  = ($urandom % 97) == 0;
        #1;
        if (in_ready) begin
          @(posedge clk); #1;
          break;
        end
        @(posedge clk); #1;
      end while (1);
      in_valid = 1'b0;
      if ($urandom % 3 == 0) begin
        @(posedge clk); #1;
      end
    end
    rekey_req = 1'b0;
    drain(200);

    check(exp_dst.size() == 0, $sformatf("%0d packets never delivered", exp_dst.size()));
    check(delivered == sent, $sformatf("delivered %0d of %0d", delivered, sent));

    $display("mechanisms: bypass_fast=%0d bypass_congestion=%0d perm_refused=%0d reject=%0d",
             n_bypass_fast, n_bypass_cong, n_perm_refused, n_reject);
    $display("            secure_stall=%0d merge_conflict=%0d aged=%0d high_prio=%0d port_blocked=%0d",
             n_stall, n_conflict, n_aged, n_prio, n_port_blocked);
    $display("            rotations: interval=%0d packets=%0d request=%0d",
             n_rot_interval, n_rot_pkts, n_rot_req);
    check(n_bypass_fast > 0,   "bypass on request happened");
    check(n_bypass_cong > 0,   "bypass because of congestion happened");
    check(n_perm_refused > 0,  "bypass refused by permission happened");
    check(n_reject > 0,        "input rejection happened");
    check(n_stall > 0,         "secure-control stall happened");
    check(n_conflict > 0,      "merge conflict happened");
    check(n_aged > 0,          "aged request happened");
    check(n_prio > 0,          "high-priority packets sent");
    check(n_port_blocked > 0,  "unavailable output port happened");
    check(n_rot_interval > 0,  "rotation by interval happened");
    check(n_rot_pkts > 0,      "rotation by packet count happened");
    check(n_rot_req > 0,       "rotation on request happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
