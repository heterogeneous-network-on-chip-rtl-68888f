// tb_hnoc_router_akrao: self-checking test of the AKRAO router core.
//
// Runs with a 20-cycle rotation interval and a 5-packet limit so that many
// keys are used. First a single packet checks the two-cycle latency. Then
// 400 random packets are offered while the output lanes are randomly
// blocked and rekey requests arrive at random. Checked: every packet leaves
// on the lane of its destination, restored to clear, in per-destination
// order; a valid lane never holds the clear payload; no packet is accepted in
// a rotation cycle; rotations happened by interval, packet count and request.
module tb_hnoc_router_akrao;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic in_valid, in_ready, rekey_req, rotating;
  pkt_t in_pkt;
  logic [N_PORTS-1:0] out_valid, out_ready;
  pkt_t out_pkt [N_PORTS];
  pkt_t lane_obf [N_PORTS];
  epoch_t key_epoch;
  logic [31:0] rotations;

  pkt_t exp_q [N_PORTS][$];
  int checks = 0, failures = 0;
  int sent = 0, recv = 0, stalls = 0;

  always #5 clk = ~clk;

  hnoc_router_akrao #(.ROT_INTERVAL(20), .PKT_LIMIT(5)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pkt_t rnd_pkt();
    pkt_t p;
    p.prio = 1'($urandom);
    p.src  = addr_t'($urandom);
    p.dst  = addr_t'($urandom);
    p.data = $urandom;
    return p;
  endfunction

  // monitor on the falling edge: signals are stable there
  always @(negedge clk) begin
    if (!rst) begin
      if (rotating) begin
        stalls++;
        check(!in_ready, "no accept during a rotation cycle");
      end
      for (int d = 0; d < N_PORTS; d++) begin
        if (out_valid[d]) begin
          check(lane_obf[d].data != out_pkt[d].data, "crossbar lane holds an obfuscated payload");
          if (out_ready[d]) begin
            recv++;
            if (exp_q[d].size() == 0) check(0, $sformatf("unexpected packet on lane %0d", d));
            else begin
              pkt_t e;
              e = exp_q[d].pop_front();
              check(out_pkt[d] == e, $sformatf("lane %0d: got %h expected %h", d, out_pkt[d], e));
            end
          end
        end
      end
      if (in_valid && in_ready) begin
        exp_q[in_pkt.dst].push_back(in_pkt);
        sent++;
      end
    end
  end

  initial begin
    int lat;
    rst = 1'b1; in_valid = 1'b0; in_pkt = '0; rekey_req = 1'b0; out_ready = '1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // latency of one packet
    in_pkt = rnd_pkt(); in_pkt.dst = 2'd3; in_valid = 1'b1;
    #1 check(in_ready, "idle router accepts");
    @(posedge clk); #1;
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid[3] && lat < 10) begin
      @(posedge clk); #1;
      lat++;
    end
    check(lat == 2, $sformatf("latency %0d cycles, expected 2", lat));
    @(posedge clk); #1;

    // random traffic
    while (sent < 400) begin
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 4) != 0;
        in_pkt   = rnd_pkt();
      end
      out_ready = 4'($urandom) | 4'($urandom);
      rekey_req = ($urandom % 50) == 0;
      @(posedge clk); #1;
    end
    in_valid = 1'b0; rekey_req = 1'b0; out_ready = '1;
    repeat (10) @(posedge clk);
    #1;
    for (int d = 0; d < N_PORTS; d++)
      check(exp_q[d].size() == 0, $sformatf("lane %0d delivered everything", d));
    check(recv == sent, $sformatf("received %0d of %0d", recv, sent));
    $display("key rotations: %0d", rotations);
    check(rotations > 40, $sformatf("%0d key rotations", rotations));
    check(stalls > 0, "rotation stalls seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
