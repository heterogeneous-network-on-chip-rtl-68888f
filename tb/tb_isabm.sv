// tb_isabm: self-checking test of the input switching allocator and buffer.
//
// Fills the destination queues with dispatch blocked and checks admission
// (full queue rejected, normal-priority packet rejected under congestion when
// its queue is half full, high-priority one still accepted), the occupancy
// count and the congestion flag. Then releases dispatch and compares the
// dispatch order with the order worked out by hand from the rules: aged
// requests first, high priority first, round-robin between queues, arrival
// order inside a queue. Last, a queue starved by a stream of high-priority
// packets must be served once its request has aged.
module tb_isabm;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic in_valid, in_ready, congested, out_valid, out_ready;
  pkt_t in_pkt, out_pkt;
  logic [$clog2(N_PORTS*4+1)-1:0] occupancy;
  logic [N_PORTS-1:0] aged;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  isabm #(.DEPTH(4), .CONG_THRESH(12), .AGE_LIMIT(8)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pkt_t mk(input int dst, input logic [31:0] d, input bit prio);
    pkt_t p;
    p.prio = prio; p.src = 2'd0; p.dst = addr_t'(dst); p.data = d;
    return p;
  endfunction

  // offer one packet for one cycle; returns whether it was accepted
  task automatic offer(input pkt_t p, output bit acc);
    in_pkt   = p;
    in_valid = 1'b1;
    #1;
    acc = in_ready;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  logic [31:0] expected [15] = '{32'h100, 32'h110, 32'h120, 32'h130,
                                 32'h101, 32'h111, 32'h121, 32'h131,
                                 32'h132, 32'h102, 32'h112, 32'h122,
                                 32'h103, 32'h113, 32'h123};

  initial begin
    bit acc;
    int n;
    rst = 1'b1; in_valid = 1'b0; out_ready = 1'b0; in_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // queue 0: four accepted, fifth rejected (full)
    for (int i = 0; i < 4; i++) begin
      offer(mk(0, 32'h100 + i, 0), acc);
      check(acc, $sformatf("q0 packet %0d accepted", i));
    end
    offer(mk(0, 32'h1FF, 0), acc);
    check(!acc, "full queue 0 rejects");
    check(occupancy == 4, "occupancy 4");
    check(!congested, "not congested at 4");

    for (int q = 1; q < 3; q++)
      for (int i = 0; i < 4; i++) begin
        offer(mk(q, 32'h100 + 16 * q + i, 0), acc);
        check(acc, "q1/q2 accepted");
      end
    check(occupancy == 12, "occupancy 12");
    check(congested, "congested at threshold 12");

    offer(mk(3, 32'h130, 0), acc); check(acc, "normal packet, queue empty, accepted");
    offer(mk(3, 32'h131, 0), acc); check(acc, "normal packet, queue at 1, accepted");
    offer(mk(3, 32'h1EE, 0), acc); check(!acc, "normal packet rejected: congested and half full");
    offer(mk(3, 32'h132, 1), acc); check(acc, "high-priority packet accepted under congestion");
    check(occupancy == 15, "occupancy 15");
    check(aged == 4'b0011, $sformatf("queues 0,1 aged (waited 8 cycles), queues 2,3 not yet (%b)", aged));

    // dispatch
    out_ready = 1'b1;
    n = 0;
    while (n < 15) begin
      #1;
      check(out_valid, "dispatch valid while packets are held");
      check(out_pkt.data == expected[n],
            $sformatf("dispatch %0d: got %h expected %h", n, out_pkt.data, expected[n]));
      n++;
      @(posedge clk);
    end
    #1;
    check(!out_valid, "empty after 15 dispatches");
    check(occupancy == 0, "occupancy back to 0");

    // aging: a normal packet in q1 against a steady stream of high-priority q0
    out_ready = 1'b0;
    offer(mk(0, 32'hC0, 1), acc); check(acc, "high-priority q0 packet accepted");
    offer(mk(0, 32'hC1, 1), acc); check(acc, "high-priority q0 packet accepted");
    offer(mk(1, 32'hA1, 0), acc); check(acc, "aging packet accepted");
    out_ready = 1'b1;
    begin
      int waited = 0;
      bit served = 0;
      while (!served && waited < 20) begin
        in_pkt = mk(0, 32'hB0 + waited, 1);
        in_valid = 1'b1;
        #1;
        if (out_valid && out_pkt.data == 32'hA1) served = 1;
        @(posedge clk); #1;
        waited++;
      end
      in_valid = 1'b0;
      check(served, "starved request is served");
      check(waited >= 8 && waited <= 11,
            $sformatf("starved request served after aging (%0d cycles)", waited));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
