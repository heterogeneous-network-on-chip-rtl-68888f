// tb_obf_crossbar: self-checking test of the obfuscating crossbar.
//
// Loads a key history of eight distinct keys, sends obfuscated packets under
// different epochs to every lane and checks that: the lane register holds the
// obfuscated packet (never the clear one), the lane output is the clear
// packet restored with its own epoch's key, a blocked lane refuses only
// packets routed to it while other lanes keep flowing, and epoch_busy marks
// the epochs held in the lanes.
module tb_obf_crossbar;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic in_valid, in_ready;
  pkt_t in_obf;
  epoch_t in_epoch;
  logic [N_PORTS-1:0] in_route, out_valid, out_ready;
  key_t key_hist [N_KEYS];
  pkt_t out_pkt [N_PORTS];
  pkt_t lane_obf [N_PORTS];
  logic [N_KEYS-1:0] epoch_busy;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obf_crossbar dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pkt_t mk(input int dst, input logic [31:0] d);
    pkt_t p;
    p.prio = 1'b0; p.src = addr_t'(3 - dst); p.dst = addr_t'(dst); p.data = d;
    return p;
  endfunction

  // independent reference of the XOR obfuscation
  function automatic pkt_t xor_key(input pkt_t p, input key_t k);
    return pkt_t'({p.prio, p.src ^ k[3:2], p.dst ^ k[1:0], p.data ^ k});
  endfunction

  task automatic send(input pkt_t clear, input epoch_t e, output bit acc);
    in_obf = xor_key(clear, key_hist[e]);
    in_epoch = e;
    in_route = '0; in_route[clear.dst] = 1'b1;
    in_valid = 1'b1;
    #1 acc = in_ready;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    bit acc;
    pkt_t p [N_PORTS];
    rst = 1'b1; in_valid = 1'b0; in_obf = '0; in_epoch = '0; in_route = 4'b0001;
    out_ready = '0;
    for (int e = 0; e < N_KEYS; e++) key_hist[e] = 32'h9E37_79B9 * (e + 3) ^ (e << 20);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // one packet per lane, epochs 0..3
    for (int d = 0; d < N_PORTS; d++) begin
      p[d] = mk(d, 32'hC0DE_0000 + d);
      send(p[d], epoch_t'(d + 2), acc);
      check(acc, $sformatf("lane %0d accepts", d));
      check(out_valid[d], $sformatf("lane %0d valid one cycle later", d));
      check(lane_obf[d] == xor_key(p[d], key_hist[d + 2]), $sformatf("lane %0d holds the obfuscated packet", d));
      check(lane_obf[d].data != p[d].data, $sformatf("lane %0d payload not in clear", d));
      check(out_pkt[d] == p[d], $sformatf("lane %0d restores the clear packet", d));
    end
    check(epoch_busy == 8'b0011_1100, $sformatf("busy epochs %b", epoch_busy));

    // lanes all blocked: a new packet to lane 1 is refused
    send(mk(1, 32'h1111_1111), 3'd6, acc);
    check(!acc, "blocked lane refuses");
    check(out_pkt[1] == p[1], "blocked lane keeps its packet");

    // release lane 2 only: a packet to lane 2 passes while lane 1 stays blocked
    out_ready = 4'b0100;
    send(mk(2, 32'h2222_2222), 3'd7, acc);
    check(acc, "free lane accepts while another is blocked");
    check(out_pkt[2] == mk(2, 32'h2222_2222), "lane 2 carries the new packet, restored with epoch 7");
    check(out_pkt[1] == p[1], "lane 1 unchanged");
    check(epoch_busy[7] && !epoch_busy[4], "epoch 7 busy, epoch 4 released");

    // drain all
    out_ready = '1;
    @(posedge clk); #1;
    check(out_valid == '0 && epoch_busy == '0, "all lanes drained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
