// tb_fwd_buffer: self-checking test of the forwarding (bypass) buffer.
//
// Checks that a packet for a destination outside the permission mask is
// refused, that the buffer stops accepting at its occupancy threshold (3 of 4
// entries), that packets come out unchanged and in arrival order one cycle
// after they were taken, and that it accepts again once it has drained.
module tb_fwd_buffer;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [N_PORTS-1:0] perm;
  logic in_valid, in_ready, above_thresh, out_valid, out_ready;
  pkt_t in_pkt, out_pkt;
  logic [2:0] count;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fwd_buffer #(.DEPTH(4), .THRESH(3)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pkt_t mk(input int dst, input logic [31:0] d);
    pkt_t p;
    p.prio = d[0]; p.src = addr_t'(d[5:4]); p.dst = addr_t'(dst); p.data = d;
    return p;
  endfunction

  task automatic offer(input pkt_t p, output bit acc);
    in_pkt = p; in_valid = 1'b1;
    #1 acc = in_ready;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  initial begin
    bit acc;
    pkt_t sent [3];
    rst = 1'b1; in_valid = 1'b0; out_ready = 1'b0; in_pkt = '0; perm = 4'b1011;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    offer(mk(2, 32'hDEAD_0002), acc);
    check(!acc, "destination 2 not permitted: refused");
    check(!out_valid, "nothing stored after a refusal");

    sent[0] = mk(0, 32'h1234_5670);
    sent[1] = mk(3, 32'h89AB_CDE1);
    sent[2] = mk(1, 32'h0F0F_0F03);
    offer(sent[0], acc); check(acc, "first packet taken");
    check(out_valid && out_pkt == sent[0], "first packet offered one cycle later");
    offer(sent[1], acc); check(acc, "second packet taken");
    offer(sent[2], acc); check(acc, "third packet taken");
    check(count == 3 && above_thresh, "threshold reached at 3");
    offer(mk(0, 32'h5555_0000), acc);
    check(!acc, "refused at threshold although a slot is free");

    out_ready = 1'b1;
    for (int i = 0; i < 3; i++) begin
      #1 check(out_valid && out_pkt == sent[i], $sformatf("packet %0d unchanged and in order", i));
      @(posedge clk);
    end
    #1 check(!out_valid && count == 0, "drained");
    offer(mk(3, 32'h7777_0000), acc);
    check(acc, "accepts again after draining");

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
