// tb_osab: self-checking test of the output switching allocator and buffer.
//
// Checked: a router packet and a forwarded packet offered to the same port in
// the same cycle are both stored, one per cycle, with the two paths taking
// turns; a full port queue refuses both paths; delivery skips ports that are
// not available; Output Data / Output Address match the stored packets in
// round-robin port order and arrival order per port; the port register takes
// the word on delivery, strobes once and then holds it.
module tb_osab;
  import hnoc_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [N_PORTS-1:0] rt_valid, rt_ready, port_ready, port_strobe, conflict;
  pkt_t rt_pkt [N_PORTS];
  logic fw_valid, fw_ready, out_valid, out_ready;
  pkt_t fw_pkt;
  data_t out_data;
  addr_t out_addr;
  data_t port_out [N_PORTS];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  osab #(.DEPTH(4)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic pkt_t mk(input int dst, input logic [31:0] d);
    pkt_t p;
    p.prio = 1'b0; p.src = 2'd0; p.dst = addr_t'(dst); p.data = d;
    return p;
  endfunction

  task automatic idle_inputs();
    rt_valid = '0; fw_valid = 1'b0;
    for (int d = 0; d < N_PORTS; d++) rt_pkt[d] = '0;
    fw_pkt = '0;
  endtask

  initial begin
    rst = 1'b1; out_ready = 1'b0; port_ready = '1;
    idle_inputs();
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // conflict on port 2: forwarding path first, router path next cycle
    rt_valid[2] = 1'b1; rt_pkt[2] = mk(2, 32'hA0);
    fw_valid = 1'b1;    fw_pkt = mk(2, 32'hF0);
    #1 check(conflict[2], "conflict seen on port 2");
    check(fw_ready && !rt_ready[2], "forwarding path wins the first conflict");
    @(posedge clk); #1;
    fw_pkt = mk(2, 32'hF1);
    check(conflict[2] && rt_ready[2] && !fw_ready, "router path wins the second conflict");
    @(posedge clk); #1;
    rt_pkt[2] = mk(2, 32'hA1);
    check(fw_ready && !rt_ready[2], "turns alternate");
    @(posedge clk); #1;
    fw_valid = 1'b0;
    check(rt_ready[2], "router alone is taken");
    @(posedge clk); #1;
    rt_pkt[2] = mk(2, 32'hA2);
    check(!rt_ready[2], "full port queue refuses");
    rt_valid = '0;

    // other ports without conflict, in the same cycle
    rt_valid[0] = 1'b1; rt_pkt[0] = mk(0, 32'hB0);
    fw_valid = 1'b1;    fw_pkt = mk(3, 32'hC0);
    #1 check(rt_ready[0] && fw_ready && conflict == '0, "different ports are filled in parallel");
    @(posedge clk); #1;
    idle_inputs();

    // delivery: port 2 unavailable at first
    port_ready = 4'b1011;
    out_ready  = 1'b1;
    #1 check(out_valid && out_addr == 2'd0 && out_data == 32'hB0, "port 0 delivered first");
    @(posedge clk); #1;
    check(port_out[0] == 32'hB0 && port_strobe[0], "port 0 register and strobe");
    check(out_valid && out_addr == 2'd3 && out_data == 32'hC0, "port 3 next, port 2 skipped");
    @(posedge clk); #1;
    check(!out_valid, "nothing deliverable while port 2 is unavailable");
    check(!port_strobe[0] && port_out[0] == 32'hB0, "port 0 holds its word");
    port_ready = '1;
    begin
      logic [31:0] exp2 [4] = '{32'hF0, 32'hA0, 32'hF1, 32'hA1};
      for (int i = 0; i < 4; i++) begin
        #1 check(out_valid && out_addr == 2'd2 && out_data == exp2[i],
                 $sformatf("port 2 word %0d: %h expected %h", i, out_data, exp2[i]));
        @(posedge clk);
      end
    end
    #1 check(port_out[2] == 32'hA1 && port_strobe[2], "port 2 register holds the last word");
    check(!out_valid, "all delivered");

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
