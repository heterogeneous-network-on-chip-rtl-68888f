// tb_akrao_key_rotation: self-checking test of the adaptive key rotation unit.
//
// Runs with a 10-cycle interval and a 4-packet limit. A reference LFSR
// (x^32 + x^22 + x^2 + x + 1, stepped every cycle from the seed) gives the key
// each rotation must load. Checked: the key after reset; a rotation exactly
// when the interval expires; a rotation after the packet limit; an immediate
// rotation on request; a rotation held back while the epoch it would
// overwrite is busy; the history keeping older keys readable by epoch.
module tb_akrao_key_rotation;
  import hnoc_pkg::*;

  localparam key_t SEED = 32'hACE1_2468;

  logic clk = 1'b0;
  logic rst;
  logic pkt_fire, rekey_req, rotating;
  logic [N_KEYS-1:0] epoch_busy;
  key_t key;
  epoch_t epoch;
  key_t key_hist [N_KEYS];
  logic [31:0] rotations;

  key_t ref_lfsr;
  key_t ref_hist [N_KEYS];
  epoch_t ref_epoch;
  int cyc;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  akrao_key_rotation #(.ROT_INTERVAL(10), .PKT_LIMIT(4), .SEED(SEED)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference: free-running LFSR; on an observed rotation the captured
  // value must be the LFSR state of that cycle
  always @(posedge clk) begin
    if (rst) begin
      ref_lfsr  <= SEED;
      ref_epoch <= '0;
      cyc       <= 0;
    end else begin
      cyc <= cyc + 1;
      if (rotating) begin
        ref_hist[ref_epoch + 1'b1] <= ref_lfsr;
        ref_epoch <= ref_epoch + 1'b1;
      end
      ref_lfsr <= (ref_lfsr >> 1) ^ (ref_lfsr[0] ? 32'h8020_0003 : 32'h0);
    end
  end

  task automatic wait_rotation(output int cycles);
    cycles = 0;
    while (!rotating && cycles < 100) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    int c;
    key_t k_before;
    rst = 1'b1; pkt_fire = 1'b0; rekey_req = 1'b0; epoch_busy = '0;
    ref_hist[0] = SEED;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    check(key == SEED && epoch == 0, "key after reset is the seed");

    // 1. interval: the rotation cycle is the 10th cycle after reset
    wait_rotation(c);
    check(c == 9, $sformatf("interval rotation in cycle %0d after reset, expected 9", c));
    @(posedge clk); #1;
    check(epoch == 1, "epoch 1 after first rotation");
    check(key == ref_hist[1], "new key is the LFSR state of the rotation cycle");
    check(key != SEED, "key changed");
    check(key_hist[0] == SEED, "old key still in history");

    // 2. packet limit: 4 packets then a rotation in the next cycle
    repeat (4) begin
      pkt_fire = 1'b1; @(posedge clk); #1;
    end
    pkt_fire = 1'b0;
    check(rotating, "rotation after 4 packets");
    @(posedge clk); #1;
    check(epoch == 2 && key == ref_hist[2], "epoch 2 key from the LFSR");

    // 3. request
    @(posedge clk); #1;
    check(!rotating, "no rotation without a reason");
    rekey_req = 1'b1; #1;
    check(rotating, "rotation on request in the same cycle");
    @(posedge clk); #1;
    rekey_req = 1'b0;
    check(epoch == 3 && key == ref_hist[3], "epoch 3 key from the LFSR");

    // 4. held back while the next epoch is in use
    epoch_busy = 8'b0001_0000;   // epoch 4 still busy
    rekey_req  = 1'b1;
    repeat (3) begin
      #1 check(!rotating, "rotation held while the next epoch is busy");
      @(posedge clk);
    end
    #1 check(epoch == 3, "epoch unchanged while held");
    epoch_busy = '0; #1;
    check(rotating, "rotation proceeds once the epoch is free");
    @(posedge clk); #1;
    rekey_req = 1'b0;
    check(epoch == 4 && key == ref_hist[4], "epoch 4 key from the LFSR");
    for (int e = 0; e <= 4; e++)
      check(key_hist[e] == ref_hist[e], $sformatf("history entry %0d", e));
    check(rotations == 4, "four rotations counted");

    // 5. wrap around the 3-bit epoch
    k_before = key;
    for (int r = 0; r < 8; r++) begin
      rekey_req = 1'b1; @(posedge clk); #1;
    end
    rekey_req = 1'b0;
    check(epoch == 4 && key != k_before && key == ref_hist[4], "epoch wraps after 8 rotations with a new key");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
