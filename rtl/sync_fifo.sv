// sync_fifo: single-clock first-in first-out queue used for the packet
// buffers of the router.
//
// DEPTH entries of type T held in a register array with wrapping read and
// write pointers. `dout` shows the oldest entry whenever `empty` is low (first
// word fall-through). A push is taken at the clock edge when `push` is high;
// the caller must not push into a full queue unless it pops in the same
// cycle. `count` is the occupancy after reset (0) and after every edge.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst,  // asynchronous, active high
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           dout,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [PW-1:0] wp, rp;

  wire do_pop  = pop && !empty;
  wire do_push = push && (!full || do_pop);

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign dout  = mem[rp];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

  // Storage has no reset: an entry is only read after it was written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(push && full && !pop))
    else $error("sync_fifo: push into a full queue");

endmodule
