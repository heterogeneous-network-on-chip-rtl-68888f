// rr_arbiter: round-robin arbiter used by the input and output switching
// allocators.
//
// Grants one of N requesters (one-hot grant, combinational from req). The
// search starts at the pointer; when `advance` is high and a grant is given,
// the pointer moves to the requester after the winner, so every requester
// that keeps asking is served within N grants. Reset puts the pointer on 0.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,      // asynchronous, active high
  input  logic [N-1:0] req,
  input  logic         advance,  // the grant was used this cycle
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + int'(k)) % N);
      if (grant == '0 && req[idx]) begin
        grant[idx] = 1'b1;
        win        = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ptr <= '0;
    else if (advance && grant != '0) ptr <= (int'(win) == N - 1) ? '0 : win + 1'b1;
  end

endmodule
