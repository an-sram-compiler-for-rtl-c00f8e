// Round-robin arbiter over N requesters.
// grant is one-hot (or zero when nothing requests) and is combinational in
// req. The search starts one past the last granted index, so every
// steadily requesting input is served within N grants. The priority
// pointer moves only on a cycle where advance is high and something was
// granted.
module rr_arbiter #(
  parameter int unsigned N = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;      // highest priority index
  logic [IW-1:0] win;

  always_comb begin
    grant = '0;
    win   = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (grant == '0 && req[idx]) begin
        grant[idx] = 1'b1;
        win        = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance && |grant)
      ptr <= (int'(win) == N - 1) ? '0 : win + IW'(1);
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("rr_arbiter: grant not one-hot");

endmodule
