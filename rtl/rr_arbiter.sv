// rr_arbiter: round-robin arbiter that picks which processing element's
// output FIFO sends its next result to the cluster's writer.
//
// Each requester raises req_i[i] while it holds a result. The arbiter grants
// the first requester at or after the priority pointer, searching upward and
// wrapping around (grant_o is one-hot, grant_idx_o its index, valid_o high
// when any request is present). The grant is combinational. When the granted
// result is taken (ack_i high in the same cycle), the pointer moves to the
// requester just after the granted one, so a PE that was served waits for
// every other requesting PE before it is served again. Reset (synchronous,
// active low) puts the pointer at requester 0.
//
// The round-robin policy is the accelerator's; the pointer update on
// acknowledge and the single-cycle grant are choices of this design.
module rr_arbiter #(
  parameter int unsigned N = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req_i,
  input  logic          ack_i,
  output logic [N-1:0]  grant_o,
  output logic [IW-1:0] grant_idx_o,
  output logic          valid_o
);

  logic [IW-1:0] ptr;

  always_comb begin
    logic [IW-1:0] idx;
    grant_o     = '0;
    grant_idx_o = '0;
    valid_o     = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = IW'((int'(ptr) + k) % N);
      if (!valid_o && req_i[idx]) begin
        valid_o      = 1'b1;
        grant_o[idx] = 1'b1;
        grant_idx_o  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (valid_o && ack_i) begin
      ptr <= (int'(grant_idx_o) == N - 1) ? '0 : grant_idx_o + 1'b1;
    end
  end

  // A grant is one-hot and only ever given to a requester.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant_o));
  assert property (@(posedge clk) disable iff (!rst_n) (grant_o & ~req_i) == '0);

endmodule
