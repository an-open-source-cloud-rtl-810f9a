// grn_model: GRN model circuit, the Boolean update functions of one gene
// regulatory network evaluated in synchronous mode.
//
// Every gene's update function is evaluated in parallel from the current
// state, so next_o is the whole network state one time step later
// (x(t+1) = F(x(t))). The block is purely combinational; the register that
// holds the state lives in the attractor search engine, which therefore
// advances the network by one step per clock cycle.
//
// The first gene of a network is the most significant state bit, so the
// state written "10" for genes (a, b) is 2'b10 with a = 1, b = 0.
//
// Parameters: MODEL selects the network (see grn_pkg::grn_model_e);
// N is derived from it.
// Ports: state_i (N bits, current state), next_o (N bits, next state).
//
// In the accelerator this circuit is produced by a generator from the
// user's equations. The networks built in here are the example networks
// whose equations are given in full: the two 2-gene networks of the state
// diagram examples and the 3-gene synchronous example. The choice of
// selecting them with a parameter is this design's own.
module grn_model #(
  parameter grn_pkg::grn_model_e MODEL = grn_pkg::GRN_FIG2B,
  localparam int unsigned        N     = grn_pkg::model_genes(MODEL)
) (
  input  logic [N-1:0] state_i,
  output logic [N-1:0] next_o
);

  if (MODEL == grn_pkg::GRN_FIG1C) begin : g_fig1c
    // a(t+1) = !b(t); b(t+1) = a(t) & b(t)
    always_comb begin
      next_o[1] = ~state_i[0];
      next_o[0] = state_i[1] & state_i[0];
    end
  end else if (MODEL == grn_pkg::GRN_FIG1D) begin : g_fig1d
    // a(t+1) = !b(t); b(t+1) = !a(t)
    always_comb begin
      next_o[1] = ~state_i[0];
      next_o[0] = ~state_i[1];
    end
  end else begin : g_fig2b
    // v1 = v1 & v2; v2 = v1 | v3; v3 = v2 & ~v3
    always_comb begin
      next_o[2] = state_i[2] & state_i[1];
      next_o[1] = state_i[2] | state_i[0];
      next_o[0] = state_i[1] & ~state_i[0];
    end
  end

endmodule
