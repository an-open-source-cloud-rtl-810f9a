// attractor_search_engine: finds, for every initial state of an assigned
// range, the attractor the network reaches, the number of steps to reach it
// (transient T) and its length (L).
//
// The search is the one-two steps cycle detection (a slow walker advances
// one step and a fast walker two steps per iteration until they meet). The
// engine holds the two walkers in registers and three copies of the GRN model
// circuit: f(slow), f(fast) and f(f(fast)), so each phase below takes one
// clock cycle per iteration:
//   RUN1  slow <= f(slow), fast <= f(f(fast)) until the two are equal.
//   RUN2  slow restarts at the initial state; both advance one step per cycle
//         while counting T; where they meet is the first attractor state.
//   RUN3  fast walks around the attractor from there, counting L, until it
//         returns to that state.
// For initial state x0 with transient T and length L the engine spends
// about (T + L) cycles in RUN1, T + 1 in RUN2 and L in RUN3, plus one cycle
// to start each state and one to hand over its result.
//
// Interface: a task is taken from task_first_i/task_last_i when task_valid_i
// and task_ready_o are both high; the engine then works through the states
// first, first+1, ... last (wrapping modulo 2^N) and offers one result per
// state on res_* with valid/ready. A result is {start state, attractor state
// (the first state of the attractor reached), T, L}. busy_o is high while a
// task is in progress. Reset is synchronous, active low.
//
// The algorithm, the range of states per task, and the T and L registers are
// the accelerator's; the three-model datapath, the state sequencing, the
// result layout and the 32-bit counters are choices of this design.
module attractor_search_engine #(
  parameter grn_pkg::grn_model_e MODEL = grn_pkg::GRN_FIG2B,
  localparam int unsigned        N     = grn_pkg::model_genes(MODEL),
  localparam int unsigned        CW    = grn_pkg::CNT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // task input
  input  logic          task_valid_i,
  output logic          task_ready_o,
  input  logic [N-1:0]  task_first_i,
  input  logic [N-1:0]  task_last_i,
  // result output
  output logic          res_valid_o,
  input  logic          res_ready_i,
  output logic [N-1:0]  res_start_o,
  output logic [N-1:0]  res_attr_o,
  output logic [CW-1:0] res_t_o,
  output logic [CW-1:0] res_l_o,
  output logic          busy_o
);

  typedef enum logic [2:0] {
    S_IDLE,   // waiting for a task
    S_START,  // load both walkers with the current initial state
    S_RUN1,   // slow one step, fast two steps, until they meet
    S_RUN2,   // count the transient T
    S_RUN3,   // count the attractor length L
    S_EMIT    // offer the result
  } state_e;

  state_e        st;
  logic [N-1:0]  cur, last;       // current initial state, last of the range
  logic [N-1:0]  slow, fast;      // the two walkers
  logic [N-1:0]  f_slow, f_fast, ff_fast;
  logic [N-1:0]  attr;
  logic [CW-1:0] t_reg, l_reg;    // transient and attractor length

  grn_model #(.MODEL(MODEL)) u_f_slow  (.state_i(slow),   .next_o(f_slow));
  grn_model #(.MODEL(MODEL)) u_f_fast  (.state_i(fast),   .next_o(f_fast));
  grn_model #(.MODEL(MODEL)) u_ff_fast (.state_i(f_fast), .next_o(ff_fast));

  assign task_ready_o = (st == S_IDLE);
  assign busy_o       = (st != S_IDLE);
  assign res_valid_o  = (st == S_EMIT);
  assign res_start_o  = cur;
  assign res_attr_o   = attr;
  assign res_t_o      = t_reg;
  assign res_l_o      = l_reg;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st    <= S_IDLE;
      cur   <= '0;
      last  <= '0;
      slow  <= '0;
      fast  <= '0;
      attr  <= '0;
      t_reg <= '0;
      l_reg <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (task_valid_i) begin
            cur  <= task_first_i;
            last <= task_last_i;
            st   <= S_START;
          end
        end
        S_START: begin
          slow <= cur;
          fast <= cur;
          st   <= S_RUN1;
        end
        S_RUN1: begin
          slow <= f_slow;
          fast <= ff_fast;
          if (f_slow == ff_fast) begin
            slow  <= cur;
            t_reg <= '0;
            st    <= S_RUN2;
          end
        end
        S_RUN2: begin
          if (slow == fast) begin
            attr  <= slow;
            fast  <= f_slow;
            l_reg <= CW'(1);
            st    <= S_RUN3;
          end else begin
            slow  <= f_slow;
            fast  <= f_fast;
            t_reg <= t_reg + 1'b1;
          end
        end
        S_RUN3: begin
          if (fast == slow) begin
            st <= S_EMIT;
          end else begin
            fast  <= f_fast;
            l_reg <= l_reg + 1'b1;
          end
        end
        S_EMIT: begin
          if (res_ready_i) begin
            if (cur == last) begin
              st <= S_IDLE;
            end else begin
              cur <= cur + 1'b1;
              st  <= S_START;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A result, once offered, stays unchanged until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    res_valid_o && !res_ready_i |=> res_valid_o && $stable(res_start_o) && $stable(res_t_o) && $stable(res_l_o));

endmodule
