// tb_attractor_search_engine: every initial state of the 3-gene and of the
// 2-gene (a = ~b, b = a & b) networks is searched, first one state per task
// with the result taken at once, then as ranges (including one that wraps
// past the largest state) with random back-pressure on the result side.
// Each result {start, attractor, T, L} is compared with a brute-force walk
// of the reference model. For single-state tasks the number of cycles from
// taking the task to offering the result must be 2 + k + T + L, where k is
// the number of one-two steps until the walkers meet (k >= 1, x_k == x_2k).
module tb_attractor_search_engine;
  import grn_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // 3-gene network
  logic        tv3, tr3, rv3, rr3, busy3;
  logic [2:0]  tf3, tl3, rs3, ra3;
  logic [31:0] rt3, rl3;
  attractor_search_engine #(.MODEL(GRN_FIG2B)) dut3 (
    .clk(clk), .rst_n(rst_n), .task_valid_i(tv3), .task_ready_o(tr3),
    .task_first_i(tf3), .task_last_i(tl3), .res_valid_o(rv3), .res_ready_i(rr3),
    .res_start_o(rs3), .res_attr_o(ra3), .res_t_o(rt3), .res_l_o(rl3), .busy_o(busy3));

  // 2-gene network
  logic        tv2, tr2, rv2, rr2, busy2;
  logic [1:0]  tf2, tl2, rs2, ra2;
  logic [31:0] rt2, rl2;
  attractor_search_engine #(.MODEL(GRN_FIG1C)) dut2 (
    .clk(clk), .rst_n(rst_n), .task_valid_i(tv2), .task_ready_o(tr2),
    .task_first_i(tf2), .task_last_i(tl2), .res_valid_o(rv2), .res_ready_i(rr2),
    .res_start_o(rs2), .res_attr_o(ra2), .res_t_o(rt2), .res_l_o(rl2), .busy_o(busy2));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0d expected %0d", what, cycles, got, exp);
    end
  endtask

  function automatic int meet_steps(grn_model_e m, int unsigned x0);
    int unsigned s, f;
    int k = 0;
    s = x0; f = x0;
    do begin
      s = grn_ref_pkg::ref_next(m, s);
      f = grn_ref_pkg::ref_next(m, grn_ref_pkg::ref_next(m, f));
      k++;
    end while (s != f);
    return k;
  endfunction

  task automatic check_result(grn_model_e m, int unsigned start, int unsigned attr,
                              int unsigned t, int unsigned l, int unsigned exp_start);
    grn_ref_pkg::ref_result_t r;
    r = grn_ref_pkg::ref_attractor(m, exp_start);
    check($sformatf("start m%0d", m), start, exp_start);
    check($sformatf("attr m%0d x0=%0d", m, exp_start), attr, r.attr);
    check($sformatf("T m%0d x0=%0d", m, exp_start), t, r.t);
    check($sformatf("L m%0d x0=%0d", m, exp_start), l, r.l);
  endtask

  // run one range on the 3-gene engine, collecting results with back-pressure
  task automatic run3(int unsigned first, int unsigned last, bit stall, bit timed);
    int unsigned x;
    int t0, lat;
    @(negedge clk);
    tv3 = 1; tf3 = 3'(first); tl3 = 3'(last);
    @(negedge clk);
    t0 = cycles;
    tv3 = 0;
    x = first;
    forever begin
      rr3 = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      if (rv3 && rr3) begin
        if (timed) begin
          grn_ref_pkg::ref_result_t r;
          r = grn_ref_pkg::ref_attractor(GRN_FIG2B, x);
          lat = cycles - t0;
          check($sformatf("latency x0=%0d", x), lat, 2 + meet_steps(GRN_FIG2B, x) + r.t + r.l);
        end
        check_result(GRN_FIG2B, rs3, ra3, rt3, rl3, x);
        if (x == last) break;
        x = (x + 1) % 8;
      end
      @(negedge clk);
    end
    @(negedge clk);
    rr3 = 0;
    check("idle after range", busy3, 0);
  endtask

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tv3 = 0; rr3 = 0; tf3 = 0; tl3 = 0;
    tv2 = 0; rr2 = 0; tf2 = 0; tl2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) run3(s, s, 0, 1);
    run3(0, 7, 1, 0);
    run3(6, 1, 1, 0);
    run3(3, 5, 0, 0);
    // 2-gene network: the whole state space as one range
    @(negedge clk);
    tv2 = 1; tf2 = 0; tl2 = 3;
    @(negedge clk);
    tv2 = 0;
    for (int x = 0; x < 4; ) begin
      rr2 = 1;
      #1;
      if (rv2) begin
        check_result(GRN_FIG1C, rs2, ra2, rt2, rl2, x);
        x++;
      end
      @(negedge clk);
    end
    rr2 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
