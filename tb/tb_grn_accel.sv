// tb_grn_accel: end-to-end run of the whole accelerator at its default size,
// 4 clusters of 32 PEs with the 3-gene network. Each cluster gets its own
// host stream of task beats: every PE receives several random ranges (so
// the whole state space is searched many times over), with empty slots and
// packages for PE IDs that do not exist mixed in, after a burst of ranges
// for a single PE that overflows its input FIFO. All four clusters run at
// once; results are collected per cluster with random back-pressure,
// checked against the brute-force reference and counted per initial state.
// The run must show, in every cluster: the broadcast waiting on a full input
// FIFO, several PEs competing for the arbiter, an unknown ID dropped, an
// empty slot skipped, a host-side stall and a flushed partial beat.
module tb_grn_accel;
  import grn_pkg::*;
  localparam grn_model_e M = GRN_FIG2B;
  localparam int NC = 4, NPE = 32, NS = 8;
  localparam int TW = task_w(3), RW = result_w(3), SLW = FLAG_W + RW;
  localparam int TSLOTS = AXI_DATA_W / TW, RSLOTS = AXI_DATA_W / SLW;
  localparam int TASKS_PER_PE = 6;

  int checks = 0, failures = 0, cycles = 0;
  int n_stall[NC], n_contend[NC], n_drop[NC], n_empty[NC], n_hoststall[NC], n_flush[NC];
  int exp_cnt[NC][NS], got_cnt[NC][NS];
  int exp_total[NC], got_total[NC];
  bit sent_all[NC];
  bit coll_done[NC];

  logic clk = 0, rst_n = 0;
  logic [NC-1:0] sv, sr, mv, mr, ml, busy;
  logic [NC-1:0][AXI_DATA_W-1:0] sd, md;

  grn_accel dut (
    .clk(clk), .rst_n(rst_n), .s_tvalid(sv), .s_tready(sr), .s_tdata(sd),
    .m_tvalid(mv), .m_tready(mr), .m_tdata(md), .m_tlast(ml), .busy_o(busy));

  always #2 clk = ~clk;
  always @(posedge clk) cycles++;

  for (genvar c = 0; c < NC; c++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (dut.g_cluster[c].u_cluster.task_valid && !dut.g_cluster[c].u_cluster.task_ready) n_stall[c]++;
        if ($countones(dut.g_cluster[c].u_cluster.pe_res_valid) > 1) n_contend[c]++;
        if (dut.g_cluster[c].u_cluster.task_valid && !dut.g_cluster[c].u_cluster.id_known) n_drop[c]++;
        if (dut.g_cluster[c].u_cluster.u_reader.have && dut.g_cluster[c].u_cluster.u_reader.pkg_empty) n_empty[c]++;
        if (mv[c] && !mr[c]) n_hoststall[c]++;
        if (mv[c] && mr[c] && ml[c]) n_flush[c]++;
      end
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0d expected %0d", what, cycles, got, exp);
    end
  endtask

  task automatic send(int c);
    logic [TW-1:0] pkgs[$];
    // a burst of whole-space ranges for one PE, more than its input FIFO holds
    for (int k = 0; k < 8; k++) begin
      pkgs.push_back({8'd0, 8'(NS - 1), 8'(c)});
      for (int x = 0; x < NS; x++) begin
        exp_cnt[c][x]++;
        exp_total[c]++;
      end
    end
    for (int k = 0; k < TASKS_PER_PE; k++)
      for (int p = 0; p < NPE + 1; p++) begin
        int unsigned f, l, id;
        f  = $urandom_range(0, NS - 1);
        l  = (f + $urandom_range(0, NS - 1)) % NS;
        id = (p == NPE) ? NPE + 3 : p;
        if ($urandom_range(0, 6) == 0) pkgs.push_back({8'd0, 8'd0, ID_EMPTY});
        pkgs.push_back({8'(f), 8'(l), 8'(id)});
        if (id < NPE)
          for (int unsigned x = f; ; x = (x + 1) % NS) begin
            exp_cnt[c][x]++;
            exp_total[c]++;
            if (x == l) break;
          end
      end
    // make the result count leave a partly filled last beat
    if (exp_total[c] % RSLOTS == 0) begin
      pkgs.push_back({8'd0, 8'd0, 8'd1});
      exp_cnt[c][0]++;
      exp_total[c]++;
    end
    while (pkgs.size() != 0) begin
      logic [AXI_DATA_W-1:0] beat;
      beat = '0;
      for (int s = 0; s < TSLOTS; s++)
        beat[s*TW +: TW] = (pkgs.size() != 0) ? pkgs.pop_front() : {8'd0, 8'd0, ID_EMPTY};
      @(negedge clk);
      sv[c] = 1; sd[c] = beat;
      #1;
      while (!sr[c]) begin @(negedge clk); #1; end
      @(negedge clk);
      sv[c] = 0;
    end
    sent_all[c] = 1;
  endtask

  task automatic collect(int c);
    forever begin
      @(negedge clk);
      mr[c] = $urandom_range(0, 3) != 0;
      #1;
      if (mv[c] && mr[c]) begin
        for (int s = 0; s < RSLOTS; s++) begin
          logic [SLW-1:0] slot;
          slot = md[c][s*SLW +: SLW];
          if (slot[SLW-1 -: FLAG_W] == 8'd1) begin
            grn_ref_pkg::ref_result_t r;
            int unsigned x;
            x = slot[79:72];
            r = grn_ref_pkg::ref_attractor(M, x);
            check("attr", 32'(slot[71:64]), r.attr);
            check("T", slot[63:32], r.t);
            check("L", slot[31:0], r.l);
            if (x < NS) got_cnt[c][x]++;
            got_total[c]++;
          end
        end
      end
      if (sent_all[c] && got_total[c] >= exp_total[c] && !busy[c]) break;
    end
    coll_done[c] = 1;
  endtask

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NC; c++) begin
      exp_total[c] = 0; got_total[c] = 0; sent_all[c] = 0; coll_done[c] = 0;
      n_stall[c] = 0; n_contend[c] = 0; n_drop[c] = 0; n_empty[c] = 0;
      n_hoststall[c] = 0; n_flush[c] = 0;
      for (int i = 0; i < NS; i++) begin exp_cnt[c][i] = 0; got_cnt[c][i] = 0; end
    end
    sv = '0; sd = '0; mr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      automatic int cc = c;
      fork
        send(cc);
        collect(cc);
      join_none
    end
    for (int c = 0; c < NC; c++) wait (coll_done[c]);
    for (int c = 0; c < NC; c++) begin
      for (int i = 0; i < NS; i++)
        check($sformatf("cluster %0d results for state %0d", c, i), got_cnt[c][i], exp_cnt[c][i]);
      $display("cluster %0d: results=%0d fifo_stall=%0d contention=%0d dropped=%0d empty_slot=%0d host_stall=%0d flush=%0d",
               c, got_total[c], n_stall[c], n_contend[c], n_drop[c], n_empty[c], n_hoststall[c], n_flush[c]);
      check("input FIFO stall seen", n_stall[c] > 0, 1);
      check("arbiter contention seen", n_contend[c] > 0, 1);
      check("unknown ID dropped", n_drop[c] > 0, 1);
      check("empty slot skipped", n_empty[c] > 0, 1);
      check("host stall seen", n_hoststall[c] > 0, 1);
      check("flushed beat seen", n_flush[c] > 0, 1);
    end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
