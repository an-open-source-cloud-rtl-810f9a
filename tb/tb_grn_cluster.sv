// tb_grn_cluster: end-to-end run of one cluster of 4 PEs with 2-entry input
// FIFOs. The host side sends beats of task packages (random ranges for
// random PEs, some empty slots, and two packages for a PE ID the cluster
// does not have), then collects the result beats with random back-pressure.
// Every result is checked against the brute-force reference, and the number
// of results per initial state must equal the number of times that state
// was assigned to an existing PE. The run must show: the broadcast waiting
// on a full input FIFO, several PEs competing for the arbiter, a package for
// an unknown PE dropped, an empty slot skipped, a host-side stall and a
// flushed partial beat.
module tb_grn_cluster;
  import grn_pkg::*;
  localparam grn_model_e M = GRN_FIG2B;
  localparam int NPE = 4, NS = 8;
  localparam int TW = task_w(3), RW = result_w(3), SLW = FLAG_W + RW;
  localparam int TSLOTS = AXI_DATA_W / TW, RSLOTS = AXI_DATA_W / SLW;
  localparam int NTASK = 60;

  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_contend = 0, n_drop = 0, n_empty = 0, n_hoststall = 0, n_flush = 0;
  int exp_cnt[NS], got_cnt[NS];
  int exp_total = 0, got_total = 0;
  bit sent_all = 0;

  logic clk = 0, rst_n = 0;
  logic sv, sr, mv, mr, ml, busy;
  logic [AXI_DATA_W-1:0] sd, md;

  grn_cluster #(.MODEL(M), .N_PE(NPE), .IN_DEPTH(2), .OUT_DEPTH(2)) dut (
    .clk(clk), .rst_n(rst_n), .s_tvalid(sv), .s_tready(sr), .s_tdata(sd),
    .m_tvalid(mv), .m_tready(mr), .m_tdata(md), .m_tlast(ml), .busy_o(busy));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      if (dut.task_valid && !dut.task_ready) n_stall++;
      if ($countones(dut.pe_res_valid) > 1) n_contend++;
      if (dut.task_valid && !dut.id_known) n_drop++;
      if (dut.u_reader.have && dut.u_reader.pkg_empty) n_empty++;
      if (mv && !mr) n_hoststall++;
      if (mv && mr && ml) n_flush++;
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0d expected %0d", what, cycles, got, exp);
    end
  endtask

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host: task beats
  initial begin
    logic [TW-1:0] pkgs[$];
    for (int i = 0; i < NS; i++) begin exp_cnt[i] = 0; got_cnt[i] = 0; end
    for (int i = 0; i < NTASK; i++) begin
      int unsigned f, l, id;
      f  = $urandom_range(0, NS - 1);
      l  = (f + $urandom_range(0, NS - 1)) % NS;
      id = (i == 5 || i == 40) ? NPE + 1 : $urandom_range(0, NPE - 1);
      if ($urandom_range(0, 4) == 0) pkgs.push_back({8'd0, 8'd0, ID_EMPTY});
      pkgs.push_back({8'(f), 8'(l), 8'(id)});
      if (id < NPE)
        for (int unsigned x = f; ; x = (x + 1) % NS) begin
          exp_cnt[x]++;
          exp_total++;
          if (x == l) break;
        end
    end
    sv = 0; sd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (pkgs.size() != 0) begin
      logic [AXI_DATA_W-1:0] beat;
      beat = '0;
      for (int s = 0; s < TSLOTS; s++)
        beat[s*TW +: TW] = (pkgs.size() != 0) ? pkgs.pop_front() : {8'd0, 8'd0, ID_EMPTY};
      @(negedge clk);
      sv = 1; sd = beat;
      #1;
      while (!sr) begin @(negedge clk); #1; end
      @(negedge clk);
      sv = 0;
    end
    sent_all = 1;
  end

  // host: result beats
  initial begin
    mr = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      mr = $urandom_range(0, 3) != 0;
      #1;
      if (mv && mr) begin
        for (int s = 0; s < RSLOTS; s++) begin
          logic [SLW-1:0] slot;
          slot = md[s*SLW +: SLW];
          if (slot[SLW-1 -: FLAG_W] == 8'd1) begin
            grn_ref_pkg::ref_result_t r;
            int unsigned x;
            x = slot[79:72];
            r = grn_ref_pkg::ref_attractor(M, x);
            check("attr", 32'(slot[71:64]), r.attr);
            check("T", slot[63:32], r.t);
            check("L", slot[31:0], r.l);
            if (x < NS) got_cnt[x]++;
            got_total++;
          end
        end
      end
      if (sent_all && got_total >= exp_total && !busy) break;
    end
    for (int i = 0; i < NS; i++) check($sformatf("results for state %0d", i), got_cnt[i], exp_cnt[i]);
    $display("mechanisms: fifo_stall=%0d contention=%0d dropped=%0d empty_slot=%0d host_stall=%0d flush=%0d",
             n_stall, n_contend, n_drop, n_empty, n_hoststall, n_flush);
    check("input FIFO stall seen", n_stall > 0, 1);
    check("arbiter contention seen", n_contend > 0, 1);
    check("unknown ID dropped", n_drop > 0, 1);
    check("empty slot skipped", n_empty > 0, 1);
    check("host stall seen", n_hoststall > 0, 1);
    check("flushed beat seen", n_flush > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
