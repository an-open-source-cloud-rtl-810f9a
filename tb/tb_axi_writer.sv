// tb_axi_writer: 23 results are offered with random gaps while the host side
// accepts beats with random back-pressure; once all are offered, flush is
// raised as the cluster would when idle. The results must come out packed
// five to a beat, slot 0 first, each slot with flag byte 1, unused slots
// zero; only the final, partly filled beat (three results) carries the
// last-beat flag.
module tb_axi_writer;
  import grn_pkg::*;
  localparam int RW = result_w(3), SLW = FLAG_W + RW, SLOTS = AXI_DATA_W / SLW;
  localparam int NRES = 23;
  int checks = 0, failures = 0, cycles = 0, beats = 0;
  logic clk = 0, rst_n = 0;
  logic rv, rr, flush, mv, mr, ml, busy;
  logic [RW-1:0] rd;
  logic [AXI_DATA_W-1:0] md;
  logic [RW-1:0] expq[$];
  bit done = 0;

  axi_writer #(.MODEL(GRN_FIG2B)) dut (.clk(clk), .rst_n(rst_n), .res_valid_i(rv), .res_ready_o(rr),
    .res_data_i(rd), .flush_i(flush), .m_tvalid(mv), .m_tready(mr), .m_tdata(md), .m_tlast(ml),
    .busy_o(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0h expected %0h", what, cycles, got, exp);
    end
  endtask

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv = 0; rd = '0; flush = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NRES; i++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      rv = 1; rd = RW'({$urandom, $urandom, $urandom});
      #1;
      while (!rr) begin
        @(negedge clk); #1;
      end
      expq.push_back(rd);
      @(negedge clk);
      rv = 0;
    end
    flush = 1;
    done = 1;
  end

  initial begin
    int got_results = 0;
    mr = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      mr = $urandom_range(0, 2) != 0;
      #1;
      if (mv && mr) begin
        int n;
        n = 0;
        beats++;
        for (int s = 0; s < SLOTS; s++) begin
          logic [SLW-1:0] slot;
          slot = md[s*SLW +: SLW];
          if (slot[SLW-1 -: FLAG_W] == 8'd1) begin
            logic [RW-1:0] e;
            n++;
            e = expq.pop_front();
            check("result", 32'(slot[RW-1:0] == e), 1);
          end else begin
            check("unused slot zero", 32'(slot == '0), 1);
          end
        end
        check("beat tlast", ml, n < SLOTS);
        if (n < SLOTS) check("final beat count", n, NRES % SLOTS);
        got_results += n;
      end
      if (done && got_results == NRES && !busy) break;
    end
    check("beats", beats, (NRES + SLOTS - 1) / SLOTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
