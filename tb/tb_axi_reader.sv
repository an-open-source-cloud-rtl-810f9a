// tb_axi_reader: beats of 21 task packages, some slots marked empty
// (ID all ones), are offered with random gaps; the task side accepts with
// random back-pressure. The packages that come out must be exactly the
// non-empty slots, in slot order and beat order, and a new beat may only be
// taken once the previous one has been worked through.
module tb_axi_reader;
  import grn_pkg::*;
  localparam int TW = task_w(3), SLOTS = AXI_DATA_W / TW;
  int checks = 0, failures = 0, cycles = 0, empties = 0;
  logic clk = 0, rst_n = 0;
  logic sv, sr, tv, tr, busy;
  logic [AXI_DATA_W-1:0] sd;
  logic [TW-1:0] td;
  logic [TW-1:0] expq[$];
  bit done = 0;

  axi_reader #(.MODEL(GRN_FIG2B)) dut (.clk(clk), .rst_n(rst_n), .s_tvalid(sv), .s_tready(sr),
    .s_tdata(sd), .task_valid_o(tv), .task_data_o(td), .task_ready_i(tr), .busy_o(busy));

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
    sv = 0; sd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 12; b++) begin
      logic [AXI_DATA_W-1:0] beat;
      beat = '0;
      for (int s = 0; s < SLOTS; s++) begin
        logic [TW-1:0] p;
        p = TW'({$urandom, $urandom});
        if ($urandom_range(0, 3) == 0) begin
          p[7:0] = ID_EMPTY;
          empties++;
        end else begin
          if (p[7:0] == ID_EMPTY) p[7:0] = 8'h00;
          expq.push_back(p);
        end
        beat[s*TW +: TW] = p;
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      sv = 1; sd = beat;
      #1;
      while (!sr) begin
        @(negedge clk); #1;
      end
      @(negedge clk);
      sv = 0;
    end
    done = 1;
  end

  initial begin
    tr = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      tr = $urandom_range(0, 2) != 0;
      #1;
      if (tv && tr) begin
        if (expq.size() == 0) begin
          checks++; failures++;
          $display("FAIL unexpected package");
        end else begin
          logic [TW-1:0] e;
          e = expq.pop_front();
          check("package", 32'(td), 32'(e));
        end
      end
      if (tv) check("no empty slot offered", td[7:0] != ID_EMPTY, 1);
      if (done && expq.size() == 0 && !busy) break;
    end
    check("empty slots seen", empties > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
