// tb_sync_fifo: random push/pop traffic against a queue model. Every cycle
// the fill level, full, empty and the head entry are compared with the
// model; pushes into a full FIFO and pops from an empty one must be ignored.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] wd, rd;
  logic [$clog2(D):0] cnt;
  logic [W-1:0] q[$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .push_i(push), .wr_data_i(wd), .pop_i(pop),
    .rd_data_o(rd), .full_o(full), .empty_o(empty), .count_o(cnt));

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
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check("empty", empty, q.size() == 0);
      check("full", full, q.size() == D);
      check("count", cnt, q.size());
      if (q.size() != 0) check("head", rd, q[0]);
      if (full) n_full++;
      if (empty) n_empty++;
      // bias toward filling in the first half and draining in the second
      push = ($urandom_range(0, 99) < (i < 1500 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < (i < 1500 ? 30 : 70));
      wd   = W'($urandom);
      @(posedge clk);
      #1;
      begin
        bit was_full;
        was_full = (q.size() == D);
        if (pop && q.size() != 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(wd);
      end
    end
    check("saw full", n_full > 0, 1);
    check("saw empty", n_empty > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
