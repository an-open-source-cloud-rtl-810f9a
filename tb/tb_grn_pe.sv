// tb_grn_pe: a PE with ID 3 and a 2-entry input FIFO watches a broadcast of
// task packages addressed to it and to other PEs. Packages for other IDs
// must never be accepted; packages for ID 3 are held on the broadcast until
// accepted, which stalls while the input FIFO is full. Results are drained
// with random back-pressure and compared, in order, with the brute-force
// reference for every state of every accepted range.
module tb_grn_pe;
  import grn_pkg::*;
  localparam grn_model_e M = GRN_FIG2B;
  localparam int TW = task_w(3), RW = result_w(3);
  int checks = 0, failures = 0, cycles = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  logic tv, acc, rv, pop, busy;
  logic [TW-1:0] td;
  logic [RW-1:0] rd;
  int unsigned expq[$];
  bit producing = 1;

  grn_pe #(.MODEL(M), .PE_ID(3), .IN_DEPTH(2), .OUT_DEPTH(2)) dut (
    .clk(clk), .rst_n(rst_n), .task_valid_i(tv), .task_data_i(td), .accept_o(acc),
    .res_valid_o(rv), .res_data_o(rd), .res_pop_i(pop), .busy_o(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0d expected %0d", what, cycles, got, exp);
    end
  endtask

  initial begin
    wait (cycles == 50000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer
  initial begin
    tv = 0; td = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int unsigned f, l, id;
      f  = $urandom_range(0, 7);
      l  = (f + $urandom_range(0, 3)) % 8;
      id = ($urandom_range(0, 2) == 0) ? $urandom_range(4, 9) : 3;
      @(negedge clk);
      tv = 1; td = {8'(f), 8'(l), 8'(id)};
      #1;
      if (id != 3) begin
        check("foreign id not accepted", acc, 0);
      end else begin
        while (!acc) begin
          stalls++;
          @(negedge clk); #1;
        end
        for (int unsigned x = f; ; x = (x + 1) % 8) begin
          expq.push_back(x);
          if (x == l) break;
        end
      end
      @(negedge clk);
      tv = 0;
    end
    producing = 0;
  end

  // consumer
  initial begin
    pop = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      pop = $urandom_range(0, 3) == 0;
      #1;
      if (pop && rv) begin
        grn_ref_pkg::ref_result_t r;
        int unsigned x;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected result");
        end else begin
          x = expq.pop_front();
          r = grn_ref_pkg::ref_attractor(M, x);
          check("start", 32'(rd[79:72]), x);
          check("attr", 32'(rd[71:64]), r.attr);
          check("T", rd[63:32], r.t);
          check("L", rd[31:0], r.l);
        end
      end
      if (!producing && expq.size() == 0 && !busy) break;
    end
    check("input FIFO full stall seen", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
