// tb_rr_arbiter: random request patterns against a round-robin model. The
// model keeps its own priority pointer; each cycle the expected grant is the
// first requester at or after the pointer (wrapping), and the pointer moves
// past the granted requester when the grant is acknowledged. With every
// requester active and ack held high the grants must visit 0, 1, ..., N-1 in
// turn.
module tb_rr_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  logic [$clog2(N)-1:0] idx;
  logic ack, valid;
  int ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req_i(req), .ack_i(ack),
    .grant_o(grant), .grant_idx_o(idx), .valid_o(valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s @%0d: got %0h expected %0h", what, cycles, got, exp);
    end
  endtask

  function automatic int expected(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (p + k) % N;
    return -1;
  endfunction

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    req = '0; ack = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // all requesting, always acknowledged: strict rotation
    for (int i = 0; i < 2 * N; i++) begin
      @(negedge clk);
      req = '1; ack = 1;
      #1;
      check("rotation", idx, i % N);
      @(posedge clk);
    end
    ptr = 0;
    // reset the pointer and run random traffic
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req = N'($urandom);
      ack = $urandom_range(0, 3) != 0;
      #1;
      e = expected(req, ptr);
      check("valid", valid, e >= 0);
      if (e >= 0) begin
        check("grant", grant, N'(1) << e);
        check("idx", idx, e);
      end else begin
        check("no grant", grant, 0);
      end
      @(posedge clk);
      if (e >= 0 && ack) ptr = (e + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
