// tb_grn_model: exhaustive check of the GRN model circuit. For each built-in
// network every state is applied and the next state is compared with the
// equations of the reference model. The state diagrams of the two 2-gene
// examples are also checked edge by edge: 00->10, 01->00, 10->10, 11->01 for
// a = ~b, b = a & b, and 00->11, 11->00, 01->01, 10->10 for a = ~b, b = ~a
// (taken from the equations: 01 and 10 are fixed points of them).
module tb_grn_model;
  import grn_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] s1c, n1c, s1d, n1d;
  logic [2:0] s2b, n2b;

  grn_model #(.MODEL(GRN_FIG1C)) u_1c (.state_i(s1c), .next_o(n1c));
  grn_model #(.MODEL(GRN_FIG1D)) u_1d (.state_i(s1d), .next_o(n1d));
  grn_model #(.MODEL(GRN_FIG2B)) u_2b (.state_i(s2b), .next_o(n2b));

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      s1c = 2'(s); s1d = 2'(s);
      #1;
      check($sformatf("fig1c %0d", s), n1c, grn_ref_pkg::ref_next(GRN_FIG1C, s));
      check($sformatf("fig1d %0d", s), n1d, grn_ref_pkg::ref_next(GRN_FIG1D, s));
    end
    for (int s = 0; s < 8; s++) begin
      s2b = 3'(s);
      #1;
      check($sformatf("fig2b %0d", s), n2b, grn_ref_pkg::ref_next(GRN_FIG2B, s));
    end
    // state diagram edges printed for the two 2-gene examples
    s1c = 2'b00; #1 check("1c 00", n1c, 2'b10);
    s1c = 2'b01; #1 check("1c 01", n1c, 2'b00);
    s1c = 2'b10; #1 check("1c 10", n1c, 2'b10);
    s1c = 2'b11; #1 check("1c 11", n1c, 2'b01);
    s1d = 2'b00; #1 check("1d 00", n1d, 2'b11);
    s1d = 2'b11; #1 check("1d 11", n1d, 2'b00);
    s1d = 2'b01; #1 check("1d 01", n1d, 2'b01);
    s1d = 2'b10; #1 check("1d 10", n1d, 2'b10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
