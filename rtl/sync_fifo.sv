// sync_fifo: single-clock first-in first-out buffer, used as the input and
// output control FIFOs of a processing element.
//
// The FIFOs let a PE accept several task packages while it is still busy and
// hold finished results until the cluster's round-robin arbiter grants the
// PE, so PEs with uneven work do not stall one another.
//
// Storage is a DEPTH-entry register array with read and write pointers one
// bit wider than the address, so full and empty are told apart by the extra
// bit. A push is taken when push_i is high and full_o is low; a pop when
// pop_i is high and empty_o is low; both may happen in the same cycle.
// rd_data_o shows the oldest entry whenever empty_o is low (first-word
// fall-through), and count_o gives the fill level. Reset is synchronous and
// active low, and empties the FIFO.
//
// The control FIFOs are part of the accelerator; their depth, fall-through
// read and reset are choices of this design. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push_i,
  input  logic [WIDTH-1:0]         wr_data_i,
  input  logic                     pop_i,
  output logic [WIDTH-1:0]         rd_data_o,
  output logic                     full_o,
  output logic                     empty_o,
  output logic [$clog2(DEPTH):0]   count_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign do_push   = push_i && !full_o;
  assign do_pop    = pop_i && !empty_o;
  assign empty_o   = (wr_ptr == rd_ptr);
  assign full_o    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign rd_data_o = mem[rd_ptr[AW-1:0]];
  assign count_o   = ($clog2(DEPTH)+1)'(wr_ptr - rd_ptr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= wr_data_i;
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("sync_fifo: DEPTH must be a power of two of at least 2");
  end

endmodule
