// grn_pe: one processing element of the accelerator, one copy of the GRN.
//
// The PE watches the cluster's task broadcast. A task package is
// {first state, last state, PE ID} with each state field SW bits wide (the
// gene count rounded up to whole bytes) and an ID_W-bit ID, most significant
// field first. When the package's ID equals PE_ID and the input control FIFO
// has room, the PE raises accept_o and stores the range in that FIFO. The
// attractor search engine takes ranges from the input FIFO and pushes one
// result per initial state into the output control FIFO, which the cluster
// drains through its round-robin arbiter (res_valid_o / res_pop_i).
//
// A result package is {start state, attractor state, T, L}: two SW-bit state
// fields (zero-extended from N genes) followed by two CNT_W-bit counters.
// busy_o is high while the PE holds any work: a queued task, a search in
// progress or a result not yet sent.
//
// The structure (input FIFO with ID check, search engine, output FIFO) is the
// accelerator's; FIFO depths, the accept handshake and the package layout
// are choices of this design. The upper bits of a state field beyond the N
// genes are ignored on input and zero on output.
module grn_pe #(
  parameter grn_pkg::grn_model_e MODEL     = grn_pkg::GRN_FIG2B,
  parameter int unsigned         PE_ID     = 0,
  parameter int unsigned         IN_DEPTH  = 4,
  parameter int unsigned         OUT_DEPTH = 4,
  localparam int unsigned        N         = grn_pkg::model_genes(MODEL),
  localparam int unsigned        SW        = grn_pkg::state_field_w(N),
  localparam int unsigned        TW        = grn_pkg::task_w(N),
  localparam int unsigned        RW        = grn_pkg::result_w(N),
  localparam int unsigned        CW        = grn_pkg::CNT_W,
  localparam int unsigned        IDW       = grn_pkg::ID_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // task broadcast from the reader
  input  logic          task_valid_i,
  input  logic [TW-1:0] task_data_i,
  output logic          accept_o,
  // result towards the arbiter / writer
  output logic          res_valid_o,
  output logic [RW-1:0] res_data_o,
  input  logic          res_pop_i,
  output logic          busy_o
);

  typedef struct packed {
    logic [SW-1:0]  first;
    logic [SW-1:0]  last;
    logic [IDW-1:0] id;
  } task_pkg_t;

  typedef struct packed {
    logic [SW-1:0] start;
    logic [SW-1:0] attr;
    logic [CW-1:0] t;
    logic [CW-1:0] l;
  } result_pkg_t;

  task_pkg_t   tsk;
  result_pkg_t res_in;

  logic           in_full, in_empty, out_full, out_empty;
  logic [2*N-1:0] in_rd;
  logic           eng_task_ready, eng_res_valid, eng_busy;
  logic [N-1:0]   eng_start, eng_attr;
  logic [CW-1:0]  eng_t, eng_l;

  assign tsk      = task_pkg_t'(task_data_i);
  assign accept_o = task_valid_i && (tsk.id == IDW'(PE_ID)) && !in_full;

  // Input control FIFO: ranges addressed to this PE.
  sync_fifo #(.WIDTH(2*N), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .push_i    (accept_o),
    .wr_data_i ({tsk.first[N-1:0], tsk.last[N-1:0]}),
    .pop_i     (eng_task_ready),
    .rd_data_o (in_rd),
    .full_o    (in_full),
    .empty_o   (in_empty),
    .count_o   ()
  );

  attractor_search_engine #(.MODEL(MODEL)) u_engine (
    .clk          (clk),
    .rst_n        (rst_n),
    .task_valid_i (!in_empty),
    .task_ready_o (eng_task_ready),
    .task_first_i (in_rd[2*N-1:N]),
    .task_last_i  (in_rd[N-1:0]),
    .res_valid_o  (eng_res_valid),
    .res_ready_i  (!out_full),
    .res_start_o  (eng_start),
    .res_attr_o   (eng_attr),
    .res_t_o      (eng_t),
    .res_l_o      (eng_l),
    .busy_o       (eng_busy)
  );

  always_comb begin
    res_in.start = SW'(eng_start);
    res_in.attr  = SW'(eng_attr);
    res_in.t     = eng_t;
    res_in.l     = eng_l;
  end

  // Output control FIFO: results waiting for the round-robin slot.
  sync_fifo #(.WIDTH(RW), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .push_i    (eng_res_valid),
    .wr_data_i (res_in),
    .pop_i     (res_pop_i),
    .rd_data_o (res_data_o),
    .full_o    (out_full),
    .empty_o   (out_empty),
    .count_o   ()
  );

  assign res_valid_o = !out_empty;
  assign busy_o      = !in_empty || eng_busy || !out_empty;

endmodule
