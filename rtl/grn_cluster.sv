// grn_cluster: a cluster of GRN processing elements sharing one 512-bit
// host channel.
//
// The reader unpacks task packages {first state, last state, PE ID} from the
// incoming beats and broadcasts them. Every PE compares the ID with its own
// (0 .. N_PE-1) and, if its input FIFO has room, accepts the package; the
// broadcast waits while the addressed PE's FIFO is full, and a package whose
// ID names no PE of the cluster is dropped. Each PE computes the attractor of
// every state of its ranges and queues one result per state. The
// round-robin arbiter picks one PE holding a result per cycle, the
// multiplexer forwards that result to the writer, and the writer packs the
// results into 512-bit beats. When the whole cluster is idle (no beat held,
// no PE holding work) the writer is told to flush a partly filled beat.
//
// The reader / PEs / round-robin arbiter / writer structure, the per-PE ID
// and the cluster size of 32 follow the accelerator description; the
// broadcast handshake, the drop of unknown IDs and the flush on idle are
// choices of this design.
module grn_cluster #(
  parameter grn_pkg::grn_model_e MODEL     = grn_pkg::GRN_FIG2B,
  parameter int unsigned         N_PE      = 32,
  parameter int unsigned         IN_DEPTH  = 4,
  parameter int unsigned         OUT_DEPTH = 4,
  localparam int unsigned        N         = grn_pkg::model_genes(MODEL),
  localparam int unsigned        TW        = grn_pkg::task_w(N),
  localparam int unsigned        RW        = grn_pkg::result_w(N),
  localparam int unsigned        DW        = grn_pkg::AXI_DATA_W,
  localparam int unsigned        IW        = (N_PE > 1) ? $clog2(N_PE) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // task beats from the host
  input  logic          s_tvalid,
  output logic          s_tready,
  input  logic [DW-1:0] s_tdata,
  // result beats to the host
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [DW-1:0] m_tdata,
  output logic          m_tlast,
  output logic          busy_o
);

  logic                    task_valid, task_ready, id_known;
  logic [TW-1:0]           task_data;
  logic [N_PE-1:0]         pe_accept, pe_res_valid, pe_pop, pe_busy;
  logic [N_PE-1:0][RW-1:0] pe_res_data;
  logic [N_PE-1:0]         grant;
  logic [IW-1:0]           grant_idx;
  logic                    arb_valid, wr_ready, reader_busy, writer_busy;

  axi_reader #(.MODEL(MODEL)) u_reader (
    .clk          (clk),
    .rst_n        (rst_n),
    .s_tvalid     (s_tvalid),
    .s_tready     (s_tready),
    .s_tdata      (s_tdata),
    .task_valid_o (task_valid),
    .task_data_o  (task_data),
    .task_ready_i (task_ready),
    .busy_o       (reader_busy)
  );

  assign id_known   = (int'(task_data[grn_pkg::ID_W-1:0]) < N_PE);
  assign task_ready = (|pe_accept) || !id_known;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    grn_pe #(
      .MODEL     (MODEL),
      .PE_ID     (i),
      .IN_DEPTH  (IN_DEPTH),
      .OUT_DEPTH (OUT_DEPTH)
    ) u_pe (
      .clk          (clk),
      .rst_n        (rst_n),
      .task_valid_i (task_valid),
      .task_data_i  (task_data),
      .accept_o     (pe_accept[i]),
      .res_valid_o  (pe_res_valid[i]),
      .res_data_o   (pe_res_data[i]),
      .res_pop_i    (pe_pop[i]),
      .busy_o       (pe_busy[i])
    );
  end

  rr_arbiter #(.N(N_PE)) u_arb (
    .clk         (clk),
    .rst_n       (rst_n),
    .req_i       (pe_res_valid),
    .ack_i       (wr_ready),
    .grant_o     (grant),
    .grant_idx_o (grant_idx),
    .valid_o     (arb_valid)
  );

  assign pe_pop = grant & {N_PE{wr_ready}};

  axi_writer #(.MODEL(MODEL)) u_writer (
    .clk         (clk),
    .rst_n       (rst_n),
    .res_valid_i (arb_valid),
    .res_ready_o (wr_ready),
    .res_data_i  (pe_res_data[grant_idx]),
    .flush_i     (!reader_busy && !(|pe_busy)),
    .m_tvalid    (m_tvalid),
    .m_tready    (m_tready),
    .m_tdata     (m_tdata),
    .m_tlast     (m_tlast),
    .busy_o      (writer_busy)
  );

  assign busy_o = reader_busy || (|pe_busy) || writer_busy;

  // At most one PE takes a broadcast package.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(pe_accept));

endmodule
