// grn_accel: Boolean gene regulatory network attractor accelerator kernel.
//
// The kernel holds NUM_CLUSTERS * PES_PER_CLUSTER copies of one network's
// model circuit, each in its own processing element, so that many initial
// states are searched at once. The PEs are grouped into clusters, and each
// cluster owns one 512-bit host channel: the FPGA shell offers four such
// channels, and the main configuration is 128 copies in four clusters of 32.
// The host assigns work by sending task packages {first state, last state,
// PE ID} on a cluster's input channel and receives one result package
// {start state, attractor state, transient T, attractor length L} per
// initial state on that cluster's output channel. Clusters are independent;
// busy_o[c] is high while cluster c holds work.
//
// Ports are arrays indexed by cluster: s_* carry task beats in, m_* carry
// result beats out, each with valid/ready.
//
// Copies, cluster size and the 512-bit channels follow the accelerator
// description; the built-in network (MODEL) defaults to the 3-gene
// synchronous example, as the networks evaluated with the accelerator are
// generated from equations that are not part of this RTL.
module grn_accel #(
  parameter grn_pkg::grn_model_e MODEL           = grn_pkg::GRN_FIG2B,
  parameter int unsigned         NUM_CLUSTERS    = 4,
  parameter int unsigned         PES_PER_CLUSTER = 32,
  parameter int unsigned         IN_DEPTH        = 4,
  parameter int unsigned         OUT_DEPTH       = 4,
  localparam int unsigned        DW              = grn_pkg::AXI_DATA_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NUM_CLUSTERS-1:0]          s_tvalid,
  output logic [NUM_CLUSTERS-1:0]          s_tready,
  input  logic [NUM_CLUSTERS-1:0][DW-1:0]  s_tdata,
  output logic [NUM_CLUSTERS-1:0]          m_tvalid,
  input  logic [NUM_CLUSTERS-1:0]          m_tready,
  output logic [NUM_CLUSTERS-1:0][DW-1:0]  m_tdata,
  output logic [NUM_CLUSTERS-1:0]          m_tlast,
  output logic [NUM_CLUSTERS-1:0]          busy_o
);

  for (genvar c = 0; c < NUM_CLUSTERS; c++) begin : g_cluster
    grn_cluster #(
      .MODEL     (MODEL),
      .N_PE      (PES_PER_CLUSTER),
      .IN_DEPTH  (IN_DEPTH),
      .OUT_DEPTH (OUT_DEPTH)
    ) u_cluster (
      .clk      (clk),
      .rst_n    (rst_n),
      .s_tvalid (s_tvalid[c]),
      .s_tready (s_tready[c]),
      .s_tdata  (s_tdata[c]),
      .m_tvalid (m_tvalid[c]),
      .m_tready (m_tready[c]),
      .m_tdata  (m_tdata[c]),
      .m_tlast  (m_tlast[c]),
      .busy_o   (busy_o[c])
    );
  end

endmodule
