// axi_writer: output side of a PE cluster. It collects the result packages
// the round-robin arbiter passes on and sends them to the host packed into
// 512-bit data beats.
//
// Each result occupies a slot of FLAG_W + RW bits: a flag byte (bit 0 set
// for a valid result) above the RW-bit result package {start state,
// attractor state, T, L}. A beat holds SLOTS = 512 / (FLAG_W + RW) slots,
// slot 0 in the least significant bits; unused slots are all zero. Results
// are taken on res_valid_i && res_ready_o into a packing buffer. A full
// buffer moves to the output register, which drives m_tvalid / m_tdata until
// m_tready. When flush_i is high (the cluster has gone idle) a partly filled
// buffer is sent too; such a beat has m_tlast set. Reset is synchronous,
// active low.
//
// The 512-bit channel and the writer's role follow the accelerator
// description; the slot layout, the flag byte, the flush on idle and the
// valid/ready beat stream (in place of the AXI4 address and response
// channels of the FPGA shell) are choices of this design.
module axi_writer #(
  parameter grn_pkg::grn_model_e MODEL = grn_pkg::GRN_FIG2B,
  localparam int unsigned        N     = grn_pkg::model_genes(MODEL),
  localparam int unsigned        RW    = grn_pkg::result_w(N),
  localparam int unsigned        FW    = grn_pkg::FLAG_W,
  localparam int unsigned        SLW   = FW + RW,
  localparam int unsigned        DW    = grn_pkg::AXI_DATA_W,
  localparam int unsigned        SLOTS = DW / SLW,
  localparam int unsigned        CNW   = $clog2(SLOTS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // result input
  input  logic          res_valid_i,
  output logic          res_ready_o,
  input  logic [RW-1:0] res_data_i,
  input  logic          flush_i,
  // beat output
  output logic          m_tvalid,
  input  logic          m_tready,
  output logic [DW-1:0] m_tdata,
  output logic          m_tlast,
  output logic          busy_o
);

  logic [DW-1:0]  pack;
  logic [CNW-1:0] count;
  logic           out_free, transfer, take;

  assign out_free    = !m_tvalid || m_tready;
  assign transfer    = out_free && ((int'(count) == SLOTS) || (flush_i && count != '0));
  assign res_ready_o = (int'(count) < SLOTS) && !transfer;
  assign take        = res_valid_i && res_ready_o;
  assign busy_o      = (count != '0) || m_tvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pack     <= '0;
      count    <= '0;
      m_tvalid <= 1'b0;
      m_tdata  <= '0;
      m_tlast  <= 1'b0;
    end else begin
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (transfer) begin
        m_tdata  <= pack;
        m_tvalid <= 1'b1;
        m_tlast  <= (int'(count) < SLOTS);
        pack     <= '0;
        count    <= '0;
      end else if (take) begin
        pack[int'(count)*SLW +: SLW] <= {FW'(1), res_data_i};
        count                        <= count + 1'b1;
      end
    end
  end

  // An offered beat stays unchanged until the host takes it.
  assert property (@(posedge clk) disable iff (!rst_n)
    m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));

endmodule
