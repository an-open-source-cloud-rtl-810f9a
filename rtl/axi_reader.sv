// axi_reader: input side of a PE cluster. It receives 512-bit data beats of
// task packages from the host and hands the packages, one per clock cycle,
// to the task broadcast that every PE of the cluster watches.
//
// A beat carries SLOTS = 512 / TW task packages, slot 0 in the least
// significant bits. A task package is {first state, last state, PE ID}; its
// width TW follows from the gene count of the network (state fields rounded
// up to whole bytes, 8-bit ID). A slot whose ID is all ones is empty and is
// skipped, so the host can send a partly filled beat. The reader holds one
// beat at a time: s_tready is high when no beat is held, a beat is taken on
// s_tvalid && s_tready, and then slots are offered in order on task_valid_o /
// task_data_o. A slot is retired when task_ready_i is high (the addressed PE
// accepted it, or no PE has that ID) or when it is empty. busy_o is high
// while a beat is held.
//
// The package fields, the byte-rounded state fields and the 512-bit channel
// follow the accelerator description. The channel here is a plain
// valid/ready beat stream (as the data channel of an AXI4 or AXI4-Stream
// port); address generation, bursts and the host-side DMA of the FPGA shell
// are not part of this block. The empty-slot marker is a choice of this
// design.
module axi_reader #(
  parameter grn_pkg::grn_model_e MODEL = grn_pkg::GRN_FIG2B,
  localparam int unsigned        N     = grn_pkg::model_genes(MODEL),
  localparam int unsigned        TW    = grn_pkg::task_w(N),
  localparam int unsigned        DW    = grn_pkg::AXI_DATA_W,
  localparam int unsigned        SLOTS = DW / TW,
  localparam int unsigned        SIW   = (SLOTS > 1) ? $clog2(SLOTS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // beat input
  input  logic          s_tvalid,
  output logic          s_tready,
  input  logic [DW-1:0] s_tdata,
  // task broadcast
  output logic          task_valid_o,
  output logic [TW-1:0] task_data_o,
  input  logic          task_ready_i,
  output logic          busy_o
);

  logic [DW-1:0]  beat;
  logic           have;
  logic [SIW-1:0] slot;
  logic [TW-1:0]  pkg;
  logic           pkg_empty, retire;

  assign pkg          = beat[int'(slot)*TW +: TW];
  assign pkg_empty    = (pkg[grn_pkg::ID_W-1:0] == grn_pkg::ID_EMPTY);
  assign task_valid_o = have && !pkg_empty;
  assign task_data_o  = pkg;
  assign retire       = have && (pkg_empty || task_ready_i);
  assign s_tready     = !have;
  assign busy_o       = have;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have <= 1'b0;
      slot <= '0;
      beat <= '0;
    end else if (s_tvalid && s_tready) begin
      beat <= s_tdata;
      have <= 1'b1;
      slot <= '0;
    end else if (retire) begin
      if (int'(slot) == SLOTS - 1) begin
        have <= 1'b0;
        slot <= '0;
      end else begin
        slot <= slot + 1'b1;
      end
    end
  end

endmodule
