// grn_pkg: types and constants shared by the Boolean gene regulatory network
// (GRN) attractor accelerator.
//
// The accelerator is generated per network: the GRN model circuit holds the
// update functions of one network. This package names the networks that are
// built into grn_model (the small example networks whose update functions are
// fully known) and gives the helper functions that derive every field width
// from the chosen network:
//   * a state field is the gene count rounded up to whole bytes;
//   * a task package is {first state, last state, PE ID};
//   * a result package is {start state, attractor state, transient T, length L}.
// The byte rounding of state fields and the 512-bit AXI4 channel width follow
// the accelerator description; the 8-bit PE ID field, the 32-bit T and L
// counters and the result layout are choices of this design.
package grn_pkg;

  // Networks the GRN model circuit can be generated for.
  //   GRN_FIG1C : a = ~b,        b = a & b          (one fixed-point attractor)
  //   GRN_FIG1D : a = ~b,        b = ~a             (two attractors of length 2)
  //   GRN_FIG2B : v1 = v1 & v2,  v2 = v1 | v3,  v3 = v2 & ~v3
  typedef enum logic [1:0] {
    GRN_FIG1C = 2'd0,
    GRN_FIG1D = 2'd1,
    GRN_FIG2B = 2'd2
  } grn_model_e;

  // Width of one AXI4 data channel of the FPGA shell.
  localparam int unsigned AXI_DATA_W = 512;
  // Width of the PE ID field of a task package.
  localparam int unsigned ID_W = 8;
  // PE ID value that marks an unused task slot in a reader beat.
  localparam logic [ID_W-1:0] ID_EMPTY = '1;
  // Width of the transient (T) and attractor length (L) counters.
  localparam int unsigned CNT_W = 32;
  // Flag byte in front of every result slot of a writer beat (bit 0 = valid).
  localparam int unsigned FLAG_W = 8;

  // Number of genes of a network.
  function automatic int unsigned model_genes(grn_model_e m);
    case (m)
      GRN_FIG2B: return 3;
      default:   return 2;
    endcase
  endfunction

  // State field width: gene count rounded up to a multiple of 8 bits.
  function automatic int unsigned state_field_w(int unsigned genes);
    return ((genes + 7) / 8) * 8;
  endfunction

  // Task package width: first state, last state and PE ID.
  function automatic int unsigned task_w(int unsigned genes);
    return 2 * state_field_w(genes) + ID_W;
  endfunction

  // Result package width: start state, attractor state, T and L.
  function automatic int unsigned result_w(int unsigned genes);
    return 2 * state_field_w(genes) + 2 * CNT_W;
  endfunction

endpackage
