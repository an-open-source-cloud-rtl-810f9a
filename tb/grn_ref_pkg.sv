// grn_ref_pkg: reference model for the testbenches of the GRN accelerator.
//
// ref_next() evaluates a network's update equations written out again here,
// independent of the RTL model circuit. ref_attractor() finds the attractor
// of an initial state by brute force: it walks the trajectory, remembering
// the step at which each state was first seen, until a state repeats. The
// repeated state is the first attractor state, its first-seen step is the
// transient T and the distance between the two visits is the length L.
package grn_ref_pkg;

  typedef struct {
    int unsigned attr;
    int unsigned t;
    int unsigned l;
  } ref_result_t;

  function automatic int unsigned ref_genes(grn_pkg::grn_model_e m);
    return (m == grn_pkg::GRN_FIG2B) ? 3 : 2;
  endfunction

  function automatic int unsigned ref_next(grn_pkg::grn_model_e m, int unsigned s);
    bit a, b, v1, v2, v3;
    case (m)
      grn_pkg::GRN_FIG1C: begin
        a = s[1]; b = s[0];
        return {30'd0, !b, a && b};
      end
      grn_pkg::GRN_FIG1D: begin
        a = s[1]; b = s[0];
        return {30'd0, !b, !a};
      end
      default: begin
        v1 = s[2]; v2 = s[1]; v3 = s[0];
        return {29'd0, v1 && v2, v1 || v3, v2 && !v3};
      end
    endcase
  endfunction

  function automatic ref_result_t ref_attractor(grn_pkg::grn_model_e m, int unsigned x0);
    int          seen [int unsigned];
    int unsigned x;
    int          step;
    ref_result_t r;
    x    = x0;
    step = 0;
    while (!seen.exists(x)) begin
      seen[x] = step;
      x       = ref_next(m, x);
      step++;
    end
    r.attr = x;
    r.t    = int'(seen[x]);
    r.l    = step - seen[x];
    return r;
  endfunction

endpackage
