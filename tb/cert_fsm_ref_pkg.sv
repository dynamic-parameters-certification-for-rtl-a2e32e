// cert_fsm_ref_pkg: reference model for the testbenches, written from the
// transition graphs of the machine (edge by edge), independently of the PROM
// memory map that the design stores. Input labels are x1 x0 S; '-' below
// means "any value".
package cert_fsm_ref_pkg;
  import cert_fsm_pkg::*;

  // Output marked in each state (state/Z).
  function automatic logic graph_z(state_e q);
    return (q == Q2) || (q == Q4);
  endfunction

  // Next state along the graph edges.
  function automatic state_e graph_next(prom_case_e c, state_e q, logic [1:0] x, logic s);
    logic x1, x0;
    x1 = x[1];
    x0 = x[0];
    case (q)
      // Q0: self loop -0-, 01- to Q1, 11- to Q2
      Q0: if (!x0) return Q0;
          else if (!x1) return Q1;
          else return Q2;
      // Q1: self loop 01- or 001, 10- to Q0, 11- to Q2, 000 to Q3
      Q1: if (x1 && !x0) return Q0;
          else if (x1 && x0) return Q2;
          else if (!x1 && x0) return Q1;
          else return s ? Q1 : Q3;
      // Q2 (case 1): self loop 11- or 001, 10- or 01- to Q0, 000 to Q3
      // Q2 (case 2): self loop 11- or 000, 10- or 01- to Q0, 001 to Q4
      Q2: if (x1 != x0) return Q0;
          else if (x1) return Q2;
          else if (c == PROM_CASE1) return s ? Q2 : Q3;
          else return s ? Q4 : Q2;
      // Q3: self loop --0, --1 to Q4
      Q3: return s ? Q4 : Q3;
      // Q4: self loop --1, --0 to Q0
      Q4: return s ? Q4 : Q0;
      // Q5..Q7: --- to Q0
      default: return Q0;
    endcase
  endfunction
endpackage
