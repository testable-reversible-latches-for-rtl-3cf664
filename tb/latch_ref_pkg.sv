// latch_ref_pkg: reference models for the latch testbenches.
//
// The characteristic equations of the four latches, written straight from
// their textbook form and independent of the gate netlists under test, plus
// the truth table of the Fredkin gate as a function of its three inputs.
package latch_ref_pkg;

  // D latch: Q+ = D.E + E'.Q
  function automatic bit d_next(bit e, bit d, bit q);
    return (d & e) | (!e & q);
  endfunction

  // T latch: Q+ = (T xor Q).E + E'.Q
  function automatic bit t_next(bit e, bit t, bit q);
    return ((t ^ q) & e) | (!e & q);
  endfunction

  // JK latch: Q+ = (J.Q' + K'.Q).E + E'.Q
  function automatic bit jk_next(bit e, bit j, bit k, bit q);
    return (((j & !q) | (!k & q)) & e) | (!e & q);
  endfunction

  // RS latch: Q+ = S.E + (R.E)'.Q
  function automatic bit rs_next(bit e, bit s, bit r, bit q);
    return (s & e) | (!(r & e) & q);
  endfunction

  // Fredkin truth table, rows in input order ABC = 000 .. 111, value {P,Q,R}
  function automatic logic [2:0] fredkin_row(logic [2:0] abc);
    case (abc)
      3'b000: return 3'b000;
      3'b001: return 3'b001;
      3'b010: return 3'b010;
      3'b011: return 3'b011;
      3'b100: return 3'b100;
      3'b101: return 3'b110;
      3'b110: return 3'b101;
      default: return 3'b111;
    endcase
  endfunction

endpackage
