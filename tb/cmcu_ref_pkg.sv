// cmcu_ref_pkg: reference model of the example flow-chart, for the testbenches.
//
// It walks the flow-chart vertex by vertex (b1..b11), knowing nothing about addresses,
// chains, the control memory or the transition table: for each vertex it gives the set
// of microoperations and, from the logic conditions, the next vertex. The testbenches
// compare the control units cycle by cycle against this walk.
//
// Example flow-chart (conditions x1..x3 are x[0]..x[2]):
//   b1 -> b2 -> b3;  b3: x1 ? b4 : (x2 ? b7 : b8)
//   b4 -> b5 -> b6;  b6: x2 ? b8 : b10
//   b7 -> b8 -> b9;  b9: x3 ? (x1 ? b2 : b4) : b10
//   b10 -> b11 -> end
package cmcu_ref_pkg;

  localparam int NV = 11;  // operational vertices

  function automatic logic [7:0] mo(int i);  // microoperation y_i as a one-hot bit
    return 8'(1) << (i - 1);
  endfunction

  function automatic logic [7:0] ref_y(int v);
    case (v)
      1:  return mo(1) | mo(2);
      2:  return mo(3);
      3:  return mo(1) | mo(4);
      4:  return mo(5);
      5:  return mo(2) | mo(6);
      6:  return mo(7);
      7:  return mo(3) | mo(8);
      8:  return mo(4) | mo(5);
      9:  return mo(6);
      10: return mo(2) | mo(7);
      11: return mo(1) | mo(8);
      default: return '0;
    endcase
  endfunction

  // Next vertex; 0 stands for the end vertex b_E.
  function automatic int ref_next(int v, logic [2:0] x);
    case (v)
      3:  return x[0] ? 4 : (x[1] ? 7 : 8);
      6:  return x[1] ? 8 : 10;
      9:  return x[2] ? (x[0] ? 2 : 4) : 10;
      11: return 0;
      default: return v + 1;
    endcase
  endfunction

  // Vertices whose successor depends on the conditions (outputs of their chains)
  function automatic bit ref_branches(int v);
    return v == 3 || v == 6 || v == 9;
  endfunction

endpackage
