// Shared types and constants of the digital low-dropout regulator.
//
// The regulator's digital controller works on an 8-bit on-switch number N
// (0..255 switches' worth of current) and reacts to three clocked comparator
// decisions taken once per clock cycle.  The package holds the width of N, the
// coarse step K used under an under-voltage condition, and the bundle of the
// three comparator decisions that travels from the voltage sensing circuit to
// the controller.  The 8-bit width and K = 8 follow the published design; the
// struct layout is this implementation's own choice.
package ldo_pkg;

  // Width of the on-switch number N and of both controller registers.
  localparam int unsigned N_BITS_DEFAULT = 8;

  // Coarse step used while V_OUT is below V_REF_L (fixed at fabrication).
  localparam int unsigned K_DEFAULT = 8;

  // Decisions of the three comparators of the voltage sensing circuit, all
  // latched at the same rising clock edge.
  //   cmp   : 1 when V_OUT > V_REF       (decrease N), 0 otherwise (increase N)
  //   over  : 1 when V_OUT > V_REF_H     (force N to 0)
  //   under : 1 when V_OUT < V_REF_L     (step N by K instead of 1)
  typedef struct packed {
    logic over;
    logic under;
    logic cmp;
  } sense_t;

endpackage
