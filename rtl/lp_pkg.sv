// lp_pkg: types shared by the linked-list summing processors.
//
// lp_ctl_t bundles the control points that the one-hot list-processor
// controller drives into the Architecture #1-#3 datapaths. The signal names
// follow the list-processor datapath drawings: LD_SUM/LD_NEXT are register
// clock enables, SUM_SEL/NEXT_SEL/A_SEL/ADD_SEL are 2:1 mux selects (1 picks
// the "working" input, 0 the constant or the alternative).
package lp_pkg;

  typedef struct packed {
    logic ld_sum;    // load SUM
    logic sum_sel;   // SUM mux: 1 = adder result, 0 = constant 0
    logic ld_next;   // load NEXT (and NUMA in Architectures #2 and #3)
    logic next_sel;  // NEXT mux: 1 = memory data, 0 = constant 0
    logic a_sel;     // address mux: 0 = NEXT, 1 = NEXT+1 / NUMA
    logic add_sel;   // shared-adder mux (Architecture #3): 1 = SUM, 0 = constant 1
  } lp_ctl_t;

  // One-hot state vector of the controller, bit positions.
  typedef enum int unsigned {
    S_START    = 0,
    S_COMP_SUM = 1,
    S_GET_NEXT = 2,
    S_DONE     = 3
  } lp_state_bit_e;

endpackage
