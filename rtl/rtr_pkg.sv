// rtr_pkg: types and constants shared by the run-time reconfiguration (RTR)
// controller, the reconfigurable region and the virtual hardware (VH) tasks.
//
// vh_state_t is the five-state life cycle of a VH task as the controller
// tracks it: UNLOADED (only present as configuration data), WAITING (requested,
// region busy), LOADING (configuration data being transferred), RUNNING
// (configured, running or ready) and DONE (finished, may be replaced). There
// is no READY state because only one task occupies the region at a time.
// The state encoding and bus widths are this design's own choice.
package rtr_pkg;

  typedef enum logic [2:0] {
    VH_UNLOADED = 3'd0,
    VH_WAITING  = 3'd1,
    VH_LOADING  = 3'd2,
    VH_RUNNING  = 3'd3,
    VH_DONE     = 3'd4
  } vh_state_t;

  // Data and address width of the host-side register bus (IPIC subset).
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;

  // Register index width inside one VH task (four 32-bit registers).
  localparam int unsigned REG_IDX_W = 2;

  // Task numbers of the two VH tasks of the reference system.
  localparam int unsigned VH_CORDIC = 0;
  localparam int unsigned VH_DCT    = 1;

endpackage
