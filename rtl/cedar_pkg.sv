// cedar_pkg: types and constants shared by the CEDAR counter-estimation engine.
//
// CEDAR keeps, per flow, only a short pointer into a small array of shared
// estimator values. This package holds the register map of the I/O register
// block, the configuration bundle that the register block hands to the
// state machine, and the state type of that state machine.
//
// The register addresses, the reset values and the fixed 32-bit width of the
// configuration fields are choices of this design; the set of registers
// (array sizes, start/stop, interrupt threshold, current up-scaled flow
// index) follows the published FPGA implementation.
package cedar_pkg;

  // Fixed-point scale of the estimator values: a value of 1.0 is stored as 1000.
  localparam int unsigned EST_SCALE_DEFAULT = 1000;

  // Register word addresses on the I/O register bus.
  typedef enum logic [2:0] {
    REG_CTRL      = 3'd0,  // [0] enable, [1] irq_en, [2] upscale active, [3] current bank
    REG_STATUS    = 3'd1,  // [0] irq pending (write 1 to clear), [1] busy (read only)
    REG_THRESH    = 3'd2,  // flow pointer threshold for the up-scale interrupt
    REG_NUM_FLOWS = 3'd3,  // number of flows in use (flows at or above are ignored)
    REG_NUM_EST   = 3'd4,  // number of estimators in use (pointer saturates at NUM_EST-1)
    REG_UPS_IDX   = 3'd5,  // current-up-scaled-flow-index
    REG_MAX_PTR   = 3'd6   // largest pointer written since last write to this register
  } cedar_reg_e;

  // Configuration seen by the state machine.
  typedef struct packed {
    logic        enable;     // start/stop
    logic        irq_en;     // interrupt enable
    logic        upscale;    // up-scaling in progress
    logic        cur_bank;   // estimator RAM holding the current (old) array A'
    logic [31:0] thresh;     // interrupt threshold on the flow pointer value
    logic [31:0] num_flows;  // flows in use
    logic [31:0] num_est;    // estimators in use
    logic [31:0] ups_idx;    // current-up-scaled-flow-index f
  } cedar_cfg_t;

  // The three states of the CEDAR state machine.
  typedef enum logic [1:0] {
    ST_FETCH_PTR = 2'd0,
    ST_FETCH_EST = 2'd1,
    ST_UPDATE    = 2'd2
  } cedar_state_e;

endpackage
