// ui_aligner_pkg: types and constants shared by the TX UI aligner blocks.
//
// The DRP (dynamic reconfiguration port) of the transceiver is carried as a
// request struct (master to transceiver) and a response struct (transceiver to
// master). Widths follow the 16-bit data / 10-bit address DRP of current AMD
// transceivers; this is a choice of this design, the address width of a given
// transceiver family may be smaller, in which case the upper bits are unused.
// The alignment controller's states are an enum so that they can be observed
// from the top level.
package ui_aligner_pkg;

  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DRP_ADDR_W = 10;
  localparam int unsigned DRP_DATA_W = 16;

  typedef struct packed {
    logic                  en;    // one-cycle access strobe
    logic                  we;    // 1 = write, 0 = read
    logic [DRP_ADDR_W-1:0] addr;
    logic [DRP_DATA_W-1:0] di;    // write data
  } drp_req_t;

  typedef struct packed {
    logic                  rdy;   // one-cycle completion strobe
    logic [DRP_DATA_W-1:0] dout;  // read data, valid with rdy
  } drp_rsp_t;

  // Direction of one phase-interpolator step.
  typedef enum logic {
    PI_UP   = 1'b0,  // increase the PI code: XCLK and data move later
    PI_DOWN = 1'b1   // decrease the PI code: XCLK and data move earlier
  } pi_dir_t;

  // States of the UI alignment controller.
  typedef enum logic [2:0] {
    AL_IDLE    = 3'd0,  // waiting for enable and TX reset done
    AL_SETTLE  = 3'd1,  // discarding phase samples taken before the last change
    AL_MEASURE = 3'd2,  // averaging DDMTD phase samples
    AL_COMPUTE = 3'd3,  // converting the phase to PI steps and finding n
    AL_SHIFT   = 3'd4,  // stepping the PI by n x 64 steps
    AL_LOCKED  = 3'd5   // aligned; monitoring the phase
  } align_state_t;

endpackage
