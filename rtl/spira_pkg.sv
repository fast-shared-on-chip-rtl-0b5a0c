// spira_pkg: types and constants shared by the SPIRA memory system.
//
// SPIRA couples a small sequential processor (SP) to a coarse-grained
// reconfigurable array (RA). Both use one multi-bank scratchpad memory (SPM)
// and are never active at the same time. This package holds the 32-bit data
// path width, the SP address map, the request structure that every SPM bank
// receives and the controller state type.
//
// The 32-bit data width follows the 32-bit system of the design. The address
// map (SPM from address 0, RA registers at RA_REG_BASE, everything else
// external) is this design's own choice.
package spira_pkg;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned BE_W   = DATA_W / 8;

  // SP address map: SPM occupies [0, NUM_BANKS*BANK_WORDS*4), the RA
  // registers a 4 KB window at RA_REG_BASE, all other addresses go to the
  // external port.
  localparam logic [ADDR_W-1:0] RA_REG_BASE   = 32'h4000_0000;
  localparam logic [ADDR_W-1:0] RA_REG_WINDOW = 32'h0000_1000;


  // One request on the address/data lines of an SPM bank.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [BE_W-1:0]   be;
    logic [29:0]       waddr;   // word address inside the bank
    logic [DATA_W-1:0] wdata;
  } bank_req_t;

  // Who owns the SPM: the SP or the RA (the controller's mux select).
  typedef enum logic [1:0] {
    CTRL_IDLE   = 2'd0,  // both asleep, waiting for the host
    CTRL_SP_RUN = 2'd1,  // SP active, SPM driven by the SP
    CTRL_SP_DRN = 2'd2,  // SP asked for the RA, waiting for SP loads to finish
    CTRL_RA_RUN = 2'd3   // RA active, SPM driven by the crossbar
  } ctrl_state_e;

  // Register numbers inside the RA register file.
  localparam int unsigned RAREG_CTRL = 0;  // write bit0=1: invoke the RA

  // Host (main processor) register numbers of the SPIRA controller.
  localparam int unsigned HOST_START  = 0; // write: SP start address, wakes SP
  localparam int unsigned HOST_STATUS = 1; // read: {done, busy}

endpackage
