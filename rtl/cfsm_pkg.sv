// cfsm_pkg: types and constants shared by the blocks of the multiprocessor
// platform.
//
// The system bus carries 16-bit data (D0-D15, as on the VME side of the bus
// adapter) and a 24-bit address (an ISA-style address width; this width is a
// choice of this design). The three least significant address bits select the
// "communication nature", i.e. which interface of the communication
// controller serves the transfer; the codes below are this design's choice.
// A transfer request travelling from the bus control unit to an interface is
// carried as one packed struct, so that it can sit in a single event buffer.
package cfsm_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 24;
  localparam int unsigned SEL_W  = 3;   // address LSBs that pick the interface

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Communication-nature codes (addr[2:0]).
  localparam logic [SEL_W-1:0] TGT_MEM  = 3'd0;  // shared memory
  localparam logic [SEL_W-1:0] TGT_VME  = 3'd1;  // ISA to VME adapter
  localparam logic [SEL_W-1:0] TGT_ASIC = 3'd2;  // ASIC
  localparam logic [SEL_W-1:0] TGT_FPGA = 3'd3;  // FPGA
  // codes 4..7: further external interfaces

  // Priority option of the bus arbiter.
  typedef enum logic [1:0] {
    ARB_FIXED       = 2'b00,  // highest request level wins
    ARB_ROUND_ROBIN = 2'b01,  // rotating, starting after the last grant
    ARB_DAISY_CHAIN = 2'b10   // grant enters at line 0 and ripples upward
  } arb_mode_e;

  // Transfer request from the bus control unit to an interface.
  // rw follows the R/W_bar convention: 1 = read, 0 = write.
  typedef struct packed {
    logic  rw;
    addr_t addr;
    data_t wdata;
  } xfer_req_t;

endpackage
