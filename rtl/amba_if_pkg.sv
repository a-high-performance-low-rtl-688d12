// Shared types and constants of the AMBA interface for DSP IP cores.
//
// Address layout (the same on HADDR and PADDR). The interface decodes from the
// address which core is selected, which of its ports is accessed, the tap
// number used for coefficient bursts and the power-management (PMU) mode:
//
//   [27:26] core index, 0 = DSP core 1
//   [25:24] port: 3 = sample input x(n), 2 = coefficient input h(n),
//                 1 = filter output y(n), 0 = core status
//   [13:12] PMU mode: 0 = core clock gated (runs only when needed),
//                     1 = core clock kept running
//   [9:2]   tap number for h(n) writes (word offset, so an incrementing
//           burst walks through the taps)
//
// With this layout the address 0xA3000000 is a write of x(n) to DSP core 1.
// The field positions are this design's choice; only the example address and
// the list of decoded items come from the reference description.
package amba_if_pkg;

  // AHB HTRANS encodings (AMBA 2)
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

  localparam logic [1:0] HRESP_OKAY = 2'b00;

  // Address fields
  localparam int CORE_LSB = 26;
  localparam int PORT_LSB = 24;
  localparam int PMU_LSB  = 12;
  localparam int TAP_LSB  = 2;
  localparam int TAP_W    = 8;

  typedef enum logic [1:0] {
    PORT_STATUS = 2'd0,
    PORT_Y      = 2'd1,
    PORT_H      = 2'd2,
    PORT_X      = 2'd3
  } port_e;

  typedef enum logic [1:0] {
    PMU_GATED   = 2'd0,
    PMU_ALWAYS  = 2'd1
  } pmu_e;

  // Data-phase operation of the AHB data FSM
  typedef enum logic [2:0] {
    OP_IDLE     = 3'd0,
    OP_WRITE_X  = 3'd1,
    OP_WRITE_H  = 3'd2,
    OP_READ_Y   = 3'd3,
    OP_READ_ST  = 3'd4
  } op_e;

  // State of the AHB data FSM: the operation, the core it addresses and
  // the tap number for coefficient writes.
  typedef struct packed {
    op_e              op;
    logic [1:0]       core;
    logic [TAP_W-1:0] tap;
  } fsm_state_t;

  localparam fsm_state_t FSM_IDLE = '{op: OP_IDLE, core: '0, tap: '0};

  // Status word returned by a read of PORT_STATUS
  //   bit 0 busy, bit 1 new output not yet read, bit 2 overrun
  localparam int ST_BUSY    = 0;
  localparam int ST_NEW     = 1;
  localparam int ST_OVERRUN = 2;

endpackage
