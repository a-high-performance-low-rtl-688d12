// AHB address and control decoder of the AMBA interface.
//
// Works in the AHB address phase. A transfer is taken when HSEL is high and
// HTRANS is NONSEQ or SEQ (the interface never inserts wait states, so every
// address phase completes in one cycle). HADDR is split into core index,
// port, tap number and PMU mode (see amba_if_pkg); HWRITE and HSIZE give the
// direction and size. From these the decoder computes, one cycle ahead of the
// data, the next state of the AHB data FSM: write x(n), write h(n), read y(n),
// read status, or IDLE for anything it does not serve (unknown core, write to
// an output, read of an input, transfers wider than a word).
//
// Because address and data phases overlap, this look-ahead lets the decoder
// gate the clocks. It owns the FSM clock g_clk_0, enabled while a transfer is
// decoded or the FSM is not idle, so an isolated transfer gives the FSM
// exactly two clock edges: one to enter the data-phase state, one to return
// to IDLE. It also tells the clock controller which core the next data phase
// needs (core_req) and passes it the PMU mode carried by the address.
// HBURST is accepted but needs no decoding: each beat carries its own
// address, so an incrementing burst of coefficient writes walks the taps.
//
// The look-ahead decode and the two FSM edges per transfer follow the
// reference architecture; the address layout and the rules for ignored
// transfers are this design's choices.
module ahb_decoder
  import amba_if_pkg::*;
#(
  parameter int NUM_CORES = 3
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 HSEL,
  input  logic [31:0]          HADDR,
  input  logic                 HWRITE,
  input  logic [1:0]           HTRANS,
  input  logic [2:0]           HSIZE,
  input  logic [2:0]           HBURST,
  input  logic                 fsm_active,
  output fsm_state_t           next_state,
  output logic                 g_clk_0,
  output logic [NUM_CORES-1:0] core_req,
  output logic                 pmu_we,
  output logic [1:0]           pmu_core,
  output pmu_e                 pmu_mode
);
  logic       take;
  logic [1:0] core;
  port_e      port;
  logic       fsm_en;

  always_comb begin
    core  = HADDR[CORE_LSB +: 2];
    port  = port_e'(HADDR[PORT_LSB +: 2]);
    take  = HSEL && (HTRANS == HTRANS_NONSEQ || HTRANS == HTRANS_SEQ)
            && (HSIZE <= 3'd2) && (32'(core) < NUM_CORES);

    next_state      = FSM_IDLE;
    next_state.core = core;
    next_state.tap  = HADDR[TAP_LSB +: TAP_W];
    if (take) begin
      unique case (port)
        PORT_X:      next_state.op = HWRITE ? OP_WRITE_X : OP_IDLE;
        PORT_H:      next_state.op = HWRITE ? OP_WRITE_H : OP_IDLE;
        PORT_Y:      next_state.op = HWRITE ? OP_IDLE    : OP_READ_Y;
        PORT_STATUS: next_state.op = HWRITE ? OP_IDLE    : OP_READ_ST;
        default:     next_state.op = OP_IDLE;
      endcase
    end
    if (next_state.op == OP_IDLE) next_state = FSM_IDLE;

    core_req = '0;
    if (next_state.op != OP_IDLE) core_req[core] = 1'b1;

    pmu_we   = take;
    pmu_core = core;
    pmu_mode = pmu_e'(HADDR[PMU_LSB +: 2]);

    fsm_en   = (next_state.op != OP_IDLE) || fsm_active;
  end

  clock_gate u_fsm_cg (.clk, .en(fsm_en), .gclk(g_clk_0));

  // reset only matters to the gated FSM, which resets asynchronously
  logic unused;
  assign unused = ^{reset, HBURST};
endmodule
