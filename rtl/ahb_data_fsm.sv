// AHB data FSM of the AMBA interface.
//
// Clocked only by the gated clock g_clk_0 from the AHB decoder. Its state is
// the operation of the current AHB data phase (IDLE, write x(n), write h(n),
// read y(n), read status) together with the addressed core and tap number,
// loaded from the decoder's look-ahead next state at the end of the address
// phase. During the data phase it routes HWDATA[DW-1:0] to the x(n) or h(n)
// input of the selected core (load_x / load_h; the core captures the value on
// its own gated clock edge at the end of the data phase) or routes the
// selected core's output or status word onto HRDATA (rd_y / rd_status tell
// the core it has been read). y(n) is returned sign-extended to 32 bits; the
// status word holds busy (bit 0), new output (bit 1) and overrun (bit 2).
//
// The FSM's role and its IDLE / DSP-input states follow the reference
// architecture; the other states and the encoding are this design's.
module ahb_data_fsm
  import amba_if_pkg::*;
#(
  parameter int NUM_CORES = 3,
  parameter int DW        = 16
) (
  input  logic                 g_clk_0,
  input  logic                 reset,
  input  fsm_state_t           next_state,
  input  logic [31:0]          HWDATA,
  output logic [31:0]          HRDATA,
  output logic                 fsm_active,
  output logic [DW-1:0]        din,
  output logic [TAP_W-1:0]     tap,
  output logic [NUM_CORES-1:0] load_x,
  output logic [NUM_CORES-1:0] load_h,
  output logic [NUM_CORES-1:0] rd_y,
  output logic [NUM_CORES-1:0] rd_status,
  input  logic [DW-1:0]        core_y      [NUM_CORES],
  input  logic [2:0]           core_status [NUM_CORES]
);
  fsm_state_t state;

  always_ff @(posedge g_clk_0 or posedge reset) begin
    if (reset) state <= FSM_IDLE;
    else       state <= next_state;
  end

  always_comb begin
    fsm_active = (state.op != OP_IDLE);
    din        = HWDATA[DW-1:0];
    tap        = state.tap;
    load_x     = '0;
    load_h     = '0;
    rd_y       = '0;
    rd_status  = '0;
    HRDATA     = '0;
    if (32'(state.core) < NUM_CORES) begin
      unique case (state.op)
        OP_WRITE_X: load_x[state.core] = 1'b1;
        OP_WRITE_H: load_h[state.core] = 1'b1;
        OP_READ_Y: begin
          rd_y[state.core] = 1'b1;
          HRDATA = 32'(signed'(core_y[state.core]));
        end
        OP_READ_ST: begin
          rd_status[state.core] = 1'b1;
          HRDATA = 32'(core_status[state.core]);
        end
        default: ;
      endcase
    end
  end

  logic unused;
  assign unused = ^HWDATA[31:DW];
endmodule
