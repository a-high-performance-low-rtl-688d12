// APB address and control decoder of the AMBA interface.
//
// Serves reads only; writes from the APB bridge are ignored. PADDR uses the
// same field layout as HADDR (see amba_if_pkg). While PSEL is high and PWRITE
// low, PRDATA carries the selected core's output y(n) (sign-extended) or its
// status word, so it is valid in the access phase (PENABLE high) as APB
// requires. In the access phase the decoder asks the clock controller for one
// edge of the selected core's clock (apb_req) and marks the read (rd_y /
// rd_status), so the core clears its new-output or overrun flag at the end of
// the transfer. No state machine is needed; the block is combinational.
//
// Read-only operation without an FSM and the clock request on reads follow
// the reference architecture; the address layout and the access-phase timing
// of the request are this design's choices.
module apb_decoder
  import amba_if_pkg::*;
#(
  parameter int NUM_CORES = 3,
  parameter int DW        = 16
) (
  input  logic                 PSEL,
  input  logic                 PENABLE,
  input  logic [31:0]          PADDR,
  input  logic                 PWRITE,
  output logic [31:0]          PRDATA,
  output logic [NUM_CORES-1:0] apb_req,
  output logic [NUM_CORES-1:0] rd_y,
  output logic [NUM_CORES-1:0] rd_status,
  input  logic [DW-1:0]        core_y      [NUM_CORES],
  input  logic [2:0]           core_status [NUM_CORES]
);
  logic [1:0] core;
  port_e      port;
  logic       rd;

  always_comb begin
    core      = PADDR[CORE_LSB +: 2];
    port      = port_e'(PADDR[PORT_LSB +: 2]);
    rd        = PSEL && !PWRITE && (32'(core) < NUM_CORES)
                && (port == PORT_Y || port == PORT_STATUS);
    PRDATA    = '0;
    apb_req   = '0;
    rd_y      = '0;
    rd_status = '0;
    if (rd) begin
      if (port == PORT_Y) PRDATA = 32'(signed'(core_y[core]));
      else                PRDATA = 32'(core_status[core]);
      if (PENABLE) begin
        apb_req[core] = 1'b1;
        if (port == PORT_Y) rd_y[core]      = 1'b1;
        else                rd_status[core] = 1'b1;
      end
    end
  end
endmodule
