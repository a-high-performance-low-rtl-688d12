// AMBA interface for DSP IP cores, with NUM_CORES FIR cores attached.
//
// The block sits on a LEON-style AMBA platform as an AHB slave and an APB
// device. All inputs to the cores arrive over the AHB (writes of samples x(n)
// and coefficients h(n)); outputs y(n) and status can be read over the AHB
// (HRDATA) when the processor needs them quickly, or over the APB (PRDATA).
// The bus protocol is handled here, so the cores only see "load this value"
// and "here is my result".
//
// The interface is split into four parts: the AHB address and control
// decoder (ahb_decoder), the AHB data FSM (ahb_data_fsm), the APB address and
// control decoder (apb_decoder) and the clock controller. Power is saved with
// three levels of clock: the free clock clk runs only the decoders' few
// registers, the FSM runs on g_clk_0 and core k on g_clk[k], and the gated
// clocks run only when the pipelined AHB address phase (look-ahead), an APB
// read, a busy core or the PMU mode calls for them.
//
// Timing of a single AHB write of a sample (HADDR 0xA3000000, HWDATA
// 0x000042DE): the FSM gets a clock edge at the end of the address phase
// (IDLE -> DSP 1 input) and one at the end of the data phase (-> IDLE); core 1
// gets one edge at the end of the data phase, which loads 0x42DE. Core 1 then
// keeps its clock for TAPS cycles while it works through its taps; y(n) is
// ready one cycle after the load. HREADY is always high (no wait states) and
// HRESP always OKAY; transfers the interface does not serve are ignored and
// read as zero.
//
// The cycle behaviour above, the four-part split and the three clock levels
// follow the reference architecture; the address layout, the status flags,
// the PMU modes and the core's busy-driven clock are this design's choices.
// reset is used asynchronously by the registers and as the disable
// condition of the bus assertions below, which lint reports as a mixed
// synchronous/asynchronous use; the assertions are not part of the circuit.
module amba_interface
  import amba_if_pkg::*;
#(
  parameter int NUM_CORES = 3,
  parameter int TAPS      = 16,
  parameter int DW        = 16
) (
  input  logic        clk,
  input  logic        reset,
  // AHB slave
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [1:0]  HTRANS,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [31:0] HWDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  output logic [31:0] HRDATA,
  // APB device
  input  logic        PSEL,
  input  logic        PENABLE,
  input  logic [31:0] PADDR,
  input  logic        PWRITE,
  output logic [31:0] PRDATA
);
  fsm_state_t           next_state;
  logic                 g_clk_0;
  logic                 fsm_active;
  logic [NUM_CORES-1:0] ahb_req, apb_req, core_busy, g_clk;
  logic                 pmu_we;
  logic [1:0]           pmu_core;
  pmu_e                 pmu_mode;
  logic [DW-1:0]        din;
  logic [TAP_W-1:0]     tap;
  logic [NUM_CORES-1:0] load_x, load_h;
  logic [NUM_CORES-1:0] ahb_rd_y, ahb_rd_st, apb_rd_y, apb_rd_st;
  logic [DW-1:0]        core_y      [NUM_CORES];
  logic [2:0]           core_status [NUM_CORES];

  assign HREADY = 1'b1;
  assign HRESP  = HRESP_OKAY;

  ahb_decoder #(.NUM_CORES(NUM_CORES)) u_ahb_dec (
    .clk, .reset, .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST,
    .fsm_active, .next_state, .g_clk_0, .core_req(ahb_req),
    .pmu_we, .pmu_core, .pmu_mode
  );

  ahb_data_fsm #(.NUM_CORES(NUM_CORES), .DW(DW)) u_fsm (
    .g_clk_0, .reset, .next_state, .HWDATA, .HRDATA, .fsm_active,
    .din, .tap, .load_x, .load_h, .rd_y(ahb_rd_y), .rd_status(ahb_rd_st),
    .core_y, .core_status
  );

  apb_decoder #(.NUM_CORES(NUM_CORES), .DW(DW)) u_apb_dec (
    .PSEL, .PENABLE, .PADDR, .PWRITE, .PRDATA, .apb_req,
    .rd_y(apb_rd_y), .rd_status(apb_rd_st), .core_y, .core_status
  );

  clock_controller #(.NUM_CORES(NUM_CORES)) u_clk_ctrl (
    .clk, .reset, .ahb_req, .apb_req, .core_busy,
    .pmu_we, .pmu_core, .pmu_mode, .g_clk
  );

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_core
    logic y_new, overrun;
    dsp_core #(.DW(DW), .TAPS(TAPS), .TAP_W(TAP_W)) u_core (
      .g_clk(g_clk[k]), .reset,
      .load_x(load_x[k]), .x_in(din),
      .load_h(load_h[k]), .h_in(din), .h_tap(tap),
      .rd_y(ahb_rd_y[k] | apb_rd_y[k]),
      .rd_status(ahb_rd_st[k] | apb_rd_st[k]),
      .y_out(core_y[k]), .busy(core_busy[k]), .y_new, .overrun
    );
    assign core_status[k] = {overrun, y_new, core_busy[k]};
  end

  // Bus rules the interface relies on
  apb_enable_needs_select: assert property (@(posedge clk) disable iff (reset)
    PENABLE |-> PSEL);
  apb_setup_then_access: assert property (@(posedge clk) disable iff (reset)
    (PSEL && !PENABLE) |=> (PSEL && PENABLE));
  one_core_load_at_a_time: assert property (@(posedge clk) disable iff (reset)
    $onehot0(load_x | load_h));

  initial begin
    assert (NUM_CORES >= 1 && NUM_CORES <= 4)
      else $error("amba_interface: the address has room for 1 to 4 cores");
  end
endmodule
