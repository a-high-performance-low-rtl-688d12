// Clock controller of the AMBA interface: one gated clock per DSP core.
//
// A core's clock g_clk[k] runs in a cycle when any of these holds:
//   - the AHB decoder requested core k in the previous cycle (its address
//     phase); the request is registered here so it covers the data phase and
//     the core clocks in the data at the end of that phase;
//   - the APB decoder requests it (read access phase of core k);
//   - the core reports busy (clearing its partial sums after reset, or
//     working through the taps of a sample);
//   - the core's PMU mode, last set by an AHB access to it, is PMU_ALWAYS.
// Otherwise the clock is stopped. Each gated clock comes from a latch-based
// clock_gate, so enables only need to settle while clk is low. The request
// and PMU registers run on the free clock clk, asynchronous active-high
// reset (PMU mode returns to PMU_GATED).
//
// Gated per-core clocks requested by the AHB and APB decoders follow the
// reference architecture; the busy and PMU terms and the one-cycle request
// register are this design's choices.
module clock_controller
  import amba_if_pkg::*;
#(
  parameter int NUM_CORES = 3
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic [NUM_CORES-1:0] ahb_req,
  input  logic [NUM_CORES-1:0] apb_req,
  input  logic [NUM_CORES-1:0] core_busy,
  input  logic                 pmu_we,
  input  logic [1:0]           pmu_core,
  input  pmu_e                 pmu_mode,
  output logic [NUM_CORES-1:0] g_clk
);
  logic [NUM_CORES-1:0] clk_en;
  logic [NUM_CORES-1:0] ahb_req_q;
  logic [NUM_CORES-1:0] pmu_on;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ahb_req_q <= '0;
      pmu_on    <= '0;
    end else begin
      ahb_req_q <= ahb_req;
      if (pmu_we && 32'(pmu_core) < NUM_CORES)
        pmu_on[pmu_core] <= (pmu_mode == PMU_ALWAYS);
    end
  end

  assign clk_en = ahb_req_q | apb_req | core_busy | pmu_on;

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_cg
    clock_gate u_cg (.clk, .en(clk_en[k]), .gclk(g_clk[k]));
  end
endmodule
