// Testbench of clock_controller. Drives random AHB requests, APB requests,
// busy flags and PMU updates, and counts the edges of every gated clock in
// each cycle against a model: core k gets an edge when it was requested on
// the AHB one cycle earlier, is requested on the APB now, is busy, or its
// PMU mode is always-on.
module tb_clock_controller;
  import amba_if_pkg::*;
  localparam int NUM_CORES = 3;
  logic                 clk = 0, reset, pmu_we;
  logic [NUM_CORES-1:0] ahb_req, apb_req, core_busy, g_clk;
  logic [1:0]           pmu_core;
  pmu_e                 pmu_mode;
  int edges [NUM_CORES] = '{default: 0};
  int checks = 0, failures = 0;

  clock_controller #(.NUM_CORES(NUM_CORES)) dut (.*);
  always #5 clk = ~clk;
  for (genvar k = 0; k < NUM_CORES; k++) begin : g_cnt
    always @(posedge g_clk[k]) edges[k]++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    logic [NUM_CORES-1:0] req_q, pmu_model;
    int e0 [NUM_CORES];
    reset = 1; ahb_req = 0; apb_req = 0; core_busy = 0; pmu_we = 0; pmu_core = 0; pmu_mode = PMU_GATED;
    req_q = 0; pmu_model = 0;
    @(negedge clk); reset = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [NUM_CORES-1:0] cur_ahb;
      @(negedge clk);
      for (int c = 0; c < NUM_CORES; c++) e0[c] = edges[c];
      cur_ahb   = ($urandom_range(0, 3) == 0) ? NUM_CORES'(1 << $urandom_range(0, NUM_CORES - 1)) : '0;
      ahb_req   = cur_ahb;
      apb_req   = ($urandom_range(0, 5) == 0) ? NUM_CORES'(1 << $urandom_range(0, NUM_CORES - 1)) : '0;
      core_busy = ($urandom_range(0, 3) == 0) ? NUM_CORES'($urandom) : '0;
      pmu_we    = ($urandom_range(0, 9) == 0);
      pmu_core  = 2'($urandom_range(0, 3));
      pmu_mode  = ($urandom_range(0, 2) == 0) ? PMU_ALWAYS : PMU_GATED;
      @(posedge clk); #1;
      for (int c = 0; c < NUM_CORES; c++) begin
        bit exp_edge;
        exp_edge = req_q[c] || apb_req[c] || core_busy[c] || pmu_model[c];
        chk(edges[c] - e0[c] == (exp_edge ? 1 : 0), $sformatf("core %0d clock edge", c));
      end
      req_q = cur_ahb;
      if (pmu_we && int'(pmu_core) < NUM_CORES) pmu_model[pmu_core] = (pmu_mode == PMU_ALWAYS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
