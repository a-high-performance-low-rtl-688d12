// Clock-activity workload for the AMBA interface at its default parameters
// (3 cores, 16 taps). Power in this design is saved by not clocking: this
// testbench runs a steady stream in which every core receives one sample per
// PERIOD bus cycles, its output being read back over the AHB, and counts the
// rising edges of the FSM clock and of each core clock against the free
// system clock. Every transfer is isolated, so the counts are exact:
//   FSM clock   2 edges per AHB transfer (write x, read y)
//   core clock  1 (load) + TAPS (work) + 1 (read) edges per sample
// It prints the resulting activity factors, checks the counts and the
// filter outputs, and then repeats the stream with PMU mode "always on" for
// comparison, where each core clock must run every cycle.
module tb_clock_activity;
  import amba_if_pkg::*;

  localparam int NUM_CORES = 3, TAPS = 16, DW = 16;
  localparam int PERIOD    = 64;   // bus cycles between samples of one core
  localparam int SAMPLES   = 40;   // samples per core

  logic        clk = 1'b0;
  logic        reset;
  logic        HSEL, HWRITE, HREADY, PSEL, PENABLE, PWRITE;
  logic [31:0] HADDR, HWDATA, HRDATA, PADDR, PRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic [2:0]  HSIZE, HBURST;

  amba_interface dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int clk_edges = 0, fsm_edges = 0;
  int core_edges [NUM_CORES] = '{default: 0};
  always @(posedge clk) clk_edges++;
  always @(posedge dut.g_clk_0) fsm_edges++;
  for (genvar k = 0; k < NUM_CORES; k++) begin : g_cnt
    always @(posedge dut.g_clk[k]) core_edges[k]++;
  end

  int coef [NUM_CORES][TAPS];
  int hist [NUM_CORES][TAPS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic logic [31:0] addr(input int core, input port_e port, input int tap = 0,
                                       input int pmu = 0);
    return 32'hA000_0000 | (32'(core) << CORE_LSB) | (32'(port) << PORT_LSB)
         | (32'(pmu) << PMU_LSB) | (32'(tap) << TAP_LSB);
  endfunction

  function automatic int ref_push(input int core, input int x);
    longint acc = 0, r;
    for (int i = TAPS-1; i > 0; i--) hist[core][i] = hist[core][i-1];
    hist[core][0] = x;
    for (int i = 0; i < TAPS; i++) acc += longint'(coef[core][i]) * longint'(hist[core][i]);
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic bus_idle();
    HSEL = 0; HTRANS = HTRANS_IDLE; HWRITE = 0; HSIZE = 3'd2; HBURST = 3'd0;
  endtask

  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
    HSEL = 1; HADDR = a; HWRITE = 1; HTRANS = HTRANS_NONSEQ;
    @(posedge clk); #1;
    bus_idle(); HWDATA = d;
    @(posedge clk); #1;
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    HSEL = 1; HADDR = a; HWRITE = 0; HTRANS = HTRANS_NONSEQ;
    @(posedge clk); #1;
    bus_idle();
    @(negedge clk); d = HRDATA;
    @(posedge clk); #1;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // One pass of the stream: per round, one sample to each core, staggered,
  // then the three outputs read; the round is padded to PERIOD cycles.
  task automatic stream(input int pmu, output int cyc, output int fsm, output int core [NUM_CORES]);
    int c0, f0;
    int e0 [NUM_CORES];
    logic [31:0] d;
    int expy [NUM_CORES];
    c0 = clk_edges; f0 = fsm_edges;
    for (int c = 0; c < NUM_CORES; c++) e0[c] = core_edges[c];
    for (int n = 0; n < SAMPLES; n++) begin
      int used;
      used = clk_edges;
      for (int c = 0; c < NUM_CORES; c++) begin
        int x;
        x = int'($urandom_range(0, 65535)) - 32768;
        expy[c] = ref_push(c, x);
        ahb_write(addr(c, PORT_X, 0, pmu), 32'(x));
      end
      idle(TAPS + 1);
      for (int c = 0; c < NUM_CORES; c++) begin
        ahb_read(addr(c, PORT_Y, 0, pmu), d);
        check(d == 32'(expy[c]), $sformatf("core %0d output", c));
      end
      used = clk_edges - used;
      idle(PERIOD - used);
    end
    cyc = clk_edges - c0;
    fsm = fsm_edges - f0;
    for (int c = 0; c < NUM_CORES; c++) core[c] = core_edges[c] - e0[c];
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int cyc, fsm;
    int core [NUM_CORES];
    bus_idle(); HADDR = 0; HWDATA = 0;
    PSEL = 0; PENABLE = 0; PADDR = 0; PWRITE = 0;
    for (int c = 0; c < NUM_CORES; c++)
      for (int i = 0; i < TAPS; i++) begin coef[c][i] = 0; hist[c][i] = 0; end
    reset = 1;
    idle(3);
    reset = 0;
    idle(TAPS + 4);
    for (int c = 0; c < NUM_CORES; c++)
      for (int i = 0; i < TAPS; i++) begin
        coef[c][i] = int'($urandom_range(0, 32767)) - 16384;
        ahb_write(addr(c, PORT_H, i), 32'(coef[c][i]));
      end
    idle(4);

    stream(int'(PMU_GATED), cyc, fsm, core);
    $display("gated:     %0d system clock edges, FSM clock %0d (%0d%%)", cyc, fsm, 100 * fsm / cyc);
    check(cyc == SAMPLES * PERIOD, "stream length");
    check(fsm == SAMPLES * NUM_CORES * 2 * 2, "FSM edges: two per transfer");
    for (int c = 0; c < NUM_CORES; c++) begin
      $display("gated:     core %0d clock %0d edges (%0d%%)", c, core[c], 100 * core[c] / cyc);
      check(core[c] == SAMPLES * (TAPS + 2), $sformatf("core %0d edges: load + TAPS + read", c));
    end

    // same stream with the PMU mode set to always-on by every access
    stream(int'(PMU_ALWAYS), cyc, fsm, core);
    for (int c = 0; c < NUM_CORES; c++) begin
      $display("always-on: core %0d clock %0d edges (%0d%%)", c, core[c], 100 * core[c] / cyc);
      check(core[c] >= cyc - PERIOD, $sformatf("core %0d clock runs continuously", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
