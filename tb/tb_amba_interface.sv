// End-to-end testbench of the AMBA interface with its DSP cores, at the
// default parameters (3 cores, 16 taps, 16-bit data).
//
// Drives the AHB and APB like a processor and an APB bridge would, loads
// coefficients into every core (single writes and an incrementing burst),
// streams samples, reads the outputs over both buses and compares them with
// a direct-form FIR computed here from the sample history. It also checks
// the clocking scheme by counting gated clock edges: two FSM edges per
// isolated transfer, one core edge for a load plus TAPS for the work, none
// while idle, a running core clock in the always-on PMU mode, and no clock
// at all for a transfer the interface ignores. Pipelined sequences of writes
// and reads to different cores are checked too. The overrun flag, the
// new-output flag and the one-cycle output latency are checked as well.
module tb_amba_interface;
  import amba_if_pkg::*;

  localparam int NUM_CORES = 3;
  localparam int TAPS      = 16;
  localparam int DW        = 16;

  logic        clk = 1'b0;
  logic        reset;
  logic        HSEL, HWRITE, HREADY, PSEL, PENABLE, PWRITE;
  logic [31:0] HADDR, HWDATA, HRDATA, PADDR, PRDATA;
  logic [1:0]  HTRANS, HRESP;
  logic [2:0]  HSIZE, HBURST;

  amba_interface dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gated_idle = 0, n_fsm_two = 0, n_overrun = 0, n_pmu = 0, n_burst = 0;
  int n_apb = 0, n_ahb = 0, n_ignored = 0, n_concurrent = 0, n_latency = 0,
      n_pipelined = 0;

  int fsm_edges = 0;
  int core_edges [NUM_CORES] = '{default: 0};
  always @(posedge dut.g_clk_0) fsm_edges++;
  for (genvar k = 0; k < NUM_CORES; k++) begin : g_cnt
    always @(posedge dut.g_clk[k]) core_edges[k]++;
  end

  // reference model state
  int coef [NUM_CORES][TAPS];
  int hist [NUM_CORES][TAPS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic logic [31:0] addr(input int core, input port_e port, input int tap = 0,
                                       input int pmu = 0);
    return 32'hA000_0000 | (32'(core) << CORE_LSB) | (32'(port) << PORT_LSB)
         | (32'(pmu) << PMU_LSB) | (32'(tap) << TAP_LSB);
  endfunction

  function automatic int ref_push(input int core, input int x);
    longint acc = 0;
    longint r;
    for (int i = TAPS-1; i > 0; i--) hist[core][i] = hist[core][i-1];
    hist[core][0] = x;
    for (int i = 0; i < TAPS; i++) acc += longint'(coef[core][i]) * longint'(hist[core][i]);
    r = (acc + (64'sd1 <<< (DW-2))) >>> (DW-1);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // --- bus drivers: inputs change 1 ns after a rising edge -----------------
  task automatic bus_idle();
    HSEL = 0; HTRANS = HTRANS_IDLE; HWRITE = 0; HSIZE = 3'd2; HBURST = 3'd0;
  endtask

  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
    HSEL = 1; HADDR = a; HWRITE = 1; HTRANS = HTRANS_NONSEQ; HSIZE = 3'd2; HBURST = 3'd0;
    @(posedge clk); #1;
    bus_idle(); HWDATA = d;
    @(posedge clk); #1;
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    HSEL = 1; HADDR = a; HWRITE = 0; HTRANS = HTRANS_NONSEQ; HSIZE = 3'd2; HBURST = 3'd0;
    @(posedge clk); #1;
    bus_idle();
    @(negedge clk); d = HRDATA;
    check(HREADY === 1'b1 && HRESP === HRESP_OKAY, "HREADY/HRESP");
    @(posedge clk); #1;
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    PSEL = 1; PENABLE = 0; PADDR = a; PWRITE = 0;
    @(posedge clk); #1;
    PENABLE = 1;
    @(negedge clk); d = PRDATA;
    @(posedge clk); #1;
    PSEL = 0; PENABLE = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // write one sample, check y one cycle after the load, wait the busy time
  task automatic push_sample(input int core, input int x, input bit use_apb);
    int exp_y;
    logic [31:0] d;
    int e0;
    exp_y = ref_push(core, x);
    e0 = core_edges[core];
    ahb_write(addr(core, PORT_X), 32'(x));
    check(core_edges[core] == e0 + 1, "one core edge loads the sample");
    @(posedge clk); #1;
    check(dut.core_y[core] == DW'(exp_y), $sformatf("y ready one cycle after load core %0d", core));
    if (dut.core_y[core] == DW'(exp_y)) n_latency++;
    check(dut.core_busy[core] == 1'b1, "core busy while taps remain");
    idle(TAPS - 1);
    check(dut.core_busy[core] == 1'b0, "core idle after TAPS cycles");
    check(core_edges[core] == e0 + 1 + TAPS, "core clocked TAPS cycles after load");
    if (use_apb) begin
      apb_read(addr(core, PORT_STATUS), d);
      check(d[ST_NEW] == 1'b1, "status shows new output (APB)");
      apb_read(addr(core, PORT_Y), d); n_apb++;
    end else begin
      ahb_read(addr(core, PORT_STATUS), d);
      check(d[ST_NEW] == 1'b1, "status shows new output (AHB)");
      ahb_read(addr(core, PORT_Y), d); n_ahb++;
    end
    check(d == 32'(exp_y), $sformatf("core %0d y=%0d expected %0d", core, int'(signed'(d)), exp_y));
    ahb_read(addr(core, PORT_STATUS), d);
    check(d[ST_NEW] == 1'b0, "new-output flag cleared by read");
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [31:0] d;
    int e0 [NUM_CORES];
    int f0;

    bus_idle(); HADDR = 0; HWDATA = 0;
    PSEL = 0; PENABLE = 0; PADDR = 0; PWRITE = 0;
    for (int c = 0; c < NUM_CORES; c++)
      for (int i = 0; i < TAPS; i++) begin coef[c][i] = 0; hist[c][i] = 0; end
    reset = 1;
    idle(3);
    reset = 0;
    idle(TAPS + 4);

    // gated clocks stay still while nothing happens
    for (int c = 0; c < NUM_CORES; c++) begin
      check(dut.core_busy[c] == 1'b0, "core has finished clearing after reset");
      e0[c] = core_edges[c];
    end
    f0 = fsm_edges;
    idle(20);
    for (int c = 0; c < NUM_CORES; c++) begin
      check(core_edges[c] == e0[c], "idle core clock stopped");
      if (core_edges[c] == e0[c]) n_gated_idle++;
    end
    check(fsm_edges == f0, "idle FSM clock stopped");

    // coefficients: cores 0 and 2 by single writes, core 1 by an INCR burst
    for (int c = 0; c < NUM_CORES; c++)
      for (int i = 0; i < TAPS; i++)
        coef[c][i] = int'($urandom_range(0, 32767)) - 16384;
    for (int i = 0; i < TAPS; i++) ahb_write(addr(0, PORT_H, i), 32'(coef[0][i]));
    for (int i = 0; i < TAPS; i++) ahb_write(addr(2, PORT_H, i), 32'(coef[2][i]));
    HSEL = 1; HWRITE = 1; HSIZE = 3'd2; HBURST = 3'b011;  // INCR
    for (int i = 0; i <= TAPS; i++) begin
      if (i < TAPS) begin
        HADDR = addr(1, PORT_H, i);
        HTRANS = (i == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
      end else begin
        HSEL = 0; HTRANS = HTRANS_IDLE;
      end
      if (i > 0) HWDATA = 32'(coef[1][i-1]);
      @(posedge clk); #1;
    end
    bus_idle();
    n_burst++;
    for (int i = 0; i < TAPS; i++)
      check(dut.g_core[1].u_core.u_coef_ram.mem[i] == DW'(coef[1][i]), "burst coefficient stored");

    // Fig. 4 case: 0x000042DE written to DSP core 1 at 0xA3000000
    begin
      int exp_y;
      exp_y = ref_push(0, 32'h42DE);
      f0 = fsm_edges; e0[0] = core_edges[0];
      HSEL = 1; HADDR = 32'hA300_0000; HWRITE = 1; HTRANS = HTRANS_NONSEQ;
      @(negedge clk);
      check(dut.u_fsm.state.op == OP_IDLE, "FSM idle in address phase");
      @(posedge clk); #1;
      bus_idle(); HWDATA = 32'h0000_42DE;
      check(fsm_edges == f0 + 1, "FSM edge at end of address phase");
      check(dut.u_fsm.state.op == OP_WRITE_X && dut.u_fsm.state.core == 0, "FSM in DSP 1 input state");
      check(core_edges[0] == e0[0], "core not clocked in address phase");
      @(posedge clk); #1;
      check(dut.u_fsm.state.op == OP_IDLE, "FSM back to IDLE");
      check(dut.g_core[0].u_core.x_reg == 16'h42DE, "DSP input holds 0x42DE");
      check(core_edges[0] == e0[0] + 1, "one core edge loads the input");
      idle(TAPS + 3);
      check(fsm_edges == f0 + 2, "FSM clocked exactly twice");
      if (fsm_edges == f0 + 2) n_fsm_two++;
      check(core_edges[0] == e0[0] + 1 + TAPS, "core clocked load + TAPS");
      ahb_read(addr(0, PORT_Y), d);
      check(d == 32'(exp_y), "y after 0x42DE");
    end

    // stream samples through all cores, alternating AHB and APB reads
    for (int n = 0; n < 12; n++)
      for (int c = 0; c < NUM_CORES; c++)
        push_sample(c, int'($urandom_range(0, 65535)) - 32768, (n + c) % 2 == 1);

    // overrun: a second sample while core 0 is busy is dropped and flagged
    begin
      int exp_y;
      exp_y = ref_push(0, 1234);
      ahb_write(addr(0, PORT_X), 32'd1234);
      ahb_write(addr(0, PORT_X), 32'd999);       // dropped
      idle(TAPS);
      ahb_read(addr(0, PORT_STATUS), d);
      check(d[ST_OVERRUN] == 1'b1, "overrun flagged");
      if (d[ST_OVERRUN]) n_overrun++;
      ahb_read(addr(0, PORT_STATUS), d);
      check(d[ST_OVERRUN] == 1'b0, "overrun cleared by status read");
      apb_read(addr(0, PORT_Y), d);
      check(d == 32'(exp_y), "dropped sample did not enter the filter");
    end

    // two cores working at the same time
    begin
      int y1, y2;
      y1 = ref_push(1, -20000);
      y2 = ref_push(2, 30000);
      ahb_write(addr(1, PORT_X), 32'(-20000));
      ahb_write(addr(2, PORT_X), 32'd30000);
      check(dut.core_busy[1] && dut.core_busy[2], "two cores busy together");
      if (dut.core_busy[1] && dut.core_busy[2]) n_concurrent++;
      idle(TAPS + 2);
      ahb_read(addr(1, PORT_Y), d); check(d == 32'(y1), "concurrent core 2 output");
      ahb_read(addr(2, PORT_Y), d); check(d == 32'(y2), "concurrent core 3 output");
    end

    // pipelined transfers: samples to all cores back to back, then the three
    // outputs read back to back; each data phase overlaps the next address
    begin
      int ey [NUM_CORES];
      logic [31:0] rd [NUM_CORES];
      for (int c = 0; c < NUM_CORES; c++) e0[c] = core_edges[c];
      f0 = fsm_edges;
      for (int c = 0; c <= NUM_CORES; c++) begin
        if (c < NUM_CORES) begin
          ey[c] = ref_push(c, 1000 * (c + 1) - 2500);
          HSEL = 1; HWRITE = 1; HTRANS = HTRANS_NONSEQ; HADDR = addr(c, PORT_X);
        end else bus_idle();
        if (c > 0) HWDATA = 32'(1000 * c - 2500);
        @(posedge clk); #1;
      end
      check(fsm_edges == f0 + NUM_CORES + 1, "FSM runs continuously through a pipelined sequence");
      for (int c = 0; c < NUM_CORES; c++)
        check(core_edges[c] == e0[c] + 1 + (NUM_CORES - 1 - c),
              "each core loaded by one edge, then working");
      idle(TAPS + 2);
      for (int c = 0; c <= NUM_CORES; c++) begin
        if (c < NUM_CORES) begin
          HSEL = 1; HWRITE = 0; HTRANS = HTRANS_NONSEQ; HADDR = addr(c, PORT_Y);
        end else bus_idle();
        if (c > 0) begin @(negedge clk); rd[c-1] = HRDATA; end
        @(posedge clk); #1;
      end
      for (int c = 0; c < NUM_CORES; c++)
        check(rd[c] == 32'(ey[c]), $sformatf("pipelined read core %0d", c));
      if (rd[NUM_CORES-1] == 32'(ey[NUM_CORES-1])) n_pipelined++;
    end

    // PMU mode: always-on keeps the core clock running while idle
    ahb_read(addr(2, PORT_STATUS, 0, int'(PMU_ALWAYS)), d);
    idle(2);
    e0[2] = core_edges[2];
    idle(10);
    check(core_edges[2] == e0[2] + 10, "PMU always-on: clock runs while idle");
    if (core_edges[2] == e0[2] + 10) n_pmu++;
    ahb_read(addr(2, PORT_STATUS, 0, int'(PMU_GATED)), d);
    idle(2);
    e0[2] = core_edges[2];
    idle(10);
    check(core_edges[2] == e0[2], "PMU gated again: clock stopped");
    push_sample(2, 777, 1'b0);

    // transfers the interface does not serve: no clocks, reads return zero
    f0 = fsm_edges;
    for (int c = 0; c < NUM_CORES; c++) e0[c] = core_edges[c];
    ahb_write(32'hAC00_0000, 32'd5);            // core 4 does not exist
    ahb_write(addr(1, PORT_Y), 32'd5);          // output is read-only
    ahb_read(addr(1, PORT_X), d);
    check(d == 0, "read of an input returns zero");
    idle(3);
    check(fsm_edges == f0, "ignored transfers do not clock the FSM");
    for (int c = 0; c < NUM_CORES; c++)
      check(core_edges[c] == e0[c], "ignored transfers do not clock a core");
    if (fsm_edges == f0) n_ignored++;

    $display("mechanisms: gated_idle=%0d fsm_two_edges=%0d burst=%0d ahb_read=%0d apb_read=%0d overrun=%0d concurrent=%0d pmu=%0d ignored=%0d latency=%0d pipelined=%0d",
             n_gated_idle, n_fsm_two, n_burst, n_ahb, n_apb, n_overrun, n_concurrent, n_pmu, n_ignored, n_latency, n_pipelined);
    check(n_gated_idle > 0, "mechanism: idle clock gating");
    check(n_fsm_two > 0,    "mechanism: two FSM edges per transfer");
    check(n_burst > 0,      "mechanism: burst");
    check(n_ahb > 0,        "mechanism: AHB read");
    check(n_apb > 0,        "mechanism: APB read");
    check(n_overrun > 0,    "mechanism: overrun");
    check(n_concurrent > 0, "mechanism: concurrent cores");
    check(n_pmu > 0,        "mechanism: PMU always-on");
    check(n_ignored > 0,    "mechanism: ignored transfer");
    check(n_latency > 0,    "mechanism: one-cycle output latency");
    check(n_pipelined > 0,  "mechanism: pipelined transfers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
