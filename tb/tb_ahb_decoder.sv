// Testbench of ahb_decoder. Checks the look-ahead next state for every port,
// direction and core index (including cores that do not exist, IDLE/BUSY
// transfers, unselected and over-wide transfers), the core request and PMU
// outputs, and the gating of the FSM clock: g_clk_0 has an edge exactly in
// the cycles where a transfer is decoded or the FSM reports it is active.
module tb_ahb_decoder;
  import amba_if_pkg::*;
  localparam int NUM_CORES = 3;
  logic                 clk = 0, reset, HSEL, HWRITE, fsm_active;
  logic [31:0]          HADDR;
  logic [1:0]           HTRANS;
  logic [2:0]           HSIZE, HBURST;
  fsm_state_t           next_state;
  logic                 g_clk_0;
  logic [NUM_CORES-1:0] core_req;
  logic                 pmu_we;
  logic [1:0]           pmu_core;
  pmu_e                 pmu_mode;
  int checks = 0, failures = 0, gclk_edges = 0;

  ahb_decoder #(.NUM_CORES(NUM_CORES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge g_clk_0) gclk_edges++;

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
    reset = 0; HSEL = 0; HWRITE = 0; HTRANS = HTRANS_IDLE; HSIZE = 3'd2; HBURST = 0;
    HADDR = 0; fsm_active = 0;
    for (int n = 0; n < 2000; n++) begin
      int core, port, tap, pmu, e0;
      bit sel, wr, active, valid_tr, size_ok;
      op_e exp_op;
      @(negedge clk);
      core = int'($urandom_range(0, 3)); port = int'($urandom_range(0, 3));
      tap = int'($urandom_range(0, 255)); pmu = int'($urandom_range(0, 1));
      sel = ($urandom_range(0, 7) != 0); wr = 1'($urandom_range(0, 1));
      active = ($urandom_range(0, 3) == 0);
      HSEL = sel; HWRITE = wr; fsm_active = active;
      HTRANS = 2'($urandom_range(0, 3));
      HSIZE = ($urandom_range(0, 9) == 0) ? 3'd3 : 3'($urandom_range(0, 2));
      HBURST = 3'($urandom_range(0, 7));
      HADDR = {4'hA, 2'(core), 2'(port), 8'($urandom), 2'b0, 2'(pmu), 2'b0, 8'(tap), 2'b0};
      #1;
      valid_tr = sel && HTRANS[1] && HSIZE <= 2 && core < NUM_CORES;
      exp_op = OP_IDLE;
      if (valid_tr)
        case (port)
          3: exp_op = wr ? OP_WRITE_X : OP_IDLE;
          2: exp_op = wr ? OP_WRITE_H : OP_IDLE;
          1: exp_op = wr ? OP_IDLE : OP_READ_Y;
          0: exp_op = wr ? OP_IDLE : OP_READ_ST;
        endcase
      chk(next_state.op == exp_op, $sformatf("op %0d expected %0d", next_state.op, exp_op));
      if (exp_op != OP_IDLE)
        chk(int'(next_state.core) == core && int'(next_state.tap) == tap, "core and tap");
      else
        chk(next_state == FSM_IDLE, "idle next state");
      chk(core_req == ((exp_op != OP_IDLE) ? NUM_CORES'(1 << core) : '0), "core request");
      chk(pmu_we == valid_tr, "PMU update only on a taken transfer");
      if (valid_tr) chk(int'(pmu_core) == core && int'(pmu_mode) == pmu, "PMU core and mode");
      e0 = gclk_edges;
      @(posedge clk); #1;
      chk(gclk_edges == e0 + ((exp_op != OP_IDLE || active) ? 1 : 0), "FSM clock gating");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
