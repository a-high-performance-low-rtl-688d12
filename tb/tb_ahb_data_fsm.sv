// Testbench of ahb_data_fsm. Clocks the FSM with random next states and
// checks, for each data-phase state, the load and read strobes, the routed
// write data and tap, the HRDATA mux (sign-extended output, status word)
// and fsm_active; also that the state only changes on a g_clk_0 edge.
module tb_ahb_data_fsm;
  import amba_if_pkg::*;
  localparam int NUM_CORES = 3, DW = 16;
  logic                 g_clk_0 = 0, reset, fsm_active;
  fsm_state_t           next_state;
  logic [31:0]          HWDATA, HRDATA;
  logic [DW-1:0]        din;
  logic [TAP_W-1:0]     tap;
  logic [NUM_CORES-1:0] load_x, load_h, rd_y, rd_status;
  logic [DW-1:0]        core_y      [NUM_CORES];
  logic [2:0]           core_status [NUM_CORES];
  int checks = 0, failures = 0;

  ahb_data_fsm #(.NUM_CORES(NUM_CORES), .DW(DW)) dut (.*);

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    fsm_state_t s, prev;
    reset = 1; next_state = FSM_IDLE; HWDATA = 0;
    for (int c = 0; c < NUM_CORES; c++) begin core_y[c] = 0; core_status[c] = 0; end
    #1 reset = 0;
    prev = FSM_IDLE;
    #1 chk(!fsm_active && HRDATA == 0 && load_x == 0, "idle after reset");
    for (int n = 0; n < 1000; n++) begin
      s.op = op_e'($urandom_range(0, 4));
      s.core = 2'($urandom_range(0, NUM_CORES - 1));
      s.tap = TAP_W'($urandom);
      next_state = s;
      #1 chk(dut.state == prev, "no change without a clock");
      prev = s;
      g_clk_0 = 1; #1 g_clk_0 = 0;
      HWDATA = $urandom;
      for (int c = 0; c < NUM_CORES; c++) begin
        core_y[c] = DW'($urandom); core_status[c] = 3'($urandom);
      end
      next_state = FSM_IDLE;   // must not matter until the next edge
      #1;
      chk(fsm_active == (s.op != OP_IDLE), "fsm_active");
      chk(din == HWDATA[DW-1:0], "write data routed");
      chk(load_x == ((s.op == OP_WRITE_X) ? NUM_CORES'(1 << s.core) : '0), "load_x");
      chk(load_h == ((s.op == OP_WRITE_H) ? NUM_CORES'(1 << s.core) : '0), "load_h");
      chk(rd_y == ((s.op == OP_READ_Y) ? NUM_CORES'(1 << s.core) : '0), "rd_y");
      chk(rd_status == ((s.op == OP_READ_ST) ? NUM_CORES'(1 << s.core) : '0), "rd_status");
      if (s.op == OP_WRITE_H) chk(tap == s.tap, "tap routed");
      case (s.op)
        OP_READ_Y:  chk(HRDATA == {{(32-DW){core_y[s.core][DW-1]}}, core_y[s.core]}, "HRDATA y sign-extended");
        OP_READ_ST: chk(HRDATA == {29'b0, core_status[s.core]}, "HRDATA status");
        default:    chk(HRDATA == 0, "HRDATA zero");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
