// Testbench of dsp_ctrl. A tap counter is modelled here and fed back to the
// controller. Checks the reset-time clearing sweep (busy and psum_zero for
// TAPS cycles), the per-sample sweep (x_we on the load, y_we at tap 0,
// psum_we at taps 1..TAPS-1, busy for exactly TAPS cycles), the new-output
// flag and the overrun flag with their clear conditions.
module tb_dsp_ctrl;
  localparam int TAPS = 8;
  logic clk = 0, reset, load_x, rd_y, rd_status, cnt_zero, cnt_last;
  logic cnt_en, cnt_clear, x_we, psum_we, psum_zero, y_we, busy, y_new, overrun;
  int k = 0;
  int checks = 0, failures = 0;

  dsp_ctrl dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge reset)
    if (reset)          k <= 0;
    else if (cnt_clear) k <= 0;
    else if (cnt_en)    k <= (k == TAPS - 1) ? 0 : k + 1;
  assign cnt_zero = (k == 0);
  assign cnt_last = (k == TAPS - 1);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (k=%0d t=%0t)", s, k, $time); end
  endtask

  task automatic sample();
    @(negedge clk); load_x = 1; #1;
    chk(x_we && !busy, "x_we on load while idle");
    @(negedge clk); load_x = 0;
    for (int i = 0; i < TAPS; i++) begin
      chk(busy, "busy during sweep");
      chk(y_we == (i == 0), "y_we only at tap 0");
      chk(psum_we == (i != 0) && !psum_zero, "psum_we at taps 1..TAPS-1");
      if (i == 1) chk(y_new, "y_new set after y_we");
      @(negedge clk);
    end
    chk(!busy, "idle after TAPS cycles");
  endtask

  initial begin
    reset = 1; load_x = 0; rd_y = 0; rd_status = 0;
    @(negedge clk); reset = 0;
    for (int i = 0; i < TAPS; i++) begin
      chk(busy && psum_zero && !y_we, "clearing after reset");
      chk(psum_we == (i != 0), "clearing writes taps 1..TAPS-1");
      @(negedge clk);
    end
    chk(!busy && !y_new && !overrun, "idle after clearing");
    sample();
    chk(y_new, "y_new held");
    rd_y = 1; @(negedge clk); rd_y = 0;
    chk(!y_new, "y_new cleared by read");
    // overrun: a load while busy
    @(negedge clk); load_x = 1;
    @(negedge clk);
    chk(busy && !x_we, "load while busy not taken");
    @(negedge clk); load_x = 0;
    chk(overrun, "overrun set");
    repeat (TAPS) @(negedge clk);
    chk(overrun && !busy, "overrun sticky");
    rd_status = 1; @(negedge clk); rd_status = 0;
    chk(!overrun, "overrun cleared by status read");
    sample();
    sample();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
