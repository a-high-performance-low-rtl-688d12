// Testbench of dsp_core at its default size (16 taps, 16-bit data). Loads
// random Q15 coefficients, feeds random samples and compares every output
// with a direct-form FIR sum over the sample history computed here; checks
// that y(n) appears one cycle after the load and that busy lasts TAPS
// cycles, that the reset-time clearing takes TAPS cycles, that a tap number
// beyond the filter is ignored and that a sample offered while busy is
// dropped and flagged. The core clock runs freely here.
module tb_dsp_core;
  localparam int DW = 16, TAPS = 16, TAP_W = 8;
  logic             g_clk = 0, reset, load_x, load_h, rd_y, rd_status;
  logic [DW-1:0]    x_in, h_in, y_out;
  logic [TAP_W-1:0] h_tap;
  logic             busy, y_new, overrun;
  int coef [TAPS];
  int hist [TAPS];
  int checks = 0, failures = 0;

  dsp_core #(.DW(DW), .TAPS(TAPS), .TAP_W(TAP_W)) dut (.*);
  always #5 g_clk = ~g_clk;

  initial begin : watchdog
    repeat (20000) @(posedge g_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  function automatic int ref_push(input int x);
    longint acc = 0, r;
    for (int i = TAPS-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    for (int i = 0; i < TAPS; i++) acc += longint'(coef[i]) * longint'(hist[i]);
    r = (acc + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic push(input int x);
    int e;
    e = ref_push(x);
    @(negedge g_clk); load_x = 1; x_in = DW'(x);
    @(negedge g_clk); load_x = 0;
    chk(busy, "busy after the load");
    @(negedge g_clk);
    chk(y_out == DW'(e), $sformatf("y=%0d expected %0d", $signed(y_out), e));
    chk(y_new, "new output flagged one cycle after the load");
    for (int i = 2; i <= TAPS; i++) begin
      chk(busy, "busy while taps remain");
      @(negedge g_clk);
    end
    chk(!busy, "idle after TAPS cycles");
    rd_y = 1; @(negedge g_clk); rd_y = 0;
    chk(!y_new, "new output flag cleared");
  endtask

  initial begin
    int cyc;
    reset = 1; load_x = 0; load_h = 0; rd_y = 0; rd_status = 0; x_in = 0; h_in = 0; h_tap = 0;
    for (int i = 0; i < TAPS; i++) hist[i] = 0;
    @(negedge g_clk); reset = 0;
    cyc = 0;
    while (busy) begin @(negedge g_clk); cyc++; end
    chk(cyc == TAPS, $sformatf("clearing took %0d cycles", cyc));
    for (int i = 0; i < TAPS; i++) begin
      coef[i] = int'($urandom_range(0, 32767)) - 16384;
      @(negedge g_clk); load_h = 1; h_tap = TAP_W'(i); h_in = DW'(coef[i]);
    end
    @(negedge g_clk); load_h = 1; h_tap = TAP_W'(TAPS); h_in = 16'h7FFF;  // ignored
    @(negedge g_clk); load_h = 0;
    // an impulse reproduces the coefficients (rounded)
    push(32767);
    for (int i = 1; i < TAPS + 2; i++) push(0);
    for (int n = 0; n < 60; n++) push(int'($urandom_range(0, 65535)) - 32768);
    // overrun
    begin
      int e;
      e = ref_push(100);
      @(negedge g_clk); load_x = 1; x_in = 16'd100;
      @(negedge g_clk); x_in = 16'd555;
      @(negedge g_clk); load_x = 0;
      chk(overrun, "overrun flagged");
      repeat (TAPS) @(negedge g_clk);
      chk(y_out == DW'(e), "dropped sample left out");
      rd_status = 1; @(negedge g_clk); rd_status = 0;
      chk(!overrun, "overrun cleared");
    end
    for (int n = 0; n < 20; n++) push(int'($urandom_range(0, 65535)) - 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
