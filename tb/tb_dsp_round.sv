// Testbench of dsp_round: rounding half up after a 15-bit shift and
// saturation to 16 bits, against a reference computed with 64-bit integers.
module tb_dsp_round;
  localparam int ACC_W = 36, DW = 16, FRAC = 15;
  logic signed [ACC_W-1:0] acc;
  logic signed [DW-1:0]    y;
  int checks = 0, failures = 0;

  dsp_round #(.ACC_W(ACC_W), .DW(DW), .FRAC(FRAC)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input longint a);
    longint r;
    acc = ACC_W'(a);
    #1;
    r = (a + 16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    checks++;
    if (longint'(y) != r) begin
      failures++;
      $display("FAIL: acc=%0d y=%0d expected %0d", a, y, r);
    end
  endtask

  initial begin
    try(0); try(16383); try(16384); try(-16384); try(-16385); try(32768);
    try(32767 * 32768); try(32767 * 32768 + 16384); try(-32768 * 32768); try(-32768 * 32768 - 1);
    try(64'sd1 <<< 34); try(-(64'sd1 <<< 35));
    for (int i = 0; i < 500; i++) try((longint'($urandom()) - 64'sd2147483648) * longint'($urandom_range(1, 16)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
