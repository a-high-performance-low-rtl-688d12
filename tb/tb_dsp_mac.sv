// Testbench of dsp_mac: random and corner operands, result compared with
// 64-bit integer arithmetic computed here.
module tb_dsp_mac;
  localparam int DW = 16, ACC_W = 36;
  logic signed [DW-1:0]    coef, sample;
  logic signed [ACC_W-1:0] addend, sum;
  int checks = 0, failures = 0;

  dsp_mac #(.DW(DW), .ACC_W(ACC_W)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input longint c, input longint s, input longint a);
    longint expv;
    coef = DW'(c); sample = DW'(s); addend = ACC_W'(a);
    #1;
    expv = c * s + a;
    checks++;
    if (longint'(sum) != expv) begin
      failures++;
      $display("FAIL: %0d*%0d+%0d = %0d, expected %0d", c, s, a, sum, expv);
    end
  endtask

  initial begin
    try(-32768, -32768, 0);
    try(32767, -32768, -(64'sd1 <<< 34));
    try(0, 12345, 77);
    try(-1, 1, -1);
    for (int i = 0; i < 500; i++)
      try(longint'($urandom_range(0, 65535)) - 32768, longint'($urandom_range(0, 65535)) - 32768,
          (longint'($urandom()) - 64'sd2147483648) * 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
