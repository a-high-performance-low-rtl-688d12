// Testbench of dsp_counter: counting with random enable, wrap after MAX-1,
// clear, and the zero/last flags, against a counter model kept here.
module tb_dsp_counter;
  localparam int MAX = 16, W = 4;
  logic         clk = 0, reset, clear, en;
  logic [W-1:0] count;
  logic         zero, last;
  int model = 0;
  int checks = 0, failures = 0, wraps = 0;

  dsp_counter #(.MAX(MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s count=%0d model=%0d", s, count, model); end
  endtask

  initial begin
    reset = 1; clear = 0; en = 0;
    @(negedge clk); reset = 0;
    chk(count == 0 && zero && !last, "reset value");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) begin
        if (model == MAX - 1) wraps++;
        model = (model == MAX - 1) ? 0 : model + 1;
      end
      #1;
      chk(int'(count) == model, "count");
      chk(zero == (model == 0) && last == (model == MAX - 1), "flags");
    end
    chk(wraps > 0, "wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
