// Testbench of dsp_ram: writes random words, reads them back through the
// asynchronous port, checks that a write without we changes nothing and
// that out-of-range addresses read zero and are not written.
module tb_dsp_ram;
  localparam int DEPTH = 15, WIDTH = 36, AW = 4;
  logic             clk = 0, we;
  logic [AW-1:0]    waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dsp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = AW'(i); wdata = WIDTH'({$urandom(), $urandom()}); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i); #1; chk(rdata == model[i], $sformatf("read %0d", i));
    end
    for (int n = 0; n < 200; n++) begin
      int a;
      a = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk); we = 1'($urandom_range(0, 1)); waddr = AW'(a); wdata = WIDTH'({$urandom(), $urandom()});
      if (we) model[a] = wdata;
      @(negedge clk); we = 0;
      raddr = AW'($urandom_range(0, DEPTH - 1)); #1;
      chk(rdata == model[raddr], "random read");
    end
    @(negedge clk); we = 1; waddr = AW'(DEPTH); wdata = '1;
    @(negedge clk); we = 0; raddr = AW'(DEPTH); #1;
    chk(rdata == '0, "out-of-range read is zero");
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i); #1; chk(rdata == model[i], "out-of-range write touched nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
