// Testbench of apb_decoder: random APB setup and access phases; checks PRDATA
// (sign-extended output or status word, zero otherwise), that writes are
// ignored, and that clock request and read strobes appear only in the access
// phase of a read of an existing core's output or status.
module tb_apb_decoder;
  import amba_if_pkg::*;
  localparam int NUM_CORES = 3, DW = 16;
  logic                 PSEL, PENABLE, PWRITE;
  logic [31:0]          PADDR, PRDATA;
  logic [NUM_CORES-1:0] apb_req, rd_y, rd_status;
  logic [DW-1:0]        core_y      [NUM_CORES];
  logic [2:0]           core_status [NUM_CORES];
  int checks = 0, failures = 0;

  apb_decoder #(.NUM_CORES(NUM_CORES), .DW(DW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", s, $time); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int core, port;
      bit rd;
      logic [31:0] expd;
      core = int'($urandom_range(0, 3)); port = int'($urandom_range(0, 3));
      PSEL = ($urandom_range(0, 5) != 0); PENABLE = 1'($urandom_range(0, 1)); PWRITE = 1'($urandom_range(0, 1));
      PADDR = {4'hA, 2'(core), 2'(port), 24'($urandom)};
      for (int c = 0; c < NUM_CORES; c++) begin
        core_y[c] = DW'($urandom); core_status[c] = 3'($urandom);
      end
      #1;
      rd = PSEL && !PWRITE && core < NUM_CORES && (port == 1 || port == 0);
      expd = 0;
      if (rd) expd = (port == 1) ? {{(32-DW){core_y[core][DW-1]}}, core_y[core]} : {29'b0, core_status[core]};
      chk(PRDATA == expd, "PRDATA");
      chk(apb_req == ((rd && PENABLE) ? NUM_CORES'(1 << core) : '0), "clock request in access phase");
      chk(rd_y == ((rd && PENABLE && port == 1) ? NUM_CORES'(1 << core) : '0), "rd_y");
      chk(rd_status == ((rd && PENABLE && port == 0) ? NUM_CORES'(1 << core) : '0), "rd_status");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
