// FIR filter DSP IP core in transposed direct form with a single, time-shared
// multiply-add unit.
//
// Transposed direct form for TAPS coefficients h[0..TAPS-1]:
//   y(n)   = h[0]*x(n) + s[1]
//   s[k]  <= h[k]*x(n) + s[k+1]   for k = 1 .. TAPS-2
//   s[TAPS-1] <= h[TAPS-1]*x(n)
// The new sample x(n) is held in a register and stays on one multiplier input
// while the tap counter steps the coefficient on the other, so one sample
// costs TAPS clock cycles: y(n) is ready one cycle after the sample is
// loaded (tap 0) and the remaining TAPS-1 cycles update the partial sums, in
// ascending k so that s[k+1] is read before it is overwritten.
//
// Sub-blocks follow the area breakdown of the reference core: mac
// (dsp_mac), ram (dsp_ram: coefficients and partial sums), ctrl (dsp_ctrl),
// counter (dsp_counter), round (dsp_round) and the output register reg_out.
// Coefficients are Q(DW-1) fractions, samples and outputs DW-bit integers;
// the output is rounded and saturated.
//
// Interface (all on the gated core clock g_clk, asynchronous active-high
// reset): load_x with x_in loads a sample, load_h with h_in and h_tap writes
// one coefficient (a tap number of TAPS or more is ignored), rd_y/rd_status mark that the bus read the output/status
// (they clear the new-output/overrun flags). busy asks the clock controller to
// keep g_clk running. After reset the core spends TAPS cycles clearing its
// partial sums (busy high).
//
// The transposed direct form with the sample held at the multiplier comes
// from the reference; the single time-shared MAC, the number formats, the
// reset-time clearing and the flags are this design's choices.
module dsp_core #(
  parameter int DW    = 16,
  parameter int TAPS  = 16,
  parameter int TAP_W = 8
) (
  input  logic             g_clk,
  input  logic             reset,
  input  logic             load_x,
  input  logic [DW-1:0]    x_in,
  input  logic             load_h,
  input  logic [DW-1:0]    h_in,
  input  logic [TAP_W-1:0] h_tap,
  input  logic             rd_y,
  input  logic             rd_status,
  output logic [DW-1:0]    y_out,
  output logic             busy,
  output logic             y_new,
  output logic             overrun
);
  localparam int ACC_W = 2*DW + $clog2(TAPS);
  localparam int CW    = $clog2(TAPS);
  localparam int PS_D  = TAPS - 1;
  localparam int PS_AW = (PS_D > 1) ? $clog2(PS_D) : 1;

  logic [CW-1:0]           k;
  logic                    cnt_zero, cnt_last, cnt_en, cnt_clear;
  logic                    x_we, psum_we, psum_zero, y_we;
  logic signed [DW-1:0]    x_reg;
  logic signed [DW-1:0]    coef;
  logic [ACC_W-1:0]        psum_rd;
  logic signed [ACC_W-1:0] addend, mac_sum;
  logic signed [DW-1:0]    y_rounded;

  dsp_ctrl u_ctrl (
    .clk(g_clk), .reset, .load_x, .rd_y, .rd_status,
    .cnt_zero, .cnt_last, .cnt_en, .cnt_clear, .x_we, .psum_we, .psum_zero,
    .y_we, .busy, .y_new, .overrun
  );

  dsp_counter #(.MAX(TAPS)) u_counter (
    .clk(g_clk), .reset, .clear(cnt_clear), .en(cnt_en),
    .count(k), .zero(cnt_zero), .last(cnt_last)
  );

  // Sample register: held for all TAPS products of one sample
  always_ff @(posedge g_clk or posedge reset) begin
    if (reset)     x_reg <= '0;
    else if (x_we) x_reg <= x_in;
  end

  dsp_ram #(.DEPTH(TAPS), .WIDTH(DW)) u_coef_ram (
    .clk(g_clk), .we(load_h && (32'(h_tap) < TAPS)), .waddr(CW'(h_tap)), .wdata(h_in),
    .raddr(k), .rdata(coef)
  );

  // Partial sum s[j] (j = 1 .. TAPS-1) lives at address j-1: tap k reads
  // s[k+1] at address k and writes s[k] at address k-1.
  dsp_ram #(.DEPTH(PS_D), .WIDTH(ACC_W)) u_psum_ram (
    .clk(g_clk), .we(psum_we), .waddr(PS_AW'(k - 1'b1)),
    .wdata(psum_zero ? '0 : mac_sum),
    .raddr(PS_AW'(k)), .rdata(psum_rd)
  );

  assign addend = cnt_last ? '0 : signed'(psum_rd);

  dsp_mac #(.DW(DW), .ACC_W(ACC_W)) u_mac (
    .coef, .sample(x_reg), .addend, .sum(mac_sum)
  );

  dsp_round #(.ACC_W(ACC_W), .DW(DW), .FRAC(DW-1)) u_round (
    .acc(mac_sum), .y(y_rounded)
  );

  // reg_out: output register y(n)
  always_ff @(posedge g_clk or posedge reset) begin
    if (reset)     y_out <= '0;
    else if (y_we) y_out <= y_rounded;
  end

  initial begin
    assert (TAPS >= 3 && 2**TAP_W >= TAPS)
      else $error("dsp_core: TAPS must be at least 3 and fit in TAP_W bits");
  end
endmodule
