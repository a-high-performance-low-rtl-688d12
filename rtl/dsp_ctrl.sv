// Control unit of the FIR core. Three states:
//   INIT  after reset: sweeps the tap counter once and writes zero into every
//         partial-sum entry, so the filter starts from an empty delay line.
//   IDLE  waits for load_x (a new sample x(n) from the bus interface).
//   RUN   one tap per clock: at tap k the multiply-add result is
//         h[k]*x(n) + s[k+1]; at k = 0 it is the output y(n) (y_we), for
//         k > 0 it replaces partial sum s[k] (psum_we). After the last tap
//         the core returns to IDLE.
// busy is high in INIT and RUN; the clock controller keeps the core clock
// running while it is set. A sample offered while busy is dropped and sets
// the sticky overrun flag, cleared by a status read (rd_status). y_new is set
// when y(n) is written and cleared by an output read (rd_y). All outputs are
// decoded from the registered state and counter flags; the registers run on
// the gated core clock with an asynchronous active-high reset.
//
// The reference core has a control block but does not describe it; the three
// states, the clearing sweep and the flags are this design's choices.
module dsp_ctrl (
  input  logic clk,
  input  logic reset,
  input  logic load_x,
  input  logic rd_y,
  input  logic rd_status,
  input  logic cnt_zero,
  input  logic cnt_last,
  output logic cnt_en,
  output logic cnt_clear,
  output logic x_we,
  output logic psum_we,
  output logic psum_zero,
  output logic y_we,
  output logic busy,
  output logic y_new,
  output logic overrun
);
  typedef enum logic [1:0] {S_INIT, S_IDLE, S_RUN} state_e;
  state_e state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= S_INIT;
    end else begin
      unique case (state)
        S_INIT:  if (cnt_last) state <= S_IDLE;
        S_IDLE:  if (load_x)   state <= S_RUN;
        S_RUN:   if (cnt_last) state <= S_IDLE;
        default: state <= S_INIT;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    cnt_en    = busy;
    cnt_clear = (state == S_IDLE);
    x_we      = (state == S_IDLE) && load_x;
    psum_we   = busy && !cnt_zero;
    psum_zero = (state == S_INIT);
    y_we      = (state == S_RUN) && cnt_zero;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      y_new   <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (y_we)      y_new <= 1'b1;
      else if (rd_y) y_new <= 1'b0;
      if (load_x && busy) overrun <= 1'b1;
      else if (rd_status) overrun <= 1'b0;
    end
  end
endmodule
