// clk_div: clock-enable generator that mimics a clock divided by CLKDIV.
//
// No new clock is produced. A counter runs on the fast clock from 0 to
// y = CLKDIV-1 and wraps. When it reaches x (parameter X) the generator goes
// to state RE for one cycle, when it reaches y it goes to state FE,
// otherwise it rests in IDLE (the three states of the design's clock divider).
// The outputs re and fe are therefore one-cycle pulses, each repeating every
// CLKDIV cycles: the rising and falling edge of a clock of f_in/CLKDIV. With
// the default X = CLKDIV/2-1 they are CLKDIV/2 cycles apart (50 % duty
// cycle, y + 1 = 2(x + 1)); another X moves the rising edge. Other modules
// use the pulses as clock enables.
//
// Only even division factors are legal, as in the design; an odd or too small
// CLKDIV stops elaboration with an error. Tying y to CLKDIV-1, the default
// of x and the synchronous active-high reset are choices
// of this implementation. After reset the first re comes X+1 cycles and the
// first fe CLKDIV cycles after rst is released.
module clk_div #(
  parameter int unsigned CLKDIV = 2,
  parameter int unsigned X      = CLKDIV / 2 - 1   // counter value that gives re
) (
  input  logic clk,
  input  logic rst,
  output logic re,
  output logic fe
);

  if (CLKDIV < 2 || (CLKDIV % 2) != 0) begin : g_bad_div
    $error("clk_div: CLKDIV must be an even number >= 2, got %0d", CLKDIV);
  end
  if (X >= CLKDIV - 1) begin : g_bad_x
    $error("clk_div: X must be below CLKDIV-1");
  end

  localparam int unsigned CW = (CLKDIV > 2) ? $clog2(CLKDIV) : 1;
  localparam logic [CW-1:0] XV = CW'(X);
  localparam logic [CW-1:0] Y  = CW'(CLKDIV - 1);

  typedef enum logic [1:0] {CD_IDLE, CD_RE, CD_FE} cd_state_e;

  logic [CW-1:0] cnt;
  cd_state_e     state;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      state <= CD_IDLE;
    end else begin
      cnt <= (cnt == Y) ? '0 : cnt + 1'b1;
      if (cnt == XV)     state <= CD_RE;
      else if (cnt == Y) state <= CD_FE;
      else               state <= CD_IDLE;
    end
  end

  assign re = (state == CD_RE);
  assign fe = (state == CD_FE);

endmodule
